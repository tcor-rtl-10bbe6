// tb_xor_index: checks the XOR set placement against an independent bitwise
// formula and checks that tag + set rebuild the original Primitive ID.
module tb_xor_index;
  int checks = 0, failures = 0;
  logic [15:0] id, id_out;
  logic [6:0]  set_idx;
  logic [8:0]  tag;

  xor_index #(.ID_W(16), .SET_W(7)) dut (
    .id, .set_idx, .tag, .inv_tag(tag), .inv_set(set_idx), .id_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp;
    for (int n = 0; n < 4000; n++) begin
      id = (n < 16) ? 16'(n * 4099) : 16'($urandom);
      #1;
      // id[6:0] ^ id[13:7] ^ {id[15:14]} placed at bits 1:0
      exp = id[6:0] ^ id[13:7] ^ {5'b0, id[15:14]};
      checks++;
      if (set_idx !== exp || tag !== id[15:7]) begin
        failures++;
        if (failures < 5) $display("id %h set %h exp %h", id, set_idx, exp);
      end
      checks++;
      if (id_out !== id) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
