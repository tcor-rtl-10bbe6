// tb_opt_victim_select: random set states against a reference model of OPT
// replacement (empty way first, else greatest OPT Number among unlocked ways,
// writes bypass unless that number is strictly greater than the request's).
module tb_opt_victim_select;
  import tcor_pkg::*;
  int checks = 0, failures = 0;
  localparam int W = 4;
  logic [W-1:0] valid, locked;
  tile_t opt [W];
  tile_t req_opt;
  logic is_write, has_free, has_cand, bypass;
  logic [1:0] free_way, cand_way;
  tile_t cand_opt;

  opt_victim_select #(.WAYS(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s v=%b l=%b", what, valid, locked);
    end
  endtask

  initial begin
    // Fig. 10 state before the third write: OPT Numbers 2 and 0, request 3 -> bypass
    valid = 4'b0011; locked = '0; opt = '{12'd2, 12'd0, 12'd0, 12'd0};
    req_opt = 12'd3; is_write = 1'b1;
    #1;
    // only two ways exist in that example: mark the other two as full and locked
    valid = 4'b1111; locked = 4'b1100;
    #1;
    check("fig10 bypass", bypass && has_cand && cand_way == 2'd0 && cand_opt == 12'd2);
    req_opt = 12'd1; #1;
    check("evict greater", !bypass && cand_way == 2'd0);
    req_opt = 12'd2; #1;
    check("tie bypasses", bypass);
    for (int n = 0; n < 5000; n++) begin
      logic ef, ec; logic [1:0] efw, ecw; tile_t eco; logic eb;
      valid = 4'($urandom); locked = 4'($urandom);
      for (int w = 0; w < W; w++) opt[w] = tile_t'($urandom_range(0, 7));
      req_opt = tile_t'($urandom_range(0, 7)); is_write = 1'($urandom);
      #1;
      ef = 0; efw = 0; ec = 0; ecw = 0; eco = 0;
      for (int w = 0; w < W; w++) if (!valid[w] && !ef) begin ef = 1; efw = 2'(w); end
      for (int w = 0; w < W; w++)
        if (valid[w] && !locked[w] && (!ec || opt[w] > eco)) begin ec = 1; ecw = 2'(w); eco = opt[w]; end
      eb = is_write && !ef && (!ec || eco <= req_opt);
      check("free", has_free == ef && (!ef || free_way == efw));
      check("cand", has_cand == ec && (!ec || (cand_way == ecw && cand_opt == eco)));
      check("bypass", bypass == eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
