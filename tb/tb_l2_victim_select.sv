// tb_l2_victim_select: random L2 set states against a reference of the TCOR
// priority (invalid, dead PB line, non-PB line, live PB line; LRU inside).
module tb_l2_victim_select;
  import tcor_pkg::*;
  int checks = 0, failures = 0;
  localparam int W = 8;
  logic [W-1:0] valid, dead;
  pb_type_e pb [W];
  tile_t last_tile [W];
  logic [2:0] age [W];
  logic [TILE_W:0] tiles_done;
  logic [2:0] victim;
  logic victim_dead;

  l2_victim_select #(.WAYS(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rank(int w);
    if (!valid[w]) return 3;
    if (pb[w] != PB_NONE && int'(last_tile[w]) < int'(tiles_done)) return 2;
    if (pb[w] == PB_NONE) return 1;
    return 0;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int br, ba, bw; int perm [8];
      for (int w = 0; w < W; w++) perm[w] = w;
      perm.shuffle();
      valid = (n % 4 == 0) ? 8'($urandom) : 8'hFF;
      tiles_done = 13'($urandom_range(0, 20));
      for (int w = 0; w < W; w++) begin
        pb[w] = pb_type_e'($urandom_range(0, 2));
        last_tile[w] = tile_t'($urandom_range(0, 20));
        age[w] = 3'(perm[w]);
      end
      #1;
      br = -1; ba = -1; bw = 0;
      for (int w = 0; w < W; w++)
        if (rank(w) > br || (rank(w) == br && int'(age[w]) > ba)) begin
          br = rank(w); ba = int'(age[w]); bw = w;
        end
      checks++;
      if (int'(victim) != bw || victim_dead != (br == 2)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d victim %0d exp %0d", n, victim, bw);
      end
      for (int w = 0; w < W; w++) begin
        checks++;
        if (dead[w] != (rank(w) == 2)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
