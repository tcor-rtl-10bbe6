// l2_victim_select: replacement choice for one L2 set with TCOR priorities.
//
// A line is dead when it holds Parameter Buffer data (PB-Lists or
// PB-Attributes) whose last reading tile has already been finished by the Tile
// Fetcher (last_tile < tiles_done). The victim is, in order of preference, an
// invalid way, a dead line, a line that is not Parameter Buffer data, and last
// a live Parameter Buffer line; inside a class the least recently used line
// (largest age) is taken. The priorities and LRU-within-class follow the
// document; the age encoding (0 = most recent) is this design's choice.
// Purely combinational.
module l2_victim_select
  import tcor_pkg::*;
#(
  parameter int WAYS = 8
) (
  input  logic [WAYS-1:0]             valid,
  input  pb_type_e                    pb   [WAYS],
  input  tile_t                       last_tile [WAYS],
  input  logic [$clog2(WAYS)-1:0]     age  [WAYS],
  input  logic [TILE_W:0]             tiles_done,  // tiles finished this frame
  output logic [$clog2(WAYS)-1:0]     victim,
  output logic                        victim_dead,
  output logic [WAYS-1:0]             dead         // per-way dead flag
);
  logic [1:0] cls [WAYS];   // 3 invalid, 2 dead, 1 non-PB, 0 live PB
  logic [1:0] best_cls;
  logic [$clog2(WAYS)-1:0] best_age;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      dead[w] = valid[w] && (pb[w] != PB_NONE) &&
                ({1'b0, last_tile[w]} < tiles_done);
      if (!valid[w])          cls[w] = 2'd3;
      else if (dead[w])       cls[w] = 2'd2;
      else if (pb[w] == PB_NONE) cls[w] = 2'd1;
      else                    cls[w] = 2'd0;
    end
    victim   = '0;
    best_cls = cls[0];
    best_age = age[0];
    for (int w = 1; w < WAYS; w++) begin
      if (cls[w] > best_cls || (cls[w] == best_cls && age[w] > best_age)) begin
        victim   = w[$clog2(WAYS)-1:0];
        best_cls = cls[w];
        best_age = age[w];
      end
    end
    victim_dead = (best_cls == 2'd2);
  end
endmodule
