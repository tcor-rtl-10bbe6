// opt_victim_select: replacement choice for one Primitive Buffer set.
//
// OPT replacement as the document gives it: an empty way is used first; with
// no empty way the candidate is the unlocked way with the greatest OPT Number
// (its next use is the farthest in the future). For a write from the Polygon
// List Builder the candidate is evicted only if its OPT Number is strictly
// greater than the request's; otherwise (smaller or equal) the write bypasses
// the cache and goes to the L2. Ties among equal OPT Numbers go to the lowest
// way (this design's choice). Purely combinational.
module opt_victim_select
  import tcor_pkg::*;
#(
  parameter int WAYS = 4
) (
  input  logic [WAYS-1:0]          valid,
  input  logic [WAYS-1:0]          locked,    // line lock or first-attribute lock
  input  tile_t                    opt [WAYS],
  input  tile_t                    req_opt,
  input  logic                     is_write,
  output logic                     has_free,
  output logic [$clog2(WAYS)-1:0]  free_way,
  output logic                     has_cand,  // an unlocked valid way exists
  output logic [$clog2(WAYS)-1:0]  cand_way,
  output tile_t                    cand_opt,
  output logic                     bypass     // write must go to L2
);
  always_comb begin
    has_free = 1'b0;
    free_way = '0;
    has_cand = 1'b0;
    cand_way = '0;
    cand_opt = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (!valid[w]) begin
        has_free = 1'b1;
        free_way = w[$clog2(WAYS)-1:0];
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (valid[w] && !locked[w] && (!has_cand || opt[w] > cand_opt)) begin
        has_cand = 1'b1;
        cand_way = w[$clog2(WAYS)-1:0];
        cand_opt = opt[w];
      end
    end
    bypass = is_write && !has_free && (!has_cand || cand_opt <= req_opt);
  end
endmodule
