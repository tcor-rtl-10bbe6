// xor_index: XOR-based set placement for the Primitive Buffer.
//
// The set index is the low SET_W bits of the Primitive ID XORed with the
// remaining high bits folded into SET_W-bit pieces; the tag is the high bits
// themselves. Because the fold depends only on the tag, the mapping can be
// inverted: id_out rebuilds a Primitive ID from a stored tag and its set, which
// the cache needs to address a primitive it writes back. XOR placement follows
// the document; the exact fold is this design's choice. Purely combinational.
module xor_index #(
  parameter int ID_W  = 16,
  parameter int SET_W = 7
) (
  input  logic [ID_W-1:0]       id,       // Primitive ID to place
  output logic [SET_W-1:0]      set_idx,  // its set
  output logic [ID_W-SET_W-1:0] tag,      // its tag
  input  logic [ID_W-SET_W-1:0] inv_tag,  // stored tag ...
  input  logic [SET_W-1:0]      inv_set,  // ... and the set it sits in
  output logic [ID_W-1:0]       id_out    // rebuilt Primitive ID
);
  localparam int TAG_W = ID_W - SET_W;

  function automatic logic [SET_W-1:0] fold(input logic [TAG_W-1:0] t);
    logic [SET_W-1:0] f;
    f = '0;
    for (int i = 0; i < TAG_W; i++) f[i % SET_W] ^= t[i];
    return f;
  endfunction

  always_comb begin
    tag     = id[ID_W-1:SET_W];
    set_idx = id[SET_W-1:0] ^ fold(id[ID_W-1:SET_W]);
    id_out  = {inv_tag, inv_set ^ fold(inv_tag)};
  end
endmodule
