// prince_masked_subcell: the S-box layer with a random mask added around it.
//
// Masked S-boxes are normally stored as recomputed tables S_m(x) = S(x^m)^m,
// one per mask, which costs memory. Here the table stays the plain one and
// the mask is applied with XOR layers instead, in the order of the masked
// step "Add(state,R); SubCell(state,R); Add(state,R)":
//   masked  = state ^ mask                 add the random mask
//   s_in    = masked ^ mask                masked S-box: remove the input mask,
//   s_out   = S(s_in) (or S^-1)            look up the plain table,
//   remask  = s_out ^ mask                 re-apply the mask to the output
//   state_o = remask ^ mask                compensation
// so state_o equals S(state_i) (or S^-1) for every mask value. The mask is
// a per-nibble XOR with the 64-bit mask word, one mask nibble per S-box.
// Note that the XORs cancel as Boolean functions: a synthesis tool that
// optimises across them may reduce the unit to the plain S-box layer.
//
// Interface: purely combinational; inv_i = 0 gives S, 1 gives S^-1.
// The sequence of mask additions is the document's; the per-nibble mask
// layout is this design's reading of it.
module prince_masked_subcell
  import prince_pkg::*;
(
  input  word_t state_i,
  input  word_t mask_i,
  input  logic  inv_i,
  output word_t state_o
);

  word_t masked, s_in, s_out, remask;

  assign masked = state_i ^ mask_i;
  assign s_in   = masked ^ mask_i;

  prince_subcell u_sbox (.state_i(s_in), .inv_i(inv_i), .state_o(s_out));

  assign remask  = s_out ^ mask_i;
  assign state_o = remask ^ mask_i;

endmodule
