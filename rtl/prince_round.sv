// prince_round: one round transformation of PRINCE built from a single copy
// of each unit (the "PrinceRound" module).
//
// The round holds one M' unit, one ShiftRow unit (SR or SR^-1), one key and
// constant adder (x ^ key ^ RC[r]) and one SubCell unit (S or S^-1). The step
// number step_i chooses both which units are active and the order in which
// they are chained:
//   forward order  (steps 0..6):  M' -> SR    -> add -> S
//   backward order (steps 7..12): S^-1 -> add -> SR^-1 -> M'
// An inactive unit passes its input through. The steps use
//   0 INIT : add(RC0), S                 (first half of PRINCEcore's start)
//   1..5 FWD: M', SR, add(RCr), S        (R1..R5, rotated so S comes last)
//   6  MID : M'                          (middle layer; its S and S^-1 are
//                                         the neighbouring steps' S-boxes)
//   7..11 BWD: S^-1, add(RC(r-1)), SR^-1, M'   (R6'..R10', rotated likewise)
//   12 FINAL: S^-1, add(RC11)
// Chaining the same four units in either order through input multiplexers,
// selected by a forward/backward tag derived from the round number, is the
// document's structure; the split into these five step kinds (so that one
// round instance covers whitening, middle layer and last layer too) is this
// design's own.
//
// The multiplexer ring forms a structural combinational loop (for instance
// M' output -> SR input in forward order, SR output -> M' input in backward
// order). It is never a real path: the forward/backward select fixes one
// order at a time, so every signal settles in one pass. Linters report it as
// a loop; it is kept because sharing the units is the point of this module.
//
// Interface: purely combinational. key_i is k1 (or k1 ^ alpha when
// decrypting); whitening with k0 / k0' is done by the controller.
module prince_round
  import prince_pkg::*;
(
  input  word_t state_i,
  input  word_t key_i,
  input  step_t step_i,
  output word_t state_o
);

  round_mode_e mode;
  logic        bwd;          // backward tag: reverse chaining order
  logic        use_mm, use_sr, use_add, use_sc;
  word_t       round_key;

  word_t mm_in, mm_out, mm_res;
  word_t sr_in, sr_out, sr_res;
  word_t add_in, add_out;
  word_t sc_in, sc_out, sc_res;

  always_comb begin
    mode      = step_mode(step_i);
    bwd       = (mode == MODE_BWD) || (mode == MODE_FINAL);
    use_mm    = (mode == MODE_FWD) || (mode == MODE_MID) || (mode == MODE_BWD);
    use_sr    = (mode == MODE_FWD) || (mode == MODE_BWD);
    use_add   = (mode != MODE_MID);
    use_sc    = (mode != MODE_MID);
    round_key = key_i ^ RC[step_rc_index(step_i)];
  end

  prince_mprime    u_mm (.state_i(mm_in), .state_o(mm_res));
  prince_shiftrows u_sr (.state_i(sr_in), .inv_i(bwd), .state_o(sr_res));
  prince_subcell   u_sc (.state_i(sc_in), .inv_i(bwd), .state_o(sc_res));

  assign mm_out  = use_mm  ? mm_res : mm_in;
  assign sr_out  = use_sr  ? sr_res : sr_in;
  assign add_out = use_add ? (add_in ^ round_key) : add_in;
  assign sc_out  = use_sc  ? sc_res : sc_in;

  // Chaining multiplexers: forward M'->SR->add->S, backward S->add->SR->M'.
  assign mm_in   = bwd ? sr_out  : state_i;
  assign sr_in   = bwd ? add_out : mm_out;
  assign add_in  = bwd ? sc_out  : sr_out;
  assign sc_in   = bwd ? state_i : add_out;
  assign state_o = bwd ? mm_out  : sc_out;

endmodule
