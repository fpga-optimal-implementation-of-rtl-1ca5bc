// prince_masked_round: the PRINCE round of prince_round with the random
// mask carried alongside the state.
//
// The state path is the same shared-unit ring as prince_round (forward order
// M' -> SR -> add -> S, backward order S^-1 -> add -> SR^-1 -> M', units
// switched on and off by the step number), except that the S-box layer is
// prince_masked_subcell. The mask word R goes through its own M' and
// ShiftRow units with the same enables and order as the state's linear
// layers, as in "M_layer(state); M_layer(R); ShiftRow(state); ShiftRow(R)":
//   forward steps : mask_o = SR(M'(mask_i)), and the S-box uses mask_o
//   backward steps: the S^-1 layer uses mask_i, then mask_o = M'(SR^-1(mask_i))
//   INIT, FINAL   : no linear layer, mask_o = mask_i
//   MID           : mask_o = M'(mask_i)
// So every round masks its S-boxes with a different, linearly derived mask.
//
// Like prince_round, both multiplexer rings (state and mask) form
// structural combinational loops that are never sensitised: the
// forward/backward select fixes one chaining order at a time.
//
// Interface: purely combinational; key_i is k1 (or k1 ^ alpha).
module prince_masked_round
  import prince_pkg::*;
(
  input  word_t state_i,
  input  word_t mask_i,
  input  word_t key_i,
  input  step_t step_i,
  output word_t state_o,
  output word_t mask_o
);

  round_mode_e mode;
  logic        bwd;
  logic        use_mm, use_sr, use_add, use_sc;
  word_t       round_key;

  word_t mm_in, mm_out, mm_res;
  word_t sr_in, sr_out, sr_res;
  word_t add_in, add_out;
  word_t sc_in, sc_out, sc_res, sc_mask;

  word_t rm_mm_in, rm_mm_out, rm_mm_res;
  word_t rm_sr_in, rm_sr_out, rm_sr_res;

  always_comb begin
    mode      = step_mode(step_i);
    bwd       = (mode == MODE_BWD) || (mode == MODE_FINAL);
    use_mm    = (mode == MODE_FWD) || (mode == MODE_MID) || (mode == MODE_BWD);
    use_sr    = (mode == MODE_FWD) || (mode == MODE_BWD);
    use_add   = (mode != MODE_MID);
    use_sc    = (mode != MODE_MID);
    round_key = key_i ^ RC[step_rc_index(step_i)];
  end

  // Mask path: its own linear units, same order and enables as the state's.
  prince_mprime    u_rm_mm (.state_i(rm_mm_in), .state_o(rm_mm_res));
  prince_shiftrows u_rm_sr (.state_i(rm_sr_in), .inv_i(bwd), .state_o(rm_sr_res));

  assign rm_mm_out = use_mm ? rm_mm_res : rm_mm_in;
  assign rm_sr_out = use_sr ? rm_sr_res : rm_sr_in;
  assign rm_mm_in  = bwd ? rm_sr_out : mask_i;
  assign rm_sr_in  = bwd ? mask_i    : rm_mm_out;
  assign mask_o    = bwd ? rm_mm_out : rm_sr_out;
  assign sc_mask   = bwd ? mask_i    : mask_o;

  // State path.
  prince_mprime         u_mm (.state_i(mm_in), .state_o(mm_res));
  prince_shiftrows      u_sr (.state_i(sr_in), .inv_i(bwd), .state_o(sr_res));
  prince_masked_subcell u_sc (.state_i(sc_in), .mask_i(sc_mask), .inv_i(bwd),
                              .state_o(sc_res));

  assign mm_out  = use_mm  ? mm_res : mm_in;
  assign sr_out  = use_sr  ? sr_res : sr_in;
  assign add_out = use_add ? (add_in ^ round_key) : add_in;
  assign sc_out  = use_sc  ? sc_res : sc_in;

  assign mm_in   = bwd ? sr_out  : state_i;
  assign sr_in   = bwd ? add_out : mm_out;
  assign add_in  = bwd ? sc_out  : sr_out;
  assign sc_in   = bwd ? state_i : add_out;
  assign state_o = bwd ? mm_out  : sc_out;

endmodule
