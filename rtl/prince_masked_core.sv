// prince_masked_core: iterative PRINCE with a fixed random mask on every
// S-box layer, 12 clock cycles per 64-bit block.
//
// The controller is that of prince_core (a step counter driving one round
// instance, the last layer computed combinationally at step 12), with a
// second 64-bit register holding the current mask R. R is loaded from mask_i
// together with the block and moves through M' and ShiftRow in step with the
// state (prince_masked_round), so each S-box layer is masked with its own
// value derived from the one fixed mask. The mask cancels after every S-box
// layer, so the ciphertext equals unmasked PRINCE for any mask value.
//
// Interface: as prince_core, plus
//   mask_i    64-bit mask, sampled with start_i (the "fixed random mask": any
//             source may drive it, a constant or a random number generator).
// start_i is taken when busy_o is low; done_o and data_o follow 12 edges
// later; key_i and decrypt_i must be held from start_i until data_o is read.
// Reset (rst_ni, active low, synchronous) clears busy, done, state and mask.
//
// The mask handling follows the document's masking algorithm; loading the
// mask with each block and the handshake are this design's own choices.
module prince_masked_core
  import prince_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic         decrypt_i,
  input  logic [127:0] key_i,
  input  word_t        mask_i,
  input  word_t        data_i,
  output logic         busy_o,
  output logic         done_o,
  output word_t        data_o
);

  word_t k0, k0p, k1;
  word_t key_in, key_out, key_core;

  step_t step_q;
  word_t state_q, mask_q;
  logic  busy_q, done_q;

  logic  load;
  step_t round_step;
  word_t round_in, round_out, rmask_in, rmask_out;

  always_comb begin
    k0       = key_i[127:64];
    k1       = key_i[63:0];
    k0p      = k0_prime(k0);
    key_in   = decrypt_i ? k0p : k0;
    key_out  = decrypt_i ? k0  : k0p;
    key_core = decrypt_i ? (k1 ^ ALPHA) : k1;
  end

  assign load       = start_i && !busy_q;
  assign round_step = load ? STEP_INIT : step_q;
  assign round_in   = load ? (data_i ^ key_in) : state_q;
  assign rmask_in   = load ? mask_i : mask_q;

  prince_masked_round u_round (
    .state_i(round_in),
    .mask_i (rmask_in),
    .key_i  (key_core),
    .step_i (round_step),
    .state_o(round_out),
    .mask_o (rmask_out)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      step_q  <= STEP_FINAL;
      state_q <= '0;
      mask_q  <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else if (load) begin
      state_q <= round_out;
      mask_q  <= rmask_out;
      step_q  <= STEP_INIT + 4'd1;
      busy_q  <= 1'b1;
      done_q  <= 1'b0;
    end else if (busy_q) begin
      state_q <= round_out;
      mask_q  <= rmask_out;
      step_q  <= step_q + 4'd1;
      if (step_q == STEP_BWD_LAST) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
      end
    end
  end

  assign busy_o = busy_q;
  assign done_o = done_q;
  assign data_o = round_out ^ key_out;

  a_key_stable : assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy_q |-> ($stable(key_i) && $stable(decrypt_i)))
    else $error("prince_masked_core: key_i or decrypt_i changed while busy");

  // A block taken by start_i has its result after CYCLES_PER_BLOCK edges.
  a_latency : assert property (@(posedge clk_i) disable iff (!rst_ni)
    load |-> ##CYCLES_PER_BLOCK done_q)
    else $error("prince_masked_core: result not ready after CYCLES_PER_BLOCK cycles");

endmodule
