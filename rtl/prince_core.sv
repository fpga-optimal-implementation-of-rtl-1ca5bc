// prince_core: iterative PRINCE encryption/decryption (the "Prince" main
// controller), one 64-bit block in 12 clock cycles.
//
// A 4-bit step counter drives a single prince_round instance and a 64-bit
// state register, so the five forward rounds, the middle layer and the five
// backward rounds all reuse one set of units. On the edge where start_i is
// taken the register loads S(data_i ^ k0 ^ k1 ^ RC0) (step 0); the next 11
// edges apply steps 1..11. After that the counter rests at step 12, where the
// same round instance computes the last layer S^-1(.) ^ k1 ^ RC11
// combinationally and the controller adds the output whitening key k0'.
// data_o is therefore valid from the 12th edge after start_i on, which gives
// 64/12 bits per clock.
//
// Decryption uses the alpha-reflection of PRINCE: the same datapath run with
// k0 and k0' exchanged and k1 replaced by k1 ^ alpha.
//
// Interface:
//   start_i   one-cycle request; taken when busy_o is low (a request while
//             busy is ignored). A new request may be made while done_o is high.
//   decrypt_i 0 = encrypt, 1 = decrypt; sampled with start_i and held by the
//             caller like the key.
//   key_i     {k0, k1}; not registered (saving 128 flip-flops), so the caller
//             must hold key_i and decrypt_i stable from start_i until it has
//             read data_o. An assertion checks this while busy.
//   busy_o    high while steps 1..11 run.
//   done_o    high from the 12th edge after start_i until the next start_i;
//             data_o is valid while it is high.
// Reset (rst_ni, active low, synchronous) clears busy, done and the state.
//
// Counter control of one round module and the 12-cycle latency follow the
// document; the start/busy/done handshake, the reset and the unregistered key
// requirement are this design's own choices.
module prince_core
  import prince_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic         decrypt_i,
  input  logic [127:0] key_i,
  input  word_t        data_i,
  output logic         busy_o,
  output logic         done_o,
  output word_t        data_o
);

  word_t k0, k0p, k1;
  word_t key_in, key_out, key_core;

  step_t step_q;
  word_t state_q;
  logic  busy_q, done_q;

  logic  load;
  step_t round_step;
  word_t round_in, round_out;

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

  prince_round u_round (
    .state_i(round_in),
    .key_i  (key_core),
    .step_i (round_step),
    .state_o(round_out)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      step_q  <= STEP_FINAL;
      state_q <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else if (load) begin
      state_q <= round_out;
      step_q  <= STEP_INIT + 4'd1;
      busy_q  <= 1'b1;
      done_q  <= 1'b0;
    end else if (busy_q) begin
      state_q <= round_out;
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

  // The key is combinational into the datapath: it must not move mid-block.
  a_key_stable : assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy_q |-> ($stable(key_i) && $stable(decrypt_i)))
    else $error("prince_core: key_i or decrypt_i changed while busy");

  // A block taken by start_i has its result after CYCLES_PER_BLOCK edges.
  a_latency : assert property (@(posedge clk_i) disable iff (!rst_ni)
    load |-> ##CYCLES_PER_BLOCK done_q)
    else $error("prince_core: result not ready after CYCLES_PER_BLOCK cycles");

endmodule
