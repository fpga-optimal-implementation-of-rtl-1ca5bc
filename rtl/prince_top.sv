// prince_top: the two PRINCE implementations side by side.
//
// enc_*  : prince_core, the area-optimised iterative PRINCE (one shared round
//          unit, 12 cycles per 64-bit block).
// msk_*  : prince_masked_core, the same architecture with a fixed random mask
//          around every S-box layer, for resistance to power analysis.
// The two cores share the clock and reset and nothing else; each has its own
// request, key, data and result ports, so either can be used alone (an
// unused core is removed by synthesis when its outputs are left open).
//
// Timing for each core: start_* is taken when busy_* is low, done_* rises on
// the 12th clock edge after it and the result stays on *_data_o until the next
// start; the key and decrypt inputs must be held until the result is read.
module prince_top
  import prince_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,

  input  logic         enc_start_i,
  input  logic         enc_decrypt_i,
  input  logic [127:0] enc_key_i,
  input  word_t        enc_data_i,
  output logic         enc_busy_o,
  output logic         enc_done_o,
  output word_t        enc_data_o,

  input  logic         msk_start_i,
  input  logic         msk_decrypt_i,
  input  logic [127:0] msk_key_i,
  input  word_t        msk_mask_i,
  input  word_t        msk_data_i,
  output logic         msk_busy_o,
  output logic         msk_done_o,
  output word_t        msk_data_o
);

  prince_core u_prince (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (enc_start_i),
    .decrypt_i(enc_decrypt_i),
    .key_i    (enc_key_i),
    .data_i   (enc_data_i),
    .busy_o   (enc_busy_o),
    .done_o   (enc_done_o),
    .data_o   (enc_data_o)
  );

  prince_masked_core u_prince_masked (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (msk_start_i),
    .decrypt_i(msk_decrypt_i),
    .key_i    (msk_key_i),
    .mask_i   (msk_mask_i),
    .data_i   (msk_data_i),
    .busy_o   (msk_busy_o),
    .done_o   (msk_done_o),
    .data_o   (msk_data_o)
  );

endmodule
