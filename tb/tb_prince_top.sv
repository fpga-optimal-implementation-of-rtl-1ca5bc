// tb_prince_top: whole-design test of prince_top at its default (and only)
// configuration. Both cores run at the same time on independent streams:
//  - the five published test vectors through both cores, both directions;
//  - the all-zero block and keys through the masked core under a non-zero
//    mask, which must still give 818665aa0d02dfda;
//  - random blocks, keys and masks against the reference model;
//  - every block's latency is 12 cycles; a start while busy is ignored; a
//    new block can start in the cycle the previous result appears.
// Each of these mechanisms is counted, and one that never happened is a
// failure.
`timescale 1ns/1ps
module tb_prince_top;
  import prince_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic         e_start = 0, e_dec = 0, m_start = 0, m_dec = 0;
  logic [127:0] e_key = '0, m_key = '0;
  logic [63:0]  e_din = '0, m_din = '0, m_mask = '0, e_dout, m_dout;
  logic         e_busy, e_done, m_busy, m_done;

  int n_enc = 0, n_dec = 0, n_ignored = 0, n_b2b = 0, n_masked = 0, n_overlap = 0;

  prince_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .enc_start_i(e_start), .enc_decrypt_i(e_dec), .enc_key_i(e_key), .enc_data_i(e_din),
    .enc_busy_o(e_busy), .enc_done_o(e_done), .enc_data_o(e_dout),
    .msk_start_i(m_start), .msk_decrypt_i(m_dec), .msk_key_i(m_key), .msk_mask_i(m_mask),
    .msk_data_i(m_din), .msk_busy_o(m_busy), .msk_done_o(m_done), .msk_data_o(m_dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  always @(negedge clk) if (e_busy && m_busy) n_overlap++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  task automatic check_lat(int lat, string what);
    checks++;
    if (lat != 12) begin
      failures++;
      $display("FAIL %s latency %0d, expected 12", what, lat);
    end
  endtask

  logic [63:0] vec_pt [5] = '{64'h0, 64'hffffffffffffffff, 64'h0, 64'h0, 64'h0123456789abcdef};
  logic [127:0] vec_key [5] = '{128'h0, 128'h0, {64'hffffffffffffffff, 64'h0},
                                {64'h0, 64'hffffffffffffffff},
                                {64'h0, 64'hfedcba9876543210}};
  logic [63:0] vec_ct [5] = '{64'h818665aa0d02dfda, 64'h604ae6ca03c20ada,
                              64'h9fb51935fc3df524, 64'h78a54cbe737bb7ef,
                              64'hae25ad3ca8fa9ccf};

  // One block through the plain core. If chain is set the start is given in
  // the cycle the previous result is still on the outputs (done high).
  task automatic run_enc(logic [63:0] d, logic [127:0] k, logic dec, bit poke,
                         output logic [63:0] res);
    int t0;
    if (!e_done || e_busy) @(negedge clk);
    if (e_done) n_b2b++;
    e_din = d; e_key = k; e_dec = dec; e_start = 1;
    @(negedge clk);
    t0 = cycle; e_start = 0;
    if (poke) begin
      @(negedge clk);
      e_din = ~d; e_start = 1;
      @(negedge clk);
      e_start = 0; e_din = d;
      n_ignored++;
    end
    while (!e_done) @(negedge clk);
    check_lat(cycle - t0 + 1, "plain core");
    res = e_dout;
    if (dec) n_dec++; else n_enc++;
  endtask

  task automatic run_msk(logic [63:0] d, logic [127:0] k, logic [63:0] msk, logic dec,
                         bit poke, output logic [63:0] res);
    int t0;
    if (!m_done || m_busy) @(negedge clk);
    if (m_done) n_b2b++;
    m_din = d; m_key = k; m_dec = dec; m_mask = msk; m_start = 1;
    @(negedge clk);
    t0 = cycle; m_start = 0;
    if (poke) begin
      repeat (4) @(negedge clk);
      m_din = ~d; m_mask = ~msk; m_start = 1;
      @(negedge clk);
      m_start = 0; m_din = d;
      n_ignored++;
    end
    while (!m_done) @(negedge clk);
    check_lat(cycle - t0 + 1, "masked core");
    res = m_dout;
    if (msk != 0) n_masked++;
    if (dec) n_dec++; else n_enc++;
  endtask

  task automatic count_ok(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    fork
      begin : plain_stream
        logic [63:0] r, pt, ct;
        logic [127:0] k;
        for (int v = 0; v < 5; v++) begin
          run_enc(vec_pt[v], vec_key[v], 0, v == 1, r);
          check(r, vec_ct[v], $sformatf("plain encrypt vector %0d", v));
          run_enc(vec_ct[v], vec_key[v], 1, 0, r);
          check(r, vec_pt[v], $sformatf("plain decrypt vector %0d", v));
        end
        for (int t = 0; t < 60; t++) begin
          pt = rand64(); k = {rand64(), rand64()};
          run_enc(pt, k, 0, t % 9 == 0, r);
          ct = ref_encrypt(pt, k);
          check(r, ct, "plain random encrypt");
          run_enc(ct, k, 1, 0, r);
          check(r, ref_decrypt(ct, k), "plain random decrypt");
        end
      end
      begin : masked_stream
        logic [63:0] r, pt, ct, msk;
        logic [127:0] k;
        // All-zero block and keys under a non-zero fixed mask.
        run_msk(64'h0, 128'h0, 64'h8717b0c59334f794, 0, 0, r);
        check(r, 64'h818665aa0d02dfda, "masked all-zero vector");
        for (int v = 0; v < 5; v++) begin
          msk = rand64();
          run_msk(vec_pt[v], vec_key[v], msk, 0, v == 3, r);
          check(r, vec_ct[v], $sformatf("masked encrypt vector %0d", v));
          run_msk(vec_ct[v], vec_key[v], ~msk, 1, 0, r);
          check(r, vec_pt[v], $sformatf("masked decrypt vector %0d", v));
        end
        for (int t = 0; t < 60; t++) begin
          pt = rand64(); k = {rand64(), rand64()};
          run_msk(pt, k, rand64(), 0, t % 11 == 0, r);
          ct = ref_encrypt(pt, k);
          check(r, ct, "masked random encrypt");
          run_msk(ct, k, rand64(), 1, 0, r);
          check(r, ref_decrypt(ct, k), "masked random decrypt");
        end
      end
    join

    count_ok(n_enc,     "encryption");
    count_ok(n_dec,     "decryption");
    count_ok(n_ignored, "start ignored while busy");
    count_ok(n_b2b,     "back-to-back start on done");
    count_ok(n_masked,  "non-zero mask");
    count_ok(n_overlap, "both cores busy together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
