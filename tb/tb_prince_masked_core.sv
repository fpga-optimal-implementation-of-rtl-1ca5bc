// tb_prince_masked_core: end-to-end checks of the masked PRINCE core.
// Each block gets a fresh random mask; the ciphertext must not depend on it.
// The internal mask register is followed step by step against the mask moved
// through the reference linear layers.
//  - the five published test vectors, encrypted and decrypted;
//  - random blocks and keys against the reference model, both directions;
//  - latency: done rises exactly 12 clock edges after start is taken;
//  - a start request while busy is ignored and does not disturb the block;
//  - back-to-back blocks, the next start given in the cycle done is high.
`timescale 1ns/1ps
module tb_prince_masked_core;
  import prince_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         start = 0, decrypt = 0;
  logic [127:0] key = '0;
  logic [63:0]  din = '0, dout, mask = '0;
  int mask_steps = 0;
  logic         busy, done;
  int checks = 0, failures = 0;
  int cycle = 0;

  prince_masked_core dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .decrypt_i(decrypt),
                   .key_i(key), .mask_i(mask), .data_i(din), .busy_o(busy), .done_o(done), .data_o(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Follow the mask register: after step s it holds the start mask moved
  // through the linear layers of steps 0..s.
  logic [63:0] exp_mask;
  always @(negedge clk) begin
    if (rst_n && dut.busy_q) begin
      if (dut.step_q == 4'd1) exp_mask = mask_at_start;
      checks++;
      mask_steps++;
      if (dut.mask_q !== exp_mask) begin
        failures++;
        $display("FAIL mask register at step %0d: %016h expected %016h",
                 dut.step_q, dut.mask_q, exp_mask);
      end
      if (dut.step_q <= 4'd5)       exp_mask = ref_sr(ref_mprime(exp_mask), 0);
      else if (dut.step_q == 4'd6)  exp_mask = ref_mprime(exp_mask);
      else                          exp_mask = ref_mprime(ref_sr(exp_mask, 1));
    end
  end
  logic [63:0] mask_at_start;
  always @(posedge clk) if (start && !busy) mask_at_start <= mask;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Run one block; optionally poke start again while busy.
  task automatic run(logic [63:0] d, logic [127:0] k, logic dec, bit poke,
                     output logic [63:0] res);
    int t0, lat;
    @(negedge clk);
    din = d; key = k; decrypt = dec; start = 1; mask = rand64();
    @(negedge clk);
    t0 = cycle; start = 0;
    if (poke) begin
      repeat (3) @(negedge clk);
      din = ~d; start = 1;           // must be ignored
      @(negedge clk);
      start = 0; din = d;
    end
    while (!done) @(negedge clk);
    lat = cycle - t0 + 1;
    checks++;
    if (lat != 12) begin
      failures++;
      $display("FAIL latency %0d, expected 12", lat);
    end
    res = dout;
  endtask

  logic [63:0] vec_pt [5] = '{64'h0, 64'hffffffffffffffff, 64'h0, 64'h0, 64'h0123456789abcdef};
  logic [127:0] vec_key [5] = '{128'h0, 128'h0, {64'hffffffffffffffff, 64'h0},
                                {64'h0, 64'hffffffffffffffff},
                                {64'h0, 64'hfedcba9876543210}};
  logic [63:0] vec_ct [5] = '{64'h818665aa0d02dfda, 64'h604ae6ca03c20ada,
                              64'h9fb51935fc3df524, 64'h78a54cbe737bb7ef,
                              64'hae25ad3ca8fa9ccf};

  initial begin
    logic [63:0] r, pt, exp;
    logic [127:0] k;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL busy/done after reset"); end

    for (int v = 0; v < 5; v++) begin
      run(vec_pt[v], vec_key[v], 0, v == 2, r);
      check(r, vec_ct[v], $sformatf("encrypt vector %0d", v));
      run(vec_ct[v], vec_key[v], 1, 0, r);
      check(r, vec_pt[v], $sformatf("decrypt vector %0d", v));
    end
    for (int t = 0; t < 40; t++) begin
      pt = rand64(); k = {rand64(), rand64()};
      run(pt, k, 0, t % 7 == 0, r);
      exp = ref_encrypt(pt, k);
      check(r, exp, "random encrypt");
      run(exp, k, 1, 0, r);
      check(r, ref_decrypt(exp, k), "random decrypt");
    end

    // Back-to-back: the next start in the cycle done is high.
    begin
      logic [63:0] p1, p2;
      int t0;
      p1 = rand64(); p2 = rand64(); k = {rand64(), rand64()};
      run(p1, k, 0, 0, r);
      check(r, ref_encrypt(p1, k), "back-to-back first");
      din = p2; start = 1;
      @(negedge clk);
      t0 = cycle; start = 0;
      checks++;
      if (!busy || done) begin failures++; $display("FAIL no restart from done"); end
      while (!done) @(negedge clk);
      checks++;
      if (cycle - t0 + 1 != 12) begin failures++; $display("FAIL back-to-back latency"); end
      check(dout, ref_encrypt(p2, k), "back-to-back second");
    end
    checks++;
    if (mask_steps < 100) begin failures++; $display("FAIL mask register never followed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
