// tb_prince_round: checks every step kind of the shared-unit round against
// the reference model, then chains steps 0..12 by hand (with whitening) and
// compares the result with the published PRINCE test vectors.
`timescale 1ns/1ps
module tb_prince_round;
  import prince_ref_pkg::*;

  logic [63:0] s_in, key, s_out;
  logic [3:0]  step;
  int checks = 0, failures = 0;

  prince_round dut (.state_i(s_in), .key_i(key), .step_i(step), .state_o(s_out));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // Expected result of one step, composed from the reference layers.
  function automatic logic [63:0] ref_step(logic [63:0] x, logic [63:0] k, int st);
    if (st == 0)       return ref_sub(x ^ k ^ ref_rc(0), 0);
    else if (st <= 5)  return ref_sub(ref_sr(ref_mprime(x), 0) ^ k ^ ref_rc(st), 0);
    else if (st == 6)  return ref_mprime(x);
    else if (st <= 11) return ref_mprime(ref_sr(ref_sub(x, 1) ^ k ^ ref_rc(st - 1), 1));
    else               return ref_sub(x, 1) ^ k ^ ref_rc(11);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] vec_pt [5] = '{64'h0, 64'hffffffffffffffff, 64'h0, 64'h0, 64'h0123456789abcdef};
  logic [127:0] vec_key [5] = '{128'h0, 128'h0, {64'hffffffffffffffff, 64'h0},
                                {64'h0, 64'hffffffffffffffff},
                                {64'h0, 64'hfedcba9876543210}};
  logic [63:0] vec_ct [5] = '{64'h818665aa0d02dfda, 64'h604ae6ca03c20ada,
                              64'h9fb51935fc3df524, 64'h78a54cbe737bb7ef,
                              64'hae25ad3ca8fa9ccf};

  initial begin
    for (int st = 0; st <= 12; st++)
      for (int t = 0; t < 50; t++) begin
        s_in = rand64(); key = rand64(); step = 4'(st);
        #1;
        check(s_out, ref_step(s_in, key, st), $sformatf("step %0d", st));
      end
    for (int v = 0; v < 5; v++) begin
      logic [63:0] x;
      key = vec_key[v][63:0];
      x = vec_pt[v] ^ vec_key[v][127:64];
      for (int st = 0; st <= 12; st++) begin
        s_in = x; step = 4'(st);
        #1;
        x = s_out;
      end
      check(x ^ ref_k0p(vec_key[v][127:64]), vec_ct[v], $sformatf("vector %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
