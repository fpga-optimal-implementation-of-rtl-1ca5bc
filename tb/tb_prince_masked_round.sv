// tb_prince_masked_round: every step kind of the masked round is compared
// with the reference layers: the state output must equal the unmasked round
// for any mask, and the mask output must be the mask moved through the same
// linear layers (SR o M' forward, M' o SR^-1 backward, M' in the middle).
`timescale 1ns/1ps
module tb_prince_masked_round;
  import prince_ref_pkg::*;

  logic [63:0] s_in, m_in, key, s_out, m_out;
  logic [3:0]  step;
  int checks = 0, failures = 0;

  prince_masked_round dut (.state_i(s_in), .mask_i(m_in), .key_i(key), .step_i(step),
                           .state_o(s_out), .mask_o(m_out));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] ref_step(logic [63:0] x, logic [63:0] k, int st);
    if (st == 0)       return ref_sub(x ^ k ^ ref_rc(0), 0);
    else if (st <= 5)  return ref_sub(ref_sr(ref_mprime(x), 0) ^ k ^ ref_rc(st), 0);
    else if (st == 6)  return ref_mprime(x);
    else if (st <= 11) return ref_mprime(ref_sr(ref_sub(x, 1) ^ k ^ ref_rc(st - 1), 1));
    else               return ref_sub(x, 1) ^ k ^ ref_rc(11);
  endfunction

  function automatic logic [63:0] ref_mask(logic [63:0] m, int st);
    if (st == 0 || st == 12) return m;
    else if (st <= 5)        return ref_sr(ref_mprime(m), 0);
    else if (st == 6)        return ref_mprime(m);
    else                     return ref_mprime(ref_sr(m, 1));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int st = 0; st <= 12; st++)
      for (int t = 0; t < 50; t++) begin
        s_in = rand64(); m_in = rand64(); key = rand64(); step = 4'(st);
        #1;
        check(s_out, ref_step(s_in, key, st), $sformatf("state step %0d", st));
        check(m_out, ref_mask(m_in, st), $sformatf("mask step %0d", st));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
