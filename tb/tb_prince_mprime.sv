// tb_prince_mprime: checks the M' layer. Every unit vector is mapped and
// compared with the block-matrix model (this checks each column of M'); the
// equations for output bits 0 and 63 are checked directly; random words are
// compared with the model, and M'(M'(x)) == x (M' is an involution).
`timescale 1ns/1ps
module tb_prince_mprime;
  import prince_ref_pkg::*;

  logic [63:0] s_in, m_out, mm_out;
  int checks = 0, failures = 0;

  prince_mprime dut  (.state_i(s_in),  .state_o(m_out));
  prince_mprime dut2 (.state_i(m_out), .state_o(mm_out));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 64; b++) begin
      s_in = 64'd1 << b;
      #1;
      check(m_out, ref_mprime(s_in), "unit vector");
    end
    for (int t = 0; t < 300; t++) begin
      s_in = rand64();
      #1;
      check(m_out, ref_mprime(s_in), "random");
      check(mm_out, s_in, "involution");
      // Output bit 0 (MSB) = in bits 4^8^12, output bit 63 = 55^59^63
      // (bit numbering from the MSB).
      checks++;
      if (m_out[63] !== (s_in[59] ^ s_in[55] ^ s_in[51]) ||
          m_out[0]  !== (s_in[8]  ^ s_in[4]  ^ s_in[0])) begin
        failures++;
        $display("FAIL bit equations for %016h", s_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
