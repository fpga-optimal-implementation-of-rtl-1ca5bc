// tb_prince_subcell: checks the S-box layer in both directions.
// Every S-box input value is placed in every nibble position (with random
// values in the other nibbles) and compared with the reference table; random
// words are checked too, as is S^-1(S(x)) == x.
`timescale 1ns/1ps
module tb_prince_subcell;
  import prince_ref_pkg::*;

  logic [63:0] s_in, s_out, i_out;
  int checks = 0, failures = 0;

  prince_subcell dut_f (.state_i(s_in),  .inv_i(1'b0), .state_o(s_out));
  prince_subcell dut_i (.state_i(s_out), .inv_i(1'b1), .state_o(i_out));

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
    for (int n = 0; n < 16; n++)
      for (int v = 0; v < 16; v++) begin
        s_in = rand64();
        s_in[63 - 4*n -: 4] = 4'(v);
        #1;
        check(s_out, ref_sub(s_in, 0), "S");
        check(i_out, s_in, "S^-1(S(x))");
      end
    for (int t = 0; t < 200; t++) begin
      s_in = rand64();
      #1;
      check(s_out, ref_sub(s_in, 0), "S random");
      check(i_out, ref_sub(s_out, 1), "S^-1 random");
    end
    // Table values: S(0)=B, S(F)=4, whole word 0123456789abcdef.
    s_in = 64'h0123456789abcdef;
    #1;
    check(s_out, 64'hbf32ac916780e5d4, "S table");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
