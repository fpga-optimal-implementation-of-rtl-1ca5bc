// tb_prince_shiftrows: checks SR and SR^-1 against the row-rotation model of
// the 4x4 nibble matrix, their composition, and one hand-worked word.
`timescale 1ns/1ps
module tb_prince_shiftrows;
  import prince_ref_pkg::*;

  logic [63:0] s_in, f_out, b_out, fb_out;
  int checks = 0, failures = 0;

  prince_shiftrows dut_f  (.state_i(s_in),  .inv_i(1'b0), .state_o(f_out));
  prince_shiftrows dut_b  (.state_i(s_in),  .inv_i(1'b1), .state_o(b_out));
  prince_shiftrows dut_fb (.state_i(f_out), .inv_i(1'b1), .state_o(fb_out));

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
    s_in = 64'h0123456789abcdef;
    #1;
    check(f_out, 64'h05af49e38d27c16b, "SR hand-worked");
    check(b_out, 64'h0da741eb852fc963, "SR^-1 hand-worked");
    for (int t = 0; t < 300; t++) begin
      s_in = rand64();
      #1;
      check(f_out, ref_sr(s_in, 0), "SR");
      check(b_out, ref_sr(s_in, 1), "SR^-1");
      check(fb_out, s_in, "SR^-1(SR(x))");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
