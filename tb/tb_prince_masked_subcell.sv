// tb_prince_masked_subcell: the masked S-box layer must give S(x) (or
// S^-1(x)) for every mask. Every nibble value is tried in every position
// under random masks, plus the all-zero and all-one masks.
`timescale 1ns/1ps
module tb_prince_masked_subcell;
  import prince_ref_pkg::*;

  logic [63:0] s_in, mask, f_out, b_out;
  int checks = 0, failures = 0;

  prince_masked_subcell dut_f (.state_i(s_in), .mask_i(mask), .inv_i(1'b0), .state_o(f_out));
  prince_masked_subcell dut_b (.state_i(s_in), .mask_i(mask), .inv_i(1'b1), .state_o(b_out));

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
        mask = (v == 0) ? 64'h0 : (v == 1) ? 64'hffffffffffffffff : rand64();
        #1;
        check(f_out, ref_sub(s_in, 0), "masked S");
        check(b_out, ref_sub(s_in, 1), "masked S^-1");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
