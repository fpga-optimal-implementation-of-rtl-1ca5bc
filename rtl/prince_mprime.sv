// prince_mprime: the M' linear layer of PRINCE (the "MatrixMutil" unit).
//
// M' is the block-diagonal 64x64 binary matrix diag(M0^, M1^, M1^, M0^); each
// 16x16 block is built from the four 4x4 matrices M0..M3, where Mk is the
// identity with its k-th diagonal entry cleared. Block b of the output, row r
// (nibble), bit c is the XOR of bit c of the input nibbles 4b+k for the three
// k with (r + k + h) mod 4 != c, where h is 0 for blocks 0 and 3 (M0^) and 1
// for blocks 1 and 2 (M1^). Every output bit is therefore the XOR of exactly
// three input bits, 64*2 two-input XOR gates in all, with no matrix product.
// M' is an involution, so the same unit serves forward and backward rounds.
//
// Interface: purely combinational, state_i -> state_o.
// The three-term XOR formulation is the document's; the index formula that
// generates the 64 equations is written out here instead of listing them.
module prince_mprime
  import prince_pkg::*;
(
  input  word_t state_i,
  output word_t state_o
);

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 4; c++) begin
          automatic int h = (b == 0 || b == 3) ? 0 : 1;
          automatic logic acc = 1'b0;
          for (int k = 0; k < 4; k++) begin
            if (((r + k + h) % 4) != c)
              acc ^= state_i[63 - (16*b + 4*k + c)];
          end
          state_o[63 - (16*b + 4*r + c)] = acc;
        end
      end
    end
  end

endmodule
