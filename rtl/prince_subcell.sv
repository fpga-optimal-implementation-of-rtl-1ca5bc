// prince_subcell: the S-box layer of PRINCE and its inverse (the "SubCell"
// unit).
//
// Sixteen 4-bit S-boxes work in parallel on the nibbles of the state. The
// S-box is the cipher's table (S(0..F) = B F 3 2 A C 9 1 6 7 8 0 E 5 D 4);
// with inv_i = 1 every nibble goes through S^-1 instead. As in the document,
// one unit with a select input provides both directions.
//
// Interface: purely combinational; inv_i = 0 gives S, 1 gives S^-1.
module prince_subcell
  import prince_pkg::*;
(
  input  word_t state_i,
  input  logic  inv_i,
  output word_t state_o
);

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      automatic nibble_t n = state_i[63 - 4*i -: 4];
      state_o[63 - 4*i -: 4] = inv_i ? SBOX_INV[n] : SBOX[n];
    end
  end

endmodule
