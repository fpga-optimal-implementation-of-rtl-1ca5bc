// prince_shiftrows: the ShiftRows nibble permutation of PRINCE and its
// inverse, chosen by a control input (the "ShiftRow" unit).
//
// The state is a 4x4 array of nibbles stored column by column; SR rotates row
// j left by j positions, so output nibble i takes input nibble SR_PERM[i].
// With inv_i = 1 the inverse permutation SR^-1 is applied instead. A single
// unit with a select input, rather than two units, follows the document; the
// select is a multiplexer on the output of two fixed wirings.
//
// Row 0 of the matrix (nibbles 0, 4, 8, 12) is not rotated, so those output
// bits are wired straight from the input in both directions.
//
// Interface: purely combinational; inv_i = 0 gives SR, 1 gives SR^-1.
module prince_shiftrows
  import prince_pkg::*;
(
  input  word_t state_i,
  input  logic  inv_i,
  output word_t state_o
);

  word_t fwd, bwd;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      fwd[63 - 4*i -: 4] = state_i[63 - 4*SR_PERM[i]     -: 4];
      bwd[63 - 4*i -: 4] = state_i[63 - 4*SR_INV_PERM[i] -: 4];
    end
  end

  assign state_o = inv_i ? bwd : fwd;

endmodule
