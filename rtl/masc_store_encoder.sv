// masc_store_encoder: write-side encoder of one MASC encoding block.
//
// A BLOCK_W-bit ternary pattern (value plus care mask) is turned into the
// resistance states of the 2**BLOCK_W cells of one row of an encoding block.
// Cell j is programmed low resistance (1) when search value j would match the
// pattern and high resistance (0) otherwise. A fully specified pattern sets
// exactly one low-resistance cell, as in the encoded cell array; a pattern
// with don't-care bits sets one cell per matching value. Supporting
// don't-care bits this way is this design's own choice.
//
// Purely combinational; no clock.
module masc_store_encoder #(
  parameter int unsigned BLOCK_W = 8
) (
  input  logic [BLOCK_W-1:0]       value,  // pattern bits
  input  logic [BLOCK_W-1:0]       care,   // 1 = bit must match, 0 = don't care
  output logic [(1<<BLOCK_W)-1:0]  lmask   // 1 = low-resistance cell
);

  always_comb begin
    for (int unsigned j = 0; j < (1 << BLOCK_W); j++) begin
      lmask[j] = (((BLOCK_W'(j)) ^ value) & care) == '0;
    end
  end

endmodule
