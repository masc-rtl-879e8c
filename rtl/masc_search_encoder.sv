// masc_search_encoder: search-line encoder of one MASC encoding block.
//
// The BLOCK_W-bit slice of the search word is decoded into 2**BLOCK_W search
// lines, of which exactly one is high while a search is enabled and none
// otherwise. Each line drives one access transistor per row, so per encoding
// block only a single cell is connected to a match line, whatever the data:
// the cell whose stored state is low resistance on a hit, a single
// high-resistance cell on a miss. This is the multi-bit encoding the design
// is built on; the output ordering (line j is high for slice value j) is this
// design's own choice.
//
// Purely combinational; no clock.
module masc_search_encoder #(
  parameter int unsigned BLOCK_W = 8
) (
  input  logic                     en,     // search enable
  input  logic [BLOCK_W-1:0]       key,    // slice of the search word
  output logic [(1<<BLOCK_W)-1:0]  lines   // one-hot search lines
);

  always_comb begin
    lines = '0;
    if (en) lines[key] = 1'b1;
  end

endmodule
