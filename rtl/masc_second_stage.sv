// masc_second_stage: second search stage of the MASC TCAM.
//
// Each partial TCAM reports, per row, whether that row matched its slice of
// the search word (EnL = match line discharged). A row of the whole TCAM is
// a hit only when it is a hit in every partial TCAM; in the array this is a
// single fixed-data TCAM cell per row driven by the EnL signals, logically an
// AND over the blocks. On top of that this block picks the lowest-numbered
// hit row as the row to read from the result memory; resolving several hits
// by lowest index is this design's own choice.
//
// Purely combinational; no clock.
module masc_second_stage #(
  parameter int unsigned BLOCKS = 4,
  parameter int unsigned ROWS   = 32,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic [BLOCKS-1:0][ROWS-1:0] enl,      // EnL of every partial TCAM
  output logic [ROWS-1:0]             row_hit,  // rows matching in all blocks
  output logic                        hit,      // at least one row hit
  output logic [ROW_W-1:0]            hit_row   // lowest hit row (0 if none)
);

  always_comb begin
    row_hit = '1;
    for (int unsigned b = 0; b < BLOCKS; b++) row_hit &= enl[b];
    hit     = |row_hit;
    hit_row = '0;
    for (int r = int'(ROWS) - 1; r >= 0; r--) begin
      if (row_hit[r]) hit_row = ROW_W'(r);
    end
  end

endmodule
