// masc_partial_tcam: one first-stage partial TCAM of the MASC architecture.
//
// The array holds ROWS rows of one BLOCK_W-bit encoding block, i.e.
// 2**BLOCK_W resistive cells per row (1 = low resistance). A search drives
// the one-hot search lines of masc_search_encoder; a row whose activated cell
// is low resistance discharges its match line, and that discharged line is
// the row's EnL output to the second stage. Miss rows keep their charge, so
// unlike a conventional TCAM only hit rows lose charge.
//
// Match-line charge is tracked per row as an age: the number of searches the
// line has served since it was last precharged. After every search the hit
// rows are precharged again (selective hit-line precharge, age back to 0);
// miss rows age by one. When the precharge controller raises `refresh`, all
// rows are precharged at the end of that cycle. A miss row leaks a little on
// every search; once its age passes the block's exact refresh period the
// sensed voltage is low enough that near misses read as hits. This is
// modelled digitally: up to the exact period the match is exact, for the next
// HD_STEP searches a row also matches at Hamming distance 1, and after that
// at distance 2. The periods follow the published circuit results; modelling
// the analog leakage by this age rule is this design's own choice.
//
// Interface and timing: a write (wr_en) programs one row's cells and
// precharges it. A search (search_en, search_key) is sampled on a rising
// clock edge; enl/enl_valid show its result from that edge on, until the next
// search. precharge_rows counts the match lines recharged at that edge (hit
// rows, or all rows on a full refresh), as a measure of precharge energy.
// Reset clears every cell to high resistance, so an unwritten row never hits.
module masc_partial_tcam
  import masc_pkg::*;
#(
  parameter int unsigned ROWS    = 32,
  parameter int unsigned BLOCK_W = 8,
  localparam int unsigned CELLS  = 1 << BLOCK_W,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // programming
  input  logic                   wr_en,
  input  logic [ROW_W-1:0]       wr_row,
  input  logic [CELLS-1:0]       wr_lmask,
  // search
  input  logic                   search_en,
  input  logic [BLOCK_W-1:0]     search_key,
  input  logic                   refresh,        // full precharge at this edge
  output logic [ROWS-1:0]        enl,            // 1 = match line discharged (hit)
  output logic                   enl_valid,
  output logic [$clog2(ROWS+1)-1:0] precharge_rows
);

  logic [CELLS-1:0] cells [ROWS];
  logic [AGE_W-1:0] age   [ROWS];
  logic [CELLS-1:0] lines;
  logic [ROWS-1:0]  hit;

  masc_search_encoder #(.BLOCK_W(BLOCK_W)) u_enc (
    .en    (search_en),
    .key   (search_key),
    .lines (lines)
  );

  // Search-line patterns one and two bits away from the search value. They
  // are the same for every row, so they are formed once per block: flipping
  // bit i of the value is a fixed permutation of the one-hot lines, and
  // flipping one more bit of the distance-1 pattern gives distance 0 or 2.
  logic [BLOCK_W-1:0][CELLS-1:0] flip1, flip2;
  logic [CELLS-1:0]              lines_hd1, lines_hd2;

  for (genvar i = 0; i < BLOCK_W; i++) begin : g_flip
    for (genvar c = 0; c < CELLS; c++) begin : g_cell
      assign flip1[i][c] = lines    [c ^ (1 << i)];
      assign flip2[i][c] = lines_hd1[c ^ (1 << i)];
    end
  end

  always_comb begin
    lines_hd1 = '0;
    lines_hd2 = '0;
    for (int unsigned i = 0; i < BLOCK_W; i++) begin
      lines_hd1 |= flip1[i];
      lines_hd2 |= flip2[i];
    end
    lines_hd2 &= ~lines;
  end

  // Sensing of every match line for the current search.
  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      logic             exact_m, hd1_m, hd2_m;
      logic [1:0]       tol;
      logic [AGE_W-1:0] age_now;
      exact_m = |(cells[r] & lines);
      hd1_m   = |(cells[r] & lines_hd1);
      hd2_m   = |(cells[r] & lines_hd2);
      age_now = (age[r] == '1) ? age[r] : age[r] + 1'b1;
      tol     = sense_tolerance(BLOCK_W, age_now);
      hit[r]  = search_en &
                (exact_m | ((tol >= 2'd1) & hd1_m) | ((tol >= 2'd2) & hd2_m));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < ROWS; r++) begin
        cells[r] <= '0;
        age[r]   <= '0;
      end
      enl            <= '0;
      enl_valid      <= 1'b0;
      precharge_rows <= '0;
    end else begin
      enl_valid <= search_en;
      if (search_en) enl <= hit;
      for (int unsigned r = 0; r < ROWS; r++) begin
        if (refresh || hit[r])        age[r] <= '0;
        else if (search_en && age[r] != '1) age[r] <= age[r] + 1'b1;
      end
      if (wr_en) begin
        cells[wr_row] <= wr_lmask;
        age[wr_row]   <= '0;
      end
      precharge_rows <= refresh ? ($clog2(ROWS+1))'(ROWS) : $countones(hit);
    end
  end

endmodule
