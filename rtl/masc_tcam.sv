// masc_tcam: two-stage multiple-access single-charge TCAM.
//
// The KEY_W-bit search word is cut into BLOCKS = KEY_W/BLOCK_W slices (the
// default 8-bit blocks give the "8:4" split of a 32-bit operand). Stage one is
// one masc_partial_tcam per slice, all searched in parallel; each reports per
// row whether that row's slice matched. Stage two (masc_second_stage) declares
// a row a hit when it matched in every slice. masc_precharge_ctrl tells each
// partial TCAM when to precharge all its match lines, so that blocks in
// approximate mode run longer refresh periods than exact blocks.
//
// Patterns are written as ternary words (wr_key with wr_care, 1 = bit must
// match); masc_store_encoder turns each slice into cell states.
//
// Timing: a search presented with search_en at a rising edge is answered from
// that edge on (one cycle of latency): row_hit, hit, hit_row and
// result_valid. precharge_rows is the number of match lines recharged at that
// edge over all blocks, the quantity that sets search energy.
module masc_tcam
  import masc_pkg::*;
#(
  parameter int unsigned KEY_W   = 64,
  parameter int unsigned BLOCK_W = 8,
  parameter int unsigned ROWS    = 32,
  localparam int unsigned BLOCKS = KEY_W / BLOCK_W,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned PER_OP = (OPERAND_W / BLOCK_W > 0) ? OPERAND_W / BLOCK_W : 1,
  localparam int unsigned CNT_W  = $clog2(PER_OP + 1),
  localparam int unsigned PC_W   = $clog2(BLOCKS * ROWS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // approximation setting
  input  logic               cfg_we,
  input  approx_mode_e       cfg_mode,
  input  logic [CNT_W-1:0]   cfg_blocks,
  // programming
  input  logic               wr_en,
  input  logic [ROW_W-1:0]   wr_row,
  input  logic [KEY_W-1:0]   wr_key,
  input  logic [KEY_W-1:0]   wr_care,
  // search
  input  logic               search_en,
  input  logic [KEY_W-1:0]   search_key,
  output logic [ROWS-1:0]    row_hit,
  output logic               hit,
  output logic [ROW_W-1:0]   hit_row,
  output logic               result_valid,
  output logic [PC_W-1:0]    precharge_rows
);

  // Refresh periods are defined for 2-, 4- and 8-bit blocks only, and the
  // key must divide into whole blocks.
  if (!(BLOCK_W == 2 || BLOCK_W == 4 || BLOCK_W == 8) || (KEY_W % BLOCK_W) != 0) begin : g_bad_param
    $error("masc_tcam: BLOCK_W must be 2, 4 or 8 and divide KEY_W");
  end

  logic [BLOCKS-1:0][ROWS-1:0]  enl;
  logic [BLOCKS-1:0]            enl_valid;
  logic [BLOCKS-1:0]            refresh;
  logic [BLOCKS-1:0][AGE_W-1:0] period;
  logic [$clog2(ROWS+1)-1:0]    pc_rows [BLOCKS];

  masc_precharge_ctrl #(.BLOCKS(BLOCKS), .BLOCK_W(BLOCK_W)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_we),
    .cfg_mode   (cfg_mode),
    .cfg_blocks (cfg_blocks),
    .search_en  (search_en),
    .refresh    (refresh),
    .period     (period)
  );

  for (genvar b = 0; b < BLOCKS; b++) begin : g_blk
    logic [(1<<BLOCK_W)-1:0] lmask;

    masc_store_encoder #(.BLOCK_W(BLOCK_W)) u_store (
      .value (wr_key [b*BLOCK_W +: BLOCK_W]),
      .care  (wr_care[b*BLOCK_W +: BLOCK_W]),
      .lmask (lmask)
    );

    masc_partial_tcam #(.ROWS(ROWS), .BLOCK_W(BLOCK_W)) u_part (
      .clk            (clk),
      .rst_n          (rst_n),
      .wr_en          (wr_en),
      .wr_row         (wr_row),
      .wr_lmask       (lmask),
      .search_en      (search_en),
      .search_key     (search_key[b*BLOCK_W +: BLOCK_W]),
      .refresh        (refresh[b]),
      .enl            (enl[b]),
      .enl_valid      (enl_valid[b]),
      .precharge_rows (pc_rows[b])
    );
  end

  masc_second_stage #(.BLOCKS(BLOCKS), .ROWS(ROWS)) u_stage2 (
    .enl     (enl),
    .row_hit (row_hit),
    .hit     (hit),
    .hit_row (hit_row)
  );

  assign result_valid = &enl_valid;

  always_comb begin
    precharge_rows = '0;
    for (int unsigned b = 0; b < BLOCKS; b++) precharge_rows += PC_W'(pc_rows[b]);
  end

  // The period is exported for observation only; it must never be zero.
  for (genvar b = 0; b < BLOCKS; b++) begin : g_chk
    a_period_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                       period[b] != '0);
  end

endmodule
