// masc_assoc_mem: MASC associative memory serving one FPU.
//
// Frequent operand patterns of the FPU are stored in a masc_tcam and their
// results in a masc_result_mem, both filled by the host before a kernel runs.
// Every operand set issued to the FPU is also searched here. A hit raises
// fpu_stop, the signal that clock-gates the FPU for that operation, and the
// result is read from the result memory instead; a miss leaves the FPU to
// compute it. The FPU and the selection between its result and out_data lie
// outside this block.
//
// Timing: search_valid/search_key at edge t; fpu_stop, hit_row valid from
// edge t (one cycle); out_valid, out_hit, out_row, out_data from edge t+1
// (two cycles), one response per search, in order, one search per cycle.
// search_count and precharge_count accumulate searches and recharged match
// lines, from which the precharge activity per search can be read off.
module masc_assoc_mem
  import masc_pkg::*;
#(
  parameter int unsigned KEY_W   = 64,
  parameter int unsigned BLOCK_W = 8,
  parameter int unsigned ROWS    = 32,
  parameter int unsigned DATA_W  = 32,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned PER_OP = (OPERAND_W / BLOCK_W > 0) ? OPERAND_W / BLOCK_W : 1,
  localparam int unsigned CNT_W  = $clog2(PER_OP + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  approx_mode_e       cfg_mode,
  input  logic [CNT_W-1:0]   cfg_blocks,
  input  logic               wr_en,
  input  logic [ROW_W-1:0]   wr_row,
  input  logic [KEY_W-1:0]   wr_key,
  input  logic [KEY_W-1:0]   wr_care,
  input  logic [DATA_W-1:0]  wr_data,
  input  logic               search_valid,
  input  logic [KEY_W-1:0]   search_key,
  output logic               fpu_stop,
  output logic               out_valid,
  output logic               out_hit,
  output logic [ROW_W-1:0]   out_row,
  output logic [DATA_W-1:0]  out_data,
  output logic [31:0]        search_count,
  output logic [31:0]        precharge_count
);

  localparam int unsigned PC_W = $clog2((KEY_W / BLOCK_W) * ROWS + 1);

  logic             hit;
  logic [ROW_W-1:0] hit_row;
  logic             tcam_valid;
  logic [PC_W-1:0]  pc_rows;
  logic [DATA_W-1:0] rd_data;
  logic             rd_valid;

  masc_tcam #(.KEY_W(KEY_W), .BLOCK_W(BLOCK_W), .ROWS(ROWS)) u_tcam (
    .clk            (clk),
    .rst_n          (rst_n),
    .cfg_we         (cfg_we),
    .cfg_mode       (cfg_mode),
    .cfg_blocks     (cfg_blocks),
    .wr_en          (wr_en),
    .wr_row         (wr_row),
    .wr_key         (wr_key),
    .wr_care        (wr_care),
    .search_en      (search_valid),
    .search_key     (search_key),
    .row_hit        (),
    .hit            (hit),
    .hit_row        (hit_row),
    .result_valid   (tcam_valid),
    .precharge_rows (pc_rows)
  );

  masc_result_mem #(.ROWS(ROWS), .DATA_W(DATA_W)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (wr_en),
    .wr_row   (wr_row),
    .wr_data  (wr_data),
    .rd_en    (tcam_valid & hit),
    .rd_row   (hit_row),
    .rd_data  (rd_data),
    .rd_valid (rd_valid)
  );

  assign fpu_stop = tcam_valid & hit;

  logic             hit_q;
  logic [ROW_W-1:0] row_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid       <= 1'b0;
      hit_q           <= 1'b0;
      row_q           <= '0;
      search_count    <= '0;
      precharge_count <= '0;
    end else begin
      out_valid <= tcam_valid;
      hit_q     <= tcam_valid & hit;
      row_q     <= hit_row;
      if (search_valid) search_count <= search_count + 1;
      precharge_count <= precharge_count + 32'(pc_rows);
    end
  end

  assign out_hit  = hit_q;
  assign out_row  = row_q;
  assign out_data = hit_q ? rd_data : '0;

  // A read of the result memory happens exactly when the previous cycle hit.
  a_read_on_hit: assert property (@(posedge clk) disable iff (!rst_n)
                                  rd_valid == hit_q);

endmodule
