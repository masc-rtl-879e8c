// masc_result_mem: result memory of the associative memory.
//
// One DATA_W-bit word per TCAM row holds the precomputed FPU result for the
// pattern stored in that row (a 1T-1R resistive array in the physical
// design, written once at the start of a kernel). On a TCAM hit the hit row is
// activated and its word read. Written here as a plain array with one write
// and one read port.
//
// Timing: writes take effect at the rising edge with wr_en. A read (rd_en,
// rd_row) at a rising edge returns rd_data and rd_valid from that edge on.
module masc_result_mem #(
  parameter int unsigned ROWS   = 32,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ROW_W-1:0]  wr_row,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  input  logic [ROW_W-1:0]  rd_row,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_valid
);

  logic [DATA_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) rd_data <= mem[rd_row];
    end
  end

endmodule
