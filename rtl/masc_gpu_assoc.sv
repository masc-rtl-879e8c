// masc_gpu_assoc: MASC associative memories of one GPU compute unit.
//
// Each of the four floating-point unit kinds gets its own associative
// memory, sized by its operands: ADD and MUL take two 32-bit operands
// (64-bit key), SQRT one (32-bit key) and MAD three (96-bit key). All use the
// same block width (default 8-bit blocks, the energy-optimal split), the same
// row count and 32-bit results. Ports are indexed by fpu_kind_e; keys are
// carried MAX_KEY_W bits wide and a unit ignores the bits above its own key
// width. Each unit has its own approximation setting, so the host can pick
// the number of approximated low blocks per FPU for the running application.
// The FPUs themselves are outside this block: fpu_stop[k] is the clock-gate
// request for FPU k, out_data[k] the result to use when out_hit[k] is set.
//
// Timing per unit as in masc_assoc_mem: fpu_stop one cycle after the search,
// out_* two cycles after.
module masc_gpu_assoc
  import masc_pkg::*;
#(
  parameter int unsigned BLOCK_W = 8,
  parameter int unsigned ROWS    = 32,
  parameter int unsigned DATA_W  = 32,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned PER_OP = (OPERAND_W / BLOCK_W > 0) ? OPERAND_W / BLOCK_W : 1,
  localparam int unsigned CNT_W  = $clog2(PER_OP + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic         [NUM_FPU-1:0]         cfg_we,
  input  approx_mode_e [NUM_FPU-1:0]         cfg_mode,
  input  logic         [NUM_FPU-1:0][CNT_W-1:0]     cfg_blocks,
  input  logic         [NUM_FPU-1:0]         wr_en,
  input  logic         [NUM_FPU-1:0][ROW_W-1:0]     wr_row,
  input  logic         [NUM_FPU-1:0][MAX_KEY_W-1:0] wr_key,
  input  logic         [NUM_FPU-1:0][MAX_KEY_W-1:0] wr_care,
  input  logic         [NUM_FPU-1:0][DATA_W-1:0]    wr_data,
  input  logic         [NUM_FPU-1:0]         search_valid,
  input  logic         [NUM_FPU-1:0][MAX_KEY_W-1:0] search_key,
  output logic         [NUM_FPU-1:0]         fpu_stop,
  output logic         [NUM_FPU-1:0]         out_valid,
  output logic         [NUM_FPU-1:0]         out_hit,
  output logic         [NUM_FPU-1:0][ROW_W-1:0]     out_row,
  output logic         [NUM_FPU-1:0][DATA_W-1:0]    out_data,
  output logic         [NUM_FPU-1:0][31:0]          search_count,
  output logic         [NUM_FPU-1:0][31:0]          precharge_count
);

  for (genvar k = 0; k < NUM_FPU; k++) begin : g_fpu
    localparam int unsigned KW = fpu_key_w(k);

    masc_assoc_mem #(
      .KEY_W   (KW),
      .BLOCK_W (BLOCK_W),
      .ROWS    (ROWS),
      .DATA_W  (DATA_W)
    ) u_am (
      .clk             (clk),
      .rst_n           (rst_n),
      .cfg_we          (cfg_we[k]),
      .cfg_mode        (cfg_mode[k]),
      .cfg_blocks      (cfg_blocks[k]),
      .wr_en           (wr_en[k]),
      .wr_row          (wr_row[k]),
      .wr_key          (wr_key[k][KW-1:0]),
      .wr_care         (wr_care[k][KW-1:0]),
      .wr_data         (wr_data[k]),
      .search_valid    (search_valid[k]),
      .search_key      (search_key[k][KW-1:0]),
      .fpu_stop        (fpu_stop[k]),
      .out_valid       (out_valid[k]),
      .out_hit         (out_hit[k]),
      .out_row         (out_row[k]),
      .out_data        (out_data[k]),
      .search_count    (search_count[k]),
      .precharge_count (precharge_count[k])
    );
  end

endmodule
