// masc_precharge_ctrl: precharge (refresh) controller of a MASC TCAM.
//
// Every partial TCAM reuses its match-line charge for a number of searches,
// its refresh period, before all its lines are precharged again. The
// controller holds the application's approximation setting, a mode (exact,
// 1-bit or 2-bit Hamming distance) and the number of low-order blocks it
// applies to, and from it sets each block's period: the low `cfg_blocks`
// blocks of every OPERAND_W-bit operand get the relaxed period of the mode,
// all others the exact period of their width. One counter per block counts
// searches and raises that block's `refresh` together with the search that
// completes its period. Approximating the lowest blocks first follows the
// published scheme; counting per operand is this design's own choice, in
// line with the published block counts being fractions of a 32-bit word.
//
// Interface and timing: cfg_we loads cfg_mode/cfg_blocks at a rising edge
// and refreshes every block at that edge, so a new setting starts from fully
// charged match lines. `refresh` and `period` are combinational from the
// registered state and search_en.
module masc_precharge_ctrl
  import masc_pkg::*;
#(
  parameter int unsigned BLOCKS  = 4,
  parameter int unsigned BLOCK_W = 8,
  localparam int unsigned PER_OP = (OPERAND_W / BLOCK_W > 0) ? OPERAND_W / BLOCK_W : 1,
  localparam int unsigned CNT_W  = $clog2(PER_OP + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  approx_mode_e                  cfg_mode,
  input  logic [CNT_W-1:0]              cfg_blocks,  // low blocks per operand
  input  logic                          search_en,
  output logic [BLOCKS-1:0]             refresh,
  output logic [BLOCKS-1:0][AGE_W-1:0]  period
);

  approx_mode_e     mode_q;
  logic [CNT_W-1:0] nblk_q;
  logic [AGE_W-1:0] cnt [BLOCKS];

  always_comb begin
    for (int unsigned b = 0; b < BLOCKS; b++) begin
      logic approx;
      approx    = (b % PER_OP) < int'(nblk_q);
      period[b] = refresh_period(BLOCK_W, approx ? mode_q : APPROX_EXACT);
      refresh[b] = cfg_we | (search_en && (cnt[b] + 1'b1 >= period[b]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= APPROX_EXACT;
      nblk_q <= '0;
      for (int unsigned b = 0; b < BLOCKS; b++) cnt[b] <= '0;
    end else begin
      if (cfg_we) begin
        mode_q <= cfg_mode;
        nblk_q <= (int'(cfg_blocks) > int'(PER_OP)) ? CNT_W'(PER_OP) : cfg_blocks;
      end
      for (int unsigned b = 0; b < BLOCKS; b++) begin
        if (refresh[b])     cnt[b] <= '0;
        else if (search_en) cnt[b] <= cnt[b] + 1'b1;
      end
    end
  end

endmodule
