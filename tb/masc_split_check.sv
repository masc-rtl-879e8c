// masc_split_check: testbench helper that drives one 32-bit-key associative
// memory built with BLOCK_W-bit blocks (16 rows) and checks it against
// masc_ref_model. After filling the rows it runs three settings in turn:
// exact, N1 low blocks at 1-bit and N2 low blocks at 2-bit approximation,
// 300 searches each, checking fpu_stop and every response. It raises `done`
// and reports its check and failure counts, and how many approximate hits
// occurred.
module masc_split_check
  import masc_pkg::*;
#(
  parameter int BLOCK_W = 8,
  parameter int N1      = 1,
  parameter int N2      = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   approx_hits
);
  localparam int K = 32, R = 16;
  localparam int CW = $clog2(32 / BLOCK_W + 1);
  logic cfg_we = 0;
  approx_mode_e cfg_mode = APPROX_EXACT;
  logic [CW-1:0] cfg_blocks = '0;
  logic wr_en = 0;
  logic [3:0] wr_row = 0;
  logic [K-1:0] wr_key = 0, wr_care = 0;
  logic [31:0] wr_data = 0;
  logic search_valid = 0;
  logic [K-1:0] search_key = 0;
  logic fpu_stop, out_valid, out_hit;
  logic [3:0] out_row;
  logic [31:0] out_data, search_count, precharge_count;
  logic [31:0] results [R];
  bit p_valid = 0, p_hit = 0;
  int p_row = 0;

  masc_ref_model #(.KEY_W(K), .BLOCK_W(BLOCK_W), .ROWS(R)) ref_m ();
  masc_assoc_mem #(.KEY_W(K), .BLOCK_W(BLOCK_W), .ROWS(R), .DATA_W(32)) dut (.*);

  initial begin
    done = 0; checks = 0; failures = 0; approx_hits = 0;
    @(posedge rst_n);
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 4'(r); wr_key = $urandom; wr_care = '1;
      wr_data = $urandom; results[r] = wr_data;
      ref_m.write(r, wr_key, wr_care);
    end
    @(negedge clk);
    wr_en = 0;
    for (int ph = 0; ph < 3; ph++) begin
      approx_mode_e m;
      int nb;
      m  = approx_mode_e'(ph);
      nb = (ph == 0) ? 0 : (ph == 1) ? N1 : N2;
      cfg_we = 1; cfg_mode = m; cfg_blocks = CW'(nb);
      void'(ref_m.configure(m, nb));
      @(negedge clk);
      cfg_we = 0;
      p_valid = 0;   // the configuration cycle carried no search
      for (int t = 0; t < 300; t++) begin
        logic [63:0] exp;
        int npre, exp_row;
        search_valid = ($urandom_range(5) != 0);
        search_key = ref_m.val[$urandom_range(R - 1)];
        if ($urandom_range(2) != 0) search_key[$urandom_range(5)] ^= 1'b1;
        if ($urandom_range(3) == 0) search_key[$urandom_range(5)] ^= 1'b1;
        exp = '0; npre = 0;
        if (search_valid) begin
          ref_m.search(search_key, exp, npre);
          if (exp != 0 && ref_m.last_maxd > 0) approx_hits++;
        end
        exp_row = 0;
        for (int r = R - 1; r >= 0; r--) if (exp[r]) exp_row = r;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== p_valid || (p_valid && out_hit !== p_hit) ||
            (p_valid && p_hit && (int'(out_row) != p_row || out_data !== results[p_row])) ||
            fpu_stop !== (search_valid && exp != 0)) begin
          failures++;
          $display("FAIL BLOCK_W=%0d phase %0d t=%0d", BLOCK_W, ph, t);
        end
        p_valid = search_valid; p_hit = (exp != 0); p_row = exp_row;
        @(negedge clk);
      end
      search_valid = 0;
    end
    done = 1;
  end
endmodule
