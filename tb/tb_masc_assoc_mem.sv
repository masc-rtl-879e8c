// tb_masc_assoc_mem: associative memory of a 32-bit-key FPU (8-bit blocks,
// 16 rows, 32-bit results). Rows are filled with random patterns and
// results; searches are issued back to back. fpu_stop must follow a hit one
// cycle after the search, out_* two cycles after with the stored result of
// the lowest hit row, and the search and recharged-line counters must match
// the reference model at the end. The 1-bit approximation is switched on
// half way through.
module tb_masc_assoc_mem;
  import masc_pkg::*;
  localparam int unsigned K = 32, W = 8, R = 16, D = 32;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  approx_mode_e cfg_mode = APPROX_EXACT;
  logic [2:0] cfg_blocks = 0;
  logic wr_en = 0;
  logic [3:0] wr_row = 0;
  logic [K-1:0] wr_key = 0, wr_care = 0;
  logic [D-1:0] wr_data = 0;
  logic search_valid = 0;
  logic [K-1:0] search_key = 0;
  logic fpu_stop, out_valid, out_hit;
  logic [3:0] out_row;
  logic [D-1:0] out_data;
  logic [31:0] search_count, precharge_count;
  logic [D-1:0] results [R];
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_search = 0, tot_pre = 0;
  // expectation of the previous cycle's search, checked against out_*
  bit   p_valid = 0, p_hit = 0;
  int   p_row = 0;

  masc_ref_model #(.KEY_W(K), .BLOCK_W(W), .ROWS(R)) ref_m ();
  masc_assoc_mem #(.KEY_W(K), .BLOCK_W(W), .ROWS(R), .DATA_W(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < int'(R); r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 4'(r); wr_key = $urandom; wr_care = '1;
      wr_data = $urandom; results[r] = wr_data;
      ref_m.write(r, wr_key, wr_care);
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [63:0] exp;
      int npre, exp_row;
      if (t == 500) begin
        cfg_we = 1; cfg_mode = APPROX_1HD; cfg_blocks = 3'd2;
        tot_pre += ref_m.configure(APPROX_1HD, 2);
      end else cfg_we = 0;
      search_valid = (t != 500) && ($urandom_range(5) != 0);
      if ($urandom_range(3) == 0) search_key = $urandom;
      else begin
        search_key = ref_m.val[$urandom_range(R - 1)];
        if ($urandom_range(1) == 0) search_key[$urandom_range(15)] ^= 1'b1;
      end
      exp = '0; npre = 0;
      if (search_valid) begin ref_m.search(search_key, exp, npre); n_search++; end
      tot_pre += npre;
      exp_row = 0;
      for (int r = int'(R) - 1; r >= 0; r--) if (exp[r]) exp_row = r;
      @(posedge clk); #1;
      // response of the previous search
      checks++;
      if (out_valid !== p_valid || (p_valid && out_hit !== p_hit) ||
          (p_valid && p_hit && (int'(out_row) != p_row || out_data !== results[p_row]))) begin
        failures++;
        $display("FAIL t=%0d out valid=%0b hit=%0b row=%0d data=%h, expected %0b %0b %0d %h",
                 t, out_valid, out_hit, out_row, out_data, p_valid, p_hit, p_row, results[p_row]);
      end
      // clock-gate request of this search
      checks++;
      if (fpu_stop !== (search_valid && exp != 0)) begin
        failures++;
        $display("FAIL t=%0d fpu_stop=%0b", t, fpu_stop);
      end
      p_valid = search_valid; p_hit = (exp != 0); p_row = exp_row;
      if (search_valid) begin if (exp != 0) n_hit++; else n_miss++; end
      @(negedge clk);
    end
    search_valid = 0; cfg_we = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (int'(search_count) != n_search || int'(precharge_count) != tot_pre) begin
      failures++;
      $display("FAIL counters searches %0d/%0d precharges %0d/%0d",
               search_count, n_search, precharge_count, tot_pre);
    end
    $display("hits=%0d misses=%0d recharged=%0d (conventional %0d)",
             n_hit, n_miss, tot_pre, n_search * R * (K / W));
    checks++;
    if (n_hit == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL hits or misses never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
