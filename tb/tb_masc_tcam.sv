// tb_masc_tcam: two-stage MASC TCAM (32-bit key, 8-bit blocks, 16 rows)
// against masc_ref_pkg. Rows hold random fully specified and partly
// don't-care patterns; keys are stored patterns with 0-2 flipped bits or
// random words. The run goes through exact mode and 1- and 2-bit
// approximation on one and two low blocks, and checks every search's row
// hits, lowest hit row, one-cycle latency and recharged-line count.
module tb_masc_tcam;
  import masc_pkg::*;
  localparam int unsigned K = 32, W = 8, R = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  approx_mode_e cfg_mode = APPROX_EXACT;
  logic [2:0] cfg_blocks = 0;
  logic wr_en = 0;
  logic [3:0] wr_row = 0;
  logic [K-1:0] wr_key = 0, wr_care = 0;
  logic search_en = 0;
  logic [K-1:0] search_key = 0;
  logic [R-1:0] row_hit;
  logic hit, result_valid;
  logic [3:0] hit_row;
  logic [6:0] precharge_rows;
  int checks = 0, failures = 0;
  int n_hit = 0, n_multi = 0, n_approx = 0, n_miss = 0;
  masc_ref_model #(.KEY_W(K), .BLOCK_W(W), .ROWS(R)) ref_m ();

  masc_tcam #(.KEY_W(K), .BLOCK_W(W), .ROWS(R)) dut (.*);

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
    for (int r = 0; r < int'(R) - 1; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 4'(r); wr_key = $urandom;
      wr_care = (r % 4 == 3) ? 32'hFFFF_FF00 : 32'hFFFF_FFFF;
      if (r == 5) wr_key = ref_m.val[2] ^ 32'h1;   // two rows near each other
      if (r == 6) begin wr_key = ref_m.val[2]; wr_care = 32'hFFFF_0000; end
      ref_m.write(r, wr_key, wr_care);
    end
    @(negedge clk);
    wr_en = 0;
    for (int phase = 0; phase < 5; phase++) begin
      approx_mode_e m;
      int nb, npre_cfg;
      m  = (phase == 0) ? APPROX_EXACT : (phase % 2 == 1) ? APPROX_1HD : APPROX_2HD;
      nb = (phase == 0) ? 0 : (phase < 3) ? 1 : 2;
      cfg_we = 1; cfg_mode = m; cfg_blocks = 3'(nb);
      npre_cfg = ref_m.configure(m, nb);
      @(posedge clk); #1;
      checks++;
      if (int'(precharge_rows) != npre_cfg) begin
        failures++;
        $display("FAIL configuration refresh recharged %0d lines", precharge_rows);
      end
      @(negedge clk);
      cfg_we = 0;
      for (int t = 0; t < 400; t++) begin
        logic [63:0] exp;
        int npre, exp_row;
        search_en = ($urandom_range(7) != 0);
        if ($urandom_range(5) == 0) search_key = $urandom;
        else begin
          int f;
          search_key = ref_m.val[$urandom_range(R - 2)];
          f = $urandom_range(2);
          for (int k = 0; k < f; k++) search_key[$urandom_range(15)] ^= 1'b1;
        end
        if (search_en) ref_m.search(search_key, exp, npre);
        else begin exp = '0; npre = 0; end
        exp_row = 0;
        for (int r = int'(R) - 1; r >= 0; r--) if (exp[r]) exp_row = r;
        @(posedge clk); #1;
        checks++;
        if (result_valid !== search_en || int'(precharge_rows) != npre ||
            (search_en && (row_hit !== exp[R-1:0] || hit !== (exp != 0) ||
                           (hit && int'(hit_row) != exp_row)))) begin
          failures++;
          $display("FAIL phase %0d t=%0d key=%h rows=%h/%h row=%0d/%0d pre=%0d/%0d",
                   phase, t, search_key, row_hit, exp[R-1:0], hit_row, exp_row,
                   precharge_rows, npre);
        end
        if (search_en) begin
          if (exp == 0) n_miss++;
          else begin
            n_hit++;
            if (ref_m.last_nhits > 1) n_multi++;
            if (ref_m.last_maxd > 0) n_approx++;
          end
        end
        @(negedge clk);
      end
      search_en = 0;
    end
    $display("hits=%0d multi=%0d approx=%0d misses=%0d", n_hit, n_multi, n_approx, n_miss);
    checks++;
    if (n_hit == 0 || n_multi == 0 || n_approx == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL a search outcome never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
