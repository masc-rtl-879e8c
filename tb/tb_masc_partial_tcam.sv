// tb_masc_partial_tcam: one 8-bit partial TCAM of 8 rows against a reference
// model of the match-line behaviour. The reference keeps each row's ternary
// pattern and its charge age (searches since its last precharge) and expects
// a hit when the cared-for Hamming distance to the key is within the
// tolerance of that age: 0 up to the exact period (4), 1 for two more
// searches, 2 beyond. The testbench issues the full refresh itself, with
// periods of 4, 6 and 8 searches in turn, and also checks the number of
// match lines recharged per search.
module tb_masc_partial_tcam;
  import masc_pkg::*;
  localparam int unsigned R = 8, W = 8, C = 1 << W;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [2:0] wr_row = 0;
  logic [C-1:0] wr_lmask = 0;
  logic search_en = 0;
  logic [W-1:0] search_key = 0;
  logic refresh = 0;
  logic [R-1:0] enl;
  logic enl_valid;
  logic [3:0] precharge_rows;

  logic [W-1:0] val [R], care [R];
  bit           written [R];
  int           age [R];
  int checks = 0, failures = 0;
  int n_exact = 0, n_hd1 = 0, n_hd2 = 0, n_miss = 0;

  masc_partial_tcam #(.ROWS(R), .BLOCK_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int r, logic [W-1:0] v, logic [W-1:0] c);
    @(negedge clk);
    wr_en = 1; wr_row = 3'(r);
    for (int j = 0; j < int'(C); j++) wr_lmask[j] = ((W'(j) ^ v) & c) == 0;
    val[r] = v; care[r] = c; written[r] = 1; age[r] = 0;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    int period, cnt;
    for (int r = 0; r < int'(R); r++) begin written[r] = 0; age[r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // rows 0..5 fully specified, row 6 with don't-care low nibble, row 7 empty
    for (int r = 0; r < 6; r++) write_row(r, W'($urandom), '1);
    write_row(6, W'($urandom), 8'hF0);
    cnt = 0; period = 4;
    for (int t = 0; t < 900; t++) begin
      logic [R-1:0] exp;
      int npre;
      if (t % 300 == 0) period = 4 + 2 * (t / 300);   // 4, 6, 8
      @(negedge clk);
      search_en = ($urandom_range(9) != 0);
      if ($urandom_range(4) == 0) search_key = W'($urandom);
      else begin
        int r, f;
        r = $urandom_range(6);
        search_key = val[r];
        f = $urandom_range(2);
        for (int k = 0; k < f; k++) search_key[$urandom_range(W - 1)] ^= 1'b1;
      end
      refresh = search_en && (cnt + 1 >= period);
      // reference
      exp = '0;
      for (int r = 0; r < int'(R); r++) begin
        int a, tol, d;
        a = age[r] + 1;
        tol = (a <= 4) ? 0 : (a <= 6) ? 1 : 2;
        d = $countones((search_key ^ val[r]) & care[r]);
        exp[r] = search_en && written[r] && (d <= tol);
        if (search_en && written[r]) begin
          if (exp[r] && d == 0) n_exact++;
          else if (exp[r] && d == 1) n_hd1++;
          else if (exp[r] && d == 2) n_hd2++;
          else n_miss++;
        end
      end
      npre = refresh ? int'(R) : $countones(exp);
      for (int r = 0; r < int'(R); r++) begin
        if (refresh || exp[r]) age[r] = 0;
        else if (search_en) age[r] = age[r] + 1;
      end
      if (refresh) cnt = 0; else if (search_en) cnt++;
      @(posedge clk);
      #1;
      checks++;
      if (enl_valid !== search_en || (search_en && enl !== exp) ||
          int'(precharge_rows) != npre) begin
        failures++;
        $display("FAIL t=%0d key=%h enl=%b exp=%b valid=%0b pre=%0d/%0d",
                 t, search_key, enl, exp, enl_valid, precharge_rows, npre);
      end
    end
    $display("hits: exact=%0d hd1=%0d hd2=%0d misses=%0d", n_exact, n_hd1, n_hd2, n_miss);
    checks++;
    if (n_exact == 0 || n_hd1 == 0 || n_hd2 == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL a match kind never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
