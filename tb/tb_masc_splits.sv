// tb_masc_splits: the three block splits of a 32-bit operand side by side,
// 2:16, 4:8 and 8:4, each run through exact mode and then with the number
// of approximated low blocks that keeps image quality acceptable for an edge
// detector: 3 blocks at 1-bit / 2 at 2-bit distance for 2:16, 2 / 1 for 4:8,
// 1 / 1 for 8:4. Every split must agree with the reference model and must
// produce approximate hits.
module tb_masc_splits;
  logic clk = 0, rst_n = 0;
  logic [2:0] done;
  int c [3], f [3], a [3];
  int checks, failures;

  masc_split_check #(.BLOCK_W(2), .N1(3), .N2(2)) u_2 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .approx_hits(a[0]));
  masc_split_check #(.BLOCK_W(4), .N1(2), .N2(1)) u_4 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .approx_hits(a[1]));
  masc_split_check #(.BLOCK_W(8), .N1(1), .N2(1)) u_8 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .approx_hits(a[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done == 3'b111);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    for (int i = 0; i < 3; i++) begin
      $display("split %0d: checks=%0d failures=%0d approximate hits=%0d", i, c[i], f[i], a[i]);
      checks++;
      if (a[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
