// tb_masc_result_mem: fills the result memory with random words and reads
// them back in random order, checking the one-cycle read latency.
module tb_masc_result_mem;
  localparam int unsigned R = 32, D = 32;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [4:0] wr_row = 0, rd_row = 0;
  logic [D-1:0] wr_data = 0, rd_data;
  logic rd_valid;
  logic [D-1:0] ref_mem [R];
  int checks = 0, failures = 0;

  masc_result_mem #(.ROWS(R), .DATA_W(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < int'(R); r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 5'(r); wr_data = $urandom; ref_mem[r] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      int r;
      r = $urandom_range(R - 1);
      rd_en = 1; rd_row = 5'(r);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (!rd_valid || rd_data !== ref_mem[r]) begin
        failures++;
        $display("FAIL row %0d: %h expected %h valid %0b", r, rd_data, ref_mem[r], rd_valid);
      end
      if (t % 7 == 0) begin
        // overwrite a row and read it in the next cycle
        wr_en = 1; wr_row = 5'(r); wr_data = $urandom; ref_mem[r] = wr_data;
        @(negedge clk);
        wr_en = 0;
      end
    end
    @(negedge clk);
    checks++;
    if (rd_valid) begin
      failures++;
      $display("FAIL rd_valid without a read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
