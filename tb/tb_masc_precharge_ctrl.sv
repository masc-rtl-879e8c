// tb_masc_precharge_ctrl: refresh timing of a controller for 8 blocks of 8
// bits (two 32-bit operands). For each setting the testbench counts the
// searches between refresh strobes of every block and compares them with the
// expected periods: 4 for exact blocks, 6 for 1-bit and 8 for 2-bit
// approximate blocks, with approximation on the low blocks of each operand.
module tb_masc_precharge_ctrl;
  import masc_pkg::*;
  localparam int unsigned B = 8, W = 8;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  approx_mode_e cfg_mode = APPROX_EXACT;
  logic [2:0] cfg_blocks = 0;
  logic search_en = 0;
  logic [B-1:0] refresh;
  logic [B-1:0][AGE_W-1:0] period;
  int checks = 0, failures = 0;

  masc_precharge_ctrl #(.BLOCKS(B), .BLOCK_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_setting(approx_mode_e m, int nb);
    int since [B];
    int expp  [B];
    int seen  [B];
    @(negedge clk);
    cfg_we = 1; cfg_mode = m; cfg_blocks = 3'(nb);
    #1;
    checks++;
    if (refresh != '1) begin
      failures++;
      $display("FAIL configuration write does not refresh all blocks");
    end
    @(negedge clk);
    cfg_we = 0;
    for (int b = 0; b < int'(B); b++) begin
      since[b] = 0; seen[b] = 0;
      expp[b] = ((b % 4) < nb) ? ((m == APPROX_1HD) ? 6 : (m == APPROX_2HD) ? 8 : 4) : 4;
    end
    for (int t = 0; t < 200; t++) begin
      search_en = ($urandom_range(3) != 0);
      #1;
      for (int b = 0; b < int'(B); b++) begin
        if (search_en) since[b]++;
        checks++;
        if (int'(period[b]) != expp[b]) begin
          failures++;
          $display("FAIL block %0d period %0d expected %0d", b, period[b], expp[b]);
        end
        if (refresh[b] !== (search_en && since[b] == expp[b])) begin
          failures++;
          $display("FAIL block %0d refresh=%0b after %0d searches (period %0d)",
                   b, refresh[b], since[b], expp[b]);
        end
        if (refresh[b]) begin since[b] = 0; seen[b]++; end
      end
      @(negedge clk);
    end
    search_en = 0;
    for (int b = 0; b < int'(B); b++) begin
      checks++;
      if (seen[b] < 10) begin
        failures++;
        $display("FAIL block %0d refreshed only %0d times", b, seen[b]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_setting(APPROX_EXACT, 0);
    run_setting(APPROX_1HD, 1);
    run_setting(APPROX_2HD, 2);
    run_setting(APPROX_1HD, 4);
    run_setting(APPROX_EXACT, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
