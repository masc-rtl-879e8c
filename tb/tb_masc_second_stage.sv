// tb_masc_second_stage: random EnL patterns against a reference AND across
// blocks, with the lowest hit row as the selected row.
module tb_masc_second_stage;
  localparam int unsigned B = 4, R = 32;
  logic [B-1:0][R-1:0] enl;
  logic [R-1:0]        row_hit;
  logic                hit;
  logic [4:0]          hit_row;
  int checks = 0, failures = 0;

  masc_second_stage #(.BLOCKS(B), .ROWS(R)) dut (
    .enl(enl), .row_hit(row_hit), .hit(hit), .hit_row(hit_row));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [R-1:0] exp_rows;
      int           exp_row;
      // mostly-ones patterns so that rows often survive all blocks
      for (int b = 0; b < int'(B); b++)
        enl[b] = $urandom | $urandom | ((t % 3 == 0) ? $urandom : 32'h0);
      #1;
      exp_row = 0;
      for (int r = int'(R) - 1; r >= 0; r--) begin
        exp_rows[r] = enl[0][r] & enl[1][r] & enl[2][r] & enl[3][r];
        if (exp_rows[r]) exp_row = r;
      end
      checks++;
      if (row_hit !== exp_rows || hit !== (exp_rows != 0) ||
          (hit && int'(hit_row) != exp_row)) begin
        failures++;
        $display("FAIL rows %h/%h hit %0b row %0d/%0d", row_hit, exp_rows, hit, hit_row, exp_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
