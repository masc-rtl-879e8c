// tb_masc_search_encoder: exhaustive check of the search-line encoder.
// Every 8-bit value must raise exactly the line of its own number, and no
// line may be high while the search is disabled.
module tb_masc_search_encoder;
  localparam int unsigned W = 8;
  logic              en;
  logic [W-1:0]      key;
  logic [(1<<W)-1:0] lines;
  int checks = 0, failures = 0;

  masc_search_encoder #(.BLOCK_W(W)) dut (.en(en), .key(key), .lines(lines));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      key = W'(v);
      en  = 1'b1;
      #1;
      for (int j = 0; j < (1 << W); j++) begin
        checks++;
        if (lines[j] !== (j == v)) begin
          failures++;
          $display("FAIL key=%0d line %0d = %0b", v, j, lines[j]);
        end
      end
      en = 1'b0;
      #1;
      checks++;
      if (lines != '0) begin
        failures++;
        $display("FAIL lines active while disabled, key=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
