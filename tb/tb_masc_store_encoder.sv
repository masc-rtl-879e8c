// tb_masc_store_encoder: random ternary patterns against a bitwise reference.
// Cell j must be low resistance exactly when every cared-for bit of j equals
// the pattern bit; a fully specified pattern must give a single such cell.
module tb_masc_store_encoder;
  localparam int unsigned W = 8;
  logic [W-1:0]      value, care;
  logic [(1<<W)-1:0] lmask;
  int checks = 0, failures = 0;

  masc_store_encoder #(.BLOCK_W(W)) dut (.value(value), .care(care), .lmask(lmask));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      value = W'($urandom);
      care  = (t < 50) ? '1 : W'($urandom);
      #1;
      for (int j = 0; j < (1 << W); j++) begin
        logic exp;
        exp = 1'b1;
        for (int b = 0; b < int'(W); b++)
          if (care[b] && (j[b] != value[b])) exp = 1'b0;
        checks++;
        if (lmask[j] !== exp) begin
          failures++;
          $display("FAIL value=%h care=%h cell %0d = %0b", value, care, j, lmask[j]);
        end
      end
      checks++;
      if ($countones(lmask) != (1 << (W - $countones(care)))) begin
        failures++;
        $display("FAIL value=%h care=%h: %0d low cells", value, care, $countones(lmask));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
