// tb_masc_gpu_assoc: end-to-end run of the four FPU associative memories at
// full size (32 rows, 8-bit blocks; 64-, 64-, 32- and 96-bit keys).
//
// Every unit is filled with 32 patterns and results, including don't-care
// patterns and near-duplicate rows, then searched every cycle with stored
// patterns, stored patterns with one or two flipped low-order bits, and
// random words. The approximation setting is changed between exact, 1-bit
// and 2-bit modes. Each unit's clock-gate request, response, result, search
// counter and recharged-line counter are compared with masc_ref_model.
// The run counts how often each mechanism occurred (exact, don't-care,
// multiple and approximate hits, misses, full refreshes, selective
// recharging, setting changes) and fails if one never did.
module tb_masc_gpu_assoc;
  import masc_pkg::*;
  localparam int unsigned R = 32, D = 32, KW = MAX_KEY_W;
  logic clk = 0, rst_n = 0;
  logic [NUM_FPU-1:0] cfg_we = '0;
  approx_mode_e [NUM_FPU-1:0] cfg_mode;
  logic [NUM_FPU-1:0][2:0] cfg_blocks = '0;
  logic [NUM_FPU-1:0] wr_en = '0;
  logic [NUM_FPU-1:0][4:0] wr_row = '0;
  logic [NUM_FPU-1:0][KW-1:0] wr_key = '0, wr_care = '0;
  logic [NUM_FPU-1:0][D-1:0] wr_data = '0;
  logic [NUM_FPU-1:0] search_valid = '0;
  logic [NUM_FPU-1:0][KW-1:0] search_key = '0;
  logic [NUM_FPU-1:0] fpu_stop, out_valid, out_hit;
  logic [NUM_FPU-1:0][4:0] out_row;
  logic [NUM_FPU-1:0][D-1:0] out_data;
  logic [NUM_FPU-1:0][31:0] search_count, precharge_count;

  logic [D-1:0]  results [NUM_FPU][R];
  logic [KW-1:0] pat     [NUM_FPU][R];
  logic [KW-1:0] pcare   [NUM_FPU][R];
  int n_search [NUM_FPU];
  int tot_pre  [NUM_FPU];
  bit p_valid  [NUM_FPU];
  bit p_hit    [NUM_FPU];
  int p_row    [NUM_FPU];
  int checks = 0, failures = 0;
  int n_exact = 0, n_dc = 0, n_multi = 0, n_hd1 = 0, n_hd2 = 0, n_miss = 0;
  int n_refresh = 0, n_selective = 0, n_cfg = 0, n_gate = 0;

  masc_ref_model #(.KEY_W(64), .BLOCK_W(8), .ROWS(R)) ref0 ();
  masc_ref_model #(.KEY_W(64), .BLOCK_W(8), .ROWS(R)) ref1 ();
  masc_ref_model #(.KEY_W(32), .BLOCK_W(8), .ROWS(R)) ref2 ();
  masc_ref_model #(.KEY_W(96), .BLOCK_W(8), .ROWS(R)) ref3 ();

  masc_gpu_assoc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int keyw(int k);
    return (k == 2) ? 32 : (k == 3) ? 96 : 64;
  endfunction

  function automatic logic [KW-1:0] wmask(int k);
    return (k == 2) ? {64'h0, {32{1'b1}}} : (k == 3) ? '1 : {32'h0, {64{1'b1}}};
  endfunction

  function automatic void ref_write(int k, int r, logic [KW-1:0] key, logic [KW-1:0] c);
    case (k)
      0: ref0.write(r, key[63:0], c[63:0]);
      1: ref1.write(r, key[63:0], c[63:0]);
      2: ref2.write(r, key[31:0], c[31:0]);
      default: ref3.write(r, key, c);
    endcase
  endfunction

  function automatic int ref_config(int k, approx_mode_e m, int nb);
    case (k)
      0: return ref0.configure(m, nb);
      1: return ref1.configure(m, nb);
      2: return ref2.configure(m, nb);
      default: return ref3.configure(m, nb);
    endcase
  endfunction

  function automatic void ref_search(int k, logic [KW-1:0] key, output logic [63:0] rows,
                                     output int npre, output int maxd, output int nh);
    case (k)
      0: begin ref0.search(key[63:0], rows, npre); maxd = ref0.last_maxd; nh = ref0.last_nhits; end
      1: begin ref1.search(key[63:0], rows, npre); maxd = ref1.last_maxd; nh = ref1.last_nhits; end
      2: begin ref2.search(key[31:0], rows, npre); maxd = ref2.last_maxd; nh = ref2.last_nhits; end
      default: begin ref3.search(key, rows, npre); maxd = ref3.last_maxd; nh = ref3.last_nhits; end
    endcase
  endfunction

  initial begin
    for (int k = 0; k < int'(NUM_FPU); k++) begin
      cfg_mode[k] = APPROX_EXACT;
      n_search[k] = 0; tot_pre[k] = 0; p_valid[k] = 0; p_hit[k] = 0; p_row[k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill: row 7 duplicates row 3 with a don't-care low byte; row 30 is left empty
    for (int r = 0; r < int'(R) - 1; r++) begin
      @(negedge clk);
      for (int k = 0; k < int'(NUM_FPU); k++) begin
        logic [KW-1:0] key, c;
        key = {$urandom, $urandom, $urandom} & wmask(k);
        c   = wmask(k);
        if (r == 7)  begin key = pat[k][3]; c = wmask(k) & ~96'hFF; end
        if (r == 12) begin key = pat[k][3]; end   // exact duplicate: multiple hit
        if (r == 20) c = wmask(k) & ~96'hF0;
        wr_en[k] = 1; wr_row[k] = 5'(r); wr_key[k] = key; wr_care[k] = c;
        wr_data[k] = $urandom; results[k][r] = wr_data[k];
        pat[k][r] = key; pcare[k][r] = c;
        ref_write(k, r, key, c);
      end
    end
    @(negedge clk);
    wr_en = '0;
    for (int t = 0; t < 1500; t++) begin
      logic [63:0] exp [NUM_FPU];
      // change the approximation setting every 300 cycles, unit by unit
      for (int k = 0; k < int'(NUM_FPU); k++) begin
        cfg_we[k] = (t % 300 == 0) && (t > 0);
        if (cfg_we[k]) begin
          approx_mode_e m;
          int nb;
          m  = approx_mode_e'((t / 300) % 3);
          nb = (m == APPROX_EXACT) ? 0 : 1 + ((t / 300 + k) % 2);
          cfg_mode[k] = m; cfg_blocks[k] = 3'(nb);
          tot_pre[k] += ref_config(k, m, nb);
          n_cfg++;
        end
      end
      for (int k = 0; k < int'(NUM_FPU); k++) begin
        int npre, maxd, nh, sel;
        search_valid[k] = !cfg_we[k] && ($urandom_range(7) != 0);
        sel = $urandom_range(9);
        if (sel == 0) search_key[k] = {$urandom, $urandom, $urandom} & wmask(k);
        else begin
          int f;
          search_key[k] = pat[k][(sel == 1) ? 3 : $urandom_range(R - 2)];
          f = (sel < 5) ? 0 : (sel < 8) ? 1 : 2;
          for (int i = 0; i < f; i++) search_key[k][$urandom_range(7)] ^= 1'b1;
        end
        exp[k] = '0; npre = 0; maxd = 0; nh = 0;
        if (search_valid[k]) begin
          ref_search(k, search_key[k], exp[k], npre, maxd, nh);
          n_search[k]++;
          if (npre >= int'(R)) n_refresh++;
          else if (npre < (keyw(k) / 8) * int'(R)) n_selective++;
          if (exp[k] == 0) n_miss++;
          else begin
            int lr;
            lr = 0;
            for (int r = int'(R) - 1; r >= 0; r--) if (exp[k][r]) lr = r;
            if (nh > 1) n_multi++;
            if (maxd == 1) n_hd1++;
            else if (maxd == 2) n_hd2++;
            else if (pcare[k][lr] != wmask(k)) n_dc++;
            else n_exact++;
          end
        end
        tot_pre[k] += npre;
      end
      @(posedge clk); #1;
      for (int k = 0; k < int'(NUM_FPU); k++) begin
        int exp_row;
        exp_row = 0;
        for (int r = int'(R) - 1; r >= 0; r--) if (exp[k][r]) exp_row = r;
        checks++;
        if (out_valid[k] !== p_valid[k] || (p_valid[k] && out_hit[k] !== p_hit[k]) ||
            (p_valid[k] && p_hit[k] &&
             (int'(out_row[k]) != p_row[k] || out_data[k] !== results[k][p_row[k]]))) begin
          failures++;
          $display("FAIL unit %0d t=%0d out valid=%0b hit=%0b row=%0d, expected %0b %0b %0d",
                   k, t, out_valid[k], out_hit[k], out_row[k], p_valid[k], p_hit[k], p_row[k]);
        end
        checks++;
        if (fpu_stop[k] !== (search_valid[k] && exp[k] != 0)) begin
          failures++;
          $display("FAIL unit %0d t=%0d fpu_stop=%0b", k, t, fpu_stop[k]);
        end
        if (fpu_stop[k]) n_gate++;
        p_valid[k] = search_valid[k]; p_hit[k] = (exp[k] != 0); p_row[k] = exp_row;
      end
      @(negedge clk);
    end
    search_valid = '0; cfg_we = '0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < int'(NUM_FPU); k++) begin
      checks++;
      if (int'(search_count[k]) != n_search[k] || int'(precharge_count[k]) != tot_pre[k]) begin
        failures++;
        $display("FAIL unit %0d counters searches %0d/%0d recharged %0d/%0d", k,
                 search_count[k], n_search[k], precharge_count[k], tot_pre[k]);
      end
      $display("unit %0d: %0d searches, %0d lines recharged, %0d in a conventional TCAM",
               k, n_search[k], tot_pre[k], n_search[k] * int'(R) * (keyw(k) / 8));
    end
    $display("exact=%0d dontcare=%0d multi=%0d hd1=%0d hd2=%0d miss=%0d",
             n_exact, n_dc, n_multi, n_hd1, n_hd2, n_miss);
    $display("full_refresh=%0d selective=%0d setting_changes=%0d fpu_gated=%0d",
             n_refresh, n_selective, n_cfg, n_gate);
    checks++;
    if (n_exact == 0 || n_dc == 0 || n_multi == 0 || n_hd1 == 0 || n_hd2 == 0 ||
        n_miss == 0 || n_refresh == 0 || n_selective == 0 || n_cfg == 0 || n_gate == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
