// masc_ref_model: reference model of a MASC TCAM for the testbenches. It has
// no ports; a testbench instantiates it and calls its functions.
//
// It keeps every row's ternary pattern, each match line's charge age per
// block and each block's search counter, and predicts the rows that hit for
// a search: a block hits in a row when the cared-for Hamming distance between
// the key slice and the stored slice is within the tolerance of that line's
// age (exact up to the block's exact refresh period, one bit for HD_STEP more
// searches, two bits beyond). Hit lines are recharged after the search, and
// a block recharges all lines when its refresh period is complete. It is
// written from that description, independently of the RTL.
module masc_ref_model
  import masc_pkg::*;
#(
  parameter int KEY_W = 64, parameter int BLOCK_W = 8, parameter int ROWS = 32
);
  localparam int BLOCKS = KEY_W / BLOCK_W;
  localparam int PER_OP = 32 / BLOCK_W;

  logic [KEY_W-1:0] val  [ROWS];
  logic [KEY_W-1:0] care [ROWS];
  bit               written [ROWS];
  int               age [BLOCKS][ROWS];
  int               cnt [BLOCKS];
  int               per [BLOCKS];
  int               pe;
  // statistics of the last search
  int               last_maxd;      // largest block distance in a hit row
  int               last_nhits;     // rows that hit

  initial begin
    pe = (BLOCK_W == 2) ? 7 : (BLOCK_W == 4) ? 5 : 4;
    for (int r = 0; r < ROWS; r++) begin
      written[r] = 0; val[r] = '0; care[r] = '0;
    end
    void'(configure(APPROX_EXACT, 0));
  end

  // New approximation setting; all lines recharged. Returns lines recharged.
  function int configure(approx_mode_e m, int nblk);
    for (int b = 0; b < BLOCKS; b++) begin
      int p;
      p = pe;
      if ((b % PER_OP) < nblk) p = (m == APPROX_1HD) ? pe + 2 : (m == APPROX_2HD) ? pe + 4 : pe;
      per[b] = p;
      cnt[b] = 0;
      for (int r = 0; r < ROWS; r++) age[b][r] = 0;
    end
    return BLOCKS * ROWS;
  endfunction

  function void write(int r, logic [KEY_W-1:0] k, logic [KEY_W-1:0] c);
    val[r] = k; care[r] = c; written[r] = 1;
    for (int b = 0; b < BLOCKS; b++) age[b][r] = 0;
  endfunction

  // One search: returns the rows that hit (bit r) and the lines recharged.
  function void search(logic [KEY_W-1:0] key, output logic [63:0] rows, output int npre);
    bit bh [BLOCKS][ROWS];
    int d  [BLOCKS][ROWS];
    rows = '0;
    npre = 0;
    last_maxd = 0;
    last_nhits = 0;
    for (int b = 0; b < BLOCKS; b++) begin
      for (int r = 0; r < ROWS; r++) begin
        int a, tol;
        logic [KEY_W-1:0] diff;
        a = age[b][r] + 1;
        tol = (a <= pe) ? 0 : (a <= pe + 2) ? 1 : 2;
        diff = (key ^ val[r]) & care[r];
        d[b][r] = 0;
        for (int i = b * BLOCK_W; i < (b + 1) * BLOCK_W; i++) d[b][r] += diff[i];
        bh[b][r] = written[r] && (d[b][r] <= tol);
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      bit all;
      all = 1;
      for (int b = 0; b < BLOCKS; b++) all &= bh[b][r];
      rows[r] = all;
      if (all) begin
        last_nhits++;
        for (int b = 0; b < BLOCKS; b++) if (d[b][r] > last_maxd) last_maxd = d[b][r];
      end
    end
    for (int b = 0; b < BLOCKS; b++) begin
      bit rf;
      rf = (cnt[b] + 1 >= per[b]);
      for (int r = 0; r < ROWS; r++) begin
        if (rf || bh[b][r]) begin
          if (!rf) npre++;
          age[b][r] = 0;
        end else age[b][r]++;
      end
      if (rf) begin npre += ROWS; cnt[b] = 0; end
      else cnt[b]++;
    end
  endfunction
endmodule
