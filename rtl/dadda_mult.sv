// dadda_mult: unsigned N x N significand multiplier built as a Dadda tree.
//
// The partial-product matrix (bit a[j] & b[i] in column i+j) is reduced in
// stages with full and half adders until every column holds at most two
// bits; a carry-propagate adder then adds the two remaining rows. Each
// stage has a target height taken from the Dadda sequence 2, 3, 4, 6, 9,
// 13, 19, 28, 42, 63, ... (d[j+1] = floor(1.5 * d[j])), largest first, and
// a column gets just enough adders that its height, counting the carries
// arriving from the column below, falls to the target:
//   excess = height + carries_in - target;  FA = excess / 2;  HA = excess % 2.
// For N = 53 the tree has 9 stages (42, 28, 19, 13, 9, 6, 4, 3, 2).
//
// The adder counts are worked out once at elaboration into tables;
// every column of every stage is a generate scope holding that column's
// bits. A full adder's sum is formed in its own column and its carry in the
// next column up, both from the same three bits of the previous stage.
//
// Interface: a, b (N bits each, unsigned) in, p (2N bits) out.
// Timing: purely combinational; the surrounding stage registers it.
//
// The use of a Dadda tree for the significand product follows the design
// description; the column ordering of bits and the final adder (a plain
// '+', left to the synthesis tool) are this design's own choices.
module dadda_mult #(
  parameter int unsigned N = 53
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned W = 2 * N;

  // Number of reduction stages: count of Dadda targets below N.
  function automatic int num_stages(int n);
    int d, k;
    d = 2;
    k = 0;
    while (d < n) begin
      k++;
      d = (d * 3) / 2;
    end
    return k;
  endfunction

  // Target height of stage s (s = 0 is the first, largest target).
  function automatic int target(int n, int s);
    int d[16];
    int k;
    d[0] = 2;
    k = 0;
    while (d[k] < n) begin
      d[k+1] = (d[k] * 3) / 2;
      k++;
    end
    // d[k-1] is the largest target below n; stage s uses d[k-1-s]
    return d[k-1-s];
  endfunction

  localparam int NST = num_stages(N);

  // Per-stage, per-column tables, computed once at elaboration.
  typedef logic [NST:0][W-1:0][7:0] tab_t;

  // what = 0: height of each column entering each stage (stage NST holds
  //           the final two-row matrix);
  // what = 1: full adders placed in each column by each stage;
  // what = 2: half adders placed in each column by each stage.
  function automatic tab_t build(int what);
    tab_t t;
    int h[2*N];
    int fa[2*N];
    int ha[2*N];
    int cin, excess, tgt;
    for (int col = 0; col < 2 * N; col++) begin
      h[col] = (col <= 2 * N - 2) ?
               ((col < N) ? col + 1 : 2 * N - 1 - col) : 0;
    end
    for (int st = 0; st <= NST; st++) begin
      for (int col = 0; col < 2 * N; col++) begin
        t[st][col] = 8'(h[col]);
      end
      if (st == NST) break;
      tgt = target(N, st);
      for (int col = 0; col < 2 * N; col++) begin
        cin = (col > 0) ? fa[col-1] + ha[col-1] : 0;
        excess = h[col] + cin - tgt;
        fa[col] = (excess > 0) ? excess / 2 : 0;
        ha[col] = (excess > 0) ? excess % 2 : 0;
      end
      for (int col = 0; col < 2 * N; col++) begin
        if (what == 1) t[st][col] = 8'(fa[col]);
        if (what == 2) t[st][col] = 8'(ha[col]);
      end
      for (int col = 2 * N - 1; col >= 0; col--) begin
        cin = (col > 0) ? fa[col-1] + ha[col-1] : 0;
        h[col] = h[col] - 2 * fa[col] - ha[col] + cin;
      end
    end
    return t;
  endfunction

  localparam tab_t HT  = build(0);
  localparam tab_t FAT = build(1);
  localparam tab_t HAT = build(2);

  for (genvar s = 0; s <= NST; s++) begin : g_st
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H  = int'(HT[s][c]);
      localparam int HW = (H > 0) ? H : 1;
      logic [HW-1:0] bits;

      if (H == 0) begin : g_empty
        assign bits = '0;
      end else if (s == 0) begin : g_pp
        // partial products of column c: a[c-i] & b[i]
        localparam int I0 = (c < N) ? 0 : c - N + 1;
        for (genvar k = 0; k < H; k++) begin : g_k
          assign bits[k] = a[c-(I0+k)] & b[I0+k];
        end
      end else begin : g_red
        localparam int HP   = int'(HT[s - 1][c]);
        localparam int FA   = int'(FAT[s - 1][c]);
        localparam int HA   = int'(HAT[s - 1][c]);
        localparam int FAL  = (c > 0) ? int'(FAT[s - 1][c - 1]) : 0;
        localparam int HAL  = (c > 0) ? int'(HAT[s - 1][c - 1]) : 0;
        localparam int PASS = HP - 3 * FA - 2 * HA;
        // sums of this column's full adders
        for (genvar k = 0; k < FA; k++) begin : g_fs
          assign bits[k] = g_st[s-1].g_col[c].bits[3*k]
                         ^ g_st[s-1].g_col[c].bits[3*k+1]
                         ^ g_st[s-1].g_col[c].bits[3*k+2];
        end
        // sums of this column's half adders
        for (genvar k = 0; k < HA; k++) begin : g_hs
          assign bits[FA+k] = g_st[s-1].g_col[c].bits[3*FA+2*k]
                            ^ g_st[s-1].g_col[c].bits[3*FA+2*k+1];
        end
        // carries of the full adders of column c-1
        for (genvar k = 0; k < FAL; k++) begin : g_fc
          logic x, y, z;
          assign x = g_st[s-1].g_col[c-1].bits[3*k];
          assign y = g_st[s-1].g_col[c-1].bits[3*k+1];
          assign z = g_st[s-1].g_col[c-1].bits[3*k+2];
          assign bits[FA+HA+k] = (x & y) | (x & z) | (y & z);
        end
        // carries of the half adders of column c-1
        for (genvar k = 0; k < HAL; k++) begin : g_hc
          assign bits[FA+HA+FAL+k] = g_st[s-1].g_col[c-1].bits[3*FAL+2*k]
                                   & g_st[s-1].g_col[c-1].bits[3*FAL+2*k+1];
        end
        // bits that pass through this stage untouched
        for (genvar k = 0; k < PASS; k++) begin : g_pass
          assign bits[FA+HA+FAL+HAL+k] = g_st[s-1].g_col[c].bits[3*FA+2*HA+k];
        end
      end
    end
  end

  // Final carry-propagate addition of the two remaining rows.
  logic [W-1:0] row0, row1;
  for (genvar c = 0; c < W; c++) begin : g_rows
    localparam int HF = int'(HT[NST][c]);
    assign row0[c] = (HF >= 1) ? g_st[NST].g_col[c].bits[0] : 1'b0;
    if (HF >= 2) begin : g_two
      assign row1[c] = g_st[NST].g_col[c].bits[HF-1];
    end else begin : g_one
      assign row1[c] = 1'b0;
    end
  end

  assign p = row0 + row1;

endmodule
