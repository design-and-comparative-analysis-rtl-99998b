// wallace_pkg: elaboration-time schedule of the Wallace tree reduction.
//
// An NxN array of partial products has columns 0 .. 2N-1 with heights
// 1, 2, .., N, .., 2, 1, 0. The tree reduces them in layers whose target
// heights are the sequence 2, 3, 4, 6, 9, 13, .. (d' = floor(3d/2)) taken
// from the largest value below N down to 2; for N = 8 that is four layers
// with targets 6, 4, 3, 2. In each layer every column, scanned from bit 0
// upwards, counts its own bits plus the carries arriving from the column
// below in the same layer, and uses as few adders as bring that count down
// to the target: a half adder when it is one over, otherwise full adders.
// This placement needs the fewest adders; for N = 8 it gives 35 full and
// 7 half adders in the tree and 13 full and 1 half adder in the final
// ripple adder, 48 full and 8 half adders in all.
//
// The functions only run during elaboration; they hold no hardware.
package wallace_pkg;

  localparam int MAX_COLS = 128;   // supports N up to 64

  // number of reduction layers for an NxN array
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

  // target column height of layer s (layer 0 reduces the raw array)
  function automatic int stage_target(int n, int s);
    int d, k, want;
    want = num_stages(n) - 1 - s;
    d = 2;
    for (k = 0; k < want; k++) d = (d * 3) / 2;
    return d;
  endfunction

  // what = 0: height of column c entering layer s (s = num_stages: final)
  // what = 1: full adders of layer s in column c
  // what = 2: half adders of layer s in column c
  function automatic int schedule(int n, int s, int c, int what);
    int h[MAX_COLS];
    int nf, nh, x, cin, d, st, col;
    for (col = 0; col < 2 * n; col++)
      h[col] = (col < n) ? col + 1 : 2 * n - 1 - col;
    for (st = 0; st <= s; st++) begin
      if (st == s && what == 0) return h[c];
      d   = stage_target(n, st);
      cin = 0;
      for (col = 0; col < 2 * n; col++) begin
        x  = h[col] + cin;
        nf = 0;
        nh = 0;
        while (x > d) begin
          if (x == d + 1) begin
            nh++;
            x--;
          end else begin
            nf++;
            x -= 2;
          end
        end
        if (st == s && col == c) return (what == 1) ? nf : nh;
        h[col] = x;
        cin    = nf + nh;
      end
    end
    return 0;
  endfunction

  function automatic int col_height(int n, int s, int c);
    return schedule(n, s, c, 0);
  endfunction

  function automatic int fa_count(int n, int s, int c);
    return (s < num_stages(n)) ? schedule(n, s, c, 1) : 0;
  endfunction

  function automatic int ha_count(int n, int s, int c);
    return (s < num_stages(n)) ? schedule(n, s, c, 2) : 0;
  endfunction

  // final ripple adder: 1 if column c receives a carry from column c-1
  function automatic int cpa_carry_in(int n, int c);
    int col, carry;
    carry = 0;
    for (col = 0; col < c; col++)
      carry = (col_height(n, num_stages(n), col) + carry >= 2) ? 1 : 0;
    return carry;
  endfunction

endpackage
