// Shared constants and elaboration-time helpers for the serial two's-complement
// multipliers. Nothing here is clocked.
//
// cnt_w(n)     : output width of an (n;k) parallel counter, k = ceil(log2(n+1)).
// bw_mask(n, pw, p): which of the six possible inputs of column p of the
//                fourfold-weight summer (rd_summer_bw) can ever be 1:
//                bit 0 row term, 1 diagonal term, 2 constant one, 3 weight-1
//                carry from column p-2, 4 weight-2 carry from column p-1,
//                5 weight-4 carry from column p itself. A carry input exists
//                only if its source column can count that high. The least
//                fixed point of that rule is found by iterating from "no
//                inputs"; for n = 4 it gives 1, 1, 3, 6, 5, 2, 2, ... inputs
//                for columns -1, 0, 1, ...
// cf_cnt_w(t)  : width of the single counter of a column summer that receives t
//                array terms plus its own fed-back carries (one line for every
//                count bit of weight 2 and above). It is the least w with
//                2^w - 1 >= t + w - 1, so that the counter can never overflow.
package smul_pkg;

  function automatic int cnt_w(input int n);
    return $clog2(n + 1);
  endfunction

  localparam int BW_MAXC = 130;   // columns -1 .. 128

  function automatic logic [5:0] bw_cand(input int n, input int p,
                                         input int ci [BW_MAXC]);
    logic [5:0] m;
    m[0] = (p >= 0 && p < n);
    m[1] = (p >= 1 && p < n);
    m[2] = (p == -1 || p == n - 2);
    m[3] = (p - 2 >= -1) && (cnt_w(ci[(p - 2 >= -1) ? p - 1 : 0]) >= 1);
    m[4] = (p - 1 >= -1) && (cnt_w(ci[(p - 1 >= -1) ? p : 0]) >= 2);
    m[5] = (cnt_w(ci[p + 1]) >= 3);
    return m;
  endfunction

  function automatic logic [5:0] bw_mask(input int n, input int pw, input int p);
    int ci [BW_MAXC];
    int nx [BW_MAXC];
    bit changed;
    for (int c = 0; c < BW_MAXC; c++) ci[c] = 0;
    changed = 1'b1;
    while (changed) begin
      changed = 1'b0;
      for (int q = -1; q < pw; q++) nx[q + 1] = $countones(bw_cand(n, q, ci));
      for (int q = -1; q < pw; q++) begin
        if (nx[q + 1] != ci[q + 1]) changed = 1'b1;
        ci[q + 1] = nx[q + 1];
      end
    end
    return bw_cand(n, p, ci);
  endfunction

  function automatic int cf_cnt_w(input int t);
    int w;
    w = 1;
    while ((2 ** w) - 1 < t + w - 1) w++;
    return w;
  endfunction

endpackage
