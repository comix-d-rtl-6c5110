// comix_ref_pkg -- reference model and statistics for the CoMix-D testbenches.
//
// comix_ref is a cycle-accurate behavioural model of the decorrelator written
// from its rules, not from the RTL: LiteSync edits Y on '10'/'01' pairs,
// LiteDesync on '00'/'11' pairs, each keeping at most D bits owed; the select
// is (AND of synced pair) | (XNOR of desynced pair), regrouped by a flag that
// toggles after 2^L input bits that disagree with it. It also counts how often
// each mechanism fires, so testbenches can prove that all of them were hit.
// scc() is the stochastic-computing correlation of two streams from their
// pair counts a = #11, b = #10, c = #01, d = #00.
package comix_ref_pkg;

  // Bit-reversed index: the first dimension of the Sobol sequence.
  function automatic int unsigned bitrev(int unsigned t, int unsigned nbits);
    int unsigned r = 0;
    for (int i = 0; i < int'(nbits); i++) r |= ((t >> i) & 1) << (nbits - 1 - i);
    return r;
  endfunction

  // SCC of a stream pair; 0 when it is undefined (a constant stream).
  function automatic real scc(int a, int b, int c, int d);
    real num, den;
    int  n = a + b + c + d;
    num = real'(a) * real'(d) - real'(b) * real'(c);
    if (num > 0.0) den = real'(n) * real'((a + b) < (a + c) ? (a + b) : (a + c))
                       - real'(a + b) * real'(a + c);
    else           den = real'(a + b) * real'(a + c)
                       - real'(n) * real'((a - d) > 0 ? (a - d) : 0);
    if (den == 0.0) return 0.0;
    return num / den;
  endfunction

  class comix_ref;
    int unsigned D, L;
    int  sync_owed, desync_owed, agg_count;
    bit  flag;
    // mechanism counters
    longint n_sync_up, n_sync_down, n_sync_sat;
    longint n_desync_up, n_desync_down, n_desync_sat;
    longint n_toggle_to0, n_toggle_to1, n_sel0, n_sel1;

    function new(int unsigned d, int unsigned l);
      D = d; L = l;
      n_sync_up = 0; n_sync_down = 0; n_sync_sat = 0;
      n_desync_up = 0; n_desync_down = 0; n_desync_sat = 0;
      n_toggle_to0 = 0; n_toggle_to1 = 0; n_sel0 = 0; n_sel1 = 0;
      reset(0, 0, 1'b1);
    endfunction

    function void reset(int s_init, int d_init, bit f_init);
      sync_owed = s_init; desync_owed = d_init; flag = f_init; agg_count = 0;
    endfunction

    // One clock: returns the outputs for inputs x, y and advances the state.
    function void step(bit x, bit y, output bit xo, output bit yo,
                       output bit sp_raw, output bit sel);
      bit ys, yd;
      // LiteSync
      ys = y;
      if (x == 1 && y == 0) begin
        if (sync_owed < int'(D)) begin ys = 1; sync_owed++; n_sync_up++; end
        else n_sync_sat++;
      end else if (x == 0 && y == 1 && sync_owed > 0) begin
        ys = 0; sync_owed--; n_sync_down++;
      end
      // LiteDesync
      yd = y;
      if (x == 0 && y == 0) begin
        if (desync_owed < int'(D)) begin yd = 1; desync_owed++; n_desync_up++; end
        else n_desync_sat++;
      end else if (x == 1 && y == 1 && desync_owed > 0) begin
        yd = 0; desync_owed--; n_desync_down++;
      end
      // select generation and aggregation
      sp_raw = (x & ys) | (x == yd);
      sel = flag;
      if (sp_raw != flag) begin
        agg_count++;
        if (agg_count == (1 << L)) begin
          agg_count = 0;
          if (flag) n_toggle_to0++; else n_toggle_to1++;
          flag = !flag;
        end
      end
      if (sel) n_sel1++; else n_sel0++;
      xo = x;
      yo = sel ? yd : ys;
    endfunction
  endclass

endpackage
