// tb_comix_d -- end-to-end testbench of the comix_d decorrelator.
//
// 1) Published example (D = 1, L = 1, LiteSync starting in S1):
//    x = 01111101, y = 10101001 must come out as x' = 01111101,
//    y' = 10101001, bit by bit in the cycle of the input (zero latency).
// 2) Default configuration (D = 1, L = 4): every value pair x, y in 0..2^N-1
//    as fully correlated low-discrepancy streams (both from one Sobol
//    sequence), each stream pair after a reset. Every output bit is compared
//    with the comix_ref model; x' must keep exactly x ones; the mean absolute
//    error of the product x'*y' and the mean |SCC| are checked against loose
//    bounds; one output pair per clock is checked by counting cycles.
// 3) Random streams of random density and length without reset between
//    them, so state carries over.
// Each mechanism (LiteSync 10->11, 01->00 and saturation; LiteDesync
// 00->01, 11->10 and saturation; flag toggles both ways; both MUX inputs;
// both branches x+y >= n and x+y < n of the mixing ratio) is counted and
// must occur. A watchdog bounds the run.
module tb_comix_d;
  import comix_ref_pkg::*;
  localparam int unsigned NB = 6;            // stream length 2^NB
  localparam int unsigned NS = 1 << NB;

  int checks = 0, failures = 0;
  logic clk, rst_n;
  logic x_in, y_in;
  logic fx, fy, dx, dy;
  longint cycles;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end
  initial cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  comix_d #(.D(1), .L(1), .SYNC_INIT(1)) u_fig (.clk, .rst_n, .x_in, .y_in, .x_out(fx), .y_out(fy));
  comix_d                                u_def (.clk, .rst_n, .x_in, .y_in, .x_out(dx), .y_out(dy));

  logic [NB-1:0] t_idx;
  logic [NB:0]   xv, yv;
  logic          sx, sy;
  ld_sng #(.N(NB)) u_sx (.t(t_idx), .value(xv), .bit_out(sx));
  ld_sng #(.N(NB)) u_sy (.t(t_idx), .value(yv), .bit_out(sy));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit [7:0] ex_x = 8'b01111101, ex_y = 8'b10101001;
    automatic bit [7:0] exp_x = 8'b01111101, exp_y = 8'b10101001;
    automatic comix_ref_pkg::comix_ref ref_m = new(1, 4);
    automatic real mae = 0.0, mascc = 0.0;
    automatic int  pairs = 0, n_branch_hi = 0, n_branch_lo = 0;
    automatic longint bits = 0, c0;
    bit rx, ry, rsp, rsel;

    rst_n = 1'b0; x_in = 0; y_in = 0; t_idx = '0; xv = '0; yv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1) published example
    for (int i = 7; i >= 0; i--) begin
      x_in = ex_x[i]; y_in = ex_y[i]; #1;
      check(fx == exp_x[i], "example x'");
      check(fy == exp_y[i], "example y'");
      @(negedge clk);
    end

    // 2) all value pairs as correlated LD streams
    c0 = cycles;
    for (int xval = 0; xval < int'(NS); xval++) begin
      for (int yval = 0; yval < int'(NS); yval++) begin
        automatic int a = 0, b = 0, c = 0, d = 0, xo_ones = 0;
        rst_n = 1'b0; #1; rst_n = 1'b1;
        ref_m.reset(0, 0, 1'b1);
        xv = (NB+1)'(xval); yv = (NB+1)'(yval);
        if (xval + yval >= int'(NS)) n_branch_hi++; else n_branch_lo++;
        for (int t = 0; t < int'(NS); t++) begin
          t_idx = NB'(t); #1;
          x_in = sx; y_in = sy; #1;
          ref_m.step(x_in, y_in, rx, ry, rsp, rsel);
          check(dx == rx && dy == ry, $sformatf("output x=%0d y=%0d t=%0d", xval, yval, t));
          check(u_def.sp_raw == rsp && u_def.sp_agg == rsel, "select streams");
          a += int'(dx && dy); b += int'(dx && !dy); c += int'(!dx && dy); d += int'(!dx && !dy);
          xo_ones += int'(dx);
          bits++;
          @(negedge clk);
        end
        check(xo_ones == xval, "x' keeps its value");
        mae   += ((real'(a) / NS - real'(xval * yval) / (NS * NS)) < 0.0)
                 ? (real'(xval * yval) / (NS * NS) - real'(a) / NS)
                 : (real'(a) / NS - real'(xval * yval) / (NS * NS));
        mascc += (scc(a, b, c, d) < 0.0) ? -scc(a, b, c, d) : scc(a, b, c, d);
        pairs++;
      end
    end
    // one output pair per clock, no latency cycles
    check(cycles - c0 == bits, "one bit pair per cycle");
    mae /= pairs; mascc /= pairs;
    $display("N=%0d D=1 L=4: MAE %.4f MASCC %.4f over %0d pairs", NB, mae, mascc, pairs);
    check(mae < 0.015, "MAE bound");
    check(mascc < 0.35, "MASCC bound");

    // 3) random streams, state carried over
    for (int s = 0; s < 200; s++) begin
      automatic int px = $urandom_range(100), py = $urandom_range(100), len = 16 + $urandom_range(200);
      for (int t = 0; t < len; t++) begin
        x_in = ($urandom_range(99) < px); y_in = ($urandom_range(99) < py); #1;
        ref_m.step(x_in, y_in, rx, ry, rsp, rsel);
        check(dx == rx && dy == ry, "random output");
        @(negedge clk);
      end
    end

    $display("LiteSync    10->11 %0d  01->00 %0d  saturated %0d", ref_m.n_sync_up, ref_m.n_sync_down, ref_m.n_sync_sat);
    $display("LiteDesync  00->01 %0d  11->10 %0d  saturated %0d", ref_m.n_desync_up, ref_m.n_desync_down, ref_m.n_desync_sat);
    $display("flag 1->0 %0d  0->1 %0d ; MUX from LiteSync %0d from LiteDesync %0d",
             ref_m.n_toggle_to0, ref_m.n_toggle_to1, ref_m.n_sel0, ref_m.n_sel1);
    $display("stream pairs with x+y>=n %0d, x+y<n %0d", n_branch_hi, n_branch_lo);
    check(ref_m.n_sync_up > 0,     "mechanism LiteSync 10->11");
    check(ref_m.n_sync_down > 0,   "mechanism LiteSync 01->00");
    check(ref_m.n_sync_sat > 0,    "mechanism LiteSync saturation");
    check(ref_m.n_desync_up > 0,   "mechanism LiteDesync 00->01");
    check(ref_m.n_desync_down > 0, "mechanism LiteDesync 11->10");
    check(ref_m.n_desync_sat > 0,  "mechanism LiteDesync saturation");
    check(ref_m.n_toggle_to0 > 0,  "mechanism flag 1->0");
    check(ref_m.n_toggle_to1 > 0,  "mechanism flag 0->1");
    check(ref_m.n_sel0 > 0,        "mechanism MUX select 0");
    check(ref_m.n_sel1 > 0,        "mechanism MUX select 1");
    check(n_branch_hi > 0 && n_branch_lo > 0, "both mixing-ratio branches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
