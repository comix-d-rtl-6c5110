// tb_comix_d_full -- comix_d at its default parameters (D = 1, L = 4).
//
// One complete decorrelation job at the largest evaluated stream length
// (N = 8, 256-bit streams): every value pair x, y in 0..255 as fully
// correlated low-discrepancy streams, each pair after a reset. All output
// bits are compared with the comix_ref model, x' must keep x ones, the
// output must come one bit pair per clock with no latency, and MAE / mean
// |SCC| must stay within bounds and match an independent software model
// (MAE 0.0055, MASCC 0.1649) within 0.0005. Then 200 independent random
// stream pairs follow without reset. Mechanism counters (FSM edits
// and saturation, flag toggles, both MUX inputs) must all be non-zero.
module tb_comix_d_full;
  import comix_ref_pkg::*;
  localparam int NB = 8;
  localparam int NS = 1 << NB;

  int checks = 0, failures = 0;
  logic clk, rst_n, x_in, y_in, x_out, y_out;
  longint cycles;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end
  initial cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  comix_d u_dut (.clk, .rst_n, .x_in, .y_in, .x_out, .y_out);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic comix_ref_pkg::comix_ref ref_m = new(1, 4);
    automatic real mae = 0.0, mascc = 0.0;
    automatic longint mism = 0, bits = 0, c0;
    bit rx, ry, rsp, rsel;
    rst_n = 1'b0; x_in = 0; y_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    c0 = cycles;
    for (int xval = 0; xval < NS; xval++) begin
      for (int yval = 0; yval < NS; yval++) begin
        automatic int a = 0, b = 0, c = 0, d = 0, xones = 0;
        ref_m.reset(0, 0, 1'b1);
        rst_n = 1'b0; #1; rst_n = 1'b1;
        for (int t = 0; t < NS; t++) begin
          automatic int unsigned r = bitrev(t, NB);
          x_in = (r < xval); y_in = (r < yval); #1;
          ref_m.step(x_in, y_in, rx, ry, rsp, rsel);
          if (x_out != rx || y_out != ry) mism++;
          if (u_dut.sp_raw != rsp || u_dut.sp_agg != rsel) mism++;
          a += int'(x_out && y_out);  b += int'(x_out && !y_out);
          c += int'(!x_out && y_out); d += int'(!x_out && !y_out);
          xones += int'(x_out);
          bits++;
          @(negedge clk);
        end
        if (xones != xval) mism++;
        mae   += absr(real'(a) / NS - real'(xval * yval) / (NS * NS));
        mascc += absr(scc(a, b, c, d));
      end
    end
    mae /= NS * NS; mascc /= NS * NS;
    // independent random streams, state carried over: correlated inputs
    // never need LiteSync to repay an inserted 1, these do
    for (int s = 0; s < 200; s++) begin
      automatic int px = $urandom_range(100), py = $urandom_range(100);
      for (int t = 0; t < NS; t++) begin
        x_in = ($urandom_range(99) < px); y_in = ($urandom_range(99) < py); #1;
        ref_m.step(x_in, y_in, rx, ry, rsp, rsel);
        if (x_out != rx || y_out != ry) mism++;
        bits++;
        @(negedge clk);
      end
    end
    $display("N=%0d D=1 L=4: MAE %.4f MASCC %.4f, %0d bit pairs in %0d cycles",
             NB, mae, mascc, bits, cycles - c0);
    $display("edits: sync %0d/%0d/%0d desync %0d/%0d/%0d toggles %0d/%0d",
             ref_m.n_sync_up, ref_m.n_sync_down, ref_m.n_sync_sat, ref_m.n_desync_up,
             ref_m.n_desync_down, ref_m.n_desync_sat, ref_m.n_toggle_to0, ref_m.n_toggle_to1);
    check(mism == 0, "bit-exact against model");
    check(cycles - c0 == bits, "one bit pair per cycle");
    check(absr(mae - 0.0055) < 0.0005 && absr(mascc - 0.1649) < 0.0005, "matches software model");
    check(mae < 0.015 && mascc < 0.35, "accuracy bounds");
    check(ref_m.n_sync_up > 0 && ref_m.n_sync_down > 0 && ref_m.n_sync_sat > 0, "LiteSync mechanisms");
    check(ref_m.n_desync_up > 0 && ref_m.n_desync_down > 0 && ref_m.n_desync_sat > 0, "LiteDesync mechanisms");
    check(ref_m.n_toggle_to0 > 0 && ref_m.n_toggle_to1 > 0, "flag toggles");
    check(ref_m.n_sel0 > 0 && ref_m.n_sel1 > 0, "both MUX inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
