// tb_comix_d_fig5 -- accuracy sweep of comix_d over FSM depth and stream length.
//
// Runs the accuracy evaluation of the decorrelator: for every N in {6,7,8}
// and every value pair x, y in 0..2^N-1, two fully correlated
// low-discrepancy streams (both from the first Sobol dimension, SCC = +1)
// are decorrelated by four instances with D = 1, 2, 3, 4 (L = 4), each
// restarted by reset. Per configuration it reports the mean absolute error
// of the product x'*y' (AND of the outputs) and the mean |SCC| of the output
// pair. Every output bit is compared with the comix_ref model; the averages
// must match the values of an independent software model of the same rules
// within 0.0005 and stay below loose bounds (MAE < 0.015, MASCC < 0.35).
// It also reports how far the density of the raw select stream S_p is from
// the ideal mixing ratio p (mean |P(S_p) - p|, bounded by 0.05); it is not
// exact because the FSMs do not reach SCC = +/-1 for every pair.
// A watchdog bounds the run.
module tb_comix_d_fig5;
  import comix_ref_pkg::*;
  localparam int ND = 4;
  localparam int NMIN = 6, NMAX = 8;

  // expected [N-6][D-1]: independent software model, same stimulus
  localparam real EXP_MAE   [3][4] = '{'{0.0093, 0.0094, 0.0102, 0.0113},
                                       '{0.0068, 0.0063, 0.0065, 0.0068},
                                       '{0.0055, 0.0050, 0.0048, 0.0048}};
  localparam real EXP_MASCC [3][4] = '{'{0.2731, 0.2877, 0.3048, 0.3205},
                                       '{0.2011, 0.2087, 0.2185, 0.2268},
                                       '{0.1649, 0.1667, 0.1707, 0.1740}};

  int checks = 0, failures = 0;
  logic clk, rst_n, x_in, y_in;
  logic [ND-1:0] xo, yo;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  for (genvar g = 0; g < ND; g++) begin : g_d
    comix_d #(.D(g + 1), .L(4)) u_dut (.clk, .rst_n, .x_in, .y_in, .x_out(xo[g]), .y_out(yo[g]));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    comix_ref_pkg::comix_ref ref_m [ND];
    bit rx, ry, rsp, rsel;
    for (int k = 0; k < ND; k++) ref_m[k] = new(k + 1, 4);
    rst_n = 1'b0; x_in = 0; y_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int nb = NMIN; nb <= NMAX; nb++) begin
      automatic int ns = 1 << nb;
      automatic real mae [ND], mascc [ND];
      automatic real perr [ND];
      automatic longint nsel1 [ND];
      automatic int  mism [ND];
      for (int k = 0; k < ND; k++) begin mae[k] = 0.0; mascc[k] = 0.0; perr[k] = 0.0; mism[k] = 0; nsel1[k] = 0; end
      for (int xval = 0; xval < ns; xval++) begin
        for (int yval = 0; yval < ns; yval++) begin
          automatic int a [ND], b [ND], c [ND], d [ND], spn [ND];
          // ideal share p*n of the LiteDesync output, by input case
          automatic int p_n = (xval + yval >= ns) ? ((xval < yval) ? xval : yval)
                                                   : ((xval < yval) ? ns - yval : ns - xval);
          for (int k = 0; k < ND; k++) begin
            a[k] = 0; b[k] = 0; c[k] = 0; d[k] = 0; spn[k] = 0;
            ref_m[k].reset(0, 0, 1'b1);
          end
          rst_n = 1'b0; #1; rst_n = 1'b1;
          for (int t = 0; t < ns; t++) begin
            automatic int unsigned r = bitrev(t, nb);
            x_in = (r < xval); y_in = (r < yval); #1;
            for (int k = 0; k < ND; k++) begin
              ref_m[k].step(x_in, y_in, rx, ry, rsp, rsel);
              if (xo[k] != rx || yo[k] != ry) mism[k]++;
              spn[k] += int'(rsp);
              nsel1[k] += longint'(rsel);
              a[k] += int'(xo[k] && yo[k]);  b[k] += int'(xo[k] && !yo[k]);
              c[k] += int'(!xo[k] && yo[k]); d[k] += int'(!xo[k] && !yo[k]);
            end
            @(negedge clk);
          end
          for (int k = 0; k < ND; k++) begin
            mae[k]   += absr(real'(a[k]) / ns - real'(xval * yval) / (ns * ns));
            mascc[k] += absr(scc(a[k], b[k], c[k], d[k]));
            perr[k]  += absr(real'(spn[k] - p_n)) / ns;
          end
        end
      end
      for (int k = 0; k < ND; k++) begin
        mae[k] /= ns * ns; mascc[k] /= ns * ns; perr[k] /= ns * ns;
        $display("N=%0d D=%0d L=4: MAE %.4f MASCC %.4f (model %.4f %.4f)  mean |P(Sp)-p| %.4f  LiteDesync share %.3f",
                 nb, k + 1, mae[k], mascc[k], EXP_MAE[nb-NMIN][k], EXP_MASCC[nb-NMIN][k], perr[k],
                 real'(nsel1[k]) / (real'(ns) * ns * ns));
        check(perr[k] < 0.05, "select density near p");
        check(mism[k] == 0, $sformatf("bit-exact N=%0d D=%0d", nb, k + 1));
        check(absr(mae[k] - EXP_MAE[nb-NMIN][k]) < 0.0005, "MAE matches model");
        check(absr(mascc[k] - EXP_MASCC[nb-NMIN][k]) < 0.0005, "MASCC matches model");
        check(mae[k] < 0.015 && mascc[k] < 0.35, "accuracy bounds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
