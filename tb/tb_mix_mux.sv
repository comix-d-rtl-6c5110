// tb_mix_mux -- self-checking testbench for mix_mux.
//
// Exhaustive over all 32 input combinations (select 0 must forward the
// LiteSync pair, select 1 the LiteDesync pair), then the published example:
// select 11110000 over synced Y' 01101001 and desynced Y' 10101010 must give
// 10101001. Watchdog included.
module tb_mix_mux;
  int checks = 0, failures = 0;
  logic sel, xs, ys, xd, yd, xo, yo;

  mix_mux u_dut (.sel, .xs, .ys, .xd, .yd, .x_out(xo), .y_out(yo));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit [7:0] s = 8'b11110000, ysy = 8'b01101001, yde = 8'b10101010, exp_y = 8'b10101001;
    for (int v = 0; v < 32; v++) begin
      {sel, xs, ys, xd, yd} = 5'(v);
      #1;
      check(xo == (sel ? xd : xs), $sformatf("x %05b", v[4:0]));
      check(yo == (sel ? yd : ys), $sformatf("y %05b", v[4:0]));
    end
    xs = 0; xd = 0;
    for (int i = 7; i >= 0; i--) begin
      sel = s[i]; ys = ysy[i]; yd = yde[i];
      #1;
      check(yo == exp_y[i], "example y'");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
