// tb_sp_generator -- self-checking testbench for sp_generator.
//
// Exhaustive over the 16 input combinations against the rule
// sp = (LiteSync pair is '11') or (LiteDesync pair matches), then the
// published example streams: synced 01111101/01101001 and desynced
// 01111101/10101010 must give S_p = 01101001. Combinational, so a short
// delay separates stimulus and check; a watchdog bounds the run.
module tb_sp_generator;
  int checks = 0, failures = 0;
  logic xs, ys, xd, yd, sp;

  sp_generator u_dut (.xs, .ys, .xd, .yd, .sp);

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
    automatic bit [7:0] sxs = 8'b01111101, sys = 8'b01101001, sxd = 8'b01111101, syd = 8'b10101010;
    automatic bit [7:0] exp_sp = 8'b01101001;
    for (int v = 0; v < 16; v++) begin
      {xs, ys, xd, yd} = 4'(v);
      #1;
      check(sp == ((v[3] && v[2]) || (v[1] == v[0])), $sformatf("truth table %04b", v[3:0]));
    end
    for (int i = 7; i >= 0; i--) begin
      xs = sxs[i]; ys = sys[i]; xd = sxd[i]; yd = syd[i];
      #1;
      check(sp == exp_sp[i], "example stream");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
