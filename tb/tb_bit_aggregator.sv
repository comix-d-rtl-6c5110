// tb_bit_aggregator -- self-checking testbench for bit_aggregator.
//
// 1) Published examples: L = 2, in 110100110110011 -> out 111111111000000;
//    L = 1, in 01101001 -> out 11110000.
// 2) Random input (bursty, both densities) through L = 1..4 instances,
//    compared each cycle with a model that counts bits disagreeing with the
//    flag; checks that the output's count of 1s never drifts from the input's
//    by more than 2^L, that the output toggles at most once per 2^L cycles,
//    and that both toggle directions happen. Watchdog included.
module tb_bit_aggregator;
  int checks = 0, failures = 0;
  logic clk, rst_n;
  logic din;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  localparam int NL = 4;
  logic [NL-1:0] dout;
  for (genvar g = 0; g < NL; g++) begin : g_l
    bit_aggregator #(.L(g + 1)) u_dut (.clk, .rst_n, .in_bit(din), .out_bit(dout[g]));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Called at a falling edge: the next input bit is applied right after.
  task automatic restart();
    rst_n = 0; #1; rst_n = 1;
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit [14:0] e1_in = 15'b110100110110011, e1_out = 15'b111111111000000;
    automatic bit [7:0]  e2_in = 8'b01101001,         e2_out = 8'b11110000;
    bit flag [NL];
    int cnt [NL], drift [NL], last_toggle [NL], toggles_up [NL], toggles_dn [NL];
    rst_n = 1'b0;
    din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 14; i >= 0; i--) begin
      din = e1_in[i]; #1;
      check(dout[1] == e1_out[i], "example L=2");
      @(negedge clk);
    end
    restart();
    for (int i = 7; i >= 0; i--) begin
      din = e2_in[i]; #1;
      check(dout[0] == e2_out[i], "example L=1");
      @(negedge clk);
    end
    restart();
    for (int k = 0; k < NL; k++) begin
      flag[k] = 1; cnt[k] = 0; drift[k] = 0; last_toggle[k] = -1000;
      toggles_up[k] = 0; toggles_dn[k] = 0;
    end
    for (int t = 0; t < 30000; t++) begin
      int dens;
      dens = ((t / 1000) % 3 == 0) ? 15 : (((t / 1000) % 3 == 1) ? 85 : 50);
      din = ($urandom_range(99) < dens);
      #1;
      for (int k = 0; k < NL; k++) begin
        check(dout[k] == flag[k], $sformatf("output L=%0d", k + 1));
        drift[k] += int'(dout[k]) - int'(din);
        check(drift[k] <= (1 << (k + 1)) && drift[k] >= -(1 << (k + 1)), "ones count kept");
        if (din != flag[k]) begin
          cnt[k]++;
          if (cnt[k] == (1 << (k + 1))) begin
            cnt[k] = 0;
            check(t - last_toggle[k] >= (1 << (k + 1)), "run length at least 2^L");
            last_toggle[k] = t;
            if (flag[k]) toggles_dn[k]++; else toggles_up[k]++;
            flag[k] = !flag[k];
          end
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < NL; k++) begin
      check(toggles_up[k] > 0 && toggles_dn[k] > 0, "both toggle directions");
      $display("L=%0d toggles 0->1 %0d 1->0 %0d", k + 1, toggles_up[k], toggles_dn[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
