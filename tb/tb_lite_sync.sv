// tb_lite_sync -- self-checking testbench for lite_sync.
//
// 1) Published example: X = 01111101, Y = 10101001 starting in S1 must give
//    X' = X and Y' = 01101001 (all four mismatching pairs before the last
//    repaid), checked bit by bit in the same cycle (zero latency).
// 2) Random streams through D = 1..4 instances, compared every cycle with an
//    independent model that tracks the number of 1s Y' is ahead of Y; also
//    checks that the lead stays within 0..D and that '11'+'00' pairs never
//    decrease. A watchdog ends the run if it hangs.
module tb_lite_sync;
  int checks = 0, failures = 0;
  logic clk, rst_n;
  logic x, y;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  // example instance, initial state S1
  logic ex_xo, ex_yo;
  lite_sync #(.D(1), .INIT_STATE(1)) u_ex (.clk, .rst_n, .x_in(x), .y_in(y), .x_out(ex_xo), .y_out(ex_yo));

  localparam int ND = 4;
  logic [ND-1:0] xo, yo;
  for (genvar g = 0; g < ND; g++) begin : g_d
    lite_sync #(.D(g + 1)) u_dut (.clk, .rst_n, .x_in(x), .y_in(y), .x_out(xo[g]), .y_out(yo[g]));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit [7:0] ex_x = 8'b01111101, ex_y = 8'b10101001, ex_exp = 8'b01101001;
    int lead [ND];
    int match_in [ND], match_out [ND];
    rst_n = 1'b0;
    x = 0; y = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1) example, leftmost bit first; each bit is applied at a falling edge
    //    and consumed by the next rising edge
    for (int i = 7; i >= 0; i--) begin
      x = ex_x[i]; y = ex_y[i]; #1;
      check(ex_xo == ex_x[i], "example X'");
      check(ex_yo == ex_exp[i], "example Y'");
      @(negedge clk);
    end
    // 2) random
    rst_n = 0; #1; rst_n = 1;
    foreach (lead[k]) begin lead[k] = 0; match_in[k] = 0; match_out[k] = 0; end
    for (int t = 0; t < 10000; t++) begin
      bit exp_y;
      // skew the streams so that long runs of one mismatch type occur
      x = ($urandom_range(99) < (((t / 500) % 2) != 0 ? 80 : 30));
      y = ($urandom_range(99) < (((t / 700) % 2) != 0 ? 25 : 70));
      #1;
      for (int k = 0; k < ND; k++) begin
        exp_y = y;
        if (x && !y && lead[k] < k + 1) exp_y = 1;
        else if (!x && y && lead[k] > 0) exp_y = 0;
        lead[k] += int'(exp_y) - int'(y);
        check(xo[k] == x, "X' passes");
        check(yo[k] == exp_y, $sformatf("Y' D=%0d", k + 1));
        check(lead[k] >= 0 && lead[k] <= k + 1, "lead within 0..D");
        match_in[k]  += (x == y);
        match_out[k] += (xo[k] == yo[k]);
      end
      @(negedge clk);
    end
    for (int k = 0; k < ND; k++) check(match_out[k] >= match_in[k], "matching pairs not fewer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
