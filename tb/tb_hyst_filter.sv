// tb_hyst_filter - self-checking testbench of hyst_filter.
//
// Instances with STATESIZE 1 (default) and 2 get noisy runs. The reference
// follows the counter recursion (0 .. 3*S-1) and the two-state voter (HIGH
// when c >= 2*S, LOW when c <= S-1, otherwise hold) and is compared every
// clock. The test also counts clocks on which the counter sat in the middle
// band while the output held a value the plain threshold would have
// changed, to show that the hysteresis is exercised.
module tb_hyst_filter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic dout1, dout2;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  hyst_filter                 dut1 (.clk, .rst_n, .din, .dout(dout1));
  hyst_filter #(.STATESIZE(2)) dut2 (.clk, .rst_n, .din, .dout(dout2));

  int c1, c2;
  bit s1, s2;
  int hold_events = 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= 1; c2 <= 3; s1 <= 0; s2 <= 0;
    end else begin
      if (c1 >= 2) s1 <= 1; else if (c1 <= 0) s1 <= 0;
      if (c2 >= 4) s2 <= 1; else if (c2 <= 1) s2 <= 0;
      if (c2 == 2 || c2 == 3) hold_events++;
      c1 <= din ? ((c1 < 2) ? c1 + 1 : c1) : ((c1 > 0) ? c1 - 1 : c1);
      c2 <= din ? ((c2 < 5) ? c2 + 1 : c2) : ((c2 > 0) ? c2 - 1 : c2);
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks += 2;
    if (dout1 !== s1) begin failures++; $display("MISMATCH t=%0t S1 dut=%b ref=%b", $time, dout1, s1); end
    if (dout2 !== s2) begin failures++; $display("MISMATCH t=%0t S2 dut=%b ref=%b", $time, dout2, s2); end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      automatic bit lvl = bit'($urandom_range(1));
      automatic int len = $urandom_range(1, 14);
      for (int i = 0; i < len; i++) begin
        @(negedge clk) din = ($urandom_range(99) < 12) ? ~lvl : lvl;
      end
    end
    // an alternating input keeps the counter in the middle band
    repeat (40) @(negedge clk) din = ~din;
    @(negedge clk);
    checks++;
    if (hold_events == 0) begin failures++; $display("middle band never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
