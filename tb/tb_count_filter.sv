// tb_count_filter - self-checking testbench of count_filter.
//
// Two instances (MAXCOUNT 3, the default, and 5) get the same stimulus: runs
// of random length with isolated inverted samples. A reference model applies
// the counter recursion and the threshold rule directly (c in 0..MAXCOUNT,
// y = 1 when 2*c >= MAXCOUNT, output one clock after the counter value) and
// is compared with both outputs every clock. A directed part checks that a
// single-sample spike inside a long run never reaches the output.
module tb_count_filter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic dout3, dout5;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  count_filter                dut3 (.clk, .rst_n, .din, .dout(dout3));
  count_filter #(.MAXCOUNT(5)) dut5 (.clk, .rst_n, .din, .dout(dout5));

  // reference models
  int  c3, c5;
  bit  y3, y5;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c3 <= 1; c5 <= 2; y3 <= 0; y5 <= 0;
    end else begin
      y3 <= (2 * c3 >= 3);
      y5 <= (2 * c5 >= 5);
      c3 <= din ? ((c3 < 3) ? c3 + 1 : c3) : ((c3 > 0) ? c3 - 1 : c3);
      c5 <= din ? ((c5 < 5) ? c5 + 1 : c5) : ((c5 > 0) ? c5 - 1 : c5);
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks += 2;
    if (dout3 !== y3) begin failures++; $display("MISMATCH t=%0t max3 dut=%b ref=%b", $time, dout3, y3); end
    if (dout5 !== y5) begin failures++; $display("MISMATCH t=%0t max5 dut=%b ref=%b", $time, dout5, y5); end
  end

  int spike_leaks = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // random runs with sparse inverted samples
    for (int r = 0; r < 400; r++) begin
      automatic bit lvl = bit'($urandom_range(1));
      automatic int len = $urandom_range(1, 14);
      for (int i = 0; i < len; i++) begin
        @(negedge clk) din = ($urandom_range(99) < 8) ? ~lvl : lvl;
      end
    end
    // directed: single spikes inside long runs are suppressed
    for (int k = 0; k < 4; k++) begin
      automatic bit lvl = bit'(k % 2);
      repeat (12) @(negedge clk) din = lvl;
      @(negedge clk) din = ~lvl;
      repeat (12) begin
        @(negedge clk) din = lvl;
        if (dout3 != lvl || dout5 != lvl) spike_leaks++;
      end
    end
    checks++;
    if (spike_leaks != 0) begin failures++; $display("spike reached the output %0d times", spike_leaks); end
    @(negedge clk);
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
