// tb_median_filter - self-checking testbench of median_filter.
//
// Instances with FILTERSIZE 7 (default) and 3 are compared every clock with
// a reference that takes the majority of the input history directly:
// dout after clock k is the majority of the samples applied at clocks
// k-F-1 .. k-2 (the delay line stage plus the registered voter), with
// samples before reset counting as Zero.
module tb_median_filter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic dout7, dout3;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  median_filter                  dut7 (.clk, .rst_n, .din, .dout(dout7));
  median_filter #(.FILTERSIZE(3)) dut3 (.clk, .rst_n, .din, .dout(dout3));

  bit hist[$];   // hist[0] = sample of the latest clock
  bit y7, y3;

  function automatic bit majority(int first, int len);
    int ones = 0;
    for (int i = first; i < first + len; i++) if (i < hist.size()) ones += hist[i];
    return (2 * ones > len);
  endfunction

  always @(posedge clk) if (rst_n) begin
    hist.push_front(din);
    if (hist.size() > 16) void'(hist.pop_back());
    y7 = majority(2, 7);
    y3 = majority(2, 3);
  end

  always @(negedge clk) if (rst_n && hist.size() > 0) begin
    checks += 2;
    if (dout7 !== y7) begin failures++; $display("MISMATCH t=%0t F7 dut=%b ref=%b", $time, dout7, y7); end
    if (dout3 !== y3) begin failures++; $display("MISMATCH t=%0t F3 dut=%b ref=%b", $time, dout3, y3); end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      automatic bit lvl = bit'($urandom_range(1));
      automatic int len = $urandom_range(1, 14);
      for (int i = 0; i < len; i++) begin
        @(negedge clk) din = ($urandom_range(99) < 15) ? ~lvl : lvl;
      end
    end
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
