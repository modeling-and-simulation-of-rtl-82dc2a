// tb_mo_filter - self-checking testbench of mo_filter.
//
// Instances with MASKSIZE 3 (default) and 5 are compared every clock with a
// reference written as sliding-window operations: an erosion stage outputs
// the AND and a dilation stage the OR of the last MASKSIZE values at its
// input, each stage adding one clock. The four stages are erosion, dilation
// (opening) then dilation, erosion (closing). Directed checks confirm that a
// One pulse or a Zero gap shorter than MASKSIZE disappears while a longer one
// passes.
module tb_mo_filter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic dout3, dout5;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mo_filter                dut3 (.clk, .rst_n, .din, .dout(dout3));
  mo_filter #(.MASKSIZE(5)) dut5 (.clk, .rst_n, .din, .dout(dout5));

  // reference: per mask size, the input history of each of the four stages
  class mo_ref;
    int m;
    bit in_hist[4][$];
    bit out_q[4];
    function new(int size);
      m = size;
      for (int s = 0; s < 4; s++) begin
        out_q[s] = 0;
        for (int i = 0; i < size; i++) in_hist[s].push_front(0);
      end
    endfunction
    // one clock edge with stage-0 input x; returns the filter output
    function bit step(bit x);
      bit nxt[4];
      for (int s = 0; s < 4; s++) begin
        bit v = (s == 0) ? x : out_q[s-1];
        bit dil = (s == 1 || s == 2);
        bit acc = dil ? 1'b0 : 1'b1;
        in_hist[s].push_front(v);
        void'(in_hist[s].pop_back());
        for (int i = 0; i < m; i++) acc = dil ? (acc | in_hist[s][i]) : (acc & in_hist[s][i]);
        nxt[s] = acc;
      end
      out_q = nxt;
      return out_q[3];
    endfunction
  endclass

  mo_ref r3 = new(3);
  mo_ref r5 = new(5);
  bit y3 = 0, y5 = 0;

  always @(posedge clk) if (rst_n) begin
    y3 = r3.step(din);
    y5 = r5.step(din);
  end

  always @(negedge clk) if (rst_n) begin
    checks += 2;
    if (dout3 !== y3) begin failures++; $display("MISMATCH t=%0t M3 dut=%b ref=%b", $time, dout3, y3); end
    if (dout5 !== y5) begin failures++; $display("MISMATCH t=%0t M5 dut=%b ref=%b", $time, dout5, y5); end
  end

  // directed: a pulse of width w inside a run of lvl; returns whether the
  // mask-3 output ever showed the pulse value
  task automatic pulse(bit lvl, int w, output bit seen);
    seen = 0;
    repeat (20) @(negedge clk) din = lvl;
    repeat (w) @(negedge clk) din = ~lvl;
    repeat (20) begin
      @(negedge clk) din = lvl;
      if (dout3 != lvl) seen = 1;
    end
  endtask

  initial begin
    bit seen;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      automatic bit lvl = bit'($urandom_range(1));
      automatic int len = $urandom_range(1, 14);
      for (int i = 0; i < len; i++) begin
        @(negedge clk) din = ($urandom_range(99) < 12) ? ~lvl : lvl;
      end
    end
    pulse(1'b0, 2, seen); checks++; if (seen)  begin failures++; $display("2-sample One pulse not removed"); end
    pulse(1'b1, 2, seen); checks++; if (seen)  begin failures++; $display("2-sample Zero gap not filled"); end
    pulse(1'b0, 4, seen); checks++; if (!seen) begin failures++; $display("4-sample One pulse lost"); end
    pulse(1'b1, 4, seen); checks++; if (!seen) begin failures++; $display("4-sample Zero gap lost"); end
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
