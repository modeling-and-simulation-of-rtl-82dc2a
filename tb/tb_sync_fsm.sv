// tb_sync_fsm - self-checking testbench of sync_fsm.
//
// The chip and bit streams are driven directly, one chip strobe every 11
// clocks and one bit strobe every 22 clocks. Each scenario sends preamble
// chips, optionally a near-miss of the SyncPattern (one chip changed), the
// SyncPattern, then eight message bits, while chips that happen to contain
// the SyncPattern keep arriving during the message. Checks:
//   - start and sync_found pulse exactly once per message, one clock after
//     the strobe of the last SyncPattern chip, never on the preamble or the
//     near-miss, never while a message is collected;
//   - bits strobed before the SyncPattern are ignored;
//   - msg_valid and stop pulse one clock after the eighth bit, with the bits
//     in msg_data first-bit-first (MSB); in_message is high in between;
//   - a code_err pulse during a message gives stop one clock later but no
//     msg_valid, ends in_message, and bits sent afterwards are ignored until
//     the next SyncPattern.
module tb_sync_fsm;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       chip = 1'b0, chip_valid = 1'b0, bit_in = 1'b0, bit_valid = 1'b0;
  logic       code_err = 1'b0;
  logic       start, stop, sync_found, in_message, msg_valid;
  logic [7:0] msg_data;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_fsm dut (.clk, .rst_n, .chip, .chip_valid, .bit_in, .bit_valid, .code_err,
                .start, .stop, .sync_found, .in_message, .msg_data, .msg_valid);

  localparam logic [7:0] PAT = lf_rx_pkg::SYNC_PATTERN;

  int n_start = 0, n_msg = 0, n_stop = 0;
  bit expect_start = 0, expect_msg = 0, expect_stop = 0;
  logic [7:0] expect_data;

  // pulses are checked on every falling edge against the expectation
  always @(negedge clk) if (rst_n) begin
    if (start) n_start++;
    if (stop) n_stop++;
    if (msg_valid) n_msg++;
    if (start !== expect_start || sync_found !== expect_start) begin
      failures++; $display("t=%0t start=%b sync_found=%b expected %b", $time, start, sync_found, expect_start);
    end
    if (msg_valid !== expect_msg || stop !== (expect_msg || expect_stop)) begin
      failures++; $display("t=%0t msg_valid=%b stop=%b expected %b/%b", $time, msg_valid, stop, expect_msg, expect_msg || expect_stop);
    end
    if (expect_msg) begin
      checks++;
      if (msg_data !== expect_data) begin failures++; $display("msg %02h expected %02h", msg_data, expect_data); end
    end
    checks += 2;
    expect_start = 0;
    expect_msg = 0;
    expect_stop = 0;
  end

  // Strobes are raised on a falling edge and dropped just after the rising
  // edge that samples them; the expected pulse is armed at the same moment,
  // so the checker sees it on the next falling edge.
  task automatic send_bit(bit b, bit is_last);
    @(negedge clk);
    bit_in = b; bit_valid = 1'b1;
    @(posedge clk);
    #1 bit_valid = 1'b0;
    if (is_last) expect_msg = 1;
    repeat (20) @(negedge clk);
  endtask

  task automatic send_pattern(logic [7:0] p, bit real_sync);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk);
      chip = p[i]; chip_valid = 1'b1;
      @(posedge clk);
      #1 chip_valid = 1'b0;
      if (real_sync && i == 0) expect_start = 1;
      repeat (10) @(negedge clk);
    end
  endtask

  task automatic message(logic [7:0] m, bit near_miss);
    repeat (4) send_pattern(8'b0101_0101, 0);   // 32 preamble chips
    if (near_miss) send_pattern(PAT ^ 8'b0001_0000, 0);
    // stray bits before the SyncPattern must be ignored
    send_bit(1'b1, 0);
    send_pattern(PAT, 1);
    checks++;
    @(negedge clk);
    if (!in_message) begin failures++; $display("in_message low after SyncPattern"); end
    expect_data = m;
    fork
      for (int i = 7; i >= 0; i--) send_bit(m[i], i == 0);
      send_pattern(PAT, 0);   // must not restart the search
    join
    @(negedge clk);
    checks++;
    if (in_message) begin failures++; $display("in_message still high after the message"); end
  endtask

  // a message cut short by a code error after nbits bits
  task automatic aborted_message(int nbits);
    repeat (4) send_pattern(8'b0101_0101, 0);
    send_pattern(PAT, 1);
    for (int i = 0; i < nbits; i++) send_bit(bit'($urandom_range(0, 1)), 0);
    @(negedge clk);
    code_err = 1'b1;
    @(posedge clk);
    #1 code_err = 1'b0;
    expect_stop = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (in_message) begin failures++; $display("in_message still high after a code error"); end
    // the rest of the message must not complete one
    for (int i = nbits; i < 8; i++) send_bit(1'b1, 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    message(8'hA5, 0);
    message(8'h3C, 1);
    message(8'h00, 1);
    message(8'hFF, 0);
    for (int k = 0; k < 4; k++) message(8'($urandom), bit'(k % 2));
    aborted_message(3);
    aborted_message(7);
    message(8'h96, 0);
    repeat (5) @(negedge clk);
    checks += 3;
    if (n_start != 11) begin failures++; $display("%0d starts for 11 SyncPatterns", n_start); end
    if (n_msg != 9)    begin failures++; $display("%0d messages for 9", n_msg); end
    if (n_stop != 11)  begin failures++; $display("%0d stops for 11", n_stop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
