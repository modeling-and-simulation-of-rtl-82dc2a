// tb_orig_cd - self-checking testbench of orig_cd, the transition-triggered
// chip detector.
//
// Sample streams of datagram-like chip sequences (alternating preamble,
// then a random Manchester payload, then two trailing chips) are sent at
// 3920, 4000 and 4200 baud with a random phase, clean, and then with 1 % of
// the samples inverted. Independently of the detector's counter, the
// testbench counts the clocks since the last level change of its input and
// checks the sampling rule on every clock:
//   - a chip is reported exactly when the sample taken lies PRESET,
//     PRESET + CHIP_LEN, PRESET + 2*CHIP_LEN, ... samples after the last level
//     change, and at no other time;
//   - the reported chip equals the input sample at that point.
// On the clean streams the decoded chips must contain the whole payload.
// The noisy streams only go through the timing rule.
module tb_orig_cd;
  import lf_stim_pkg::*;

  localparam int CHIP_LEN = 11;
  localparam int PRESET   = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic chip, chip_valid, data_clk;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  orig_cd dut (.clk, .rst_n, .din, .chip, .chip_valid, .data_clk);

  // reference timing: since = samples since the last level change, counted
  // at the clock edge that takes the sample; a sample is due at
  // since = PRESET + k*CHIP_LEN
  int  since = PRESET;   // reset state: as if a sample had just been due
  bit  prev_in = 0, due = 0, due_val = 0;
  bit  rx[$];
  int  bad_timing = 0, bad_value = 0;
  logic dclk_q = 1'b0;
  bit  checking = 0;

  always @(posedge clk) if (rst_n) begin
    if (din != prev_in) since = 0;
    else                since++;
    prev_in = din;
    // the sample taken at this edge is reported after it
    due     = (since >= PRESET) && ((since - PRESET) % CHIP_LEN == 0);
    due_val = din;
  end

  always @(negedge clk) if (rst_n && checking) begin
    checks++;
    if (chip_valid !== due) begin
      bad_timing++;
      if (bad_timing < 5) $display("t=%0t chip_valid=%b expected %b (since=%0d)", $time, chip_valid, due, since);
    end
    if (chip_valid) begin
      rx.push_back(chip);
      if (chip !== due_val) bad_value++;
      if (data_clk === dclk_q) bad_value++;
    end
    dclk_q = data_clk;
  end

  function automatic int find_seq(bit hay[$], bit needle[$]);
    for (int s = 0; s + needle.size() <= hay.size(); s++) begin
      automatic bit ok = 1;
      for (int i = 0; i < needle.size(); i++) if (hay[s+i] != needle[i]) begin ok = 0; break; end
      if (ok) return s;
    end
    return -1;
  endfunction

  task automatic run(int unsigned baud, int unsigned flip_pm);
    bit chips[$], payload[$], smp[$];
    for (int i = 0; i < 40; i++) chips.push_back(bit'(i % 2));
    for (int i = 0; i < 30; i++) begin
      automatic bit b = bit'($urandom_range(0, 1));
      chips.push_back(~b);   payload.push_back(~b);
      chips.push_back(b);    payload.push_back(b);
    end
    chips.push_back(1'b0);
    chips.push_back(1'b1);
    chips_to_samples(smp, chips, baud, $urandom_range(FS_HZ - 1), flip_pm);
    rx.delete();
    foreach (smp[i]) @(negedge clk) din = smp[i];
    repeat (3) @(negedge clk);
    if (flip_pm == 0) begin
      checks++;
      if (find_seq(rx, payload) < 0) begin
        failures++;
        $display("baud %0d: payload not found in %0d decoded chips", baud, rx.size());
      end
    end
  endtask

  initial begin
    int unsigned rates[3] = '{3920, 4000, 4200};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checking = 1;
    foreach (rates[r]) repeat (3) run(rates[r], 0);
    foreach (rates[r]) repeat (2) run(rates[r], 10);
    checks += 2;
    if (bad_timing != 0) begin failures++; $display("%0d clocks with wrong sampling time", bad_timing); end
    if (bad_value != 0)  begin failures++; $display("%0d wrong chip values or data_clk", bad_value); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
