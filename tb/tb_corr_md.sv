// tb_corr_md - self-checking testbench of corr_md.
//
// Each run resets the decoder and sends one datagram (32 preamble chips,
// the SyncPattern, an 8-bit message in inverted Manchester code, two
// trailing chips) as 90 kHz samples at 3920, 4000 or 4200 baud with a random
// phase. The testbench plays the control state machine: it watches the chip
// stream, pulses start one clock after the last SyncPattern chip, takes the
// next eight decoded bits and pulses stop. Checks:
//   - no bit is reported before start;
//   - clean runs: all eight bits equal the message (0x00, 0xFF and random
//     messages are sent), and consecutive bits are 20 to 24 clocks apart;
//   - runs with 1 % inverted samples: at least three in four messages
//     arrive intact.
module tb_corr_md;
  import lf_stim_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic start = 1'b0, stop = 1'b0;
  logic chip, chip_valid, data_clk, bit_out, bit_valid, adj_longer, adj_shorter;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  corr_md dut (.clk, .rst_n, .din, .start, .stop, .chip, .chip_valid, .data_clk,
               .bit_out, .bit_valid, .adj_longer, .adj_shorter);

  logic [lf_rx_pkg::SYNC_LEN-1:0] hist;
  bit   searching, started;
  logic [7:0] got;
  int   nbits, cyc = 0, last_bit = -1, bad_spacing = 0, early_bits = 0;
  int   noisy_runs = 0, noisy_ok = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    start = 1'b0;
    stop  = 1'b0;
    if (rst_n) begin
      if (bit_valid && !started) early_bits++;
      if (chip_valid && searching) begin
        hist = {hist[lf_rx_pkg::SYNC_LEN-2:0], chip};
        if (hist == lf_rx_pkg::SYNC_PATTERN) begin
          searching = 0;
          started   = 1;
          start     = 1'b1;
        end
      end
      if (bit_valid && started && nbits < 8) begin
        got = {got[6:0], bit_out};
        nbits++;
        if (last_bit >= 0 && (cyc - last_bit < 20 || cyc - last_bit > 24)) bad_spacing++;
        last_bit = cyc;
        if (nbits == 8) stop = 1'b1;
      end
    end
  end

  task automatic run(int unsigned baud, int unsigned flip_pm, logic [7:0] msg);
    bit chips[$], smp[$];
    rst_n = 1'b0;
    hist = '0; searching = 1; started = 0; nbits = 0; got = '0; last_bit = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    build_datagram(chips, 32, msg);
    chips.push_back(1'b0);
    chips.push_back(1'b1);
    idle_samples(smp, 20, 0);
    chips_to_samples(smp, chips, baud, $urandom_range(FS_HZ - 1), flip_pm);
    foreach (smp[i]) @(negedge clk) din = smp[i];
    repeat (30) @(negedge clk) din = 1'b0;
    if (flip_pm == 0) begin
      checks++;
      if (nbits != 8 || got != msg) begin
        failures++;
        $display("baud %0d clean: sent %02h got %02h (%0d bits, started %0d)", baud, msg, got, nbits, started);
      end
    end else begin
      noisy_runs++;
      if (nbits == 8 && got == msg) noisy_ok++;
    end
  endtask

  initial begin
    int unsigned rates[3] = '{3920, 4000, 4200};
    repeat (3) @(posedge clk);
    foreach (rates[r]) begin
      run(rates[r], 0, 8'h00);
      run(rates[r], 0, 8'hFF);
      for (int k = 0; k < 4; k++) begin
        run(rates[r], 0, 8'($urandom));
        run(rates[r], 10, 8'($urandom));
      end
    end
    checks++;
    if (4 * noisy_ok < 3 * noisy_runs) begin
      failures++;
      $display("noisy runs: only %0d of %0d messages intact", noisy_ok, noisy_runs);
    end
    $display("noisy runs: %0d of %0d messages intact", noisy_ok, noisy_runs);
    checks++;
    if (early_bits != 0) begin failures++; $display("%0d bits before start", early_bits); end
    checks++;
    if (bad_spacing != 0) begin failures++; $display("%0d bit spacings outside 20..24", bad_spacing); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
