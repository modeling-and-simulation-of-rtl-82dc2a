// tb_corr_cd - self-checking testbench of corr_cd.
//
// Each run resets the detector and feeds 90 kHz samples of 40 preamble chips
// followed by 30 random bits in Manchester code (60 chips; the detector
// needs the chip transitions Manchester code guarantees), at the data rates 3920, 4000 and 4200 baud
// (chip length 11.48, 11.25 and 10.71 samples), a random start phase, and
// either clean samples or 1 % inverted samples. Checks per clean run:
//   - the 60 payload chips appear, in order and unbroken, in the decided
//     chip stream (the detector locked and kept lock);
//   - the number of decided chips matches the 102 sent (rate check).
// Noise can make the detector slip a chip, as its rules allow; for noisy
// runs at least three in four must keep lock over the whole payload.
//   - every chip period is 10, 11 or 12 clocks, and chip_valid follows
//     chip_end by exactly one clock.
// Over all runs both phase corrections (longer and shorter period) must
// have happened.
module tb_corr_cd;
  import lf_stim_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic chip, chip_valid, data_clk, chip_end, adj_longer, adj_shorter;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  corr_cd dut (.clk, .rst_n, .din, .chip, .chip_valid, .data_clk,
               .chip_end, .adj_longer, .adj_shorter);

  bit   rx[$];
  int   noisy_runs = 0, noisy_ok = 0;
  int   n_longer = 0, n_shorter = 0;
  int   last_valid = -1, cyc = 0, bad_period = 0, bad_align = 0;
  logic end_q = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (adj_longer)  n_longer++;
      if (adj_shorter) n_shorter++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (chip_valid !== end_q) bad_align++;
    end_q = chip_end;
    if (chip_valid) begin
      rx.push_back(chip);
      if (last_valid >= 0 && (cyc - last_valid < 10 || cyc - last_valid > 12)) bad_period++;
      last_valid = cyc;
    end
  end

  function automatic int find_seq(bit hay[$], bit needle[$]);
    for (int s = 0; s + needle.size() <= hay.size(); s++) begin
      bit ok = 1;
      for (int i = 0; i < needle.size(); i++) if (hay[s+i] != needle[i]) begin ok = 0; break; end
      if (ok) return s;
    end
    return -1;
  endfunction

  task automatic run(int unsigned baud, int unsigned flip_pm);
    bit chips[$], payload[$], smp[$];
    int pos;
    rst_n = 1'b0;
    rx.delete();
    last_valid = -1;
    end_q = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) chips.push_back(bit'(i % 2));
    for (int i = 0; i < 30; i++) begin
      automatic bit b = bit'($urandom_range(1));
      chips.push_back(~b);   payload.push_back(~b);
      chips.push_back(b);    payload.push_back(b);
    end
    chips.push_back(1'b0);  // one trailing chip so the last payload chip closes
    chips.push_back(1'b1);
    chips_to_samples(smp, chips, baud, $urandom_range(FS_HZ - 1), flip_pm);
    foreach (smp[i]) @(negedge clk) din = smp[i];
    repeat (14) @(negedge clk) din = 1'b0;
    pos = find_seq(rx, payload);
    if (flip_pm == 0) begin
      checks++;
      if (pos < 0) begin
        failures++;
        $display("baud %0d clean: payload not found in %0d chips", baud, rx.size());
      end
      checks++;
      if (rx.size() < 102 - 4 || rx.size() > 102 + 2) begin
        failures++;
        $display("baud %0d: %0d chips decided for 102 sent", baud, rx.size());
      end
    end else begin
      noisy_runs++;
      if (pos >= 0) noisy_ok++;
    end
  endtask

  initial begin
    int unsigned rates[3] = '{3920, 4000, 4200};
    repeat (3) @(posedge clk);
    for (int rep = 0; rep < 4; rep++)
      foreach (rates[r]) begin
        run(rates[r], 0);
        run(rates[r], 10);
      end
    checks++;
    if (4 * noisy_ok < 3 * noisy_runs) begin
      failures++;
      $display("noisy runs: only %0d of %0d kept lock", noisy_ok, noisy_runs);
    end
    $display("noisy runs: %0d of %0d kept lock", noisy_ok, noisy_runs);
    checks++;
    if (bad_period != 0) begin failures++; $display("%0d chip periods outside 10..12", bad_period); end
    checks++;
    if (bad_align != 0) begin failures++; $display("%0d chip_valid/chip_end misalignments", bad_align); end
    checks++;
    if (n_longer == 0 || n_shorter == 0) begin
      failures++;
      $display("phase corrections: longer %0d shorter %0d", n_longer, n_shorter);
    end
    $display("phase corrections: longer %0d shorter %0d", n_longer, n_shorter);
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
