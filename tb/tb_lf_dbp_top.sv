// tb_lf_dbp_top - end-to-end testbench of the baseband processor at its
// default parameters (Count3, Hyst1, Median7 and MO3 filters, CorrMD with
// 11-sample chips, 8-chip SyncPattern, 8-bit messages).
//
// After one reset a stream of datagrams is sent as 90 kHz LFRAW samples:
// for every filter setting (none, count, hysteresis, median, morphology),
// switched at run time between datagrams, and every data rate (3920, 4000
// and 4200 baud), one clean datagram and one with 3 % of the samples
// inverted, each preceded by idle samples with the same noise and a random
// phase. Checks:
//   - every clean datagram yields exactly one msg_valid with the sent
//     message, no later than 60 clocks after its last sample;
//   - noisy datagrams: at least three in four arrive intact over the filter
//     settings that filter;
//   - each mechanism happened at least once: every filter setting delivered
//     a message, the chip period was lengthened and shortened, the
//     SyncPattern was found, the machine returned to the search after a
//     message and found the next one, and the filters removed isolated
//     one-sample spikes (at most one in four of those at their input reached
//     their output).
module tb_lf_dbp_top;
  import lf_stim_pkg::*;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 lfraw = 1'b0;
  lf_rx_pkg::filt_sel_e filter_sel = lf_rx_pkg::FILT_MEDIAN;
  logic                 chip, chip_valid, data_clk, bit_out, bit_valid;
  logic                 sync_found, in_message, msg_valid, adj_longer, adj_shorter;
  logic [7:0]           msg_data;
  int                   checks = 0, failures = 0;

  always #5 clk = ~clk;

  lf_dbp_top dut (
    .clk, .rst_n, .lfraw, .filter_sel,
    .chip, .chip_valid, .data_clk, .bit_out, .bit_valid,
    .sync_found, .in_message, .msg_data, .msg_valid,
    .adj_longer, .adj_shorter
  );

  int cyc = 0;
  int n_longer = 0, n_shorter = 0, n_sync = 0, n_msg = 0, n_resync = 0;
  int n_msg_per_filter[5] = '{default: 0};
  bit had_msg = 0;
  logic [7:0] rx_msgs[$];
  int         rx_time[$];

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (adj_longer)  n_longer++;
    if (adj_shorter) n_shorter++;
    if (sync_found) begin
      n_sync++;
      if (had_msg) n_resync++;
    end
    if (msg_valid) begin
      n_msg++;
      had_msg = 1;
      rx_msgs.push_back(msg_data);
      rx_time.push_back(cyc);
    end
  end

  int  noisy_runs = 0, noisy_ok = 0;

  task automatic datagram(lf_rx_pkg::filt_sel_e sel, int unsigned baud,
                          int unsigned flip_pm, logic [7:0] msg);
    bit chips[$], smp[$];
    int end_cyc;
    bit ok;
    @(negedge clk) filter_sel = sel;
    rx_msgs.delete();
    rx_time.delete();
    idle_samples(smp, 60 + $urandom_range(40), flip_pm);
    build_datagram(chips, 32, msg);
    chips.push_back(1'b0);   // the carrier stays on for one more chip
    chips_to_samples(smp, chips, baud, $urandom_range(FS_HZ - 1), flip_pm);
    foreach (smp[i]) @(negedge clk) lfraw = smp[i];
    end_cyc = cyc;
    repeat (80) @(negedge clk) lfraw = ($urandom_range(999) < flip_pm);
    ok = (rx_msgs.size() == 1) && (rx_msgs[0] == msg) && (rx_time[0] - end_cyc <= 60);
    if (ok) n_msg_per_filter[int'(sel)]++;
    if (flip_pm == 0) begin
      checks++;
      if (!ok) begin
        failures++;
        $display("filter %s baud %0d: sent %02h, got %0d messages%s", sel.name(), baud, msg,
                 rx_msgs.size(), rx_msgs.size() > 0 ? $sformatf(" first %02h at +%0d", rx_msgs[0], rx_time[0] - end_cyc) : "");
      end
    end else if (sel != lf_rx_pkg::FILT_NONE) begin
      noisy_runs++;
      if (ok) noisy_ok++;
    end
  endtask

  // noise removal: isolated one-sample spikes (a sample unlike both of its
  // neighbours) at the filter input and at its output, while a filter is on
  int  spikes_in = 0, spikes_out = 0;
  bit  si[3], so[3];
  always @(negedge clk) if (rst_n) begin
    si = '{si[1], si[2], dut.sample};
    so = '{so[1], so[2], dut.filtered};
    if (filter_sel != lf_rx_pkg::FILT_NONE) begin
      if (si[1] != si[0] && si[1] != si[2]) spikes_in++;
      if (so[1] != so[0] && so[1] != so[2]) spikes_out++;
    end
  end

  initial begin
    int unsigned rates[3] = '{3920, 4000, 4200};
    lf_rx_pkg::filt_sel_e sels[5] = '{lf_rx_pkg::FILT_NONE, lf_rx_pkg::FILT_COUNT,
                                      lf_rx_pkg::FILT_HYST, lf_rx_pkg::FILT_MEDIAN,
                                      lf_rx_pkg::FILT_MO};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (sels[f])
      foreach (rates[r]) begin
        datagram(sels[f], rates[r], 0, 8'($urandom));
        datagram(sels[f], rates[r], 30, 8'($urandom));
      end
    // the recommended configuration once more with fixed messages
    datagram(lf_rx_pkg::FILT_MEDIAN, 4000, 0, 8'h00);
    datagram(lf_rx_pkg::FILT_MEDIAN, 4000, 0, 8'hFF);

    checks++;
    if (4 * noisy_ok < 3 * noisy_runs) begin
      failures++;
      $display("noisy datagrams: only %0d of %0d intact", noisy_ok, noisy_runs);
    end
    $display("noisy datagrams intact: %0d of %0d", noisy_ok, noisy_runs);
    foreach (sels[f]) begin
      checks++;
      if (n_msg_per_filter[f] == 0) begin failures++; $display("filter %s never delivered a message", sels[f].name()); end
    end
    checks += 5;
    if (n_longer == 0)  begin failures++; $display("chip period never lengthened"); end
    if (n_shorter == 0) begin failures++; $display("chip period never shortened"); end
    if (n_sync == 0)    begin failures++; $display("SyncPattern never found"); end
    if (n_resync == 0)  begin failures++; $display("no SyncPattern found after a completed message"); end
    if (spikes_in == 0 || 4 * spikes_out > spikes_in) begin
      failures++; $display("filters passed %0d of %0d one-sample spikes", spikes_out, spikes_in);
    end
    $display("mechanisms: longer %0d shorter %0d sync %0d resync %0d messages %0d",
             n_longer, n_shorter, n_sync, n_resync, n_msg);
    $display("one-sample spikes with a filter on: %0d at its input, %0d at its output",
             spikes_in, spikes_out);
    $display("messages per filter (none/count/hyst/median/mo): %0d %0d %0d %0d %0d",
             n_msg_per_filter[0], n_msg_per_filter[1], n_msg_per_filter[2],
             n_msg_per_filter[3], n_msg_per_filter[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
