// tb_msr_sweep - message success rate of the baseband processor against
// noise, for every filter setting and each of the three decoder chains
// (DECODER = DEC_CORRMD, the default, DEC_CORRCD and DEC_ORIG), all other
// parameters at their defaults. Two more instances run DEC_ORIG with the
// filter sizes that suit the original chip detector: Count5, Hyst2, Median7
// and MO5 in one, MO7 in the other (whose other filters repeat the first).
// All five instances receive the same LFRAW.
//
// The test measures the message success rate (MSR): the share of datagrams
// whose message is received correctly. A datagram's message is the first one
// reported within MSG_WINDOW clocks of the datagram's last sample. Messages
// reported at other times were decoded from noise: a chance SyncPattern in
// the noise-only LFRAW between datagrams. These are counted separately. The
// test also gives a bit error estimate over the datagrams' messages.
//
// Datagrams go through a simple baseband stand-in for the analog front end.
// This noise model is the testbench's own, not a model of a real front end:
//   - At 90 kHz, the carrier envelope A·chip gets white Gaussian noise of
//     standard deviation sigma.
//   - A one-pole low-pass at 11 kHz acts as the data filter.
//   - A one-pole low-pass at 500 Hz of that signal acts as the threshold.
//   - The comparator output is LFRAW.
// The noise runs through the idle time between datagrams too, so the
// receiver also sees noise-only LFRAW.
//
// Noise levels are given as A/sigma in dB. The printout also gives
// Eb/N0 = A^2 * B / (4 * D * sigma^2) with B = 45 kHz, the bandwidth of
// 90 kHz white noise, and D = 4000 baud. These numbers describe this
// stand-in only; they are not comparable with a front end that compresses
// the signal logarithmically.
//
// Per filter setting and noise level, N_MSG datagrams are sent. Each uses a
// random message, a rate of 3920, 4000 or 4200 baud, and a random phase.
// Checks:
//   - at the weakest noise every decoder with every filter setting receives
//     every datagram, except the original chip detector (all its instances),
//     which has to receive three in four (it re-times on every level change, so one
//     chatter sample near a chip edge can cost a chip even at low noise);
//   - at the strongest noise, the MSR of the CorrMD without a filter is
//     below one, so the sweep reaches the region where the receiver fails;
//   - the MSR never rises by more than a quarter of N_MSG from one noise
//     level to the next stronger one;
//   - summed over the levels, the CorrMD with the median filter (the
//     recommended setting) receives at least as many datagrams as without a
//     filter, less a margin of N_MSG/4 for the statistics;
//   - summed over all filter settings and levels, the CorrMD and the CorrCD
//     each receive more datagrams than the original chip detector at either
//     filter sizes.
module tb_msr_sweep;
  import lf_stim_pkg::*;

  localparam int  N_MSG    = 24;
  localparam int  N_LEVELS = 4;
  localparam real SNR_DB[N_LEVELS] = '{14.0, 8.0, 5.0, 2.0};
  localparam int  MSG_WINDOW = 60;
  localparam real PI       = 3.14159265358979;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 lfraw = 1'b0;
  lf_rx_pkg::filt_sel_e filter_sel = lf_rx_pkg::FILT_NONE;
  int                   checks = 0, failures = 0;

  always #5 clk = ~clk;

  localparam int N_DEC = 5;
  localparam string DEC_NAME[N_DEC] = '{"CorrMD", "CorrCD", "Original", "Original, larger filters",
                                        "Original, larger filters, MO7"};

  int         cyc = 0;
  logic [7:0] rx_msgs[N_DEC][$];
  int         rx_time[N_DEC][$];
  always @(posedge clk) cyc++;

  for (genvar d = 0; d < N_DEC; d++) begin : g_dut
    logic       chip, chip_valid, data_clk, bit_out, bit_valid;
    logic       sync_found, in_message, msg_valid, adj_longer, adj_shorter;
    logic [7:0] msg_data;
    localparam bit BIG = (d >= 3);
    lf_dbp_top #(
      .DECODER       (BIG ? lf_rx_pkg::DEC_ORIG : lf_rx_pkg::dec_sel_e'(d)),
      .COUNT_MAX     (BIG ? 5 : 3),
      .HYST_STATESIZE(BIG ? 2 : 1),
      .MO_MASKSIZE   ((d == 4) ? 7 : BIG ? 5 : 3)
    ) dut (
      .clk, .rst_n, .lfraw, .filter_sel,
      .chip, .chip_valid, .data_clk, .bit_out, .bit_valid,
      .sync_found, .in_message, .msg_data, .msg_valid,
      .adj_longer, .adj_shorter
    );
    always @(negedge clk) if (rst_n && msg_valid) begin
      rx_msgs[d].push_back(msg_data);
      rx_time[d].push_back(cyc);
    end
  end

  // analog stand-in state
  real amp = 1.0, sigma = 0.0;
  real v_data = 0.0, v_thr = 0.0;
  real a_data, a_thr;

  function automatic real gauss();
    real u1 = (real'($urandom) + 1.0) / 4294967297.0;
    real u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // one 90 kHz sample of the stand-in front end for carrier state c
  task automatic drive(bit c);
    real x = amp * real'(c) + sigma * gauss();
    v_data = v_data + a_data * (x - v_data);
    v_thr  = v_thr + a_thr * (v_data - v_thr);
    @(negedge clk) lfraw = (v_data > v_thr);
  endtask

  int ok_cnt[N_DEC][5][N_LEVELS];
  int bit_err[N_DEC][5][N_LEVELS];
  int bit_cnt[N_DEC][5][N_LEVELS];
  int false_msgs[N_DEC][5][N_LEVELS];

  task automatic datagram(int f, int l);
    int unsigned rates[3] = '{3920, 4000, 4200};
    logic [7:0] msg = 8'($urandom);
    bit chips[$], smp[$];
    int end_cyc;
    chips.delete();
    smp.delete();
    for (int d = 0; d < N_DEC; d++) begin
      rx_msgs[d].delete();
      rx_time[d].delete();
    end
    build_datagram(chips, 32, msg);
    chips.push_back(1'b0);
    chips_to_samples(smp, chips, rates[$urandom_range(2)], $urandom_range(FS_HZ - 1), 0);
    repeat (100 + $urandom_range(40)) drive(1'b0);
    foreach (smp[i]) drive(smp[i]);
    end_cyc = cyc;
    repeat (80) drive(1'b0);
    // the datagram's message is the first one reported from shortly before
    // its last sample on; the others were decoded from noise
    for (int d = 0; d < N_DEC; d++) begin
      automatic int hit = -1;
      foreach (rx_msgs[d][i])
        if (hit < 0 && rx_time[d][i] >= end_cyc - MSG_WINDOW && rx_time[d][i] <= end_cyc + MSG_WINDOW) hit = i;
      false_msgs[d][f][l] += rx_msgs[d].size() - (hit >= 0 ? 1 : 0);
      if (hit >= 0) begin
        if (rx_msgs[d][hit] == msg) ok_cnt[d][f][l]++;
        bit_err[d][f][l] += $countones(rx_msgs[d][hit] ^ msg);
        bit_cnt[d][f][l] += 8;
      end
    end
  endtask

  initial begin
    lf_rx_pkg::filt_sel_e sels[5] = '{lf_rx_pkg::FILT_NONE, lf_rx_pkg::FILT_COUNT,
                                      lf_rx_pkg::FILT_HYST, lf_rx_pkg::FILT_MEDIAN,
                                      lf_rx_pkg::FILT_MO};
    int sum_none = 0, sum_median = 0;
    int sum_dec[N_DEC];
    a_data = 1.0 - $exp(-2.0 * PI * 11000.0 / real'(FS_HZ));
    a_thr  = 1.0 - $exp(-2.0 * PI * 500.0 / real'(FS_HZ));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int l = 0; l < N_LEVELS; l++) begin
      sigma = amp / $pow(10.0, SNR_DB[l] / 20.0);
      foreach (sels[f]) begin
        @(negedge clk) filter_sel = sels[f];
        for (int k = 0; k < N_MSG; k++) datagram(f, l);
      end
    end

    for (int d = 0; d < N_DEC; d++) begin
      $display("%s: A/sigma  Eb/N0(stand-in)  MSR: none count hyst median mo   bit errors/bits received   messages from noise", DEC_NAME[d]);
      for (int l = 0; l < N_LEVELS; l++) begin
        automatic real ebn0 = 10.0 * $log10($pow(10.0, SNR_DB[l] / 10.0) * 45000.0 / (4.0 * 4000.0));
        $display("  %5.1f dB  %5.1f dB          %4.2f %4.2f %4.2f %4.2f %4.2f   %0d/%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d   %0d %0d %0d %0d %0d",
                 SNR_DB[l], ebn0,
                 real'(ok_cnt[d][0][l]) / N_MSG, real'(ok_cnt[d][1][l]) / N_MSG, real'(ok_cnt[d][2][l]) / N_MSG,
                 real'(ok_cnt[d][3][l]) / N_MSG, real'(ok_cnt[d][4][l]) / N_MSG,
                 bit_err[d][0][l], bit_cnt[d][0][l], bit_err[d][1][l], bit_cnt[d][1][l], bit_err[d][2][l], bit_cnt[d][2][l],
                 bit_err[d][3][l], bit_cnt[d][3][l], bit_err[d][4][l], bit_cnt[d][4][l],
                 false_msgs[d][0][l], false_msgs[d][1][l], false_msgs[d][2][l], false_msgs[d][3][l], false_msgs[d][4][l]);
      end
    end

    for (int d = 0; d < N_DEC; d++) begin
      sum_dec[d] = 0;
      foreach (sels[f]) begin
        checks++;
        if (ok_cnt[d][f][0] < ((d >= 2) ? N_MSG - N_MSG / 4 : N_MSG)) begin
          failures++;
          $display("%s %s: %0d of %0d datagrams at the weakest noise", DEC_NAME[d], sels[f].name(), ok_cnt[d][f][0], N_MSG);
        end
        for (int l = 1; l < N_LEVELS; l++) begin
          checks++;
          if (ok_cnt[d][f][l] > ok_cnt[d][f][l-1] + N_MSG / 4) begin
            failures++;
            $display("%s %s: MSR rises from %0d to %0d with more noise", DEC_NAME[d], sels[f].name(),
                     ok_cnt[d][f][l-1], ok_cnt[d][f][l]);
          end
        end
        for (int l = 0; l < N_LEVELS; l++) sum_dec[d] += ok_cnt[d][f][l];
      end
    end
    checks++;
    if (ok_cnt[0][0][N_LEVELS-1] >= N_MSG) begin
      failures++;
      $display("strongest noise does not disturb the unfiltered CorrMD");
    end
    for (int l = 0; l < N_LEVELS; l++) begin
      sum_none   += ok_cnt[0][0][l];
      sum_median += ok_cnt[0][3][l];
    end
    checks++;
    if (sum_median + N_MSG / 4 < sum_none) begin
      failures++;
      $display("CorrMD: median filter receives %0d datagrams, no filter %0d", sum_median, sum_none);
    end
    $display("datagrams received over all filters and levels: CorrMD %0d, CorrCD %0d, Original %0d, Original with larger filters %0d and with MO7 %0d, of %0d each",
             sum_dec[0], sum_dec[1], sum_dec[2], sum_dec[3], sum_dec[4], 5 * N_LEVELS * N_MSG);
    for (int d = 0; d < 2; d++)
      for (int o = 2; o < N_DEC; o++) begin
        checks++;
        if (sum_dec[d] <= sum_dec[o]) begin
          failures++;
          $display("%s does not beat %s", DEC_NAME[d], DEC_NAME[o]);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
