// lf_stim_pkg - stimulus helpers shared by the receiver testbenches.
//
// Builds the chip sequence of a wake-up datagram (alternating Zero/One
// preamble chips, the SyncPattern, then each message bit in inverted
// Manchester code: One -> chips Zero,One; Zero -> chips One,Zero) and turns a
// chip sequence into the 90 kHz LFRAW sample stream an ideal analog front end
// would deliver at a given data rate. Sample n belongs to chip
// floor((n * 2 * baud + phase) / 90000). Noise is modelled at the comparator
// output: each sample is inverted with probability flip_pm / 1000, also in
// the idle time around a datagram. This stands in for the analog front end;
// it is not a model of its filters.
package lf_stim_pkg;

  localparam int unsigned FS_HZ = 90000;

  // chip sequence of one datagram
  function automatic void build_datagram(ref bit chips[$],
                                         input int unsigned preamble_chips,
                                         input logic [lf_rx_pkg::MSG_BITS-1:0] msg);
    chips.delete();
    for (int unsigned i = 0; i < preamble_chips; i++) chips.push_back(bit'(i % 2));
    for (int i = lf_rx_pkg::SYNC_LEN - 1; i >= 0; i--) chips.push_back(lf_rx_pkg::SYNC_PATTERN[i]);
    for (int i = lf_rx_pkg::MSG_BITS - 1; i >= 0; i--) begin
      chips.push_back(~msg[i]);
      chips.push_back(msg[i]);
    end
  endfunction

  // sample stream of a chip sequence, appended to smp
  function automatic void chips_to_samples(ref bit smp[$],
                                           input bit chips[$],
                                           input int unsigned baud,
                                           input int unsigned phase,
                                           input int unsigned flip_pm);
    longint unsigned chip_rate = 2 * longint'(baud);
    longint unsigned n = 0;
    longint unsigned idx;
    bit s;
    forever begin
      idx = (n * chip_rate + phase) / FS_HZ;
      if (idx >= chips.size()) break;
      s = chips[idx];
      if ($urandom_range(999) < flip_pm) s = ~s;
      smp.push_back(s);
      n++;
    end
  endfunction

  // idle samples between datagrams: Zero, each inverted with probability
  // flip_pm / 1000
  function automatic void idle_samples(ref bit smp[$], input int unsigned count,
                                       input int unsigned flip_pm);
    for (int unsigned i = 0; i < count; i++) smp.push_back($urandom_range(999) < flip_pm);
  endfunction

endpackage
