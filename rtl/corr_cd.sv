// corr_cd - Correlation Chip Detector (CorrCD): recovers the chip stream from
// the oversampled 1-bit LFRAW samples with a correlator whose period tracks
// the phase of the incoming chips.
//
// How it works. A sample counter divides the 90 kHz sample clock into chip
// periods of nominally CHIP_LEN samples. Over each period the chip correlator
// z, an up/down counter saturating at +/-CHIP_LEN, adds +1 for every One
// sample and -1 for every Zero sample; this equals the correlation with the
// One chip minus the correlation with the Zero chip. At the end of a period
// the voter decides chip = (z >= 0) and the correlator restarts with the
// first sample of the next period. A zero detector toggles a flag each time
// z passes through zero during a period. The controlled clock generator uses
// that flag and the final |z| to stay in phase with the chips:
//   - a zero crossing in this period: the period is extended by one sample
//     (the correlation window started too early);
//   - no zero crossing, but |z| short of the full CHIP_LEN: the next period
//     is shortened by one sample; after a shortened period that ends with
//     |z| = CHIP_LEN-1, the length returns to normal;
//   - |z| = CHIP_LEN (perfect alignment): normal length.
// Shortening is not allowed directly after an extension. This rule set, the
// counter ranges and the restart values follow the design. The port set,
// the single clock edge (the control is evaluated combinationally and all
// state changes on the rising edge) and the chip_valid strobe being aligned
// with the chip value, rather than delayed to the middle of the next chip,
// are this design's own choices.
//
// Interface:
//   din          sampled (optionally filtered) LFRAW, one sample per clock
//   chip         decided chip value, registered, valid from chip_valid on
//   chip_valid   one-clock pulse after each decision
//   data_clk     internal chip clock, toggles at each decision
//   chip_end     combinational: this clock edge closes a chip period; the
//                sample on din at this edge is the first of the next chip
//   adj_longer   combinational: this edge extends the period by one sample
//   adj_shorter  combinational: this edge starts a shortened period
// Timing: one decision per 10, 11 or 12 clocks; chip and chip_valid appear
// one clock after the period's last sample.
module corr_cd #(
  parameter int unsigned CHIP_LEN = lf_rx_pkg::CHIP_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic chip,
  output logic chip_valid,
  output logic data_clk,
  output logic chip_end,
  output logic adj_longer,
  output logic adj_shorter
);

  localparam int unsigned SW = $clog2(CHIP_LEN + 2);       // sample counter
  localparam int unsigned ZW = $clog2(CHIP_LEN + 1) + 1;   // signed correlator
  localparam logic signed [ZW-1:0] ZMAX = ZW'(CHIP_LEN);

  typedef enum logic [1:0] {
    ACT_COUNT,   // inside a period
    ACT_EXTEND,  // hold the sample counter one more clock
    ACT_NORMAL,  // decide, next period CHIP_LEN samples
    ACT_SHORT    // decide, next period CHIP_LEN-1 samples
  } cd_act_e;

  logic [SW-1:0]          smp_cnt;
  logic signed [ZW-1:0]   z;
  logic                   zc_flag;     // odd number of zero crossings seen
  logic                   end_q;       // previous clock was a period end
  logic                   shorten_en;
  logic                   shortened;   // current period is a shortened one

  cd_act_e                act;
  logic                   clr_short;
  logic [ZW-1:0]          mag;
  logic                   at_end;

  always_comb begin
    at_end    = (smp_cnt == SW'(CHIP_LEN));
    mag       = z[ZW-1] ? -z : z;
    act       = ACT_COUNT;
    clr_short = 1'b0;
    if (at_end) begin
      if (zc_flag && !end_q) begin
        act = ACT_EXTEND;
      end else if (!zc_flag && shorten_en && (mag != ZW'(CHIP_LEN))) begin
        if (shortened && (mag == ZW'(CHIP_LEN - 1))) begin
          act       = ACT_NORMAL;
          clr_short = 1'b1;
        end else begin
          act = ACT_SHORT;
        end
      end else begin
        act = ACT_NORMAL;
      end
    end
  end

  assign chip_end    = (act == ACT_NORMAL) || (act == ACT_SHORT);
  assign adj_longer  = (act == ACT_EXTEND);
  assign adj_shorter = (act == ACT_SHORT);

  // sample counter and clock generator state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_cnt    <= '0;
      end_q      <= 1'b0;
      shorten_en <= 1'b0;
      shortened  <= 1'b0;
    end else begin
      end_q <= at_end;
      unique case (act)
        ACT_COUNT:  smp_cnt <= smp_cnt + 1'b1;
        ACT_EXTEND: begin
          smp_cnt    <= smp_cnt;
          shorten_en <= 1'b0;
        end
        ACT_NORMAL: begin
          smp_cnt    <= SW'(1);
          shorten_en <= 1'b1;
          if (clr_short) shortened <= 1'b0;
        end
        ACT_SHORT: begin
          smp_cnt    <= SW'(2);
          shorten_en <= 1'b1;
          shortened  <= 1'b1;
        end
      endcase
    end
  end

  // chip correlator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z <= '0;
    end else if (chip_end) begin
      z <= din ? ZW'(1) : -ZW'(1);
    end else if (din) begin
      if (z < ZMAX) z <= z + 1'b1;
    end else begin
      if (z > -ZMAX) z <= z - 1'b1;
    end
  end

  // zero detector
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         zc_flag <= 1'b1;
    else if (at_end)    zc_flag <= 1'b0;
    else if (z == '0)   zc_flag <= ~zc_flag;
  end

  // voter and chip clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip       <= 1'b0;
      chip_valid <= 1'b0;
      data_clk   <= 1'b0;
    end else begin
      chip_valid <= chip_end;
      if (chip_end) begin
        chip     <= (z >= 0);
        data_clk <= ~data_clk;
      end
    end
  end

  a_period_bound: assert property (@(posedge clk) disable iff (!rst_n)
    smp_cnt <= SW'(CHIP_LEN))
    else $error("corr_cd: sample counter beyond the chip length");

endmodule
