// tb_manch_dec - self-checking testbench of manch_dec, the chip-pair
// Manchester decoder.
//
// Chips are strobed directly, one every 11 clocks. Each scenario sends some
// chips before a start pulse, then a list of chip pairs, then a stop pulse,
// then more chips. The pairs are random Manchester bits with some invalid
// pairs (Zero-Zero, One-One) mixed in. Checks:
//   - nothing comes out before start or after stop;
//   - every valid pair gives exactly one bit_valid, one clock after the
//     pair's second chip strobe, with bit_out = One for Zero-One and Zero
//     for One-Zero;
//   - every invalid pair gives exactly one code_err at that time and no bit;
//   - the pairing begins with the first chip after start, whatever the
//     decoder was doing before.
module tb_manch_dec;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic chip = 1'b0, chip_valid = 1'b0, start = 1'b0, stop = 1'b0;
  logic bit_out, bit_valid, code_err;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  manch_dec dut (.clk, .rst_n, .chip, .chip_valid, .start, .stop,
                 .bit_out, .bit_valid, .code_err);

  // expectation for the next falling edge
  bit exp_bit_valid = 0, exp_bit = 0, exp_err = 0;
  int n_bits = 0, n_errs = 0;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (bit_valid !== exp_bit_valid || code_err !== exp_err ||
        (exp_bit_valid && bit_out !== exp_bit)) begin
      failures++;
      $display("t=%0t bit_valid=%b bit_out=%b code_err=%b expected %b %b %b",
               $time, bit_valid, bit_out, code_err, exp_bit_valid, exp_bit, exp_err);
    end
    if (bit_valid) n_bits++;
    if (code_err)  n_errs++;
    exp_bit_valid = 0;
    exp_err = 0;
  end

  task automatic send_chip(bit c);
    @(negedge clk);
    chip = c; chip_valid = 1'b1;
    @(posedge clk);
    #1 chip_valid = 1'b0;
    repeat (10) @(negedge clk);
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk);
    sig = 1'b1;
    @(posedge clk);
    #1 sig = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  int sent_bits = 0, sent_errs = 0;

  task automatic scenario(int pre_chips, int pairs);
    for (int i = 0; i < pre_chips; i++) send_chip(bit'($urandom_range(0, 1)));
    pulse(start);
    for (int p = 0; p < pairs; p++) begin
      automatic bit c0 = bit'($urandom_range(0, 1));
      automatic bit invalid = ($urandom_range(0, 4) == 0);
      automatic bit c1 = invalid ? c0 : ~c0;
      send_chip(c0);
      @(negedge clk);
      chip = c1; chip_valid = 1'b1;
      @(posedge clk);
      #1 chip_valid = 1'b0;
      if (invalid) begin
        exp_err = 1;
        sent_errs++;
      end else begin
        exp_bit_valid = 1;
        exp_bit = c1;
        sent_bits++;
      end
      repeat (10) @(negedge clk);
    end
    pulse(stop);
    for (int i = 0; i < 5; i++) send_chip(bit'($urandom_range(0, 1)));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 30; k++) scenario(k % 4, 1 + $urandom_range(0, 9));
    // a start while decoding restarts the pairing
    pulse(start);
    send_chip(1'b0);
    scenario(0, 4);
    repeat (5) @(negedge clk);
    checks += 2;
    if (n_bits != sent_bits) begin failures++; $display("%0d bits for %0d valid pairs", n_bits, sent_bits); end
    if (n_errs != sent_errs) begin failures++; $display("%0d code errors for %0d invalid pairs", n_errs, sent_errs); end
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
