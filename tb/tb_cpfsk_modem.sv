// tb_cpfsk_modem - end-to-end testbench of the CPFSK modem at its default
// parameters (8000 samples/s, 100 bit/s, 1400/1800 Hz).
//
// The transmitter's samples are looped back to the receiver through a model
// channel that adds uniform noise. Before the transmitter's first sample the
// channel delivers 30 noise samples, so the receiver has to realign on the
// first-sample marker (tx_first_o drives rx_sync_i). The bit stream starts with
// the pattern 1110010 and continues with random bits: the first 30 bits go
// through a clean channel, the rest with noise of +/-6000 against a signal
// peak of about 10300. Sample strobes are 6 (the minimum) or 8 clocks apart.
//
// Checks: every bit decided equals the bit sent, in order; the number of bits;
// no output step at a bit boundary larger than the fastest tone can make
// (continuous phase). Each mechanism is counted and must occur: bits '1' and
// '0', tone changes both ways, noisy bits, the receiver realignment, and
// strobes at the minimum spacing.
module tb_cpfsk_modem;
  localparam int SPB  = 80;
  localparam int NBIT = 70;
  localparam int PRE  = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_en = 1'b0;
  logic tx_bit = 1'b0;
  logic tx_bit_taken, tx_x_valid, tx_first;
  logic signed [15:0] tx_x;
  logic signed [15:0] rx_x = '0;
  logic rx_x_valid = 1'b0, rx_sync = 1'b0;
  logic rx_bit, rx_bit_valid;
  logic [23:0] rx_mag0, rx_mag1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cpfsk_modem dut (
    .clk, .rst_n, .sample_en, .tx_bit, .tx_bit_taken_o(tx_bit_taken),
    .tx_x_o(tx_x), .tx_x_valid_o(tx_x_valid), .tx_first_o(tx_first),
    .rx_x_i(rx_x), .rx_x_valid_i(rx_x_valid), .rx_sync_i(rx_sync),
    .rx_bit_o(rx_bit), .rx_bit_valid_o(rx_bit_valid),
    .rx_mag0_o(rx_mag0), .rx_mag1_o(rx_mag1));

  logic bits [NBIT];
  int   n_sent = 0, n_rcvd = 0, n_tx_samples = 0;
  int   n_ones = 0, n_zeros = 0, n_up = 0, n_down = 0, n_noisy = 0;
  int   n_realign = 0, n_min_spacing = 0;
  int   noise = 0;
  int   prev_x = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  // data source: next bit ready whenever the transmitter takes one
  always @(posedge clk) if (rst_n && tx_bit_taken) begin
    if (bits[n_sent]) n_ones++; else n_zeros++;
    if (n_sent > 0 && bits[n_sent] && !bits[n_sent-1]) n_up++;
    if (n_sent > 0 && !bits[n_sent] && bits[n_sent-1]) n_down++;
    if (noise > 0) n_noisy++;
    n_sent++;
    tx_bit <= (n_sent < NBIT) ? bits[n_sent] : 1'b0;
  end

  // channel: noise samples first, then the transmitter's samples plus noise
  always @(posedge clk) begin
    rx_x_valid <= 1'b0;
    rx_sync    <= 1'b0;
    if (rst_n && tx_x_valid) begin
      int v;
      v = int'(tx_x);
      if (noise > 0) v += int'($urandom % (2 * noise + 1)) - noise;
      if (v > 32767) v = 32767;
      if (v < -32768) v = -32768;
      rx_x       <= 16'(v);
      rx_x_valid <= 1'b1;
      rx_sync    <= tx_first;
      if (tx_first && n_tx_samples == 0) n_realign++;
      // continuous phase: compare the step across a bit boundary
      if (tx_first && n_tx_samples > 0) begin
        checks++;
        if (int'(tx_x) - prev_x > 13500 || prev_x - int'(tx_x) > 13500)
          fail($sformatf("jump from %0d to %0d at sample %0d", prev_x, tx_x, n_tx_samples));
      end
      prev_x = int'(tx_x);
      n_tx_samples++;
    end
  end

  // receiver output
  always @(posedge clk) if (rst_n && rx_bit_valid) begin
    checks++;
    if (n_rcvd >= NBIT) fail("extra bit decided");
    else if (rx_bit != bits[n_rcvd])
      fail($sformatf("bit %0d decided %0b sent %0b (mag0 %0d mag1 %0d)",
                     n_rcvd, rx_bit, bits[n_rcvd], rx_mag0, rx_mag1));
    n_rcvd++;
  end

  task automatic need(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) fail($sformatf("%s never happened", what));
  endtask

  initial begin
    for (int i = 0; i < NBIT; i++)
      bits[i] = (i < 7) ? 1'((32'b1110010 >> (6 - i)) & 1) : 1'($urandom);
    tx_bit = bits[0];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // unaligned noise into the receiver before the transmitter starts
    for (int i = 0; i < PRE; i++) begin
      rx_x       <= 16'($signed($urandom % 4001) - 2000);
      rx_x_valid <= 1'b1;
      @(posedge clk);
      rx_x_valid <= 1'b0;
      @(posedge clk);
    end
    for (int s = 0; s < NBIT * SPB; s++) begin
      if (s == 30 * SPB) noise = 6000;
      sample_en <= 1'b1;
      @(posedge clk);
      sample_en <= 1'b0;
      if (s % 2 == 0) begin
        repeat (5) @(posedge clk);
        n_min_spacing++;
      end else repeat (7) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n_rcvd != NBIT) fail($sformatf("%0d of %0d bits decided", n_rcvd, NBIT));
    $display("mechanisms:");
    need("bits 1 sent", n_ones);
    need("bits 0 sent", n_zeros);
    need("tone changes 0->1", n_up);
    need("tone changes 1->0", n_down);
    need("bits through noise", n_noisy);
    need("receiver realignments", n_realign);
    need("strobes at minimum spacing", n_min_spacing);
    $display("bits sent %0d, decided %0d", n_sent, n_rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBIT * SPB * 8 + PRE * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
