// tb_cpfsk_tx - self-checking testbench of the CPFSK transmitter.
//
// Sends 12 random bits (plus the pattern 1110010) at the default operating
// point and compares every output sample with a real-valued model,
//     x[n] = (AMP^2/2^15)/2 * cos(n*thA -/+ n*thB),
// '-' for bit '1' (1400 Hz) and '+' for bit '0' (1800 Hz), with thA and thB the
// angles of the quantised 1600 Hz and 200 Hz coefficients. It also checks the
// seven-clock latency from sample_en to x_valid_o, that a bit is taken on every
// 80th sample, that first_o marks those samples, and that the output has no
// jump at bit boundaries (continuous phase). Sample strobes come 6 to 9 clocks
// apart, including the minimum spacing.
module tb_cpfsk_tx;
  localparam real PI   = 3.14159265358979323846;
  localparam real FS   = 8000.0;
  localparam int  AMP  = 26000;
  localparam int  SPB  = 80;
  localparam int  NBIT = 19;
  localparam real TOL  = 100.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_en = 1'b0;
  logic tx_bit;
  logic bit_taken, x_valid, first;
  logic signed [15:0] x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cpfsk_tx dut (.clk, .rst_n, .sample_en, .tx_bit, .bit_taken_o(bit_taken),
                .x_o(x), .x_valid_o(x_valid), .first_o(first));

  logic bits [NBIT];
  int   bit_idx = 0;
  int   n_out = 0;
  int   cyc = 0;
  int   en_q[$];
  real  tha, thb, gain;
  int   prev_x = 0;
  int   boundary_checks = 0;

  assign tx_bit = (bit_idx < NBIT) ? bits[bit_idx] : 1'b0;

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (sample_en) en_q.push_back(cyc);
    if (bit_taken) begin
      checks++;
      if ((n_out % SPB) != 0) fail($sformatf("bit taken at sample %0d", n_out));
    end
    if (x_valid) begin
      real exp_x, d;
      int  b;
      b = n_out / SPB;
      exp_x = gain * $cos(n_out * tha + (bits[b] ? -1.0 : 1.0) * n_out * thb);
      d = real'(x) - exp_x;
      checks++;
      if (d > TOL || d < -TOL)
        fail($sformatf("x[%0d] = %0d expected %0.1f (bit %0b)", n_out, x, exp_x, bits[b]));
      checks++;
      if (en_q.size() == 0) fail("x_valid_o without a strobe");
      else begin
        int lat;
        lat = cyc - en_q.pop_front();
        if (lat != 7) fail($sformatf("latency %0d clocks", lat));
      end
      checks++;
      if (first != ((n_out % SPB) == 0)) fail($sformatf("first_o wrong at %0d", n_out));
      // continuity across a bit boundary where the tone changes
      if (n_out % SPB == 0 && n_out > 0 && bits[b] != bits[b-1]) begin
        int step;
        step = int'(x) - prev_x;
        boundary_checks++;
        checks++;
        // no step larger than a 1800 Hz tone of this size makes: 2*sin(pi*1800/8000)*peak
        if (step > 13500 || step < -13500) fail($sformatf("jump %0d at boundary %0d", step, n_out));
      end
      prev_x = int'(x);
      n_out++;
    end
  end

  always @(posedge clk) if (rst_n && bit_taken) bit_idx <= bit_idx + 1;

  initial begin
    logic [6:0] pat;
    pat = 7'b1110010;
    for (int i = 0; i < 7; i++) bits[i] = pat[6-i];
    for (int i = 7; i < NBIT; i++) bits[i] = 1'($urandom);
    tha  = $acos(real'(int'($floor($cos(2.0 * PI * 1600.0 / FS) * 32768.0 + 0.5))) / 32768.0);
    thb  = $acos(real'(int'($floor($cos(2.0 * PI * 200.0 / FS) * 32768.0 + 0.5))) / 32768.0);
    gain = (real'(AMP) * real'(AMP) / 32768.0) / 2.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NBIT * SPB; s++) begin
      sample_en <= 1'b1;
      @(posedge clk);
      sample_en <= 1'b0;
      repeat (5 + (s % 4)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != NBIT * SPB) fail($sformatf("%0d samples out", n_out));
    checks++;
    if (boundary_checks == 0) fail("no tone change at a bit boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBIT * SPB * 10 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
