// tb_cpfsk_rx - self-checking testbench of the square-wave CPFSK receiver.
//
// The testbench makes its own continuous-phase FSK signal in real arithmetic
// (1400 Hz for '1', 1800 Hz for '0', 8000 samples/s, 100 bit/s, random start
// phase and amplitude) and adds uniform noise. Before the first bit it sends 37
// samples of noise and then marks the first sample of bit 0 with sync_i, so the
// receiver must realign. For every bit it checks
//   * the two magnitude estimates against its own correlation with the signs
//     of cos/sin at both tones, |re|+|im|,
//   * the decided bit against the bit sent,
//   * that bit_valid_o comes two clocks after the last sample of the bit.
// Samples arrive with random idle cycles between them.
module tb_cpfsk_rx;
  localparam real PI   = 3.14159265358979323846;
  localparam int  SPB  = 80;
  localparam int  NBIT = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [15:0] x = '0;
  logic x_valid = 1'b0, sync = 1'b0;
  logic bit_o, bit_valid;
  logic [23:0] mag0, mag1;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cpfsk_rx dut (.clk, .rst_n, .x_i(x), .x_valid_i(x_valid), .sync_i(sync),
                .bit_o, .bit_valid_o(bit_valid), .mag0_o(mag0), .mag1_o(mag1));

  logic   bits [NBIT];
  longint exp_m0 [NBIT];
  longint exp_m1 [NBIT];
  int     last_cyc [$];
  int     nb_out = 0;
  int     skip = 0;   // decisions to ignore (none: sync comes before a bit period ends)

  function automatic int sgn_re(int n, real f);
    return ($cos(2.0 * PI * f * n / 8000.0) > -1.0e-9) ? 1 : -1;
  endfunction

  function automatic int sgn_im(int n, real f);
    real s;
    s = $sin(2.0 * PI * f * n / 8000.0);
    if (s < 1.0e-9 && s > -1.0e-9) return ($cos(2.0 * PI * f * n / 8000.0) > 0.0) ? 1 : -1;
    return (s > 0.0) ? 1 : -1;
  endfunction

  function automatic longint labs(longint v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  task automatic put(logic signed [15:0] v, logic s, logic is_last);
    x = v; sync = s; x_valid = 1'b1;
    @(posedge clk);
    if (is_last) last_cyc.push_back(cyc);
    #1;
    x_valid = 1'b0; sync = 1'b0;
    if ($urandom % 3 == 0) @(posedge clk);
    #1;
  endtask

  always @(posedge clk) if (rst_n && bit_valid) begin
    if (skip > 0) skip--;
    else begin
      int lat;
      lat = (last_cyc.size() > 0) ? cyc - last_cyc.pop_front() : -1;
      checks++;
      if (lat != 2) fail($sformatf("bit %0d latency %0d", nb_out, lat));
      checks++;
      if (longint'(mag0) != exp_m0[nb_out] || longint'(mag1) != exp_m1[nb_out])
        fail($sformatf("bit %0d mags %0d %0d expected %0d %0d", nb_out, mag0, mag1,
                       exp_m0[nb_out], exp_m1[nb_out]));
      checks++;
      if (bit_o != bits[nb_out]) fail($sformatf("bit %0d decided %0b sent %0b", nb_out, bit_o, bits[nb_out]));
      nb_out++;
    end
  end

  initial begin
    real    phase, amp, f;
    int     noise;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // 37 samples of noise, not aligned to anything; sync cuts the receiver's
    // first bit period short, so they give no decision
    for (int i = 0; i < 37; i++) put(16'($signed($urandom % 4001) - 2000), 1'b0, 1'b0);
    phase = 2.0 * PI * real'($urandom % 1000) / 1000.0;
    for (int b = 0; b < NBIT; b++) begin
      longint re0, im0, re1, im1;
      bits[b] = (b < 7) ? 1'((32'b1110010 >> (6 - b)) & 1) : 1'($urandom);
      f = bits[b] ? 1400.0 : 1800.0;
      amp = 3000.0 + real'($urandom % 12000);
      noise = (b < 20) ? 0 : 6000;
      re0 = 0; im0 = 0; re1 = 0; im1 = 0;
      for (int n = 0; n < SPB; n++) begin
        int v;
        v = int'($floor(amp * $cos(phase) + 0.5));
        if (noise > 0) v += int'($urandom % (2 * noise + 1)) - noise;
        phase += 2.0 * PI * f / 8000.0;
        re0 += sgn_re(n, 1800.0) * v;  im0 += sgn_im(n, 1800.0) * v;
        re1 += sgn_re(n, 1400.0) * v;  im1 += sgn_im(n, 1400.0) * v;
        put(16'(v), (b == 0 && n == 0), n == SPB - 1);
      end
      exp_m0[b] = labs(re0) + labs(im0);
      exp_m1[b] = labs(re1) + labs(im1);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (nb_out != NBIT) fail($sformatf("%0d bits decided", nb_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NBIT + 1) * SPB * 3 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
