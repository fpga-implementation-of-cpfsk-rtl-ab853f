// tb_sincos_gen - self-checking testbench of the one-multiplier sine-cosine
// generator. The testbench plays the part of the shared multiplier: it forms
// m = round(coef * (s1+s2) / 2^15) from the generator's outputs, using its own
// copy of the Q1.15 coefficient. Two generators (the 1600 Hz carrier and the
// 200 Hz deviation tone at 8000 samples/s) are stepped for 4000 samples and
// compared with AMP*sin(n*theta) and AMP*tan(theta/2)*cos(n*theta), theta
// taken from the quantised coefficient. init is checked to restart the phase.
module tb_sincos_gen;
  localparam real PI  = 3.14159265358979323846;
  localparam real FS  = 8000.0;
  localparam int  AMP = 26000;
  localparam int  N   = 4000;
  localparam real TOL = 60.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0;
  logic load = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic signed [15:0] m_a, m_b, coef_a, coef_b, sin_a, cos_a, sin_b, cos_b;
  logic signed [16:0] sum_a, sum_b;

  sincos_gen #(.FREQ_HZ(1600.0), .SAMPLE_HZ(FS), .AMP(AMP)) dut_a (
    .clk, .rst_n, .init, .load, .m_i(m_a), .sum_o(sum_a), .coef_o(coef_a),
    .sin_o(sin_a), .cos_o(cos_a));
  sincos_gen #(.FREQ_HZ(200.0), .SAMPLE_HZ(FS), .AMP(AMP)) dut_b (
    .clk, .rst_n, .init, .load, .m_i(m_b), .sum_o(sum_b), .coef_o(coef_b),
    .sin_o(sin_b), .cos_o(cos_b));

  function automatic int q15(real v);
    return int'($floor(v * 32768.0 + 0.5));
  endfunction

  // the testbench's multiplier, using its own coefficients
  int ca, cb;
  assign m_a = 16'((longint'(ca) * longint'(sum_a) + 16384) >>> 15);
  assign m_b = 16'((longint'(cb) * longint'(sum_b) + 16384) >>> 15);

  task automatic check_close(string what, int got, real exp);
    checks++;
    if ((real'(got) - exp) > TOL || (exp - real'(got)) > TOL) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0.1f", what, got, exp);
    end
  endtask

  // Exact waveform for the first EXACT_N samples; after that rounding has
  // moved the phase slightly, so only the amplitude (the ellipse the state
  // travels on) is checked: (s1/AMP)^2 + (s2/(AMP*tan(theta/2)))^2 = 1.
  localparam int EXACT_N = 400;

  task automatic check_gen(int n, real f, int c, logic signed [15:0] s,
                           logic signed [15:0] co);
    real th, ratio, e;
    th    = $acos(real'(c) / 32768.0);
    ratio = $tan(PI * f / FS);
    if (n < EXACT_N) begin
      check_close($sformatf("%0.0f Hz sin n=%0d", f, n), int'(s),  real'(AMP) * $sin(n * th));
      check_close($sformatf("%0.0f Hz cos n=%0d", f, n), int'(co), real'(AMP) * ratio * $cos(n * th));
    end else begin
      e = (real'(s) / AMP) ** 2 + (real'(co) / (AMP * ratio)) ** 2;
      checks++;
      if (e > 1.02 || e < 0.98) begin
        failures++;
        if (failures < 10) $display("FAIL %0.0f Hz amplitude n=%0d: %f", f, n, e);
      end
    end
  endtask

  initial begin
    ca = q15($cos(2.0 * PI * 1600.0 / FS));
    cb = q15($cos(2.0 * PI * 200.0 / FS));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (coef_a != 16'(ca) || coef_b != 16'(cb)) begin
      failures++;
      $display("FAIL coefficients %0d %0d expected %0d %0d", coef_a, coef_b, ca, cb);
    end
    for (int n = 0; n < N; n++) begin
      check_gen(n, 1600.0, ca, sin_a, cos_a);
      check_gen(n, 200.0,  cb, sin_b, cos_b);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      if (n % 7 == 3) @(negedge clk);   // idle cycles must hold the state
    end
    // init restarts at phase zero
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    for (int n = 0; n < 50; n++) begin
      check_gen(n, 1600.0, ca, sin_a, cos_a);
      check_gen(n, 200.0,  cb, sin_b, cos_b);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
