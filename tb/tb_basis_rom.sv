// tb_basis_rom - self-checking testbench of the square-wave basis table.
// Reads all 80 entries and compares each bit with the sign of cos and sin of
// 2*pi*f*n/8000 for f = 1800 Hz (tone 0) and 1400 Hz (tone 1), worked out in
// real arithmetic. Where the cosine is zero the real part must be +1; where
// the sine is zero the imaginary part must be +1 at phase 0 and -1 at phase pi.
module tb_basis_rom;
  localparam real PI  = 3.14159265358979323846;
  localparam int  SPB = 80;

  logic [6:0] addr;
  logic [3:0] bits;
  int checks = 0, failures = 0;

  basis_rom dut (.addr_i(addr), .bits_o(bits));

  function automatic logic exp_re(int n, real f);
    real c;
    c = $cos(2.0 * PI * f * n / 8000.0);
    return (c > -1.0e-9);
  endfunction

  function automatic logic exp_im(int n, real f);
    real s, c;
    s = $sin(2.0 * PI * f * n / 8000.0);
    c = $cos(2.0 * PI * f * n / 8000.0);
    if (s < 1.0e-9 && s > -1.0e-9) return (c > 0.0);
    return (s > 0.0);
  endfunction

  task automatic check(int n, int k, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL n=%0d bit %0d: got %0b expected %0b", n, k, got, exp);
    end
  endtask

  initial begin
    int ones;
    ones = 0;
    for (int n = 0; n < SPB; n++) begin
      addr = 7'(n);
      #1;
      check(n, 0, bits[0], exp_re(n, 1800.0));
      check(n, 1, bits[1], exp_im(n, 1800.0));
      check(n, 2, bits[2], exp_re(n, 1400.0));
      check(n, 3, bits[3], exp_im(n, 1400.0));
      ones += int'(bits[0]) + int'(bits[1]) + int'(bits[2]) + int'(bits[3]);
    end
    // roughly balanced square waves
    checks++;
    if (ones < 150 || ones > 170) begin
      failures++;
      $display("FAIL %0d ones in the table", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
