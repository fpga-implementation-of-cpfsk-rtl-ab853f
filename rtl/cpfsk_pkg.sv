// cpfsk_pkg - constants, types and elaboration-time helper functions shared by
// the CPFSK modem.
//
// The modem runs at 8000 samples/s, 100 bit/s (80 samples per bit), sending a
// '1' as a 1400 Hz tone and a '0' as an 1800 Hz tone. The transmitter makes
// these tones as the sum and difference of a 1600 Hz carrier and a 200 Hz
// deviation tone, each from a one-multiplier sine-cosine recurrence. The
// helper functions below turn frequencies into the fixed-point constants
// those recurrences and the receiver's square-wave basis table need; they are
// evaluated only while the design is elaborated, never in hardware.
//
// Fixed point: samples and oscillator states are signed 16-bit integers;
// oscillator coefficients are Q1.15; the mixer gain is Q6.10.
package cpfsk_pkg;

  // Operating point (the modem's main configuration).
  localparam int unsigned FS_HZ       = 8000;  // sampling frequency
  localparam int unsigned F1_HZ       = 1400;  // tone for bit '1'
  localparam int unsigned F0_HZ       = 1800;  // tone for bit '0'
  localparam int unsigned BIT_RATE    = 100;   // bits per second
  localparam int unsigned SAMPLE_W    = 16;    // sample / oscillator width
  // Peak of each oscillator's sine output. Chosen so that s1+s2 of the 1600 Hz
  // oscillator (peak AMP*sqrt(1+tan^2(36 deg)) = 1.236*AMP) stays inside 16 bits.
  localparam int          OSC_AMP     = 26000;
  localparam int unsigned MIX_FRAC    = 10;    // fraction bits of the mixer gain

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Round a real to the nearest integer.
  function automatic int round_int(real v);
    return int'($floor(v + 0.5));
  endfunction

  // cos(2*pi*f/fs) in Q1.15, clamped to the largest positive code.
  function automatic int q15_cos(real f, real fs);
    int c;
    c = round_int($cos(2.0 * PI * f / fs) * 32768.0);
    return (c > 32767) ? 32767 : c;
  endfunction

  // Peak of the cosine output of the one-multiplier recurrence whose sine peak
  // is amp: the recurrence forces cos_peak/sin_peak = tan(theta/2).
  function automatic int osc_cos_amp(int amp, real f, real fs);
    return round_int(real'(amp) * $tan(PI * f / fs));
  endfunction

  // Gain that lifts the cos*cos product of two such oscillators to the size of
  // their sin*sin product: cot(thetaA/2)*cot(thetaB/2), in Q(MIX_FRAC).
  function automatic int mix_gain(real fa, real fb, real fs);
    return round_int(real'(1 << MIX_FRAC) / ($tan(PI * fa / fs) * $tan(PI * fb / fs)));
  endfunction

  // Sign of the square-wave basis function of frequency f at sample n
  // (1 means +1, 0 means -1). The phase is held as the exact integer
  // p = (n*f) mod fs, so the table has no rounding error:
  //   real part +1 for p <= fs/4 or p >= 3fs/4 (the cosine half-periods),
  //   imaginary part +1 for p < fs/2 (the sine half-periods).
  function automatic logic basis_re(int unsigned n, int unsigned f, int unsigned fs);
    longint unsigned p, q;
    q = longint'(fs);
    p = (longint'(n) * longint'(f)) % q;
    return (4 * p <= q) || (4 * p >= 3 * q);
  endfunction

  function automatic logic basis_im(int unsigned n, int unsigned f, int unsigned fs);
    longint unsigned p, q;
    q = longint'(fs);
    p = (longint'(n) * longint'(f)) % q;
    return (2 * p < q);
  endfunction

endpackage
