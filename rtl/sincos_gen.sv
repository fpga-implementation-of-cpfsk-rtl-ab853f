// sincos_gen - one-multiplier digital sine-cosine generator.
//
// Holds two states, s1[n] = a*sin(n*theta) and s2[n] = b*cos(n*theta), with
// theta = 2*pi*FREQ_HZ/SAMPLE_HZ, and advances them with
//     m       = cos(theta) * (s1[n] + s2[n])
//     s1[n+1] = m + s2[n]
//     s2[n+1] = m - s1[n]
// which needs a single multiplication per step. The update matrix has
// determinant exactly 1 for any quantised cos(theta), so the amplitude neither
// grows nor decays. This form fixes the amplitude ratio b/a = tan(theta/2); the
// sine peak is AMP and the cosine peak is AMP*tan(theta/2).
//
// The multiplier is not inside this block: the generator shows the sum
// s1+s2 on sum_o and its coefficient on coef_o, and on load takes the scaled
// product m (coef*sum >>> 15, rounded) on m_i. This lets one multiplier serve
// several generators and the mixer, as in the transmitter. coef_o is a
// constant (fixed by the parameters); it is an output so that the shared
// multiplier needs no copy of it.
//
// Interface and timing: init (synchronous, priority over load) restarts the
// phase at n = 0 (s1 = 0, s2 = cosine peak); load advances n by one on the
// clock edge. Reset (synchronous, active low) has the same effect as init.
//
// The recurrence and its one-multiplier form follow the modem's design; the
// amplitude, widths and the external-multiplier interface are this design's.
module sincos_gen
  import cpfsk_pkg::*;
#(
  parameter real FREQ_HZ = 1600.0,
  parameter real SAMPLE_HZ = 8000.0,
  parameter int  AMP     = OSC_AMP
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic                  load,
  input  sample_t               m_i,     // coef_o*sum_o >>> 15
  output logic signed [16:0]    sum_o,   // s1 + s2
  output sample_t               coef_o,  // cos(theta), Q1.15
  output sample_t               sin_o,   // s1[n]
  output sample_t               cos_o    // s2[n]
);

  localparam int COEF    = q15_cos(FREQ_HZ, SAMPLE_HZ);
  localparam int COS_AMP = osc_cos_amp(AMP, FREQ_HZ, SAMPLE_HZ);

  sample_t s1, s2;

  assign coef_o = sample_t'(COEF);
  assign sum_o  = 17'(s1) + 17'(s2);
  assign sin_o  = s1;
  assign cos_o  = s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= sample_t'(COS_AMP);
    end else if (init) begin
      s1 <= '0;
      s2 <= sample_t'(COS_AMP);
    end else if (load) begin
      s1 <= m_i + s2;
      s2 <= m_i - s1;
    end
  end

endmodule
