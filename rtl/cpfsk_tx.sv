// cpfsk_tx - continuous-phase FSK transmitter built on one shared multiplier.
//
// The output tone is formed from two free-running sine-cosine generators, a
// carrier at FC = (F0+F1)/2 (1600 Hz) and a deviation tone at FDEV = |F0-F1|/2
// (200 Hz, modulation index h = 2*FDEV/BIT_RATE = 4):
//     x[n] = 1/2 * ( cosA*cosB  +/-  sinA*sinB ) = 1/2 * cos(A -/+ B)
// Adding the sin*sin term gives FC-FDEV, subtracting it gives FC+FDEV. The bit
// only picks add or subtract, while both generators keep running, so the phase
// of x is continuous across bit boundaries (CPFSK).
//
// A single 17x17 signed multiplier is time-shared over the clock cycles of a
// sample: sinA*sinB, cosA*cosB, the amplitude correction of cosA*cosB, the
// update of generator A and the update of generator B; a sixth cycle adds or
// subtracts and registers x. The one-multiplier generator gives its cosine a
// smaller peak than its sine (ratio tan(theta/2)), so cosA*cosB is multiplied by
// the constant cot(thetaA/2)*cot(thetaB/2) before it is combined.
//
// Interface and timing: sample_en (one clock wide) starts a sample; the sample
// period must be at least SEQ_CYCLES = 6 clocks (a new sample may start in the
// cycle that outputs the previous one). x_o and x_valid_o are high in the
// seventh cycle after the one in which sample_en was high; first_o marks the
// first sample of each bit. A new
// data bit is taken from tx_bit on the sample_en that starts a bit period
// (every FS_HZ/BIT_RATE samples) and bit_taken_o pulses in that cycle.
//
// From the modem's design: the two-generator structure, the sum/difference
// mixing with the 1/2 factor, the one-multiplier recurrence and the sharing of
// one multiplier. This design's own choices: the widths, the step order, the
// amplitude-correction gain, the serial bit interface and the mapping of '1' to
// F1_HZ.
module cpfsk_tx
  import cpfsk_pkg::*;
#(
  parameter int unsigned FS       = FS_HZ,
  parameter int unsigned F1       = F1_HZ,
  parameter int unsigned F0       = F0_HZ,
  parameter int unsigned RATE     = BIT_RATE,
  parameter int          AMP      = OSC_AMP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_en,
  input  logic    tx_bit,
  output logic    bit_taken_o,
  output sample_t x_o,
  output logic    x_valid_o,
  output logic    first_o
);

  localparam int unsigned SPB        = FS / RATE;           // samples per bit
  localparam int unsigned CNT_W      = $clog2(SPB);
  localparam real         FC         = (real'(F0) + real'(F1)) / 2.0;
  localparam real         FDEV       = (F0 > F1) ? (real'(F0) - real'(F1)) / 2.0
                                                 : (real'(F1) - real'(F0)) / 2.0;
  localparam int          K_MIX      = mix_gain(FC, FDEV, real'(FS));
  // bit '1' is the lower tone when F1 < F0: cos(A-B) = cc + ss
  localparam logic        ONE_IS_LOW = (F1 < F0);
  localparam int unsigned SEQ_CYCLES = 6;

  typedef enum logic [2:0] {
    ST_IDLE, ST_SS, ST_CC, ST_CCK, ST_UPD_A, ST_UPD_B, ST_OUT
  } step_e;

  step_e step;

  // generator signals
  logic signed [16:0] sum_a, sum_b;
  sample_t            coef_a, coef_b, sin_a, cos_a, sin_b, cos_b;
  logic               load_a, load_b;

  // shared multiplier
  logic signed [16:0] op_x, op_y;
  logic signed [33:0] prod;
  sample_t            m_round;   // (prod + 2^14) >>> 15

  logic signed [16:0] ss_q, cc_q, cck_q;
  logic [CNT_W-1:0]   sample_cnt;
  logic               cur_bit, cur_first;
  logic               start;

  sincos_gen #(.FREQ_HZ(FC), .SAMPLE_HZ(real'(FS)), .AMP(AMP)) u_gen_a (
    .clk, .rst_n, .init(1'b0), .load(load_a), .m_i(m_round),
    .sum_o(sum_a), .coef_o(coef_a), .sin_o(sin_a), .cos_o(cos_a)
  );

  sincos_gen #(.FREQ_HZ(FDEV), .SAMPLE_HZ(real'(FS)), .AMP(AMP)) u_gen_b (
    .clk, .rst_n, .init(1'b0), .load(load_b), .m_i(m_round),
    .sum_o(sum_b), .coef_o(coef_b), .sin_o(sin_b), .cos_o(cos_b)
  );

  always_comb begin
    op_x = '0;
    op_y = '0;
    unique case (step)
      ST_SS:    begin op_x = 17'(sin_a);  op_y = 17'(sin_b);        end
      ST_CC:    begin op_x = 17'(cos_a);  op_y = 17'(cos_b);        end
      ST_CCK:   begin op_x = cc_q;        op_y = 17'(K_MIX);        end
      ST_UPD_A: begin op_x = 17'(coef_a); op_y = sum_a;             end
      ST_UPD_B: begin op_x = 17'(coef_b); op_y = sum_b;             end
      default:  begin op_x = '0;          op_y = '0;                end
    endcase
  end

  assign prod    = 34'(op_x) * 34'(op_y);
  assign m_round = sample_t'((prod + 34'sd16384) >>> 15);
  assign load_a  = (step == ST_UPD_A);
  assign load_b  = (step == ST_UPD_B);
  assign start   = sample_en && (step == ST_IDLE || step == ST_OUT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step        <= ST_IDLE;
      ss_q        <= '0;
      cc_q        <= '0;
      cck_q       <= '0;
      sample_cnt  <= '0;
      cur_bit     <= 1'b0;
      cur_first   <= 1'b0;
      bit_taken_o <= 1'b0;
      x_o         <= '0;
      x_valid_o   <= 1'b0;
      first_o     <= 1'b0;
    end else begin
      bit_taken_o <= 1'b0;
      x_valid_o   <= 1'b0;
      unique case (step)
        ST_IDLE: ;
        ST_SS:    begin ss_q  <= 17'(prod >>> 15);       step <= ST_CC;    end
        ST_CC:    begin cc_q  <= 17'(prod >>> 15);       step <= ST_CCK;   end
        ST_CCK:   begin cck_q <= 17'(prod >>> MIX_FRAC); step <= ST_UPD_A; end
        ST_UPD_A: step <= ST_UPD_B;
        ST_UPD_B: begin
          sample_cnt <= (sample_cnt == CNT_W'(SPB - 1)) ? '0 : sample_cnt + 1'b1;
          step       <= ST_OUT;
        end
        ST_OUT: begin
          // add the sin*sin term for the lower tone, subtract it for the upper
          if (cur_bit == ONE_IS_LOW) x_o <= sample_t'((cck_q + ss_q) >>> 1);
          else                       x_o <= sample_t'((cck_q - ss_q) >>> 1);
          x_valid_o  <= 1'b1;
          first_o    <= cur_first;
          step       <= ST_IDLE;
        end
        default: step <= ST_IDLE;
      endcase
      // a new sample may start while the previous one is being output
      if (start) begin
        step      <= ST_SS;
        cur_first <= (sample_cnt == '0);
        if (sample_cnt == '0) begin
          cur_bit     <= tx_bit;
          bit_taken_o <= 1'b1;
        end
      end
    end
  end

  // A sample may only start once the previous one has been produced.
  a_sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
      sample_en |-> (step == ST_IDLE || step == ST_OUT))
    else $error("cpfsk_tx: sample_en closer than %0d clocks", SEQ_CYCLES);

endmodule
