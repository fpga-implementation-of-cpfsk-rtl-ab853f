// cpfsk_rx - multiplierless square-wave detector for the CPFSK signal.
//
// The receiver decides each bit from the energy the received signal has at the
// two tone frequencies over one bit period. Instead of a Fourier (complex
// sinusoid) correlation it correlates with complex square waves, so every
// product is a sign check and complement: four parallel accumulators form the
// real and imaginary correlations with the F0 and F1 square waves. At the end
// of the bit the size of each complex sum is estimated without squaring as
// |re| + |im|, and the bit is '1' when the F1 estimate is larger than the F0
// estimate, '0' otherwise. No carrier phase or timing recovery loop is needed;
// only the bit boundaries must be known.
//
// Interface and timing: one sample per clock with x_valid_i high. A sample
// number within the bit (0 .. SPB-1, SPB = FS/RATE = 80) picks the basis
// values from basis_rom. sync_i, given with a valid sample, declares that
// sample the first of a bit; without it the counter runs freely from reset.
// On the last sample of a bit the two estimates are registered; one clock
// later bit_o is registered and bit_valid_o pulses, i.e. bit_valid_o is high
// two clocks after the last sample of the bit was presented. mag0_o/mag1_o
// keep the estimates of the last decided bit.
//
// From the modem's design: the square-wave basis, the four parallel
// accumulators, the comparison of the two tone estimates. This design's own
// choices: the |re|+|im| magnitude estimate, the sync input, widths and timing.
module cpfsk_rx
  import cpfsk_pkg::*;
#(
  parameter int unsigned FS   = FS_HZ,
  parameter int unsigned F1   = F1_HZ,
  parameter int unsigned F0   = F0_HZ,
  parameter int unsigned RATE = BIT_RATE,
  localparam int unsigned SPB   = FS / RATE,
  localparam int unsigned CNT_W = $clog2(SPB),
  localparam int unsigned ACC_W = SAMPLE_W + CNT_W,
  localparam int unsigned MAG_W = ACC_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          x_i,
  input  logic             x_valid_i,
  input  logic             sync_i,
  output logic             bit_o,
  output logic             bit_valid_o,
  output logic [MAG_W-1:0] mag0_o,
  output logic [MAG_W-1:0] mag1_o
);

  logic [CNT_W-1:0] cnt, idx;
  logic             first, last;
  logic [3:0]       basis;
  logic signed [ACC_W-1:0] nxt [4];
  logic             decide;

  assign idx   = sync_i ? '0 : cnt;
  assign first = (idx == '0);
  assign last  = (idx == CNT_W'(SPB - 1));

  basis_rom #(.FS(FS), .F1(F1), .F0(F0), .RATE(RATE)) u_rom (
    .addr_i(idx), .bits_o(basis)
  );

  // index k: 0 = re F0, 1 = im F0, 2 = re F1, 3 = im F1
  for (genvar k = 0; k < 4; k++) begin : g_corr
    sq_correlator #(.X_W(SAMPLE_W), .ACC_W(ACC_W)) u_corr (
      .clk, .rst_n, .en_i(x_valid_i), .start_i(first), .basis_i(basis[k]),
      .x_i, .acc_o(), .next_o(nxt[k])
    );
  end

  function automatic logic [MAG_W-1:0] abs_ext(logic signed [ACC_W-1:0] v);
    return v[ACC_W-1] ? MAG_W'(-v) : MAG_W'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt         <= '0;
      mag0_o      <= '0;
      mag1_o      <= '0;
      decide      <= 1'b0;
      bit_o       <= 1'b0;
      bit_valid_o <= 1'b0;
    end else begin
      decide      <= 1'b0;
      bit_valid_o <= decide;
      if (decide) bit_o <= (mag1_o > mag0_o);
      if (x_valid_i) begin
        cnt <= last ? '0 : idx + 1'b1;
        if (last) begin
          mag0_o <= abs_ext(nxt[0]) + abs_ext(nxt[1]);
          mag1_o <= abs_ext(nxt[2]) + abs_ext(nxt[3]);
          decide <= 1'b1;
        end
      end
    end
  end

endmodule
