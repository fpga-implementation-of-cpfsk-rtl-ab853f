// sq_correlator - one multiplierless correlator of the square-wave detector.
//
// Accumulates, over one bit period, the product of the received sample with a
// +1/-1 basis value. The product needs no multiplier: a sign check of the
// basis value selects the sample or its two's complement, which is added to
// the running sum.
//
// Interface and timing: on a clock with en_i high the accumulator takes
//     acc <= (start_i ? 0 : acc) + (basis_i ? x_i : -x_i)
// so start_i marks the first sample of a new bit period and the sum of that
// sample alone becomes the new value. acc_o is the registered sum and
// next_o the value it takes at the coming edge (used to capture the total of a
// bit on its last sample without a cycle of delay). The accumulator is ACC_W
// bits, wide enough for SPB full-scale samples without overflow.
//
// From the modem's design: sign check and complement in place of the
// multiplier. This design's own choices: widths and the start/enable timing.
module sq_correlator
  import cpfsk_pkg::*;
#(
  parameter int unsigned X_W   = SAMPLE_W,
  parameter int unsigned ACC_W = SAMPLE_W + 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic                    start_i,
  input  logic                    basis_i,
  input  logic signed [X_W-1:0]   x_i,
  output logic signed [ACC_W-1:0] acc_o,
  output logic signed [ACC_W-1:0] next_o
);

  logic signed [ACC_W-1:0] term;

  // sign check and complement
  assign term   = basis_i ? ACC_W'(x_i) : -ACC_W'(x_i);
  assign next_o = (start_i ? '0 : acc_o) + term;

  always_ff @(posedge clk) begin
    if (!rst_n)    acc_o <= '0;
    else if (en_i) acc_o <= next_o;
  end

endmodule
