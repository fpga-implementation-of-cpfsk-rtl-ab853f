// basis_rom - table of the complex square-wave basis functions used by the
// square-wave (multiplierless) FSK detector.
//
// For each of the two tone frequencies the detector correlates the received
// samples with a complex square wave whose real part is the sign of a cosine
// and whose imaginary part is the sign of a sine at that frequency. Since each
// value is +1 or -1 it is stored as one bit (1 = +1, 0 = -1), four bits per
// sample index:
//     bits_o[0] real part, tone F0     bits_o[1] imaginary part, tone F0
//     bits_o[2] real part, tone F1     bits_o[3] imaginary part, tone F1
// With p = (n*F) mod FS, the real part is +1 for p <= FS/4 or p >= 3*FS/4 and
// the imaginary part is +1 for p < FS/2. The table covers one bit period
// (FS/RATE entries) and restarts every bit, in step with the detector.
//
// The contents are computed while the design is elaborated (a constant
// function fills a localparam array), so the table follows any change of the
// frequencies. The read is combinational (a small ROM of SPB x 4 bits).
//
// From the modem's design: the square-wave basis and its use in place of a
// multiplier. This design's own choices: one table indexed by the sample
// number within the bit, and the sign given to the boundary samples.
module basis_rom
  import cpfsk_pkg::*;
#(
  parameter int unsigned FS   = FS_HZ,
  parameter int unsigned F1   = F1_HZ,
  parameter int unsigned F0   = F0_HZ,
  parameter int unsigned RATE = BIT_RATE,
  localparam int unsigned SPB   = FS / RATE,
  localparam int unsigned ADDR_W = $clog2(SPB)
) (
  input  logic [ADDR_W-1:0] addr_i,
  output logic [3:0]        bits_o
);

  typedef logic [3:0] entry_t;
  typedef entry_t table_t [SPB];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned n = 0; n < SPB; n++) begin
      t[n] = {basis_im(n, F1, FS), basis_re(n, F1, FS),
              basis_im(n, F0, FS), basis_re(n, F0, FS)};
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    bits_o = 4'b0000;
    if (32'(addr_i) < SPB) bits_o = TABLE[addr_i];
  end

endmodule
