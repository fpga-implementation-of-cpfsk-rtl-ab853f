// cpfsk_modem - complete CPFSK modem for HF data links: transmitter and
// square-wave receiver side by side in one device.
//
// The transmitter turns a serial bit stream into 16-bit samples of a
// continuous-phase FSK signal (bit '1' = F1, bit '0' = F0; by default 1400 and
// 1800 Hz at 100 bit/s and 8000 samples/s). The receiver takes 16-bit samples
// of such a signal and returns the bits, using only adders and sign checks.
// The two halves share the clock, the reset and the parameters but no data:
// the converters and the radio channel between tx_x_o and rx_x_i lie outside.
//
// Interface and timing:
//   sample_en     one-clock strobe at the sample rate; at least 6 clocks apart.
//   tx_bit        next bit to send, taken when tx_bit_taken_o pulses (on the
//                 strobe that opens each bit period, every FS/RATE samples).
//   tx_x_o        transmit sample, valid with tx_x_valid_o, 6 clocks after the
//                 strobe; tx_first_o marks the first sample of a bit.
//   rx_x_i        received sample, one per clock with rx_x_valid_i; rx_sync_i
//                 marks the first sample of a bit (optional after reset).
//   rx_bit_o      decided bit, valid with rx_bit_valid_o two clocks after the
//                 last sample of its bit period; rx_mag0_o/rx_mag1_o hold
//                 the two tone estimates it was decided from (soft output).
// The partition into transmitter and receiver follows the modem's design; the
// sample strobe and the handshakes are this design's own.
module cpfsk_modem
  import cpfsk_pkg::*;
#(
  parameter int unsigned FS   = FS_HZ,
  parameter int unsigned F1   = F1_HZ,
  parameter int unsigned F0   = F0_HZ,
  parameter int unsigned RATE = BIT_RATE,
  parameter int          AMP  = OSC_AMP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_en,
  // transmitter
  input  logic    tx_bit,
  output logic    tx_bit_taken_o,
  output sample_t tx_x_o,
  output logic    tx_x_valid_o,
  output logic    tx_first_o,
  // receiver
  input  sample_t rx_x_i,
  input  logic    rx_x_valid_i,
  input  logic    rx_sync_i,
  output logic    rx_bit_o,
  output logic    rx_bit_valid_o,
  output logic [SAMPLE_W+$clog2(FS/RATE):0] rx_mag0_o,  // F0 energy estimate
  output logic [SAMPLE_W+$clog2(FS/RATE):0] rx_mag1_o   // F1 energy estimate
);

  cpfsk_tx #(.FS(FS), .F1(F1), .F0(F0), .RATE(RATE), .AMP(AMP)) u_tx (
    .clk, .rst_n, .sample_en, .tx_bit,
    .bit_taken_o(tx_bit_taken_o), .x_o(tx_x_o), .x_valid_o(tx_x_valid_o),
    .first_o(tx_first_o)
  );

  cpfsk_rx #(.FS(FS), .F1(F1), .F0(F0), .RATE(RATE)) u_rx (
    .clk, .rst_n, .x_i(rx_x_i), .x_valid_i(rx_x_valid_i), .sync_i(rx_sync_i),
    .bit_o(rx_bit_o), .bit_valid_o(rx_bit_valid_o),
    .mag0_o(rx_mag0_o), .mag1_o(rx_mag1_o)
  );

endmodule
