// alamouti_encoder_top -- 16-QAM Alamouti (2x1 space-time block code)
// transmitter baseband for an FPGA with two DAC/RF cards.
//
// A TxController supplies 8-bit data words and starts both TxCOREs with one
// enable pulse; each TxCORE turns the word into two 16-QAM symbols and plays
// them over two time slots of N_POINTS clocks in the Alamouti order, one
// core per antenna.  Both cores share clock, reset and enable, so the two
// antennas switch time slots on the same clock edge.
//
// Ports go to the two DAC/RF cards: ch1_dac / ch2_dac carry the unsigned
// 16-bit I and Q scale values, ch1_tx_on / ch2_tx_on the RF triggers.  data
// is the controller's current data word, brought out for observation.
// Timing: after reset each core spends INIT_CYCLES clocks warming up the RF
// path with TX_ON low; then every Alamouti block takes 2*N_POINTS clocks with
// TX_ON high (64 with the published 32 points per symbol) followed by one
// clock of handshake, i.e. one block every 2*N_POINTS+1 clocks.
module alamouti_encoder_top
  import alamouti_pkg::*;
#(
  parameter int unsigned N_POINTS       = alamouti_pkg::SAMPLES_PER_SYMBOL,
  parameter int unsigned INIT_CYCLES    = 64,
  parameter int unsigned KNOWN_SESSIONS = 4
) (
  input  logic  clk,
  input  logic  rst,
  output iq_t   ch1_dac,
  output logic  ch1_tx_on,
  output iq_t   ch2_dac,
  output logic  ch2_tx_on,
  output data_t data
);

  logic ch1_busy, ch2_busy;
  logic ch1_enable, ch2_enable;

  tx_controller #(
    .KNOWN_SESSIONS(KNOWN_SESSIONS)
  ) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .ch1_busy  (ch1_busy),
    .ch2_busy  (ch2_busy),
    .ch1_enable(ch1_enable),
    .ch2_enable(ch2_enable),
    .data      (data)
  );

  tx_core #(
    .CHANNEL    (CH1),
    .N_POINTS   (N_POINTS),
    .INIT_CYCLES(INIT_CYCLES)
  ) u_core_ch1 (
    .clk   (clk),
    .rst   (rst),
    .enable(ch1_enable),
    .data  (data),
    .busy  (ch1_busy),
    .dac   (ch1_dac),
    .tx_on (ch1_tx_on)
  );

  tx_core #(
    .CHANNEL    (CH2),
    .N_POINTS   (N_POINTS),
    .INIT_CYCLES(INIT_CYCLES)
  ) u_core_ch2 (
    .clk   (clk),
    .rst   (rst),
    .enable(ch2_enable),
    .data  (data),
    .busy  (ch2_busy),
    .dac   (ch2_dac),
    .tx_on (ch2_tx_on)
  );

  // the two antennas of an Alamouti block must stay in step
  assert property (@(posedge clk) disable iff (rst) ch1_tx_on == ch2_tx_on)
    else $error("alamouti_encoder_top: channels out of step");

endmodule
