// tb_alamouti_points -- the encoder with finer symbol waveforms.
//
// More points per symbol give a finer waveform at the price of a longer
// block: 2*N_POINTS clocks per Alamouti block.  This testbench builds the
// encoder with 64 and with 128 points per symbol side by side (all other
// parameters at their defaults) and lets a stream checker follow each from
// reset through the known-symbol sessions into the counted data, checking
// every sample of both antennas, the block length (128 and 256 clocks with
// tx_on high) and the block period (2*N_POINTS + 1 clocks).
module tb_alamouti_points;
  import alamouti_pkg::*;

  localparam int INIT   = 64;
  localparam int BLOCKS = 10;

  logic clk = 1'b0;
  logic rst;

  always #5 clk = ~clk;

  iq_t   a1, a2, b1, b2;
  logic  a1_on, a2_on, b1_on, b2_on;
  data_t a_data, b_data;
  int    a_checks, a_fail, a_blocks, a_first;
  int    b_checks, b_fail, b_blocks, b_first;

  alamouti_encoder_top #(.N_POINTS(64)) dut64 (
    .clk(clk), .rst(rst),
    .ch1_dac(a1), .ch1_tx_on(a1_on), .ch2_dac(a2), .ch2_tx_on(a2_on), .data(a_data)
  );
  alamouti_stream_checker #(.N_POINTS(64)) chk64 (
    .clk(clk), .rst(rst),
    .ch1_dac(a1), .ch1_tx_on(a1_on), .ch2_dac(a2), .ch2_tx_on(a2_on), .data(a_data),
    .checks(a_checks), .failures(a_fail), .blocks(a_blocks), .first_on(a_first)
  );

  alamouti_encoder_top #(.N_POINTS(128)) dut128 (
    .clk(clk), .rst(rst),
    .ch1_dac(b1), .ch1_tx_on(b1_on), .ch2_dac(b2), .ch2_tx_on(b2_on), .data(b_data)
  );
  alamouti_stream_checker #(.N_POINTS(128)) chk128 (
    .clk(clk), .rst(rst),
    .ch1_dac(b1), .ch1_tx_on(b1_on), .ch2_dac(b2), .ch2_tx_on(b2_on), .data(b_data),
    .checks(b_checks), .failures(b_fail), .blocks(b_blocks), .first_on(b_first)
  );

  int checks, failures;

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #2;
    rst = 1'b0;
    while (a_blocks < BLOCKS || b_blocks < BLOCKS) @(posedge clk);
    checks   = a_checks + b_checks + 4;
    failures = a_fail + b_fail;
    // first block starts INIT + 4 clocks after reset for any size
    if (a_first - 3 != INIT + 4) begin
      failures++; $display("FAIL N=64 first tx_on at %0d", a_first - 3);
    end
    if (b_first - 3 != INIT + 4) begin
      failures++; $display("FAIL N=128 first tx_on at %0d", b_first - 3);
    end
    if (a_blocks < BLOCKS) begin
      failures++; $display("FAIL N=64 %0d blocks", a_blocks);
    end
    if (b_blocks < BLOCKS) begin
      failures++; $display("FAIL N=128 %0d blocks", b_blocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (INIT + 20 + BLOCKS * (2 * 128 + 1)) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_fail + b_fail + 1);
    $finish;
  end

endmodule
