// alamouti_stream_checker -- checks the DAC streams of one Alamouti encoder.
//
// Passive monitor used by the size-sweep testbench.  It follows the encoder
// from the release of reset and checks, for N_POINTS samples per symbol:
// tx_on of the two antennas in step, 2*N_POINTS samples per block, one block
// every 2*N_POINTS+1 clocks, every I/Q sample of both antennas against the
// Alamouti code of the expected data word (0 for the first KNOWN+1 blocks,
// then 1, 2, ...), computed by the reference model of alamouti_tb_pkg, and
// the controller's data word moving on during each block.  blocks counts the
// finished blocks; checks and failures are running totals.
module alamouti_stream_checker
  import alamouti_pkg::*;
  import alamouti_tb_pkg::*;
#(
  parameter int N_POINTS = 32,
  parameter int KNOWN    = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  iq_t   ch1_dac,
  input  logic  ch1_tx_on,
  input  iq_t   ch2_dac,
  input  logic  ch2_tx_on,
  input  data_t data,
  output int    checks,
  output int    failures,
  output int    blocks,
  output int    first_on
);

  localparam int N = N_POINTS;

  initial begin
    checks = 0;
    failures = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d %s", N, what);
    end
  endtask

  function automatic data_t block_data(input int b);
    return (b <= KNOWN) ? 8'd0 : data_t'(b - KNOWN);
  endfunction

  int cycle = 0;
  int blk = 0;
  assign blocks = blk;
  initial first_on = -1;
  int k = 0;
  bit in_block = 0;
  int last_start = -1;

  // mechanism counters
  int n_warm_moves = 0, n_known = 0, n_incr = 0, n_wrap = 0, n_slot2 = 0;
  dac_t prev_i;

  always @(posedge clk) begin
    #1;
    cycle++;
    if (!rst) begin
      check(ch1_tx_on == ch2_tx_on, "antennas out of step");
      if (!ch1_tx_on && first_on < 0) begin
        if (ch1_dac.i != prev_i) n_warm_moves++;
      end
      prev_i = ch1_dac.i;
      if (ch1_tx_on) begin
        data_t d;
        logic [3:0] x1, x2;
        int n;
        if (first_on < 0) first_on = cycle;
        if (!in_block) begin
          in_block = 1;
          k = 0;
          if (last_start >= 0)
            check(cycle - last_start == 2 * N + 1, $sformatf("block period %0d", cycle - last_start));
          last_start = cycle;
        end
        d  = block_data(blk);
        x1 = d[3:0];
        x2 = d[7:4];
        n  = k % N;
        if (k < N) begin
          check(close(int'(ch1_dac.i), expected(x1, n, N, 0, 0)) &&
                close(int'(ch1_dac.q), expected(x1, n, N, 1, 0)),
                $sformatf("blk %0d CH1 slot1 k=%0d got %0d/%0d", blk, k, ch1_dac.i, ch1_dac.q));
          check(close(int'(ch2_dac.i), expected(x2, n, N, 0, 0)) &&
                close(int'(ch2_dac.q), expected(x2, n, N, 1, 0)),
                $sformatf("blk %0d CH2 slot1 k=%0d got %0d/%0d", blk, k, ch2_dac.i, ch2_dac.q));
        end else begin
          check(close(int'(ch1_dac.i), expected(x2, n, N, 0, 1)) &&
                close(int'(ch1_dac.q), expected(x2, n, N, 1, 0)),
                $sformatf("blk %0d CH1 slot2 k=%0d got %0d/%0d", blk, k, ch1_dac.i, ch1_dac.q));
          check(close(int'(ch2_dac.i), expected(x1, n, N, 0, 0)) &&
                close(int'(ch2_dac.q), expected(x1, n, N, 1, 1)),
                $sformatf("blk %0d CH2 slot2 k=%0d got %0d/%0d", blk, k, ch2_dac.i, ch2_dac.q));
          if (k == N) n_slot2++;
        end
        // the controller's word has moved on by the middle of the block
        if (k == N)
          check(data == block_data(blk + 1),
                $sformatf("blk %0d controller data %0d expected %0d", blk, data, block_data(blk + 1)));
        k++;
      end else if (in_block) begin
        in_block = 0;
        check(k == 2 * N, $sformatf("block %0d lasted %0d samples", blk, k));
        if (blk < KNOWN) n_known++;
        else if (blk > KNOWN && block_data(blk) == 8'd0) n_wrap++;
        else if (blk > KNOWN) n_incr++;
        blk++;
      end
    end
  end

endmodule
