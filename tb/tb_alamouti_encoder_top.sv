// tb_alamouti_encoder_top -- end-to-end testbench of the Alamouti encoder,
// all parameters at their defaults (32 points, 64-clock warm-up, 4 known
// sessions).
//
// Runs the encoder from reset through the warm-up, the known-symbol
// sessions and the whole data counter including its wrap from 255 to 0, and
// checks every DAC sample of both antennas against the Alamouti code of the
// expected data word:
//     block b carries 0 for b <= 4 (four counted known sessions, then the
//     counter's own 0), and (b - 4) mod 256 afterwards.
// Also checked: tx_on low during warm-up while the outputs already move,
// 64 samples per block with tx_on high, one block every 65 clocks, the
// controller's data word moving on during each block, and the published
// example X1 = "0001", X2 = "0000" (data 1) at its first samples.
// Mechanisms counted, each must occur: warm-up, known-symbol session,
// data increment, counter wrap, slot-2 negation/conjugation.
module tb_alamouti_encoder_top;
  import alamouti_pkg::*;
  import alamouti_tb_pkg::*;

  localparam int N      = 32;
  localparam int INIT   = 64;
  localparam int KNOWN  = 4;
  localparam int BLOCKS = KNOWN + 1 + 256 + 3;

  logic  clk = 1'b0;
  logic  rst;
  iq_t   ch1_dac, ch2_dac;
  logic  ch1_tx_on, ch2_tx_on;
  data_t data;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  alamouti_encoder_top dut (
    .clk      (clk),
    .rst      (rst),
    .ch1_dac  (ch1_dac),
    .ch1_tx_on(ch1_tx_on),
    .ch2_dac  (ch2_dac),
    .ch2_tx_on(ch2_tx_on),
    .data     (data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic data_t block_data(input int b);
    return (b <= KNOWN) ? 8'd0 : data_t'(b - KNOWN);
  endfunction

  int cycle = 0;
  int blk = 0;
  int k = 0;
  bit in_block = 0;
  int last_start = -1;
  int first_on = -1;

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
        // published example, data 1: X1 = 0001 (75 %, 22.5 deg), X2 = 0000 (25 %, 45 deg)
        if (blk == KNOWN + 1 && k == 0)
          check(close(int'(ch1_dac.i), 33980) && close(int'(ch2_dac.i), 13984),
                $sformatf("example slot1 I: %0d %0d", ch1_dac.i, ch2_dac.i));
        if (blk == KNOWN + 1 && k == N)
          check(close(int'(ch1_dac.i), 2400) && close(int'(ch2_dac.q), 47280),
                $sformatf("example slot2 -I2=%0d -Q1=%0d", ch1_dac.i, ch2_dac.q));
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

  int rst_cycle;

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #2;
    rst = 1'b0;
    rst_cycle = cycle;
    while (blk < BLOCKS) @(posedge clk);
    // first RF trigger: one reset clock, the warm-up, one ready clock, the
    // enable pulse, the first sample from the table register
    check(first_on - rst_cycle == INIT + 4, $sformatf("first tx_on %0d clocks after reset", first_on - rst_cycle));
    check(n_warm_moves > N, $sformatf("outputs moved %0d times during warm-up", n_warm_moves));
    check(n_known == KNOWN, $sformatf("%0d known-symbol sessions", n_known));
    check(n_incr > 0, $sformatf("%0d incremented blocks", n_incr));
    check(n_wrap == 1, $sformatf("%0d counter wraps", n_wrap));
    check(n_slot2 == BLOCKS, $sformatf("%0d second time slots", n_slot2));
    $display("mechanisms: warmup_moves=%0d known=%0d incr=%0d wrap=%0d slot2=%0d",
             n_warm_moves, n_known, n_incr, n_wrap, n_slot2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (INIT + 20 + BLOCKS * (2 * N + 1)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
