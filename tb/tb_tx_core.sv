// tb_tx_core -- self-checking testbench of TxCORE, both antenna variants.
//
// Instantiates a CH1 (Tx0) and a CH2 (Tx1) core with the published sizes
// (32 points, 64-clock warm-up) and plays the controller's part: after reset
// it waits for both cores to drop busy and then pulses enable with a random
// data word, back to back, changing data right after each pulse.  Checked:
//   * warm-up: busy high and tx_on low for 1 + 64 clocks after reset while
//     the DAC outputs already move;
//   * every block: tx_on high for exactly 64 clocks, starting two clocks
//     after the enable pulse; every I/Q sample of both cores against the
//     Alamouti code (X1, X2 in slot 1; -X2*, X1* in slot 2) computed by the
//     reference model;
//   * busy drops one clock before the last sample; blocks repeat every
//     65 clocks when enabled as early as possible.
module tb_tx_core;
  import alamouti_pkg::*;
  import alamouti_tb_pkg::*;

  localparam int N      = 32;
  localparam int INIT   = 64;
  localparam int BLOCKS = 40;

  logic  clk = 1'b0;
  logic  rst;
  logic  enable;
  data_t data;
  logic  busy1, busy2;
  iq_t   dac1, dac2;
  logic  on1, on2;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  tx_core #(.CHANNEL(CH1)) dut1 (
    .clk(clk), .rst(rst), .enable(enable), .data(data),
    .busy(busy1), .dac(dac1), .tx_on(on1)
  );
  tx_core #(.CHANNEL(CH2)) dut2 (
    .clk(clk), .rst(rst), .enable(enable), .data(data),
    .busy(busy2), .dac(dac2), .tx_on(on2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // data words in the order they were sent, and the clock of each enable
  data_t sent[$];
  int    en_cycle[$];
  int    cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- monitor
  int    k = 0;            // sample index within the current block
  int    blk = 0;          // blocks seen
  int    busy_low_at;      // first sample index with busy low
  int    last_start = -1;
  bit    in_block = 0;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      check(on1 == on2, "tx_on of the two cores differ");
      if (on1) begin
        data_t d;
        logic [3:0] x1, x2;
        int n;
        if (!in_block) begin
          in_block    = 1;
          k           = 0;
          busy_low_at = -1;
          check(en_cycle.size() > 0 && cycle - en_cycle[0] == 2,
                $sformatf("block %0d starts %0d clocks after enable", blk,
                          en_cycle.size() > 0 ? cycle - en_cycle[0] : -1));
          if (last_start >= 0)
            check(cycle - last_start == 2 * N + 1,
                  $sformatf("block period %0d", cycle - last_start));
          last_start = cycle;
        end
        d  = (sent.size() > 0) ? sent[0] : '0;
        x1 = d[3:0];
        x2 = d[7:4];
        n  = k % N;
        if (k < N) begin
          check(close(int'(dac1.i), expected(x1, n, N, 0, 0)) &&
                close(int'(dac1.q), expected(x1, n, N, 1, 0)),
                $sformatf("CH1 slot1 d=%h k=%0d got %0d/%0d", d, k, dac1.i, dac1.q));
          check(close(int'(dac2.i), expected(x2, n, N, 0, 0)) &&
                close(int'(dac2.q), expected(x2, n, N, 1, 0)),
                $sformatf("CH2 slot1 d=%h k=%0d got %0d/%0d", d, k, dac2.i, dac2.q));
        end else begin
          check(close(int'(dac1.i), expected(x2, n, N, 0, 1)) &&
                close(int'(dac1.q), expected(x2, n, N, 1, 0)),
                $sformatf("CH1 slot2 d=%h k=%0d got %0d/%0d", d, k, dac1.i, dac1.q));
          check(close(int'(dac2.i), expected(x1, n, N, 0, 0)) &&
                close(int'(dac2.q), expected(x1, n, N, 1, 1)),
                $sformatf("CH2 slot2 d=%h k=%0d got %0d/%0d", d, k, dac2.i, dac2.q));
        end
        if (busy_low_at < 0 && !busy1 && !busy2) busy_low_at = k;
        k++;
      end else if (in_block) begin
        in_block = 0;
        check(k == 2 * N, $sformatf("block %0d lasted %0d samples", blk, k));
        check(busy_low_at == 2 * N - 2, $sformatf("busy dropped at sample %0d", busy_low_at));
        if (sent.size() > 0) void'(sent.pop_front());
        if (en_cycle.size() > 0) void'(en_cycle.pop_front());
        blk++;
      end
    end
  end

  // ----------------------------------------------------------------- driver
  int warm, moves;
  dac_t prev_i;

  initial begin
    rst = 1'b1; enable = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // warm-up
    warm = 0; moves = 0; prev_i = dac1.i;
    while (busy1 || busy2) begin
      @(posedge clk); #1;
      warm++;
      check(!on1 && !on2, "tx_on during warm-up");
      if (dac1.i != prev_i) moves++;
      prev_i = dac1.i;
      if (warm > 1000) break;
    end
    check(warm == INIT + 1, $sformatf("warm-up took %0d clocks", warm));
    check(moves > N, $sformatf("DAC output moved %0d times during warm-up", moves));

    // blocks, each enabled one clock after both cores report ready
    for (int b = 0; b < BLOCKS; b++) begin
      while (busy1 || busy2) begin
        @(posedge clk); #1;
      end
      @(posedge clk); #1;                                // registered enable
      enable = 1'b1;
      data   = (b == 0) ? 8'h01 : data_t'($urandom);   // first: X1 = 0001, X2 = 0000
      sent.push_back(data);
      en_cycle.push_back(cycle);
      @(posedge clk); #1;
      enable = 1'b0;
      data   = data_t'($urandom);                       // must not matter any more
      @(posedge clk); #1;
      @(posedge clk); #1;
    end
    while (blk < BLOCKS) begin
      @(posedge clk); #1;
    end
    check(blk == BLOCKS, $sformatf("%0d blocks seen", blk));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (INIT + 10 + BLOCKS * (2 * N + 4)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
