// tb_tx_controller -- self-checking testbench of the TxController.
//
// Two small behavioural stand-ins for the TxCOREs answer the handshake: busy
// is high for a warm-up after reset, and after each enable pulse it rises
// after 1..3 clocks and stays high for 6..20 clocks, drawn independently per
// channel so that the two channels are often out of step.  Checked:
//   * enables: both the same, one clock wide, raised exactly one clock after
//     the first clock with both channels free, never while a channel is busy;
//   * no second enable until both channels were busy at the same time;
//   * data offered with the enables: 0 for the four known-symbol sessions and
//     the first counted block, then 1, 2, ... wrapping from 255 to 0.
// The number of times the controller had to wait for a lagging channel, in
// either state, and the counter wrap are counted; each must happen.
module tb_tx_controller;
  import alamouti_pkg::*;

  localparam int KNOWN  = 4;
  localparam int BLOCKS = KNOWN + 1 + 256 + 10;

  logic  clk = 1'b0;
  logic  rst;
  logic  busy1, busy2;
  logic  en1, en2;
  data_t data;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  tx_controller dut (
    .clk       (clk),
    .rst       (rst),
    .ch1_busy  (busy1),
    .ch2_busy  (busy2),
    .ch1_enable(en1),
    .ch2_enable(en2),
    .data      (data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------- TxCORE stand-ins
  // delay: clocks until busy rises; len: clocks busy stays high
  int dly1, dly2, len1, len2;

  always @(posedge clk) begin
    if (rst) begin
      busy1 <= 1'b1; dly1 <= 0; len1 <= 10;
    end else if (en1) begin
      dly1 <= 1 + int'($urandom % 3);
      len1 <= 6 + int'($urandom % 15);
    end else if (dly1 > 1) begin
      dly1 <= dly1 - 1;
    end else if (dly1 == 1) begin
      dly1 <= 0; busy1 <= 1'b1;
    end else if (busy1) begin
      if (len1 > 1) len1 <= len1 - 1;
      else busy1 <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      busy2 <= 1'b1; dly2 <= 0; len2 <= 17;
    end else if (en2) begin
      dly2 <= 1 + int'($urandom % 3);
      len2 <= 6 + int'($urandom % 15);
    end else if (dly2 > 1) begin
      dly2 <= dly2 - 1;
    end else if (dly2 == 1) begin
      dly2 <= 0; busy2 <= 1'b1;
    end else if (busy2) begin
      if (len2 > 1) len2 <= len2 - 1;
      else busy2 <= 1'b0;
    end
  end

  // ------------------------------------------------------------ monitor
  int   blk = 0;
  bit   prev_free = 0;      // both channels free in the previous clock
  bit   prev_en = 0;
  bit   both_busy_seen = 1;
  int   wait_ready = 0;     // clocks with one channel free, the other busy, before an enable
  int   wait_busy = 0;      // clocks after an enable with only one channel busy
  int   wraps = 0;
  bit   armed = 0;          // an enable is outstanding
  data_t exp_data;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      check(en1 == en2, "ch1_enable and ch2_enable differ");
      if (en1) begin
        check(prev_free, "enable without both channels free the clock before");
        check(!prev_en, "enable wider than one clock");
        check(both_busy_seen, "enable before both channels were busy");
        exp_data = (blk <= KNOWN) ? 8'd0 : data_t'(blk - KNOWN);
        check(data == exp_data, $sformatf("block %0d data %0d expected %0d", blk, data, exp_data));
        if (blk > KNOWN && data == 8'd0) wraps++;
        blk++;
        both_busy_seen = 0;
        armed = 1;
      end else begin
        check(!(prev_free && !prev_en && !armed), "no enable one clock after both channels free");
      end
      if (busy1 && busy2) begin
        both_busy_seen = 1;
        armed = 0;
      end
      if (busy1 != busy2) begin
        if (armed) wait_busy++;
        else       wait_ready++;
      end
      prev_free = !busy1 && !busy2;
      prev_en   = en1;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(!en1 && !en2 && data == 8'd0, "reset values");
    rst = 1'b0;
    while (blk < BLOCKS) begin
      @(posedge clk);
    end
    repeat (2) @(posedge clk);
    check(wait_ready > 0, $sformatf("waited for a lagging ready channel %0d times", wait_ready));
    check(wait_busy > 0, $sformatf("waited for a lagging busy channel %0d times", wait_busy));
    check(wraps == 1, $sformatf("data wrapped %0d times", wraps));
    $display("mechanisms: wait_ready=%0d wait_busy=%0d wraps=%0d blocks=%0d",
             wait_ready, wait_busy, wraps, blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (BLOCKS * 30 + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
