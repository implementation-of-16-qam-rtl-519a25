// tb_qam16_rom -- self-checking testbench of the 16-QAM mapping tables.
//
// Reads every entry of every symbol's I and Q table at the default size
// (32 points, 16-bit DAC) and compares it with the geometric reference model
// of alamouti_tb_pkg.  Also checks the two published example symbols at their
// first sample, the full 0..65535 swing of a 100 % symbol, the one-clock read
// latency, and that reading a table half a period further on yields the
// negated waveform.
module tb_qam16_rom;
  import alamouti_pkg::*;
  import alamouti_tb_pkg::*;

  localparam int N = 32;

  logic       clk = 1'b0;
  sym_t       sym;
  logic [4:0] idx_i, idx_q;
  dac_t       dac_i, dac_q;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  qam16_rom dut (
    .clk  (clk),
    .sym  (sym),
    .idx_i(idx_i),
    .idx_q(idx_q),
    .dac_i(dac_i),
    .dac_q(dac_q)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // read one address, result valid after one clock
  task automatic rd(input int s, input int ni, input int nq);
    sym   = sym_t'(s);
    idx_i = 5'(ni);
    idx_q = 5'(nq);
    @(posedge clk);
    #1;
  endtask

  int min_i, max_i;

  initial begin
    sym = '0; idx_i = '0; idx_q = '0;
    @(posedge clk);

    // every entry, Q read at a different index than I
    for (int s = 0; s < 16; s++) begin
      for (int n = 0; n < N; n++) begin
        int nq;
        nq = (n * 7 + 3) % N;
        rd(s, n, nq);
        check(close(int'(dac_i), expected(4'(s), n, N, 1'b0, 1'b0)),
              $sformatf("I sym=%0d n=%0d got %0d exp %0d", s, n, dac_i,
                        expected(4'(s), n, N, 1'b0, 1'b0)));
        check(close(int'(dac_q), expected(4'(s), nq, N, 1'b1, 1'b0)),
              $sformatf("Q sym=%0d n=%0d got %0d exp %0d", s, nq, dac_q,
                        expected(4'(s), nq, N, 1'b1, 1'b0)));
      end
    end

    // published examples: "0001" -> I (75 %, 22.5 deg), Q (75 %, 292.5 deg);
    // "0000" -> I (25 %, 45 deg), Q (25 %, 315 deg); sample 0 of each
    rd(1, 0, 0);
    check(close(int'(dac_i), 33981) || close(int'(dac_i), 33979), $sformatf("0001 I[0]=%0d", dac_i));
    check(close(int'(dac_q), 1870),  $sformatf("0001 Q[0]=%0d", dac_q));
    rd(0, 0, 0);
    check(close(int'(dac_i), 13984), $sformatf("0000 I[0]=%0d", dac_i));
    check(close(int'(dac_q), 2400),  $sformatf("0000 Q[0]=%0d", dac_q));

    // 100 % symbol ("0101") spans the whole DAC range
    min_i = 65535; max_i = 0;
    for (int n = 0; n < N; n++) begin
      rd(5, n, n);
      if (int'(dac_i) < min_i) min_i = int'(dac_i);
      if (int'(dac_i) > max_i) max_i = int'(dac_i);
    end
    check(min_i <= 1 && max_i >= 65534, $sformatf("100%% swing %0d..%0d", min_i, max_i));

    // negation by half-period offset: x[n] + x[n+N/2] is the full swing of
    // the symbol's amplitude class, the same for every n (within rounding)
    for (int s = 0; s < 16; s++) begin
      int x, y, sum_ref;
      sum_ref = expected(4'(s), 0, N, 1'b0, 1'b0) + expected(4'(s), N / 2, N, 1'b0, 1'b0);
      for (int n = 0; n < N; n += 5) begin
        rd(s, n, n);
        x = int'(dac_i);
        rd(s, (n + N / 2) % N, n);
        y = int'(dac_i);
        check((x + y - sum_ref <= 2) && (sum_ref - (x + y) <= 2),
              $sformatf("negation sym=%0d n=%0d: %0d + %0d vs %0d", s, n, x, y, sum_ref));
      end
    end

    // read latency: output follows the address one clock later, not earlier
    sym = 4'd5; idx_i = 5'd4; idx_q = 5'd0;   // peak of a 45 deg, 100 % symbol
    @(posedge clk); #1;
    sym = 4'd0; idx_i = 5'd24;
    #1;
    check(dac_i >= 16'd65534, $sformatf("registered read held %0d", dac_i));
    @(posedge clk); #1;
    check(close(int'(dac_i), expected(4'd0, 24, N, 1'b0, 1'b0)), "registered read updated");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
