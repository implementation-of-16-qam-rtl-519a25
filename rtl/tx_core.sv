// tx_core -- TxCORE: Alamouti baseband processor for one antenna.
//
// Two instances run in lock step, one per antenna (CHANNEL = CH1 for Tx0,
// CH2 for Tx1).  On an enable pulse from the controller the core latches the
// 8-bit data word into BUFF1 = DATA[7:4] (symbol X2) and BUFF0 = DATA[3:0]
// (symbol X1) and then streams two time slots of N_POINTS samples each:
//
//               time slot 1          time slot 2
//     CH1/Tx0   X1 =  I1 + jQ1       -X2* = -I2 + jQ2
//     CH2/Tx1   X2 =  I2 + jQ2        X1* =  I1 - jQ1
//
// Negating a rail is done by reading its table N_POINTS/2 entries further on
// (a 180 degree shift of the offset-binary sinusoid, see qam16_rom).
//
// State machine (follows the published ASM of TxCORE):
//   RESET  busy = 1, TX_ON = 0, counters cleared.
//   INIT   RF warm-up: INIT_CYCLES clocks with TX_ON low while the known
//          symbol (data 0) is already played to the DACs; busy stays 1.
//   READY  busy = 0; wait for enable, then latch BUFF1/BUFF0, TS_NO = 0.
//   BUSY   one sample per clock; SYMBOL_INDEX counts 0..N_POINTS-1 in slot
//          TS_NO = 0, then again in TS_NO = 1.  busy drops one clock before
//          the last sample (at TS_NO = 1, SYMBOL_INDEX = N_POINTS-2) so the
//          controller can prepare the next block; after the last sample the
//          core returns to READY.
// The warm-up length of 64 clocks and the early busy drop are read from the
// published text and ASM; that SYMBOL_INDEX keeps counting through the early
// busy drop and restarts at 0 with every block is this design's reading of
// the ASM.
//
// Interface: clk, rst (synchronous, active high), enable (one-clock pulse),
// data (sampled with enable), busy, and to the DAC card dac.i, dac.q (16-bit
// unsigned) and tx_on (RF trigger).  Timing: dac and tx_on come from
// registers and are aligned; tx_on is high for exactly 2*N_POINTS clocks per
// block, starting two clocks after the enable pulse.
module tx_core
  import alamouti_pkg::*;
#(
  parameter channel_e    CHANNEL     = CH1,
  parameter int unsigned N_POINTS    = alamouti_pkg::SAMPLES_PER_SYMBOL,
  parameter int unsigned INIT_CYCLES = 64,
  localparam int unsigned IDX_W      = $clog2(N_POINTS)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  enable,
  input  data_t data,
  output logic  busy,
  output iq_t   dac,
  output logic  tx_on
);

  typedef enum logic [1:0] {
    S_RESET,
    S_INIT,
    S_READY,
    S_BUSY
  } core_state_e;

  localparam int unsigned CNT_W = (INIT_CYCLES > 1) ? $clog2(INIT_CYCLES) : 1;
  localparam logic [IDX_W-1:0] LAST   = IDX_W'(N_POINTS - 1);
  localparam logic [IDX_W-1:0] BEFORE = IDX_W'(N_POINTS - 2);
  localparam logic [IDX_W-1:0] HALF   = IDX_W'(N_POINTS / 2);

  core_state_e      state;
  sym_t             buff1, buff0;  // X2, X1
  logic             ts_no;         // 0: time slot 1, 1: time slot 2
  logic [IDX_W-1:0] sym_index;
  logic [CNT_W-1:0] cntr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_RESET;
      busy      <= 1'b1;
      buff1     <= '0;
      buff0     <= '0;
      ts_no     <= 1'b0;
      sym_index <= '0;
      cntr      <= '0;
    end else begin
      unique case (state)
        S_RESET: begin
          state <= S_INIT;
        end
        S_INIT: begin
          // known symbol (data 0) played with the RF trigger off
          sym_index <= sym_index + 1'b1;
          if (cntr == CNT_W'(INIT_CYCLES - 1)) begin
            state     <= S_READY;
            busy      <= 1'b0;
            sym_index <= '0;
          end else begin
            cntr <= cntr + 1'b1;
          end
        end
        S_READY: begin
          if (enable) begin
            state     <= S_BUSY;
            busy      <= 1'b1;
            buff1     <= data[7:4];
            buff0     <= data[3:0];
            ts_no     <= 1'b0;
            sym_index <= '0;
          end
        end
        S_BUSY: begin
          if (ts_no && sym_index == BEFORE) begin
            busy      <= 1'b0;
            sym_index <= sym_index + 1'b1;
          end else if (ts_no && sym_index == LAST) begin
            busy  <= 1'b0;
            state <= S_READY;
          end else if (!ts_no && sym_index == LAST) begin
            sym_index <= '0;
            ts_no     <= 1'b1;
          end else begin
            sym_index <= sym_index + 1'b1;
          end
        end
        default: state <= S_RESET;
      endcase
    end
  end

  // Alamouti schedule: symbol and table positions for this antenna.
  sym_t             rd_sym;
  logic [IDX_W-1:0] rd_idx_i, rd_idx_q;

  always_comb begin
    rd_idx_i = sym_index;
    rd_idx_q = sym_index;
    if (!ts_no) begin
      rd_sym = (CHANNEL == CH1) ? buff0 : buff1;   // X1 on Tx0, X2 on Tx1
    end else if (CHANNEL == CH1) begin
      rd_sym   = buff1;                            // -X2* = -I2 + jQ2
      rd_idx_i = sym_index + HALF;
    end else begin
      rd_sym   = buff0;                            //  X1* =  I1 - jQ1
      rd_idx_q = sym_index + HALF;
    end
  end

  qam16_rom #(
    .N_POINTS(N_POINTS),
    .DAC_W   (DAC_BITS)
  ) u_rom (
    .clk  (clk),
    .sym  (rd_sym),
    .idx_i(rd_idx_i),
    .idx_q(rd_idx_q),
    .dac_i(dac.i),
    .dac_q(dac.q)
  );

  // RF trigger, delayed to line up with the registered table output
  always_ff @(posedge clk) begin
    if (rst) tx_on <= 1'b0;
    else     tx_on <= (state == S_BUSY);
  end

  // an enable pulse is only seen in READY; one arriving in any other state
  // would be lost
  assert property (@(posedge clk) disable iff (rst) enable |-> state == S_READY)
    else $error("tx_core: enable outside READY");

endmodule
