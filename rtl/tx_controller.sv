// tx_controller -- TxController: data source and handshake master of the
// two TxCOREs.
//
// The data source is an 8-bit counter, so the encoder runs stand-alone; a
// different source can later replace the counter behind the same handshake.
// Its state machine follows the published ASM:
//   RESET       DATA = RESET_DATA, CNTR = 0.
//   WAIT_READY  wait until neither channel is busy, then raise ch1_enable and
//               ch2_enable (one clock) and go to WAIT_BUSY.
//   WAIT_BUSY   enables low; wait until both channels are busy.  Then, while
//               CNTR < KNOWN_SESSIONS, CNTR is incremented and DATA kept (the
//               known-symbol sessions a receiver synchronises on); afterwards
//               DATA is incremented once per Alamouti block.  Back to
//               WAIT_READY.
// With the published values the blocks carry data 0 (first four sessions
// counted by CNTR), 0, 1, 2, ... 255, 0, ... .  DATA is updated while the
// cores are busy, long before it is sampled with the next enable.
//
// Interface: clk, rst (synchronous, active high); ch1_busy / ch2_busy in;
// ch1_enable / ch2_enable (registered one-clock pulses) and data out.  The
// enable pulse is registered, which is this design's choice; the ASM only
// orders the events.
module tx_controller
  import alamouti_pkg::*;
#(
  parameter int unsigned KNOWN_SESSIONS = 4,
  parameter data_t       RESET_DATA     = '0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ch1_busy,
  input  logic  ch2_busy,
  output logic  ch1_enable,
  output logic  ch2_enable,
  output data_t data
);

  typedef enum logic {
    S_WAIT_READY,
    S_WAIT_BUSY
  } ctrl_state_e;

  localparam int unsigned CNTR_W = $clog2(KNOWN_SESSIONS + 1);

  ctrl_state_e       state;
  logic [CNTR_W-1:0] cntr;
  logic              enable;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_WAIT_READY;
      data   <= RESET_DATA;
      cntr   <= '0;
      enable <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT_READY: begin
          if (!ch1_busy && !ch2_busy) begin
            enable <= 1'b1;
            state  <= S_WAIT_BUSY;
          end
        end
        S_WAIT_BUSY: begin
          enable <= 1'b0;
          if (ch1_busy && ch2_busy) begin
            if (cntr < CNTR_W'(KNOWN_SESSIONS)) cntr <= cntr + 1'b1;
            else                                data <= data + 1'b1;
            state <= S_WAIT_READY;
          end
        end
        default: state <= S_WAIT_READY;
      endcase
    end
  end

  assign ch1_enable = enable;
  assign ch2_enable = enable;

endmodule
