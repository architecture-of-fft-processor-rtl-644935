// uart_rx: serial receiver for the link from the host PC.
//
// Frame: one start bit (0), 8 data bits LSB first, one stop bit (1), no
// parity. The line is first passed through a two-flop synchroniser. A falling
// edge starts a frame; the start bit is checked again at its middle and each
// following bit is sampled at its middle, CLKS_PER_BIT clocks apart. When the
// stop bit is high, valid pulses for one cycle with the byte on data; when it
// is low, frame_err pulses instead and the byte is dropped. The receiver then
// waits for the line to be idle (high) again. The frame format and the rate
// (9600 baud from 50 MHz by default) are this design's choices; the source
// design only states that samples are sent to the board over a serial link.
//
// Interface: clk, rst_n, rxd in; data (8), valid, frame_err out.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_t;

  rstate_t                           state;
  logic [1:0]                        sync;
  logic [$clog2(CLKS_PER_BIT)-1:0]   tick;
  logic [2:0]                        bitn;
  logic [7:0]                        shreg;
  logic                              rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      tick      <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: begin
          tick <= '0;
          if (!rx) state <= R_START;
        end
        R_START: begin
          if (32'(tick) == CLKS_PER_BIT / 2 - 1) begin
            tick <= '0;
            bitn <= '0;
            state <= rx ? R_IDLE : R_DATA;   // a glitch, not a start bit
          end else begin
            tick <= tick + 1'b1;
          end
        end
        R_DATA: begin
          if (32'(tick) == CLKS_PER_BIT - 1) begin
            tick  <= '0;
            shreg <= {rx, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end else begin
            tick <= tick + 1'b1;
          end
        end
        R_STOP: begin
          if (32'(tick) == CLKS_PER_BIT - 1) begin
            tick <= '0;
            if (rx) begin
              data  <= shreg;
              valid <= 1'b1;
              state <= R_IDLE;
            end else begin
              frame_err <= 1'b1;
              state     <= R_IDLE;
            end
          end else begin
            tick <= tick + 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
