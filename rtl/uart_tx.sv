// uart_tx: serial transmitter for the link to the host PC.
//
// Frame: one start bit (0), 8 data bits LSB first, one stop bit (1), no
// parity, each bit CLKS_PER_BIT clocks long. A start pulse while idle latches
// data; busy goes high on the next clock and stays high until the stop bit
// has been sent in full (10 bit times). start is ignored while busy. The line
// idles high. Format and rate are this design's choices, matching uart_rx.
//
// Interface: clk, rst_n, data (8), start in; txd, busy out.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       txd,
  output logic       busy
);

  logic [$clog2(CLKS_PER_BIT)-1:0] tick;
  logic [3:0]                      bitn;   // 0 = start bit .. 9 = stop bit
  logic [9:0]                      frame;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      tick  <= '0;
      bitn  <= '0;
      frame <= '1;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        busy  <= 1'b1;
        tick  <= '0;
        bitn  <= '0;
        txd   <= 1'b0;
      end
    end else begin
      if (32'(tick) == CLKS_PER_BIT - 1) begin
        tick <= '0;
        if (bitn == 4'd9) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          bitn <= bitn + 1'b1;
          txd  <= frame[bitn + 1'b1];
        end
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end

endmodule
