// fft_uart_top: 4-point Vedic FFT processor with a serial link to a host PC.
//
// The host sends four 8-bit samples over the serial line (uart_rx); host_if
// loads them into the FFT core (fft4_core), which computes the 4-point
// radix-2 FFT in 4 clocks with one butterfly whose twiddle products are
// formed by Urdhva-Tiryakbhyam (Vedic) multipliers; host_if then returns the
// four complex results, real and imaginary parts, as 16 bytes over uart_tx.
// The serial-in, serial-out arrangement follows the source design's
// flow (samples sent to the FPGA board over a serial link, results shown on
// the PC); clock rate, baud rate and byte protocol are this design's choices.
//
// Interface: clk, rst_n (active-low, synchronous), uart_rxd in; uart_txd,
// busy, overrun (sticky), frame_err (sticky) out.
module fft_uart_top
  import fft_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic busy,
  output logic overrun,
  output logic frame_err
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;

  logic [7:0]        rx_data, tx_data;
  logic              rx_valid, rx_ferr, tx_start, tx_busy;
  logic              ld_we, fft_start, fft_busy, fft_done, host_busy;
  logic [ADDR_W-1:0] ld_addr, rd_addr;
  cplx_t             ld_data, rd_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr)
  );

  host_if u_host (
    .clk, .rst_n,
    .rx_data, .rx_valid, .rx_frame_err(rx_ferr),
    .tx_data, .tx_start, .tx_busy,
    .ld_we, .ld_addr, .ld_data, .fft_start, .fft_done, .rd_addr, .rd_data,
    .busy(host_busy), .overrun, .frame_err
  );

  fft4_core u_fft (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_data, .start(fft_start),
    .busy(fft_busy), .done(fft_done), .rd_addr, .rd_data
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .start(tx_start), .txd(uart_txd), .busy(tx_busy)
  );

  assign busy = host_busy | fft_busy;

endmodule
