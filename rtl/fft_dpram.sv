// fft_dpram: dual-port data memory of the memory-based FFT.
//
// DEPTH complex words. Each of the two ports has its own address, write
// enable, write data and read data. Reads are asynchronous (distributed-RAM
// style), so within one clock the butterfly can read its two operands through
// ports A and B and the results are written back in place, through the same
// ports and addresses, at the clock edge. A read in the cycle of a write
// returns the old word. If both ports write the same address, port B wins.
// The memory is not reset; the core always writes every word before reading.
// Using a dual-port memory follows the source design; the read timing and
// collision rule are this design's choices.
//
// Interface: clk; a_addr, a_we, a_wdata, a_rdata; b_addr, b_we, b_wdata,
// b_rdata.
module fft_dpram
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = fft_pkg::N_POINTS
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  cplx_t                    a_wdata,
  output cplx_t                    a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  cplx_t                    b_wdata,
  output cplx_t                    b_rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];

endmodule
