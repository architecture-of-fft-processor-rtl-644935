// fft4_core: memory-based 4-point radix-2 FFT processor with a Vedic twiddle
// multiplier.
//
// One radix-2 butterfly (radix2_butterfly, whose twiddle product is formed by
// Urdhva-Tiryakbhyam multipliers) works in place on a dual-port data memory
// (fft_dpram) under the controller (fft_ctrl): in each of 4 clocks it reads
// two words through the two ports, and writes the two results back to the
// same addresses. Samples are loaded in natural order and stored at
// bit-reversed addresses, so the results come out in natural order:
// X[k] = sum_n x[n] * W_4^(n*k), with no scaling.
//
// Timing: while idle, ld_we writes ld_data as sample x[ld_addr]. A start
// pulse runs the transform: 4 butterfly clocks, then done pulses for one
// cycle and X[k] can be read combinationally on rd_data for rd_addr = k, up
// to the next load. Loads and start are ignored while busy.
// The single butterfly, the dual-port memory and the Vedic multiplier follow
// the source design; bit-reversed loading, widths and the port protocol are
// this design's choices.
module fft4_core
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  cplx_t             ld_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] rd_addr,
  output cplx_t             rd_data
);

  logic              bf_en;
  logic [ADDR_W-1:0] bf_a, bf_b;
  logic              tw_idx;
  twiddle_t          w;
  cplx_t             a_rdata, b_rdata, y0, y1;
  logic [ADDR_W-1:0] a_addr;
  logic              a_we, b_we;
  cplx_t             a_wdata;

  fft_ctrl #(.N(N_POINTS)) u_ctrl (
    .clk, .rst_n, .start(start & ~busy), .busy, .done, .bf_en,
    .addr_a(bf_a), .addr_b(bf_b), .tw_idx
  );

  twiddle_rom u_tw (.idx(tw_idx), .w);

  radix2_butterfly u_bf (.a(a_rdata), .b(b_rdata), .w, .y0, .y1);

  // Port A is shared by loading, butterflies and read-out; port B serves only
  // the butterflies.
  always_comb begin
    if (bf_en) begin
      a_addr  = bf_a;
      a_we    = 1'b1;
      a_wdata = y0;
    end else if (!busy && ld_we) begin
      a_addr  = bitrev(ld_addr);
      a_we    = 1'b1;
      a_wdata = ld_data;
    end else begin
      a_addr  = rd_addr;
      a_we    = 1'b0;
      a_wdata = ld_data;
    end
    b_we = bf_en;
  end

  fft_dpram #(.DEPTH(N_POINTS)) u_mem (
    .clk,
    .a_addr, .a_we, .a_wdata, .a_rdata,
    .b_addr(bf_b), .b_we, .b_wdata(y1), .b_rdata
  );

  assign rd_data = a_rdata;

endmodule
