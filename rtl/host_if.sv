// host_if: frames the serial byte stream for the 4-point FFT core.
//
// Receive: each received byte is one sample x[n], an unsigned 8-bit number
// with four fraction bits (value = code / 16), and is written into the core
// as x[n] = code + j0, n = 0, 1, 2, 3 in arrival order. After the fourth
// byte the core is started. Reply: when the core signals done, the results
// are sent as 16 bytes: for k = 0..3, Re X[k] then Im X[k], each sign-extended
// to 16 bits and sent low byte first. The values keep the samples' four
// fraction bits. Bytes that arrive while a frame is being computed or sent
// are dropped and set the sticky overrun flag; a stop-bit error sets the
// sticky frame_err flag. The source design states only that samples are sent
// one by one and that real and imaginary results are read back; this byte
// protocol is this design's choice.
//
// Interface: byte stream from uart_rx (rx_data, rx_valid, rx_frame_err), to
// uart_tx (tx_data, tx_start, tx_busy), and the load/start/read ports of
// fft4_core. busy is high from the core start until the last reply byte has
// been handed to the transmitter.
module host_if
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // from the serial receiver
  input  logic [7:0]        rx_data,
  input  logic              rx_valid,
  input  logic              rx_frame_err,
  // to the serial transmitter
  output logic [7:0]        tx_data,
  output logic              tx_start,
  input  logic              tx_busy,
  // to the FFT core
  output logic              ld_we,
  output logic [ADDR_W-1:0] ld_addr,
  output cplx_t             ld_data,
  output logic              fft_start,
  input  logic              fft_done,
  output logic [ADDR_W-1:0] rd_addr,
  input  cplx_t             rd_data,
  // status
  output logic              busy,
  output logic              overrun,
  output logic              frame_err
);

  typedef enum logic [1:0] {H_LOAD, H_START, H_WAIT, H_SEND} hstate_t;

  hstate_t           state;
  logic [ADDR_W-1:0] n_cnt;     // samples loaded so far
  logic [ADDR_W+1:0] byte_idx;  // reply byte 0..15: {k, part}
  logic [15:0]       word;
  logic              tx_start_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= H_LOAD;
      n_cnt     <= '0;
      byte_idx  <= '0;
      overrun   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      if (rx_frame_err) frame_err <= 1'b1;
      if (rx_valid && state != H_LOAD) overrun <= 1'b1;
      unique case (state)
        H_LOAD: if (rx_valid) begin
          n_cnt <= n_cnt + 1'b1;
          if (32'(n_cnt) == N_POINTS - 1) state <= H_START;
        end
        H_START: state <= H_WAIT;
        H_WAIT:  if (fft_done) begin
          state    <= H_SEND;
          byte_idx <= '0;
        end
        H_SEND: if (!tx_busy && !tx_start_q) begin
          byte_idx <= byte_idx + 1'b1;
          if (&byte_idx) state <= H_LOAD;
        end
        default: state <= H_LOAD;
      endcase
    end
  end

  // tx_start_q blocks a second start in the cycle before tx_busy rises.
  always_ff @(posedge clk) begin
    if (!rst_n) tx_start_q <= 1'b0;
    else        tx_start_q <= tx_start;
  end

  always_comb begin
    ld_we     = (state == H_LOAD) && rx_valid;
    ld_addr   = n_cnt;
    ld_data   = '{re: data_t'({1'b0, rx_data}), im: data_t'(0)};
    fft_start = (state == H_START);
    rd_addr   = byte_idx[ADDR_W+1:2];
    word      = byte_idx[1] ? 16'($signed(rd_data.im)) : 16'($signed(rd_data.re));
    tx_data   = byte_idx[0] ? word[15:8] : word[7:0];
    tx_start  = (state == H_SEND) && !tx_busy && !tx_start_q;
    busy      = (state != H_LOAD);
  end

endmodule
