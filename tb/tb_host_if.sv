// tb_host_if: drives the byte-stream side of host_if with sample bytes and
// plays a simple FFT core and transmitter in the testbench. Checks that the
// four samples are loaded as x[0..3] = code + j0 with the right addresses,
// that the core is started once after the fourth byte, that the 16 reply
// bytes carry Re/Im of X[0..3] sign-extended to 16 bits, low byte first, and
// that no byte is started while the transmitter is busy. Also checks the
// sticky overrun flag (byte during a frame) and frame_err flag.
module tb_host_if;
  import fft_pkg::*;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic [7:0]        rx_data = '0, tx_data;
  logic              rx_valid = 1'b0, rx_frame_err = 1'b0, tx_start, tx_busy;
  logic              ld_we, fft_start, fft_done;
  logic [ADDR_W-1:0] ld_addr, rd_addr;
  cplx_t             ld_data, rd_data;
  logic              busy, overrun, frame_err;
  int checks = 0, failures = 0;

  host_if dut (.clk, .rst_n, .rx_data, .rx_valid, .rx_frame_err, .tx_data, .tx_start, .tx_busy,
               .ld_we, .ld_addr, .ld_data, .fft_start, .fft_done, .rd_addr, .rd_data,
               .busy, .overrun, .frame_err);

  always #5 clk = ~clk;

  // core model: remembers the loads, answers X[k] = (x[k]*3 - 500, -x[k] - 7*k)
  cplx_t loaded [4];
  int    n_loads = 0, n_starts = 0, done_cnt = 0;
  always @(posedge clk) begin
    if (ld_we) begin loaded[ld_addr] <= ld_data; n_loads++; end
    if (fft_start) begin n_starts++; done_cnt <= 6; end
    else if (done_cnt > 0) done_cnt <= done_cnt - 1;
  end
  assign fft_done = (done_cnt == 1);
  assign rd_data = '{re: data_t'(3 * int'(loaded[rd_addr].re) - 500),
                     im: data_t'(-int'(loaded[rd_addr].re) - 7 * int'(rd_addr))};

  // transmitter model: busy for 7 clocks after each start, bytes recorded
  logic [7:0] txq [$];
  int         tx_cnt = 0, tx_viol = 0;
  always @(posedge clk) begin
    if (tx_start) begin
      if (tx_cnt != 0) tx_viol++;
      txq.push_back(tx_data);
      tx_cnt <= 7;
    end else if (tx_cnt > 0) tx_cnt <= tx_cnt - 1;
  end
  assign tx_busy = (tx_cnt != 0);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic frame(input logic [7:0] s [4], input bit poke);
    int l0, st0, re, im;
    logic [15:0] w;
    l0 = n_loads; st0 = n_starts;
    txq.delete();
    for (int n = 0; n < 4; n++) send_byte(s[n]);
    checks++;
    if (n_loads != l0 + 4) begin failures++; $display("FAIL %0d loads", n_loads - l0); end
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (loaded[n] !== '{re: data_t'({1'b0, s[n]}), im: data_t'(0)}) begin
        failures++; $display("FAIL sample %0d loaded as %h", n, loaded[n]);
      end
    end
    if (poke) send_byte(8'hee);   // arrives during the frame: dropped
    while (txq.size() < 16) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (n_starts != st0 + 1) begin failures++; $display("FAIL %0d starts", n_starts - st0); end
    checks++;
    if (txq.size() != 16) begin failures++; $display("FAIL %0d reply bytes", txq.size()); end
    for (int k = 0; k < 4; k++) begin
      re = 3 * int'(s[k]) - 500; im = -int'(s[k]) - 7 * k;
      w = 16'(re);
      checks++;
      if (txq[4*k] !== w[7:0] || txq[4*k+1] !== w[15:8]) begin failures++; $display("FAIL Re X[%0d]", k); end
      w = 16'(im);
      checks++;
      if (txq[4*k+2] !== w[7:0] || txq[4*k+3] !== w[15:8]) begin failures++; $display("FAIL Im X[%0d]", k); end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after the reply"); end
  endtask

  initial begin
    logic [7:0] s [4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || overrun || frame_err) begin failures++; $display("FAIL flags after reset"); end
    for (int f = 0; f < 20; f++) begin
      for (int n = 0; n < 4; n++) s[n] = 8'($urandom);
      frame(s, 0);
    end
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun without cause"); end
    s = '{8'h12, 8'h08, 8'h06, 8'hff};
    frame(s, 1);
    checks++;
    if (!overrun) begin failures++; $display("FAIL overrun not flagged"); end
    @(negedge clk); rx_frame_err = 1; @(negedge clk); rx_frame_err = 0;
    checks++;
    if (!frame_err) begin failures++; $display("FAIL frame_err not flagged"); end
    checks++;
    if (tx_viol != 0) begin failures++; $display("FAIL %0d starts while busy", tx_viol); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
