// tb_fft4_core: runs the 4-point FFT core on random real and complex frames
// and compares every bin with a direct DFT, X[k] = sum_n x[n] (-j)^(nk),
// computed in the testbench. Also checks that a transform takes 4 butterfly
// clocks (done on the 5th rising edge after start) and that loads during a
// transform are ignored.
module tb_fft4_core;
  import fft_pkg::*;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              ld_we = 1'b0, start = 1'b0, busy, done;
  logic [ADDR_W-1:0] ld_addr = '0, rd_addr = '0;
  cplx_t             ld_data = '0, rd_data;
  int checks = 0, failures = 0;

  fft4_core dut (.clk, .rst_n, .ld_we, .ld_addr, .ld_data, .start, .busy, .done, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int xr [4], input int xi [4], input bit poke_load);
    int er, ei, cyc;
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = ADDR_W'(n); ld_data = '{re: data_t'(xr[n]), im: data_t'(xi[n])};
    end
    @(negedge clk); ld_we = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    if (poke_load) begin ld_we = 1; ld_addr = 0; ld_data = '{re: data_t'(777), im: data_t'(5)}; end
    while (!done) begin @(negedge clk); cyc++; ld_we = 0; end
    ld_we = 0;
    checks++;
    if (cyc != 5) begin failures++; $display("FAIL done %0d edges after start, expected 5", cyc); end
    for (int k = 0; k < 4; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < 4; n++) begin
        // (-j)^m for m = n*k mod 4: 1, -j, -1, j
        unique case ((n * k) % 4)
          0: begin er += xr[n]; ei += xi[n]; end
          1: begin er += xi[n]; ei -= xr[n]; end
          2: begin er -= xr[n]; ei -= xi[n]; end
          3: begin er -= xi[n]; ei += xr[n]; end
        endcase
      end
      rd_addr = ADDR_W'(k); #1;
      checks++;
      if (rd_data.re !== data_t'(er) || rd_data.im !== data_t'(ei)) begin
        failures++;
        $display("FAIL X[%0d]=(%0d,%0d) expected (%0d,%0d)", k, rd_data.re, rd_data.im, er, ei);
      end
    end
  endtask

  initial begin
    int xr [4], xi [4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // DC and single tones
    xr = '{16, 16, 16, 16}; xi = '{0, 0, 0, 0}; run_frame(xr, xi, 0);
    xr = '{1, 0, 0, 0};     xi = '{0, 0, 0, 0}; run_frame(xr, xi, 0);
    xr = '{0, 1, 0, 0};     xi = '{0, 0, 0, 0}; run_frame(xr, xi, 0);
    xr = '{255, 255, 255, 255}; xi = '{0, 0, 0, 0}; run_frame(xr, xi, 1);
    for (int f = 0; f < 200; f++) begin
      for (int n = 0; n < 4; n++) begin
        xr[n] = int'($urandom_range(255));
        xi[n] = (f % 2) ? int'($urandom_range(510)) - 255 : 0;
        if (f % 2) xr[n] -= 128;
      end
      run_frame(xr, xi, f % 3 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
