// tb_cmul_vedic: checks the Vedic complex multiplier against integer
// arithmetic: p = floor((b * w) / 64) per component, for the 4-point
// twiddles and for random data and random twiddles.
module tb_cmul_vedic;
  import fft_pkg::*;
  cplx_t    b, p;
  twiddle_t w;
  int checks = 0, failures = 0;

  cmul_vedic dut (.b, .w, .p);

  task automatic check(input int br, input int bi, input int wr, input int wi);
    int er, ei;
    b = '{re: data_t'(br), im: data_t'(bi)};
    w = '{re: tw_t'(wr), im: tw_t'(wi)};
    #1;
    er = (br * wr - bi * wi) >>> 6;
    ei = (br * wi + bi * wr) >>> 6;
    checks++;
    if (p.re !== data_t'(er) || p.im !== data_t'(ei)) begin
      failures++;
      $display("FAIL (%0d,%0d)*(%0d,%0d) gave (%0d,%0d) expected (%0d,%0d)",
               br, bi, wr, wi, p.re, p.im, data_t'(er), data_t'(ei));
    end
  endtask

  function automatic int srand(input int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-2048, 2047, 64, 0);
    check(-2048, 2047, 0, -64);
    check(2047, -2048, 0, -64);
    check(1, -1, 0, -64);
    for (int i = 0; i < 1000; i++) begin
      check(srand(2047), srand(2047), 64, 0);
      check(srand(2047), srand(2047), 0, -64);
      // random twiddles of magnitude below 1, results still within 12 bits
      check(srand(1000), srand(1000), srand(45), srand(45));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
