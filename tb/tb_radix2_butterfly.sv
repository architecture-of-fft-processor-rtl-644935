// tb_radix2_butterfly: checks y0 = a + w*b and y1 = a - w*b against integer
// arithmetic for the twiddles 1 and -j and random operands.
module tb_radix2_butterfly;
  import fft_pkg::*;
  cplx_t    a, b, y0, y1;
  twiddle_t w;
  int checks = 0, failures = 0;

  radix2_butterfly dut (.a, .b, .w, .y0, .y1);

  task automatic check(input int ar, input int ai, input int br, input int bi, input bit minus_j);
    int wbr, wbi;
    a = '{re: data_t'(ar), im: data_t'(ai)};
    b = '{re: data_t'(br), im: data_t'(bi)};
    w = minus_j ? '{re: tw_t'(0), im: tw_t'(-64)} : '{re: tw_t'(64), im: tw_t'(0)};
    #1;
    // (br + j bi) * (-j) = bi - j br
    wbr = minus_j ? bi  : br;
    wbi = minus_j ? -br : bi;
    checks++;
    if (y0.re !== data_t'(ar + wbr) || y0.im !== data_t'(ai + wbi) ||
        y1.re !== data_t'(ar - wbr) || y1.im !== data_t'(ai - wbi)) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) mj=%0d y0=(%0d,%0d) y1=(%0d,%0d)",
               ar, ai, br, bi, minus_j, y0.re, y0.im, y1.re, y1.im);
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
    check(10, 0, 5, 0, 0);
    check(10, 3, 5, 7, 1);
    for (int i = 0; i < 2000; i++)
      check(srand(1000), srand(1000), srand(1000), srand(1000), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
