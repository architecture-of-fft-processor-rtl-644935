// fft_ctrl: controller and address generator of the memory-based radix-2 FFT.
//
// A single butterfly does all the work, one butterfly per clock, so an
// N-point transform takes (N/2) * log2(N) clocks: 4 for N = 4. For stage s
// (span 2^s) and butterfly j of the stage, with group g = j / 2^s and
// position t = j mod 2^s, the operands are at addr_a = g * 2^(s+1) + t and
// addr_b = addr_a + 2^s, and the twiddle exponent is t * N / 2^(s+1)
// (in-place decimation in time on bit-reversed input). The single butterfly
// and the cycle count follow the source design; the addressing is the
// standard in-place scheme and this design's choice.
//
// Timing: start is taken in IDLE on a rising edge; bf_en is then high for the
// next (N/2)*log2(N) cycles, each carrying one butterfly's addresses; done
// pulses for one cycle right after the last butterfly was written back, when
// the memory holds the result. busy is high from the cycle after start up to
// and including the done cycle. start is ignored while busy.
//
// Interface: clk, rst_n, start in; busy, done, bf_en, addr_a, addr_b, tw_idx
// out.
module fft_ctrl #(
  parameter int unsigned N = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     bf_en,
  output logic [$clog2(N)-1:0]     addr_a,
  output logic [$clog2(N)-1:0]     addr_b,
  output logic [((N > 4) ? $clog2(N) - 1 : 1)-1:0] tw_idx
);

  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned AW    = LOGN;
  localparam int unsigned TWW   = (N > 4) ? LOGN - 1 : 1;
  localparam int unsigned NHALF = N / 2;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  state_t                        state;
  logic [$clog2(LOGN+1)-1:0]     stage;
  logic [$clog2(NHALF+1)-1:0]    bfly;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      stage <= '0;
      bfly  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          stage <= '0;
          bfly  <= '0;
        end
        S_RUN: begin
          if (32'(bfly) == NHALF - 1) begin
            bfly <= '0;
            if (32'(stage) == LOGN - 1) state <= S_DONE;
            else                   stage <= stage + 1'b1;
          end else begin
            bfly <= bfly + 1'b1;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    int unsigned span, grp, pos, a;
    span   = 1 << stage;
    grp    = 32'(bfly) / span;
    pos    = 32'(bfly) % span;
    a      = grp * 2 * span + pos;
    addr_a = AW'(a);
    addr_b = AW'(a + span);
    tw_idx = TWW'(pos * (N / (2 * span)));
  end

  assign bf_en = (state == S_RUN);
  assign done  = (state == S_DONE);
  assign busy  = (state != S_IDLE);

endmodule
