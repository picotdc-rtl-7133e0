// hit_decoder: turns one channel's 256 fine-phase samples per 1.28 GHz cycle
// into at most one time-stamped edge per cycle.
//
// The capture flip-flops sample the hit signal at 256 equally spaced phases
// of each 781.25 ps cycle (64 DLL taps x 4 resistive interpolation points);
// bit k of `samples` is the hit level at phase k of the cycle whose medium/
// coarse count is `now`. As in the document, these custom flip-flops are
// followed by a standard-cell flip-flop for metastability resolution: stage 1
// here registers the samples together with `now`. Stage 2 compares them with
// the last phase of the previous cycle and finds the first change of level:
// from low, the first 1 is a rising edge; from high, the first 0 is a falling
// edge. The phase index is the 8-bit fine code (DLL tap in bits 7:2,
// interpolation in bits 1:0), so the hit time is {now, k}. The document
// allows one edge per cycle (the glitch filter guarantees it); a second
// change inside one cycle is not reported, and `multi` flags that cycle.
// Latency is 2 cycles from `samples` to `valid`; one hit per cycle.
// The search rule for the edge (first change of level) is this design's own.
module hit_decoder
  import tdc_pkg::*;
#(
  parameter int unsigned PHASES = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [PHASES-1:0] samples,
  input  cyc_t              now,
  output logic              valid,
  output logic              rising,
  output tdc_time_t         t,
  output logic              multi
);

  localparam int unsigned KW = $clog2(PHASES);

  logic [PHASES-1:0] smp_q;
  cyc_t              now_q;
  logic              last_q;    // level at the last phase of the previous cycle

  // First phase whose level differs from the level before it.
  logic              found;
  logic [KW-1:0]     k;
  int unsigned       nchg;
  always_comb begin
    found = 1'b0;
    k     = '0;
    nchg  = 0;
    for (int unsigned i = 0; i < PHASES; i++) begin
      if (smp_q[i] != ((i == 0) ? last_q : smp_q[(i == 0) ? 0 : i - 1])) begin
        nchg++;
        if (!found) begin
          found = 1'b1;
          k     = KW'(i);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_q  <= '0;
      now_q  <= '0;
      last_q <= 1'b0;
      valid  <= 1'b0;
      rising <= 1'b0;
      t      <= '0;
      multi  <= 1'b0;
    end else begin
      smp_q  <= enable ? samples : '0;
      now_q  <= now;
      last_q <= smp_q[PHASES-1];
      valid  <= found;
      rising <= !last_q;
      t      <= {now_q, FINE_W'(k) << (FINE_W - KW)};
      multi  <= nchg > 1;
    end
  end

endmodule
