// time_base: the TDC's free-running time base and its synchronous commands.
//
// A 5-bit medium counter runs on the 1.28 GHz clock and wraps every 32
// cycles, i.e. once per 25 ns period of the 40 MHz reference; a 13-bit coarse
// counter counts those wraps. Together they form the naturally overflowing
// 18-bit count (`now`, 781.25 ps units) used for trigger matching and TOT, as
// the document describes. The 320 MHz logic of the core runs on the same clock
// with the enable `ce320` (every 4th cycle); `ce40` marks the last fast cycle
// of each 40 MHz period.
//
// Trigger, event reset and bunch-crossing reset are taken as synchronous to
// the 40 MHz reference and sampled once per period, at `ce40`. A sampled
// trigger is presented on `trig` during the next `ce40` cycle (32 fast
// cycles later) with the time, event number and bunch number it was sampled
// at. The bunch counter counts 40 MHz periods, wraps to 0 after `bx_max` and
// is loaded with `bx_offset` by a bunch-crossing reset: the document's
// "counter with arbitrary overflow and reset for machine cycle". The event
// counter counts triggers and is cleared by an event reset. Widths of the
// bunch and event counters (12 bits) are this design's choice.
module time_base
  import tdc_pkg::*;
(
  input  logic              clk,        // 1.28 GHz
  input  logic              rst_n,
  input  logic [BX_W-1:0]   bx_max,
  input  logic [BX_W-1:0]   bx_offset,
  input  logic              trigger_in, // 40 MHz synchronous
  input  logic              evt_rst_in,
  input  logic              bx_rst_in,
  output logic [MED_W-1:0]  med,
  output logic [COARSE_W-1:0] coarse,
  output cyc_t              now,
  output logic              ce320,
  output logic              ce40,
  output logic              trig,       // one cycle, coincides with ce40
  output cyc_t              trig_time,
  output logic [EVID_W-1:0] trig_evid,
  output logic [BX_W-1:0]   trig_bx,
  output logic [BX_W-1:0]   bx,
  output logic [EVID_W-1:0] evid
);

  logic trig_q;

  assign now   = {coarse, med};
  assign ce320 = (med[1:0] == 2'b11);
  assign ce40  = (med == '1);
  assign trig  = trig_q && ce40;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      med       <= '0;
      coarse    <= '0;
      bx        <= '0;
      evid      <= '0;
      trig_q    <= 1'b0;
      trig_time <= '0;
      trig_evid <= '0;
      trig_bx   <= '0;
    end else begin
      med <= med + 1'b1;
      if (ce40) begin
        coarse <= coarse + 1'b1;
        if (bx_rst_in)          bx <= bx_offset;
        else if (bx == bx_max)  bx <= '0;
        else                    bx <= bx + 1'b1;
        trig_q <= trigger_in;
        if (trigger_in) begin
          trig_time <= now;
          trig_evid <= evt_rst_in ? '0 : evid;
          trig_bx   <= bx;
        end
        if (evt_rst_in)      evid <= trigger_in ? EVID_W'(1) : '0;
        else if (trigger_in) evid <= evid + 1'b1;
      end
    end
  end

endmodule
