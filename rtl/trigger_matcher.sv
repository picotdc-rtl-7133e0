// trigger_matcher: per-channel trigger matching at 320 MHz.
//
// Triggered mode. The event builder pulses `start` once a trigger window
// [win_start, win_start + win_len) (in 1.28 GHz cycles on the 18-bit
// naturally overflowing count) has closed. The matcher then walks its channel
// buffer from the head: hits older than the window are removed, hits inside it
// are offered on `out_*` (one per enabled cycle when `out_ready`) and kept,
// since an overlapping later window may need them again, and the first hit
// after the window, or the end of the buffer, ends the search and raises
// `done` until the next `start`. Between triggers, hits older than
// `reject_before` (the start of the oldest window that can still come) are
// removed from the head so the buffer does not fill with hits no trigger will
// claim. With `relative` set, the time offered is the hit time minus the
// window start (in 3.05 ps units), otherwise the absolute time.
// Untriggered mode: every buffered hit is offered as it arrives, absolute.
// Of an offered hit only the time can change; its edge bit and TOT pass
// straight through from the buffer.
//
// The document gives the function (configurable latency and length, overlap
// possible, matching per channel at 320 MHz); the search order, the head
// rejection rule and the time reference for relative times are this design's.
// Time comparisons are modulo 2^18, valid for distances below 2^17 cycles.
module trigger_matcher
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic                   triggered,
  input  logic                   relative,
  input  logic                   start,
  input  cyc_t                   win_start,
  input  logic [15:0]            win_len,
  input  cyc_t                   reject_before,
  // channel buffer
  input  logic [$clog2(DEPTH):0] buf_count,
  input  hit_t                   buf_data,
  output logic [$clog2(DEPTH):0] buf_off,
  output logic                   buf_pop,
  // matched hits
  output logic                   out_valid,
  output hit_t                   out_hit,
  input  logic                   out_ready,
  output logic                   done
);

  localparam int unsigned OW = $clog2(DEPTH) + 1;

  logic          busy;
  logic [OW-1:0] off;
  cyc_t          d_win, d_rej;
  logic          at_end, older, in_win;

  assign buf_off = busy ? off : '0;
  assign at_end  = (off >= buf_count);
  assign d_win   = cyc_t'(buf_data.t[TIME_W-1 -: CYC_W] - win_start);
  assign d_rej   = cyc_t'(buf_data.t[TIME_W-1 -: CYC_W] - reject_before);
  assign older   = d_win[CYC_W-1];
  assign in_win  = !older && (d_win < cyc_t'(win_len));

  always_comb begin
    out_valid = 1'b0;
    out_hit   = buf_data;
    buf_pop   = 1'b0;
    if (!triggered) begin
      out_valid = (buf_count != 0);
      buf_pop   = ce && out_valid && out_ready;
    end else if (busy) begin
      if (!at_end && in_win) begin
        out_valid = 1'b1;
        if (relative) out_hit.t = buf_data.t - {win_start, FINE_W'(0)};
      end
      buf_pop = ce && !at_end && older && (off == 0);
    end else begin
      buf_pop = ce && (buf_count != 0) && d_rej[CYC_W-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      off  <= '0;
      done <= 1'b0;
    end else if (ce) begin
      if (start && triggered) begin
        busy <= 1'b1;
        off  <= '0;
        done <= 1'b0;
      end else if (busy) begin
        if (at_end || (!older && !in_win)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (older) begin
          if (off != 0) off <= off + 1'b1;   // cannot happen for time-ordered hits
        end else if (out_ready) begin
          off <= off + 1'b1;
        end
      end
    end
  end

endmodule
