// tdc_channel: the digital chain of one TDC channel.
//
// samples (256 phases per 1.28 GHz cycle) -> hit_decoder (one edge per
// 781 ps) -> derandomizer (4 hits, drained at 320 MHz) -> edge_processor
// (mode selection, TOT pairing) -> channel_buffer -> trigger_matcher, whose
// output stream goes to the event builder. `lost` pulses whenever a hit is
// dropped because the derandomizer or the channel buffer was full; `multi`
// flags a cycle with more than one edge, which the decoder cannot resolve.
// The chain and the 4-hit derandomizer follow the document; the buffer depth
// is this design's choice.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned PHASES    = 256,
  parameter int unsigned DERAND    = 4,
  parameter int unsigned BUF_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              enable,
  input  logic [PHASES-1:0] samples,
  input  cyc_t              now,
  input  logic              triggered,
  input  logic              relative,
  input  edge_mode_e        edge_mode,
  input  logic              start,
  input  cyc_t              win_start,
  input  logic [15:0]       win_len,
  input  cyc_t              reject_before,
  output logic              out_valid,
  output hit_t              out_hit,
  input  logic              out_ready,
  output logic              done,
  output logic              lost,
  output logic              multi
);

  localparam int unsigned OW = $clog2(BUF_DEPTH) + 1;

  logic      dec_valid, dec_rising;
  tdc_time_t dec_t;
  logic      dr_valid, dr_pop, dr_lost;
  logic [TIME_W:0] dr_data;
  logic      ep_valid;
  hit_t      ep_hit;
  logic      buf_pop, buf_lost;
  logic [OW-1:0] buf_off, buf_count;
  hit_t      buf_data;

  hit_decoder #(.PHASES(PHASES)) u_dec (
    .clk, .rst_n, .enable, .samples, .now,
    .valid(dec_valid), .rising(dec_rising), .t(dec_t), .multi
  );

  derandomizer #(.DEPTH(DERAND), .W(TIME_W + 1)) u_derand (
    .clk, .rst_n,
    .wr(dec_valid), .wr_data({dec_rising, dec_t}),
    .pop(dr_pop), .rd_valid(dr_valid), .rd_data(dr_data), .lost(dr_lost)
  );

  edge_processor u_edge (
    .clk, .rst_n, .ce, .mode(edge_mode),
    .in_valid(dr_valid), .in_rising(dr_data[TIME_W]), .in_t(dr_data[TIME_W-1:0]),
    .in_pop(dr_pop), .out_valid(ep_valid), .out_hit(ep_hit)
  );

  channel_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .wr(ep_valid), .wr_data(ep_hit),
    .pop(buf_pop), .rd_off(buf_off), .rd_data(buf_data), .count(buf_count), .lost(buf_lost)
  );

  trigger_matcher #(.DEPTH(BUF_DEPTH)) u_match (
    .clk, .rst_n, .ce, .triggered, .relative, .start, .win_start, .win_len, .reject_before,
    .buf_count, .buf_data, .buf_off, .buf_pop,
    .out_valid, .out_hit, .out_ready, .done
  );

  assign lost = dr_lost || buf_lost;

endmodule
