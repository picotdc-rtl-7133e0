// channel_buffer: per-channel store of processed hits, oldest first, for
// trigger matching.
//
// Hits enter in time order from the edge processor (`wr`, at most one per
// 320 MHz cycle, the document's sustainable rate into the channel buffer).
// Because trigger windows may overlap, a hit must stay in the buffer after it
// has been matched once; the matcher therefore reads at an offset from the
// head (`rd_off`, combinational `rd_data`) and only removes hits from the head
// (`pop`) once no later window can contain them. `count` is the occupancy. A
// write to a full buffer is dropped and `lost` pulses. The document names the
// buffer but gives no depth: DEPTH = 64 is this design's choice. `rd_off` is
// one bit wider than an index so that it matches the matcher's offset, which
// can equal DEPTH when the whole buffer has been walked; its top bit is not
// needed for the read and stays unused.
module channel_buffer
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr,
  input  hit_t                   wr_data,
  input  logic                   pop,
  input  logic [$clog2(DEPTH):0] rd_off,
  output hit_t                   rd_data,
  output logic [$clog2(DEPTH):0] count,
  output logic                   lost
);

  localparam int unsigned AW = $clog2(DEPTH);

  hit_t          mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic          do_pop, do_wr;

  assign do_pop  = pop && (count != 0);
  assign do_wr   = wr && ((count < (AW+1)'(DEPTH)) || do_pop);
  assign rd_data = mem[AW'(rp + AW'(rd_off))];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
      lost  <= 1'b0;
    end else begin
      lost <= wr && !do_wr;
      if (do_wr)  wp <= wp + 1'b1;
      if (do_pop) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

endmodule
