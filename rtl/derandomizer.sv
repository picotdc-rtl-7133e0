// derandomizer: the small per-channel FIFO between the 1.28 GHz hit decoder
// and the 320 MHz channel logic.
//
// Hits arrive at up to one per 1.28 GHz cycle in bursts but can leave only
// at the sustained 320 MHz rate; the document gives a 4-hit derandomizer per
// channel for this. It is a DEPTH-entry circular buffer in the fast clock
// domain: `wr` pushes (the entry is dropped and `lost` pulses when full), and
// `pop` (the consumer gates it with its 320 MHz enable) removes the head,
// which is always visible on `rd_data` while `rd_valid`. A write and a pop
// may happen in the same cycle, also when full. Dropping hits on overflow is
// this design's choice; the document does not say what happens then.
module derandomizer #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 27
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr,
  input  logic [W-1:0] wr_data,
  input  logic         pop,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  output logic         lost
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;
  logic          do_pop, do_wr;

  assign rd_valid = (cnt != 0);
  assign rd_data  = mem[rp];
  assign do_pop   = pop && rd_valid;
  assign do_wr    = wr && ((cnt < (AW+1)'(DEPTH)) || do_pop);

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp   <= '0;
      wp   <= '0;
      cnt  <= '0;
      lost <= 1'b0;
    end else begin
      lost <= wr && !do_wr;
      if (do_wr)  wp <= inc(wp);
      if (do_pop) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

endmodule
