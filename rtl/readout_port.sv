// readout_port: one byte-wide readout port with its readout FIFO.
//
// The event builder writes 32-bit frames into a DEPTH-entry FIFO (`wr`,
// `wr_data`; `full` holds it off). The serializer sends each frame as four
// bytes, most significant byte first, on `data`, one byte per `strobe`
// pulse. The byte rate is 320 MHz >> `rate` (320, 160, 80 or 40 MHz, the
// document's range), derived from the 1.28 GHz clock by counting 4 << rate
// cycles. When the FIFO is empty the port sends the idle frame 0xD0D0D0D0,
// so the link never stops. `frame_start` marks the first byte of every frame;
// since the idle frame repeats the same byte, a receiver needs it (or an
// equivalent) to find frame boundaries. The 8 data bits and the frame order
// follow the document; the strobe, `frame_start`, the byte order and the FIFO
// depth of 512 are this design's choices.
module readout_port
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  rate,
  input  logic        wr,
  input  logic [31:0] wr_data,
  output logic        full,
  output logic [7:0]  data,
  output logic        strobe,
  output logic        frame_start,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [5:0]    div;
  logic [1:0]    byte_idx;
  logic [31:0]   shreg;
  logic          tick, pop;

  assign full = (level == (AW+1)'(DEPTH));
  assign tick = (div == 6'((4 << rate) - 1));
  assign pop  = tick && (byte_idx == 2'd0) && (level != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp          <= '0;
      wp          <= '0;
      level       <= '0;
      div         <= '0;
      byte_idx    <= '0;
      shreg       <= IDLE_FRAME;
      data        <= '0;
      strobe      <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      logic do_wr;
      do_wr = wr && !full;
      if (do_wr) wp <= wp + 1'b1;
      if (pop)   rp <= rp + 1'b1;
      level  <= level + (AW+1)'(do_wr) - (AW+1)'(pop);
      div    <= tick ? '0 : div + 1'b1;
      strobe <= tick;
      if (tick) begin
        byte_idx <= byte_idx + 1'b1;
        if (byte_idx == 2'd0) begin
          logic [31:0] w;
          w           = (level != 0) ? mem[rp] : IDLE_FRAME;
          data        <= w[31:24];
          shreg       <= {w[23:0], 8'h00};
          frame_start <= 1'b1;
        end else begin
          data        <= shreg[31:24];
          shreg       <= {shreg[23:0], 8'h00};
          frame_start <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp] <= wr_data;
  end

endmodule
