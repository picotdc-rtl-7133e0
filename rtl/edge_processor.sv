// edge_processor: keeps the edges the chosen measurement mode asks for and,
// in TOT mode, pairs leading with trailing edges.
//
// Runs at 320 MHz (`ce`), taking one decoded edge per enabled cycle from the
// derandomizer. The document names the modes rising, rising & falling, and
// TOT (leading edge plus time over threshold); a falling-only mode is added
// here. In TOT mode a leading edge is held until the next trailing edge, and
// one entry {leading time, trailing - leading} is produced, the difference
// taken on the naturally overflowing 26-bit time (modulo 2^26). A trailing
// edge with no leading edge before it is discarded, and a second leading edge
// replaces a held one; both rules are this design's choice. `out_valid` is a
// one-cycle pulse, one clock after the enabled cycle that produced it.
module edge_processor
  import tdc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  edge_mode_e mode,
  input  logic       in_valid,
  input  logic       in_rising,
  input  tdc_time_t  in_t,
  output logic       in_pop,
  output logic       out_valid,
  output hit_t       out_hit
);

  logic      held;
  tdc_time_t lead;

  assign in_pop = ce && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held      <= 1'b0;
      lead      <= '0;
      out_valid <= 1'b0;
      out_hit   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_pop) begin
        unique case (mode)
          EDGE_RISING: if (in_rising) begin
            out_valid <= 1'b1;
            out_hit   <= '{rising: 1'b1, t: in_t, tot: '0};
          end
          EDGE_FALL: if (!in_rising) begin
            out_valid <= 1'b1;
            out_hit   <= '{rising: 1'b0, t: in_t, tot: '0};
          end
          EDGE_BOTH: begin
            out_valid <= 1'b1;
            out_hit   <= '{rising: in_rising, t: in_t, tot: '0};
          end
          EDGE_TOT: begin
            if (in_rising) begin
              held <= 1'b1;
              lead <= in_t;
            end else if (held) begin
              held      <= 1'b0;
              out_valid <= 1'b1;
              out_hit   <= '{rising: 1'b1, t: lead, tot: in_t - lead};
            end
          end
        endcase
      end
    end
  end

endmodule
