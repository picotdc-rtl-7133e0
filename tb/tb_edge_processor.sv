// tb_edge_processor: feeds alternating edges in each mode and checks which
// edges are kept and the TOT pairing, including unmatched edges.
module tb_edge_processor;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  edge_mode_e mode = EDGE_RISING;
  logic in_valid = 0, in_rising = 0;
  tdc_time_t in_t = '0;
  logic in_pop, out_valid;
  hit_t out_hit;
  int checks = 0, failures = 0;

  edge_processor dut (.*);

  always #1 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  hit_t expq [$];
  int nout = 0;

  // output collector
  always @(negedge clk) if (rst_n && out_valid) begin
    nout++;
    chk("output expected", expq.size() > 0, 1);
    if (expq.size() > 0) begin
      hit_t e;
      e = expq.pop_front();
      chk("rising", out_hit.rising, e.rising);
      chk("t", out_hit.t, e.t);
      chk("tot", out_hit.tot, e.tot);
    end
  end

  initial begin
    tdc_time_t lead;
    bit held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    held = 0;
    lead = '0;
    for (int m = 0; m < 4; m++) begin
      mode = edge_mode_e'(m);
      for (int i = 0; i < 40; i++) begin
        bit r;
        tdc_time_t tt;
        // mostly alternating, sometimes a repeated edge type; one TOT
        // wraps around the top of the time range
        r  = ((i % 2) == 0) ^ (i % 13 == 7);
        tt = tdc_time_t'(1000 * m + 37 * i + $urandom % 20);
        if (m == 2 && i == 20) tt = 26'h3FFFFF0;
        if (m == 2 && i == 21) tt = 26'h0000020;
        case (mode)
          EDGE_RISING: if (r)  expq.push_back('{rising: 1, t: tt, tot: 0});
          EDGE_FALL:   if (!r) expq.push_back('{rising: 0, t: tt, tot: 0});
          EDGE_BOTH:   expq.push_back('{rising: r, t: tt, tot: 0});
          EDGE_TOT: begin
            if (r) begin
              held = 1;
              lead = tt;
            end else if (held) begin
              held = 0;
              expq.push_back('{rising: 1, t: lead, tot: tdc_time_t'(tt - lead)});
            end
          end
        endcase
        // the edge waits two cycles with ce low, then is taken with ce high
        @(negedge clk);
        in_valid = 1; in_rising = r; in_t = tt; ce = 0;
        @(negedge clk);
        chk("no pop without ce", in_pop, 0);
        ce = 1;
        #0 chk("pop with ce", in_pop, 1);
        @(negedge clk);
        in_valid = 0; ce = 0;
      end
    end
    repeat (3) @(negedge clk);
    chk("outputs drained", expq.size(), 0);
    chk("outputs produced", nout > 70, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
