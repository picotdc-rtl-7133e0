// tb_tdc_channel: one complete channel, from 256-phase samples to matched
// hits. Untriggered streaming in each edge mode (times and TOT checked
// against the edge list), a derandomizer overflow from edges in back-to-back
// cycles, and triggered matching of a window.
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int P = 256;
  logic clk = 0, rst_n = 0, ce, enable = 1;
  logic [P-1:0] samples = '0;
  cyc_t now = '0;
  logic triggered = 0, relative = 0, start = 0;
  edge_mode_e edge_mode = EDGE_BOTH;
  cyc_t win_start = '0, reject_before = '0;
  logic [15:0] win_len = '0;
  logic out_valid, out_ready = 1, done, lost, multi;
  hit_t out_hit;
  int checks = 0, failures = 0;

  tdc_channel #(.BUF_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  int phase = 0;
  always @(posedge clk) phase <= (phase + 1) % 4;
  assign ce = (phase == 3);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  longint edges [$];    // absolute bin times, alternating, first rising
  longint cyc = 0;
  int nlost = 0;
  hit_t got [$];

  // drive samples of cycle `cyc` and the matching time count
  always @(negedge clk) if (rst_n) begin
    int k0;
    for (int k = 0; k < P; k++) begin
      int n;
      n = 0;
      foreach (edges[i]) if (edges[i] <= cyc * P + k) n++;
      samples[k] = n[0];
    end
    now <= cyc_t'(cyc);
    cyc++;
    #1;
    if (ce && out_valid && out_ready) got.push_back(out_hit);
    if (lost) nlost++;
  end

  task automatic add_edges(int n, int min_gap, int max_gap);
    longint b;
    b = (edges.size() > 0) ? edges[$] : (cyc + 4) * P;
    if (b < (cyc + 4) * P) b = (cyc + 4) * P;
    for (int i = 0; i < n; i++) begin
      b += min_gap + $urandom % (max_gap - min_gap + 1);
      edges.push_back(b);
    end
  endtask

  function automatic tdc_time_t tstamp(longint b);
    return tdc_time_t'(b);    // cycle * 256 + phase, modulo 2^26
  endfunction

  initial begin
    int first;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- untriggered, each mode
    for (int m = 0; m < 4; m++) begin
      edge_mode = edge_mode_e'(m);
      got.delete();
      first = edges.size();
      if (first % 2) begin add_edges(1, 3000, 3000); first++; end  // start on a rising edge
      add_edges(30, 3 * P, 12 * P);
      while (cyc * P < edges[$] + 200 * P) @(negedge clk);
      begin
        hit_t e [$];
        e.delete();
        for (int i = first; i < edges.size(); i++) begin
          bit r;
          r = (i % 2 == 0);
          case (edge_mode)
            EDGE_RISING: if (r)  e.push_back('{rising: 1, t: tstamp(edges[i]), tot: 0});
            EDGE_FALL:   if (!r) e.push_back('{rising: 0, t: tstamp(edges[i]), tot: 0});
            EDGE_BOTH:   e.push_back('{rising: r, t: tstamp(edges[i]), tot: 0});
            EDGE_TOT:    if (!r && i > first) e.push_back('{rising: 1, t: tstamp(edges[i-1]),
                                                             tot: tdc_time_t'(edges[i] - edges[i-1])});
          endcase
        end
        chk("hit count", got.size(), e.size());
        foreach (e[i]) if (i < got.size()) chk("hit", got[i], e[i]);
      end
    end
    // ---- overflow: edges in 8 consecutive cycles
    edge_mode = EDGE_BOTH;
    got.delete();
    if (edges.size() % 2) add_edges(1, 3000, 3000);
    add_edges(10, P, P);
    while (cyc * P < edges[$] + 100 * P) @(negedge clk);
    chk("derandomizer overflow seen", nlost > 0, 1);
    chk("hits kept through overflow", got.size() >= 4 && got.size() < 10, 1);
    // ---- triggered: a window over part of a hit train
    triggered = 1;
    edge_mode = EDGE_RISING;
    got.delete();
    if (edges.size() % 2) add_edges(1, 3000, 3000);
    first = edges.size();
    add_edges(40, 2 * P, 6 * P);
    reject_before = cyc_t'(edges[first] / P - 10);
    while (cyc * P < edges[$] + 100 * P) @(negedge clk);
    begin
      cyc_t ws;
      int exp_n;
      ws = cyc_t'(edges[first + 10] / P);
      win_start = ws;
      win_len = 16'(edges[first + 30] / P - ws);
      relative = 1;
      exp_n = 0;
      for (int i = first; i < edges.size(); i += 2)
        if (edges[i] / P >= ws && edges[i] / P < ws + win_len) exp_n++;
      do @(negedge clk); while (!ce);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      repeat (4) @(negedge clk);
      chk("matched", got.size(), exp_n);
      foreach (got[i]) chk("relative time in window", got[i].t < {win_len, 8'h00}, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
