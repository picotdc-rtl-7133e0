// tb_hit_decoder: drives a hit waveform with known edge times through the
// 256-phase sample vector and checks time, edge type, the multi-edge flag and
// the 2-cycle latency of every decoded edge.
module tb_hit_decoder;
  import tdc_pkg::*;
  localparam int P = 256;
  logic clk = 0, rst_n = 0, enable = 1;
  logic [P-1:0] samples = '0;
  cyc_t now = '0;
  logic valid, rising, multi;
  tdc_time_t t;
  int checks = 0, failures = 0;

  hit_decoder #(.PHASES(P)) dut (.*);

  always #1 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  longint edges [$];          // absolute phase-bin times, alternating, first rising
  typedef struct { bit v; bit r; bit m; longint t; } exp_t;
  exp_t expq [$];             // expected output per cycle, in cycle order
  int nout = 0, nexp = 0;

  function automatic bit level_at(longint b);
    int n = 0;
    foreach (edges[i]) if (edges[i] <= b) n++;
    return n[0];
  endfunction

  initial begin
    longint b = 300;
    longint ncyc;
    // isolated edges at random phases, at least one cycle apart
    for (int i = 0; i < 400; i++) begin
      b += 256 + ($urandom % 1500);
      edges.push_back(b);
    end
    // a pulse shorter than one cycle: two edges in the same cycle
    b = ((b / 256) + 4) * 256 + 10;
    edges.push_back(b);
    edges.push_back(b + 90);
    ncyc = b / 256 + 6;

    repeat (2) @(negedge clk);
    rst_n = 1;
    for (longint n = 0; n < ncyc; n++) begin
      exp_t e;
      int first, cnt;
      @(negedge clk);
      check_cycle(n - 2);
      for (int k = 0; k < P; k++) samples[k] = level_at(n * P + k);
      now = cyc_t'(n);
      cnt = 0; first = -1;
      foreach (edges[i]) if (edges[i] / P == n) begin
        if (first < 0) first = i;
        cnt++;
      end
      e.v = (cnt > 0);
      e.r = (first >= 0) ? (first % 2 == 0) : 0;
      e.m = (cnt > 1);
      e.t = (first >= 0) ? (((n % (1 << CYC_W)) << 8) | (edges[first] % P)) : 0;
      expq.push_back(e);
    end
    for (longint n = ncyc; n < ncyc + 2; n++) begin
      @(negedge clk);
      check_cycle(n - 2);
    end
    chk("every edge decoded", nout, nexp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output for the samples of cycle n is visible two cycles after they are
  // driven, at the falling edge where cycle n+2 is driven.
  task automatic check_cycle(longint n);
    exp_t e;
    if (n < 0 || n >= expq.size()) return;
    e = expq[n];
    chk("valid", valid, e.v);
    if (e.v) begin
      nexp++;
      if (valid) nout++;
      chk("rising", rising, e.r);
      chk("time", t, e.t);
      chk("multi", multi, e.m);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
