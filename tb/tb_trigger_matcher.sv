// tb_trigger_matcher: loads a channel buffer with hits at known times, runs
// a sequence of trigger windows (overlapping ones included, absolute and
// relative time) under random back-pressure, and checks the matched hits,
// the removal of old hits, idle rejection and untriggered streaming at one
// hit per 320 MHz cycle.
module tb_trigger_matcher;
  import tdc_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0, ce;
  logic triggered = 1, relative = 0, start = 0;
  cyc_t win_start = '0, reject_before = '0;
  logic [15:0] win_len = '0;
  logic [$clog2(D):0] buf_count, buf_off;
  hit_t buf_data, out_hit;
  logic buf_pop, out_valid, out_ready = 0, done;
  logic wr = 0, lost;
  hit_t wr_data = '0;
  int checks = 0, failures = 0;

  channel_buffer #(.DEPTH(D)) u_buf (.clk, .rst_n, .wr, .wr_data, .pop(buf_pop),
    .rd_off(buf_off), .rd_data(buf_data), .count(buf_count), .lost);
  trigger_matcher #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  // 320 MHz enable: one clock in four
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

  cyc_t hits [$];    // cycle times of hits written
  int nmatched = 0, noverlap = 0;

  task automatic write_hits(int n, ref cyc_t tnext);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr = 1;
      wr_data = '{rising: 1'b1, t: {tnext, 8'($urandom)}, tot: '0};
      hits.push_back(tnext);
      tnext = cyc_t'(tnext + 1 + $urandom % 20);
    end
    @(negedge clk);
    wr = 0;
  endtask

  // One trigger: expected hits are those inside [ws, ws+len) still stored.
  task automatic run_trigger(cyc_t ws, int len, bit rel);
    tdc_time_t exp_t [$];
    int got = 0;
    foreach (hits[i]) begin
      cyc_t d;
      d = cyc_t'(hits[i] - ws);
      if (!d[CYC_W-1] && d < cyc_t'(len)) exp_t.push_back('0);
    end
    relative = rel;
    win_start = ws;
    win_len = 16'(len);
    // start is sampled on an enabled cycle
    do @(negedge clk); while (!ce);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      out_ready = ($urandom % 3 != 0);
      #1;
      // the transfer happens at the coming rising edge
      if (ce && out_valid && out_ready) begin
        cyc_t c;
        got++;
        c = rel ? cyc_t'(out_hit.t[TIME_W-1 -: CYC_W] + ws) : out_hit.t[TIME_W-1 -: CYC_W];
        begin
          cyc_t d;
          d = cyc_t'(c - ws);
          chk("hit inside window", !d[CYC_W-1] && d < cyc_t'(len), 1);
        end
      end
    end
    out_ready = 0;
    chk("matched count", got, exp_t.size());
    nmatched += got;
    // hits older than the window start are gone now
    while (hits.size() > 0 && cyc_t'(hits[0] - ws) >= cyc_t'(1 << (CYC_W - 1))) void'(hits.pop_front());
    repeat (2) @(negedge clk);
    chk("buffer holds the rest", buf_count, hits.size());
  endtask

  initial begin
    cyc_t tn;
    tn = cyc_t'(2**CYC_W - 300);     // start near the wrap of the count
    repeat (3) @(negedge clk);
    rst_n = 1;
    reject_before = cyc_t'(tn - 10);
    write_hits(50, tn);
    chk("loaded", buf_count, 50);
    // windows moving forward, several overlapping
    begin
      cyc_t ws;
      ws = cyc_t'(hits[0] - 5);
      for (int k = 0; k < 12; k++) begin
        int len;
        len = 20 + $urandom % 60;
        reject_before = ws;
        run_trigger(ws, len, k % 3 == 1);
        ws = cyc_t'(ws + ((k % 2) ? len / 2 : len + 3));   // odd: next window overlaps
        if (k % 2) noverlap++;
      end
      // idle rejection: everything older than reject_before leaves the buffer
      reject_before = cyc_t'(hits[hits.size() / 2]);
      repeat (200) @(negedge clk);
      while (hits.size() > 0 && cyc_t'(hits[0] - reject_before) >= cyc_t'(1 << (CYC_W - 1))) void'(hits.pop_front());
      chk("idle rejection", buf_count, hits.size());
    end
    // untriggered: stream everything in order
    triggered = 0;
    out_ready = 1;
    begin
      int n, nce, nh;
      n = 0;
      nce = 0;
      nh = hits.size();
      while (buf_count != 0 && n < 1000) begin
        @(negedge clk);
        #1;
        if (ce && buf_count != 0) nce++;
        if (ce && out_valid) begin
          chk("stream order", out_hit.t[TIME_W-1 -: CYC_W], hits[0]);
          void'(hits.pop_front());
        end
        n++;
      end
      chk("stream drained", hits.size(), 0);
      // one hit per 320 MHz cycle: as many enabled cycles as hits
      chk("stream rate", nce, nh);
    end
    chk("hits matched", nmatched > 20, 1);
    chk("overlaps run", noverlap > 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
