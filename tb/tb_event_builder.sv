// tb_event_builder: 64 modelled channel matchers answer each trigger with a
// random number of hits. The frames written to the four port FIFOs are
// checked against the expected event: headers, hits in channel order on the
// group's port (or on port 0 behind group separators), trailers with counts.
// Also checked: no start before the window has closed, no write to a full
// FIFO under random back-pressure, the trigger-lost flag, and untriggered
// round-robin streaming.
module tb_event_builder;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  tdc_cfg_t cfg;
  cyc_t now = '0, trig_time = '0;
  logic trig = 0;
  logic [EVID_W-1:0] trig_evid = '0;
  logic [BX_W-1:0] trig_bx = '0;
  logic start;
  cyc_t win_start, reject_before;
  logic [15:0] win_len;
  logic [NCH-1:0] ch_valid, ch_done, ch_lost = '0, ch_ready;
  hit_t ch_hit [NCH];
  logic [NGROUP-1:0] fifo_wr, fifo_full = '0;
  logic [31:0] fifo_data [NGROUP];
  logic trig_lost;
  int checks = 0, failures = 0;
  localparam int MARGIN = 64;

  event_builder #(.TRIG_DEPTH(4), .MARGIN(MARGIN)) dut (.*);

  always #5 clk = ~clk;
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase + 1) % 4;
    now <= now + 1'b1;
  end
  assign ce = (phase == 3);

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------- channel models
  hit_t chq [NCH][$];      // hits the channel will offer for the current trigger
  hit_t nextq [NCH][$];    // hits prepared for the next trigger
  logic [NCH-1:0] busy = '0;
  always_comb for (int c = 0; c < NCH; c++) begin
    ch_valid[c] = busy[c] ? (chq[c].size() > 0) : (!cfg.triggered && chq[c].size() > 0);
    ch_hit[c]   = (chq[c].size() > 0) ? chq[c][0] : '0;
    ch_done[c]  = cfg.triggered && !busy[c];
  end
  always @(posedge clk) if (ce) begin
    for (int c = 0; c < NCH; c++) begin
      if (ch_ready[c]) begin
        chk("ready only with valid", ch_valid[c], 1);
        void'(chq[c].pop_front());
      end
      if (start) begin
        chq[c] = nextq[c];
        busy[c] <= 1'b1;
      end else if (busy[c] && chq[c].size() == 0 && $urandom % 2) busy[c] <= 1'b0;
    end
  end

  // --------------------------------------------------- FIFO monitoring
  logic [31:0] portq [NGROUP][$];
  int nstart = 0;
  cyc_t cur_ws;
  always @(posedge clk) begin
    for (int p = 0; p < NGROUP; p++) if (fifo_wr[p]) begin
      chk("no write to a full FIFO", fifo_full[p], 0);
      portq[p].push_back(fifo_data[p]);
    end
    if (start) begin
      cyc_t d;
      nstart++;
      d = cyc_t'(now - win_start);
      chk("window closed at start", d >= cyc_t'(cfg.window + MARGIN) && !d[CYC_W-1], 1);
    end
  end

  // random back-pressure
  bit backpressure = 0;
  always @(negedge clk) fifo_full <= backpressure ? NGROUP'($urandom) & NGROUP'($urandom) : '0;

  // ------------------------------------------------------ stimulus
  task automatic send_trigger(logic [EVID_W-1:0] ev, logic [BX_W-1:0] bxv);
    do @(negedge clk); while (!ce);
    trig = 1; trig_time = now; trig_evid = ev; trig_bx = bxv;
    @(negedge clk);
    trig = 0;
  endtask

  function automatic hit_t rnd_hit();
    return '{rising: 1'($urandom), t: tdc_time_t'($urandom), tot: tdc_time_t'($urandom % 4096)};
  endfunction

  task automatic expect_event(logic [EVID_W-1:0] ev, logic [BX_W-1:0] bxv, cyc_t tt,
                              logic [3:0] flags, ref logic [31:0] e [NGROUP][$]);
    int cnt [NGROUP];
    for (int p = 0; p < NGROUP; p++) begin
      e[p].delete();
      cnt[p] = 0;
    end
    for (int p = 0; p < NGROUP; p++) if (!cfg.single_port || p == 0) begin
      if (cfg.header_en[0]) e[p].push_back(frame_header1(ev, bxv));
      if (cfg.header_en[1]) e[p].push_back(frame_header2(tt));
    end
    for (int g = 0; g < NGROUP; g++) begin
      int p;
      bit any;
      p = cfg.single_port ? 0 : g;
      any = 0;
      for (int c = 16 * g; c < 16 * g + 16; c++) if (cfg.ch_enable[c]) any |= (nextq[c].size() > 0);
      if (cfg.single_port && any) e[0].push_back(frame_group(2'(g)));
      for (int c = 16 * g; c < 16 * g + 16; c++) if (cfg.ch_enable[c])
        foreach (nextq[c][i]) begin
          hit_t h;
          h = nextq[c][i];
          e[p].push_back((cfg.edge_mode == EDGE_TOT)
            ? frame_tot(4'(c), h.t, h.tot, cfg.tot_fmt19, cfg.lead_shift, cfg.tot_shift)
            : frame_data(4'(c), h.rising, h.t));
          cnt[p]++;
        end
    end
    for (int p = 0; p < NGROUP; p++) if (!cfg.single_port || p == 0)
      e[p].push_back(frame_trailer(ev, flags, CNT_W'(cnt[p])));
  endtask

  task automatic run_event(int ev, int density, logic [3:0] flags);
    logic [31:0] e [NGROUP][$];
    for (int c = 0; c < NCH; c++) begin
      nextq[c].delete();
      if ($urandom % 100 < density) repeat (1 + $urandom % 3) nextq[c].push_back(rnd_hit());
    end
    for (int p = 0; p < NGROUP; p++) portq[p].delete();
    expect_event(EVID_W'(ev), BX_W'(ev * 3), trig_time, flags, e);
    // wait for the trailer(s)
    begin
      int n;
      n = 0;
      while (portq[0].size() < e[0].size() && n < 20000) begin @(negedge clk); n++; end
      repeat (40) @(negedge clk);
    end
    for (int p = 0; p < NGROUP; p++) begin
      chk("frames per port", portq[p].size(), e[p].size());
      foreach (e[p][i]) if (i < portq[p].size()) chk("frame", portq[p][i], e[p][i]);
    end
  endtask

  initial begin
    cfg = CFG_DEFAULT;
    cfg.triggered = 1;
    cfg.latency = 16'd100;
    cfg.window = 16'd40;
    cfg.header_en = 2'b11;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // four ports, then single port, with and without headers and back-pressure
    for (int k = 0; k < 12; k++) begin
      cfg.single_port = (k >= 6);
      cfg.header_en = 2'(k % 4);
      cfg.edge_mode = (k % 3 == 2) ? EDGE_TOT : EDGE_BOTH;
      cfg.ch_enable = (k == 5) ? 64'h00FF_FF00_FFFF_0F0F : '1;
      backpressure = (k % 2 == 1);
      send_trigger(EVID_W'(k), BX_W'(k * 3));
      run_event(k, (k == 4) ? 0 : 30, 4'b0000);
    end
    // trigger FIFO overflow: 6 triggers, depth 4, window still open
    cfg.single_port = 0;
    cfg.header_en = 2'b01;
    cfg.latency = 16'd0;
    cfg.window = 16'd400;
    backpressure = 0;
    for (int c = 0; c < NCH; c++) nextq[c].delete();
    repeat (200) @(negedge clk);
    for (int p = 0; p < NGROUP; p++) portq[p].delete();
    for (int k = 0; k < 6; k++) begin
      send_trigger(EVID_W'(20 + k), 0);
      repeat (4) @(negedge clk);
    end
    chk("trigger lost flagged", trig_lost, 1);
    repeat (4000) @(negedge clk);
    chk("lost-trigger flag in first trailer", portq[0][1][13], 1);   // trailer flags[1]
    chk("four events kept", portq[0].size(), 8);
    // untriggered: everything streams out, per channel in order
    cfg.triggered = 0;
    cfg.single_port = 1;
    cfg.edge_mode = EDGE_BOTH;
    for (int p = 0; p < NGROUP; p++) portq[p].delete();
    repeat (8) @(negedge clk);
    begin
      int total, got_data;
      logic [1:0] grp;
      total = 0;
      for (int c = 0; c < NCH; c += 5) begin
        repeat (3) chq[c].push_back(rnd_hit());
        total += 3;
      end
      repeat (2000) @(negedge clk);
      got_data = 0;
      grp = 0;
      foreach (portq[0][i]) begin
        if (portq[0][i][31:28] == TYPE_GROUP) grp = portq[0][i][1:0];
        else if (!portq[0][i][31]) got_data++;
      end
      chk("untriggered: all hits out", got_data, total);
      chk("untriggered: channels drained", chq[0].size() + chq[60].size(), 0);
    end
    chk("events started", nstart >= 16, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
