// tb_picotdc_top: end-to-end test of the TDC core at its default size.
//
// A hit generator produces edge trains on all 64 channels at 3.05 ps
// resolution and turns them into the 256 phase samples per channel and
// 1.28 GHz cycle that the timing macro would deliver. The chip is configured
// over I2C, triggers are sent on the 40 MHz grid, and the four byte-wide
// readout ports are deserialized. Every event is compared frame by frame with
// a reference computed from the edge lists:
//   A  triggered, four ports, rising+falling edges, two headers, absolute
//      time, overlapping windows
//   B  triggered, single port (group separators), leading edge + TOT,
//      relative time, 160 MHz byte rate
//   C  untriggered streaming
//   D  a burst on one channel overflows its derandomizer; the lost hits are
//      flagged in the trailer and in the status bytes read back over I2C
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_picotdc_top;
  import tdc_pkg::*;
  localparam int P = 256;
  localparam int HALF = 12;        // I2C half bit, clock cycles
  logic clk = 0, rst_n = 0;
  logic [P-1:0] samples [NCH];
  logic trigger = 0, evt_rst = 0, bx_rst = 0;
  logic scl = 1, sda_m = 1, sda_oe, sda_in;
  logic [7:0] ro_data [NGROUP];
  logic [NGROUP-1:0] ro_strobe, ro_frame_start;
  logic [8*322-1:0] delay_adjust;
  int checks = 0, failures = 0;

  assign sda_in = sda_m && !sda_oe;

  picotdc_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------ time and hits
  longint cyc = 0;                 // equals the chip's 1.28 GHz count since reset
  longint edges [NCH][$];          // absolute bin times, alternating, first rising
  int     nxt [NCH];               // next edge not yet driven
  bit     lvl [NCH];

  initial foreach (samples[c]) samples[c] = '0;

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      logic [P-1:0] s;
      s = {P{lvl[c]}};
      while (nxt[c] < edges[c].size() && edges[c][nxt[c]] < (cyc + 1) * P) begin
        int k;
        k = int'(edges[c][nxt[c]] - cyc * P);
        for (int i = k; i < P; i++) s[i] = !lvl[c];
        lvl[c] = !lvl[c];
        nxt[c]++;
      end
      samples[c] = s;
    end
    cyc++;
  end

  // Edges on channel c from bin `from` on: pulses of `wmin..wmax` cycles,
  // gaps of `gmin..gmax` cycles, until bin `upto`.
  task automatic gen_hits(longint from, longint upto, int wmin, int wmax, int gmin, int gmax);
    for (int c = 0; c < NCH; c++) begin
      longint b;
      b = from + $urandom % (gmax * P);
      while (b < upto) begin
        edges[c].push_back(b);
        b += wmin * P + $urandom % ((wmax - wmin) * P + 1);
        edges[c].push_back(b);
        b += gmin * P + $urandom % ((gmax - gmin) * P + 1);
      end
    end
  endtask

  // ------------------------------------------------------------- I2C
  task automatic wait_half();
    repeat (HALF) @(negedge clk);
  endtask
  task automatic i2c_start();
    sda_m = 1; wait_half(); scl = 1; wait_half(); sda_m = 0; wait_half(); scl = 0; wait_half();
  endtask
  task automatic i2c_stop();
    sda_m = 0; wait_half(); scl = 1; wait_half(); sda_m = 1; wait_half();
  endtask
  task automatic i2c_bit(bit b, output bit r);
    sda_m = b; wait_half(); scl = 1; wait_half(); r = sda_in; scl = 0;
  endtask
  int n_i2c_acks = 0;
  task automatic i2c_byte(logic [7:0] v, bit master_ack, output logic [7:0] r);
    bit b;
    for (int i = 7; i >= 0; i--) begin i2c_bit(v[i], b); r[i] = b; end
    i2c_bit(master_ack ? 1'b0 : 1'b1, b);
    if (!b) n_i2c_acks++;
  endtask
  task automatic cfg_write(tdc_cfg_t c);
    logic [7:0] bytes [19];
    logic [7:0] r;
    bytes[0] = {c.port_rate, c.single_port, c.tot_fmt19, c.edge_mode, c.relative, c.triggered};
    bytes[1] = {c.lead_shift, 2'b00, c.header_en};
    bytes[2] = {3'b000, c.tot_shift};
    bytes[3] = c.latency[7:0];  bytes[4] = c.latency[15:8];
    bytes[5] = c.window[7:0];   bytes[6] = c.window[15:8];
    bytes[7] = c.bx_max[7:0];   bytes[8] = {4'b0, c.bx_max[11:8]};
    bytes[9] = c.bx_offset[7:0]; bytes[10] = {4'b0, c.bx_offset[11:8]};
    for (int i = 0; i < 8; i++) bytes[11 + i] = c.ch_enable[8*i +: 8];
    i2c_start();
    i2c_byte({7'h2A, 1'b0}, 0, r);
    i2c_byte(8'h00, 0, r);
    i2c_byte(8'h00, 0, r);
    foreach (bytes[i]) i2c_byte(bytes[i], 0, r);
    i2c_stop();
  endtask
  task automatic status_read(int a, output logic [7:0] v);
    logic [7:0] r;
    i2c_start();
    i2c_byte({7'h2A, 1'b0}, 0, r);
    i2c_byte(8'(a >> 8), 0, r);
    i2c_byte(8'(a), 0, r);
    sda_m = 1;
    i2c_start();
    i2c_byte({7'h2A, 1'b1}, 0, r);
    i2c_byte(8'hFF, 0, v);         // controller leaves SDA released, then NACKs
    i2c_stop();
  endtask

  // ------------------------------------------------------ readout ports
  logic [31:0] portq [NGROUP][$];
  logic [31:0] wsh [NGROUP];
  int nb [NGROUP];
  int n_idle = 0;
  always @(posedge clk) for (int p = 0; p < NGROUP; p++) if (ro_strobe[p]) begin
    if (ro_frame_start[p]) nb[p] = 0;
    wsh[p] = {wsh[p][23:0], ro_data[p]};
    nb[p]++;
    if (nb[p] == 4) begin
      if (wsh[p] == IDLE_FRAME) n_idle++;
      else portq[p].push_back(wsh[p]);
    end
  end

  // --------------------------------------------------------- triggers
  typedef struct { longint tt; int evid; int bx; } trig_rec_t;
  trig_rec_t trigs [$];
  int n_evid = 0;
  task automatic send_trigger();
    // hold the input for one 40 MHz period; it is sampled at its last cycle
    while ((cyc % 32) != 0) @(negedge clk);
    trigger = 1;
    trigs.push_back('{tt: cyc + 31, evid: n_evid, bx: int'(((cyc + 31) / 32) % 3564)});
    n_evid++;
    repeat (32) @(negedge clk);
    trigger = 0;
  endtask

  // ------------------------------------------------------ reference
  tdc_cfg_t cfg;
  int n_sep = 0, n_tot = 0, n_overlap = 0, n_events = 0, n_hits = 0, n_rel = 0;

  function automatic logic [31:0] hit_frame(int c, int i, longint ws);
    tdc_time_t t;
    t = tdc_time_t'(edges[c][i]);
    if (cfg.relative) t = tdc_time_t'(edges[c][i] - ws * P);
    if (cfg.edge_mode == EDGE_TOT)
      return frame_tot(4'(c), t, tdc_time_t'(edges[c][i+1] - edges[c][i]),
                       cfg.tot_fmt19, cfg.lead_shift, cfg.tot_shift);
    return frame_data(4'(c), (i % 2) == 0, t);
  endfunction

  task automatic expect_event(trig_rec_t tr, logic [3:0] flags, ref logic [31:0] e [NGROUP][$]);
    longint ws;
    int cnt [NGROUP];
    ws = tr.tt - cfg.latency;
    for (int p = 0; p < NGROUP; p++) begin e[p].delete(); cnt[p] = 0; end
    for (int p = 0; p < NGROUP; p++) if (!cfg.single_port || p == 0) begin
      if (cfg.header_en[0]) e[p].push_back(frame_header1(EVID_W'(tr.evid), BX_W'(tr.bx)));
      if (cfg.header_en[1]) e[p].push_back(frame_header2(cyc_t'(tr.tt)));
    end
    for (int g = 0; g < NGROUP; g++) begin
      int p;
      bit sep;
      p = cfg.single_port ? 0 : g;
      sep = 0;
      for (int c = 16 * g; c < 16 * g + 16; c++) if (cfg.ch_enable[c])
        for (int i = 0; i < edges[c].size(); i++) begin
          longint hc;
          bit keep;
          hc = edges[c][i] / P;
          case (cfg.edge_mode)
            EDGE_RISING: keep = (i % 2 == 0);
            EDGE_FALL:   keep = (i % 2 == 1);
            EDGE_TOT:    keep = (i % 2 == 0) && (i + 1 < edges[c].size());
            default:     keep = 1;
          endcase
          if (keep && hc >= ws && hc < ws + cfg.window) begin
            if (cfg.single_port && !sep) begin
              e[0].push_back(frame_group(2'(g)));
              sep = 1;
            end
            e[p].push_back(hit_frame(c, i, ws));
            cnt[p]++;
          end
        end
    end
    for (int p = 0; p < NGROUP; p++) if (!cfg.single_port || p == 0)
      e[p].push_back(frame_trailer(EVID_W'(tr.evid), flags, CNT_W'(cnt[p])));
  endtask

  // Check all events of `trigs` against the port streams.
  task automatic check_events(logic [3:0] flags0);
    logic [31:0] e [NGROUP][$];
    int pos [NGROUP];
    for (int p = 0; p < NGROUP; p++) pos[p] = 0;
    foreach (trigs[k]) begin
      expect_event(trigs[k], (k == 0) ? flags0 : 4'b0, e);
      if (k > 0 && trigs[k].tt - trigs[k-1].tt < cfg.window) n_overlap++;
      n_events++;
      for (int p = 0; p < NGROUP; p++) foreach (e[p][i]) begin
        logic [31:0] g;
        g = (pos[p] < portq[p].size()) ? portq[p][pos[p]] : 32'hDEAD_BEEF;
        chk("frame", g, e[p][i]);
        if (g == e[p][i]) begin
          if (e[p][i][31:28] == TYPE_GROUP) n_sep++;
          else if (!e[p][i][31]) begin
            n_hits++;
            if (cfg.edge_mode == EDGE_TOT) n_tot++;
            if (cfg.relative) n_rel++;
          end
        end
        pos[p]++;
      end
    end
    for (int p = 0; p < NGROUP; p++) chk("no extra frames", portq[p].size(), pos[p]);
  endtask

  // wait until the ports have sent nothing but idle frames for a while
  task automatic drain();
    int last;
    last = -1;
    for (int n = 0; n < 100; n++) begin
      int tot;
      repeat (800) @(negedge clk);
      tot = 0;
      for (int p = 0; p < NGROUP; p++) tot += portq[p].size();
      if (tot == last) break;
      last = tot;
    end
  endtask

  task automatic clear_run();
    trigs.delete();
    for (int p = 0; p < NGROUP; p++) portq[p].delete();
  endtask

  // --------------------------------------------------------- scenario
  int n_lost_flag = 0, n_untrig = 0, n_status = 0;
  initial begin
    logic [7:0] st;
    foreach (lvl[c]) begin lvl[c] = 0; nxt[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- A: triggered, four ports, both edges, absolute time
    cfg = CFG_DEFAULT;
    cfg.triggered = 1;
    cfg.edge_mode = EDGE_BOTH;
    cfg.header_en = 2'b11;
    cfg.latency = 16'd200;
    cfg.window = 16'd120;
    cfg_write(cfg);
    clear_run();
    gen_hits((cyc + 10) * P, (cyc + 4000) * P, 2, 30, 150, 700);
    repeat (300) @(negedge clk);
    for (int k = 0; k < 14; k++) begin
      send_trigger();
      repeat (32 * ($urandom % 5)) @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    drain();
    check_events(4'b0);

    // ---- B: single port, TOT, relative time, 160 MHz bytes
    cfg.single_port = 1;
    cfg.edge_mode = EDGE_TOT;
    cfg.relative = 1;
    cfg.header_en = 2'b01;
    cfg.port_rate = 2'd1;
    cfg.window = 16'd100;
    cfg_write(cfg);
    clear_run();
    gen_hits((cyc + 10) * P, (cyc + 3000) * P, 1, 7, 200, 900);
    repeat (300) @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      send_trigger();
      repeat (32 * (1 + $urandom % 4)) @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    drain();
    check_events(4'b0);

    // ---- C: untriggered, four ports, rising edges
    cfg = CFG_DEFAULT;
    cfg.edge_mode = EDGE_RISING;
    cfg_write(cfg);
    repeat (400) @(negedge clk);
    clear_run();
    begin
      int first [NCH];
      longint from;
      from = (cyc + 20) * P;
      foreach (first[c]) first[c] = edges[c].size();
      gen_hits(from, from + 1500 * P, 2, 20, 100, 400);
      repeat (3000) @(negedge clk);
      for (int p = 0; p < NGROUP; p++) begin
        int pos [16];
        foreach (pos[i]) pos[i] = first[16 * p + i];
        foreach (portq[p][i]) begin
          int c;
          c = 16 * p + int'(portq[p][i][30:27]);
          chk("untriggered frame", portq[p][i], frame_data(4'(c), 1'b1, tdc_time_t'(edges[c][pos[c % 16]])));
          pos[c % 16] += 2;
          n_untrig++;
        end
        foreach (pos[i]) chk("untriggered: all rising edges out", pos[i] >= edges[16 * p + i].size(), 1);
      end
    end

    // ---- D: derandomizer overflow on channel 3, triggered
    cfg = CFG_DEFAULT;
    cfg.triggered = 1;
    cfg.edge_mode = EDGE_BOTH;
    cfg.latency = 16'd100;
    cfg.window = 16'd60;
    cfg_write(cfg);
    clear_run();
    repeat (200) @(negedge clk);
    begin
      longint b;
      b = (cyc + 20) * P + 17;
      for (int i = 0; i < 12; i++) edges[3].push_back(b + i * P);   // one edge per cycle
    end
    repeat (60) @(negedge clk);
    send_trigger();
    repeat (1500) @(negedge clk);
    begin
      logic [31:0] tr;
      tr = (portq[0].size() > 0) ? portq[0][$] : '0;
      chk("trailer on port 0", tr[31:28], TYPE_TRAILER);
      if (tr[31:28] == TYPE_TRAILER && tr[12]) n_lost_flag++;
      chk("some burst hits kept", tr[11:0] >= 4 && tr[11:0] < 12, 1);
    end
    status_read(670 + 13, st);       // channels 0-7 that lost hits
    chk("status: channel 3 lost hits", st, 8'h08);
    if (st == 8'h08) n_status++;

    // ---- mechanisms
    $display("events=%0d hits=%0d overlaps=%0d separators=%0d tot=%0d relative=%0d untriggered=%0d lost=%0d idle=%0d",
             n_events, n_hits, n_overlap, n_sep, n_tot, n_rel, n_untrig, n_lost_flag, n_idle);
    chk("mechanism: triggered events", n_events > 0, 1);
    chk("mechanism: matched hits", n_hits > 0, 1);
    chk("mechanism: overlapping windows", n_overlap > 0, 1);
    chk("mechanism: group separators", n_sep > 0, 1);
    chk("mechanism: TOT frames", n_tot > 0, 1);
    chk("mechanism: relative time", n_rel > 0, 1);
    chk("mechanism: untriggered stream", n_untrig > 0, 1);
    chk("mechanism: derandomizer overflow", n_lost_flag, 1);
    chk("mechanism: idle frames", n_idle > 0, 1);
    chk("mechanism: I2C acknowledged", n_i2c_acks > 50, 1);
    chk("mechanism: status read", n_status, 1);
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
