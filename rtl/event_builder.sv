// event_builder: trigger handling and framing of the readout data.
//
// Triggered mode. Every trigger is stored in a trigger FIFO with the start of
// its window (trigger time - latency), its event number and bunch number.
// When the head trigger's window has closed, plus MARGIN cycles for hits still
// in the channel pipelines, `start` is broadcast to all channel matchers,
// which search their buffers in parallel. The builder writes the enabled
// event headers (up to two, as in the document: header 1 carries event and
// bunch number, header 2 the trigger time), then takes the matched hits
// channel by channel in increasing channel order, one frame per 320 MHz
// cycle, skipping channels as soon as they report `done` with nothing left.
// Last comes a trailer with event number, error flags and hit count, and the
// trigger is removed. With four ports, channel group g (channels 16g..16g+15)
// goes to port g, and headers and trailers are written to all four ports, each
// trailer with its own port's count. With a single port, everything goes to
// port 0 and a group separator frame precedes the hits of each group that
// has hits, so the 4-bit channel field can be completed.
// Untriggered mode: hits are taken round-robin from the channels as they
// come, with the same port and separator rules and no headers or trailers.
//
// A frame is written only when every port it goes to has room, so nothing is
// lost at this stage: back-pressure stalls the matchers and, behind them, the
// channel buffers fill. Trailer flags: bit 0 hits were lost in a channel of
// the port since the previous trailer, bit 1 a trigger was lost because the
// trigger FIFO was full. The document names headers, trailers, separators and
// their possible fields; their layout, the channel order, the MARGIN and the
// trigger FIFO depth are this design's choices. The whole configuration
// struct comes in; the fields for the channels and the ports (relative time,
// port rate, bunch counter settings) are not used here.
module event_builder
  import tdc_pkg::*;
#(
  parameter int unsigned TRIG_DEPTH = 16,
  parameter int unsigned MARGIN     = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  tdc_cfg_t          cfg,
  input  cyc_t              now,
  // from the time base
  input  logic              trig,
  input  cyc_t              trig_time,
  input  logic [EVID_W-1:0] trig_evid,
  input  logic [BX_W-1:0]   trig_bx,
  // to / from the channels
  output logic              start,
  output cyc_t              win_start,
  output logic [15:0]       win_len,
  output cyc_t              reject_before,
  input  logic [NCH-1:0]    ch_valid,
  input  hit_t              ch_hit [NCH],
  input  logic [NCH-1:0]    ch_done,
  input  logic [NCH-1:0]    ch_lost,
  output logic [NCH-1:0]    ch_ready,
  // to the readout port FIFOs
  output logic [NGROUP-1:0] fifo_wr,
  output logic [31:0]       fifo_data [NGROUP],
  input  logic [NGROUP-1:0] fifo_full,
  output logic              trig_lost
);

  localparam int unsigned TAW = $clog2(TRIG_DEPTH);
  localparam int unsigned CW  = $clog2(NCH);

  typedef struct packed {
    cyc_t              ws;
    cyc_t              t;
    logic [EVID_W-1:0] evid;
    logic [BX_W-1:0]   bx;
  } trig_entry_t;

  typedef enum logic [2:0] {S_IDLE, S_H1, S_H2, S_COLLECT, S_TRAILER, S_STREAM} state_e;

  trig_entry_t       tf [TRIG_DEPTH];
  logic [TAW-1:0]    tf_rp, tf_wp;
  logic [TAW:0]      tf_cnt;
  trig_entry_t       head;
  logic              tf_pop, tf_push;

  state_e            state;
  logic [NCH-1:0]    pending;
  logic [1:0]        last_grp;
  logic              grp_sent;
  logic [CNT_W-1:0]  hit_cnt [NGROUP];
  logic [NGROUP-1:0] lost_grp;
  logic [CW-1:0]     rr_last;

  // -------------------------------------------------------------- triggers
  assign head    = tf[tf_rp];
  assign tf_push = trig && cfg.triggered && (tf_cnt < (TAW+1)'(TRIG_DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tf_rp     <= '0;
      tf_wp     <= '0;
      tf_cnt    <= '0;
      trig_lost <= 1'b0;
    end else begin
      if (tf_push) tf_wp <= tf_wp + 1'b1;
      if (tf_pop)  tf_rp <= tf_rp + 1'b1;
      tf_cnt <= tf_cnt + (TAW+1)'(tf_push) - (TAW+1)'(tf_pop);
      if (trig && cfg.triggered && !tf_push) trig_lost <= 1'b1;
      else if (tf_pop)                    trig_lost <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (tf_push)
      tf[tf_wp] <= '{ws: cyc_t'(trig_time - cyc_t'(cfg.latency)), t: trig_time,
                     evid: trig_evid, bx: trig_bx};
  end

  cyc_t since_ws;
  logic win_closed;
  assign since_ws      = cyc_t'(now - head.ws);
  assign win_closed    = (tf_cnt != 0) && !since_ws[CYC_W-1] &&
                         (since_ws >= cyc_t'(cfg.window) + cyc_t'(MARGIN));
  assign win_start     = head.ws;
  assign win_len       = cfg.window;
  assign reject_before = (tf_cnt != 0) ? head.ws
                                       : cyc_t'(now - cyc_t'(cfg.latency) - cyc_t'(MARGIN));

  // ------------------------------------------------------------ selection
  function automatic logic [CW:0] first_set(logic [NCH-1:0] v);
    for (int i = 0; i < NCH; i++) if (v[i]) return {1'b1, CW'(i)};
    return '0;
  endfunction

  logic [CW:0]    sel_c, sel_rr_hi, sel_rr_lo;
  logic [CW-1:0]  cur;
  logic [NCH-1:0] above_last;
  always_comb begin
    for (int i = 0; i < NCH; i++) above_last[i] = (CW'(i) > rr_last);
    sel_c     = first_set(pending);
    sel_rr_hi = first_set(ch_valid & cfg.ch_enable & above_last);
    sel_rr_lo = first_set(ch_valid & cfg.ch_enable);
    if (state == S_STREAM) cur = sel_rr_hi[CW] ? sel_rr_hi[CW-1:0] : sel_rr_lo[CW-1:0];
    else                   cur = sel_c[CW-1:0];
  end

  logic [NGROUP-1:0] all_ports, cur_port;
  logic [31:0]       data_frame;
  logic              need_sep;
  assign all_ports  = cfg.single_port ? NGROUP'(1) : '1;
  assign cur_port   = cfg.single_port ? NGROUP'(1) : NGROUP'(1) << cur[CW-1 -: 2];
  assign data_frame = (cfg.edge_mode == EDGE_TOT)
      ? frame_tot(cur[3:0], ch_hit[cur].t, ch_hit[cur].tot, cfg.tot_fmt19, cfg.lead_shift, cfg.tot_shift)
      : frame_data(cur[3:0], ch_hit[cur].rising, ch_hit[cur].t);
  assign need_sep   = cfg.single_port && (!grp_sent || last_grp != cur[CW-1 -: 2]);

  // --------------------------------------------------------------- actions
  logic go, data_go, sep_go, skip, have;
  logic [31:0] frame;
  always_comb begin
    go        = 1'b0;
    data_go   = 1'b0;
    sep_go    = 1'b0;
    skip      = 1'b0;
    have      = 1'b0;
    start     = 1'b0;
    tf_pop    = 1'b0;
    fifo_wr   = '0;
    frame     = data_frame;
    ch_ready  = '0;
    if (ce) begin
      unique case (state)
        S_IDLE: if (cfg.triggered && win_closed) begin
          go    = 1'b1;
          start = 1'b1;
        end
        S_H1: if ((fifo_full & all_ports) == '0) begin
          fifo_wr   = all_ports;
          frame     = frame_header1(head.evid, head.bx);
        end
        S_H2: if ((fifo_full & all_ports) == '0) begin
          fifo_wr   = all_ports;
          frame     = frame_header2(head.t);
        end
        S_COLLECT, S_STREAM: begin
          have = (state == S_STREAM) ? (sel_rr_hi[CW] || sel_rr_lo[CW]) : sel_c[CW];
          if (have && ch_valid[cur]) begin
            if (need_sep) begin
              if (!fifo_full[0]) begin
                sep_go    = 1'b1;
                fifo_wr   = NGROUP'(1);
                frame     = frame_group(cur[CW-1 -: 2]);
              end
            end else if ((fifo_full & cur_port) == '0) begin
              data_go        = 1'b1;
              fifo_wr        = cur_port;
              ch_ready[cur]  = 1'b1;
            end
          end else if (have && state == S_COLLECT && ch_done[cur]) begin
            skip = 1'b1;
          end
        end
        S_TRAILER: if ((fifo_full & all_ports) == '0) begin
          fifo_wr = all_ports;
          tf_pop  = 1'b1;
        end
        default: ;
      endcase
    end
  end

  // Every port gets the same frame except the trailer, which carries the
  // port's own hit count and flags.
  always_comb begin
    for (int p = 0; p < NGROUP; p++) begin
      logic [3:0] flags;
      flags = {2'b00, trig_lost,
               cfg.single_port ? (lost_grp != '0) : lost_grp[p]};
      fifo_data[p] = (state == S_TRAILER) ? frame_trailer(head.evid, flags, hit_cnt[p]) : frame;
    end
  end

  // ----------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pending  <= '0;
      last_grp <= '0;
      grp_sent <= 1'b0;
      lost_grp <= '0;
      rr_last  <= CW'(NCH - 1);
      for (int p = 0; p < NGROUP; p++) hit_cnt[p] <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) if (ch_lost[c]) lost_grp[c / 16] <= 1'b1;
      if (ce) begin
        if (!cfg.triggered) begin
          if (state != S_STREAM) begin
            state    <= S_STREAM;
            grp_sent <= 1'b0;
          end
        end else if (state == S_STREAM) begin
          state <= S_IDLE;
        end
        unique case (state)
          S_IDLE: if (go) begin
            pending  <= cfg.ch_enable;
            grp_sent <= 1'b0;
            for (int p = 0; p < NGROUP; p++) hit_cnt[p] <= '0;
            state    <= cfg.header_en[0] ? S_H1 : cfg.header_en[1] ? S_H2 : S_COLLECT;
          end
          S_H1: if (fifo_wr != '0) state <= cfg.header_en[1] ? S_H2 : S_COLLECT;
          S_H2: if (fifo_wr != '0) state <= S_COLLECT;
          S_COLLECT: begin
            if (!sel_c[CW]) state <= S_TRAILER;
            if (skip) pending[cur] <= 1'b0;
          end
          S_TRAILER: if (tf_pop) begin
            state    <= S_IDLE;
            lost_grp <= '0;
            for (int c = 0; c < NCH; c++) if (ch_lost[c]) lost_grp[c / 16] <= 1'b1;
          end
          default: ;
        endcase
        if (sep_go) begin
          grp_sent <= 1'b1;
          last_grp <= cur[CW-1 -: 2];
        end
        if (data_go) begin
          rr_last <= cur;
          if (cfg.single_port) hit_cnt[0] <= hit_cnt[0] + 1'b1;
          else                 hit_cnt[cur[CW-1 -: 2]] <= hit_cnt[cur[CW-1 -: 2]] + 1'b1;
        end
      end
    end
  end

endmodule
