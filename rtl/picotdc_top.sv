// picotdc_top: digital core of a 64-channel, 3 ps-bin time-to-digital
// converter for particle physics detectors.
//
// Each channel's hit signal is sampled by the (analog, not modelled here)
// timing macro at 256 phases of every 1.28 GHz cycle: a 64-tap DLL locked to
// the 781.25 ps clock period with a 4-point resistive interpolator between
// taps. The core receives these 256 bits per channel per cycle on `samples`
// and turns them into 26-bit time stamps (13-bit coarse 40 MHz count, 5-bit
// medium 1.28 GHz count, 6-bit DLL tap, 2-bit interpolation), one edge per
// channel per cycle. Per channel the hits pass a 4-hit derandomizer, the edge
// processor (rising / both / falling / leading + TOT), a channel buffer and a
// trigger matcher; the event builder frames matched hits (triggered mode,
// configurable latency and window, overlapping windows allowed) or all hits
// (untriggered mode) as 32-bit words and sends them out on one or four byte
// ports running at 40 to 320 MHz. An I2C target gives access to the
// configuration, delay-adjust and status bytes.
//
// Clocking: one clock, `clk` at 1.28 GHz (the PLL output); the 320 MHz and
// 40 MHz logic use enables derived from the medium counter. `trigger`,
// `evt_rst` and `bx_rst` are synchronous to the 40 MHz reference and sampled
// once per 25 ns. `rst_n` is an asynchronous active-low reset.
// The blocks and rates follow the document; buffer depths, frame field
// layouts other than the measurement frames, and the register map are this
// design's choices. The time base's separate medium/coarse counts and its
// 40 MHz enable are left open: the core uses only their combined count `now`.
module picotdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned PHASES     = 256,
  parameter int unsigned DERAND     = 4,
  parameter int unsigned BUF_DEPTH  = 64,
  parameter int unsigned TRIG_DEPTH = 16,
  parameter int unsigned RO_DEPTH   = 512,
  parameter int unsigned MARGIN     = 64,
  parameter logic [6:0]  I2C_ADDR   = 7'h2A
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PHASES-1:0] samples [NCH],
  input  logic              trigger,
  input  logic              evt_rst,
  input  logic              bx_rst,
  input  logic              scl,
  input  logic              sda_in,
  output logic              sda_oe,
  output logic [7:0]        ro_data [NGROUP],
  output logic [NGROUP-1:0] ro_strobe,
  output logic [NGROUP-1:0] ro_frame_start,
  output logic [8*322-1:0]  delay_adjust
);

  localparam int unsigned STAT_BYTES = 300;

  tdc_cfg_t          cfg;
  cyc_t              now, trig_time;
  logic              ce320, trig;
  logic [EVID_W-1:0] trig_evid, evid;
  logic [BX_W-1:0]   trig_bx, bx;

  logic              start;
  cyc_t              win_start, reject_before;
  logic [15:0]       win_len;
  logic [NCH-1:0]    ch_valid, ch_done, ch_lost, ch_ready, ch_multi;
  hit_t              ch_hit [NCH];

  logic [NGROUP-1:0] fifo_wr, fifo_full;
  logic [31:0]       fifo_data [NGROUP];
  logic [$clog2(RO_DEPTH):0] ro_level [NGROUP];
  logic              trig_lost;

  logic [15:0]       reg_addr;
  logic              reg_wr;
  logic [7:0]        reg_wdata, reg_rdata;
  logic [8*STAT_BYTES-1:0] status;
  logic [NCH-1:0]    lost_sticky, multi_sticky;

  // ------------------------------------------------------- configuration
  i2c_slave #(.DEV_ADDR(I2C_ADDR)) u_i2c (
    .clk, .rst_n, .scl, .sda_in, .sda_oe,
    .reg_addr, .reg_wr, .reg_wdata, .reg_rdata
  );

  config_registers #(.STAT_BYTES(STAT_BYTES)) u_regs (
    .clk, .rst_n, .addr(reg_addr), .wr(reg_wr), .wdata(reg_wdata), .rdata(reg_rdata),
    .status, .cfg, .delay_adjust
  );

  // ------------------------------------------------------------ time base
  time_base u_time (
    .clk, .rst_n, .bx_max(cfg.bx_max), .bx_offset(cfg.bx_offset),
    .trigger_in(trigger), .evt_rst_in(evt_rst), .bx_rst_in(bx_rst),
    .med(), .coarse(), .now, .ce320, .ce40(),
    .trig, .trig_time, .trig_evid, .trig_bx, .bx, .evid
  );

  // ------------------------------------------------------------- channels
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tdc_channel #(.PHASES(PHASES), .DERAND(DERAND), .BUF_DEPTH(BUF_DEPTH)) u_ch (
      .clk, .rst_n, .ce(ce320), .enable(cfg.ch_enable[c]), .samples(samples[c]), .now,
      .triggered(cfg.triggered), .relative(cfg.relative), .edge_mode(cfg.edge_mode),
      .start, .win_start, .win_len, .reject_before,
      .out_valid(ch_valid[c]), .out_hit(ch_hit[c]), .out_ready(ch_ready[c]),
      .done(ch_done[c]), .lost(ch_lost[c]), .multi(ch_multi[c])
    );
  end

  // -------------------------------------------------------- event builder
  event_builder #(.TRIG_DEPTH(TRIG_DEPTH), .MARGIN(MARGIN)) u_evb (
    .clk, .rst_n, .ce(ce320), .cfg, .now,
    .trig, .trig_time, .trig_evid, .trig_bx,
    .start, .win_start, .win_len, .reject_before,
    .ch_valid, .ch_hit, .ch_done, .ch_lost, .ch_ready,
    .fifo_wr, .fifo_data, .fifo_full, .trig_lost
  );

  // -------------------------------------------------------- readout ports
  for (genvar p = 0; p < NGROUP; p++) begin : g_port
    readout_port #(.DEPTH(RO_DEPTH)) u_port (
      .clk, .rst_n, .rate(cfg.port_rate),
      .wr(fifo_wr[p]), .wr_data(fifo_data[p]), .full(fifo_full[p]),
      .data(ro_data[p]), .strobe(ro_strobe[p]), .frame_start(ro_frame_start[p]),
      .level(ro_level[p])
    );
  end

  // --------------------------------------------------------------- status
  // bytes 0-1 event number, 2-3 bunch number, 4-11 readout FIFO levels
  // (2 bytes per port), 12 bit 0 trigger lost, 13-20 channels that lost hits,
  // 21-28 channels that saw two edges in one cycle (both sticky until reset).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lost_sticky  <= '0;
      multi_sticky <= '0;
    end else begin
      lost_sticky  <= lost_sticky | ch_lost;
      multi_sticky <= multi_sticky | ch_multi;
    end
  end

  always_comb begin
    status = '0;
    status[15:0]  = 16'(evid);
    status[31:16] = 16'(bx);
    for (int p = 0; p < NGROUP; p++) status[32 + 16*p +: 16] = 16'(ro_level[p]);
    status[96]    = trig_lost;
    status[104 +: NCH] = lost_sticky;
    status[168 +: NCH] = multi_sticky;
  end

endmodule
