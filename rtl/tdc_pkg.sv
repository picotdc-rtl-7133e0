// tdc_pkg: constants, types and frame encoders shared by the TDC core.
//
// A time stamp is 26 bits: a 13-bit coarse count of the 40 MHz reference,
// a 5-bit medium count of the 1.28 GHz clock (32 per 25 ns), a 6-bit DLL tap
// (64 taps per 781 ps) and a 2-bit resistive interpolation code (4 per tap),
// so one LSB is 781.25 ps / 256 = 3.05 ps. These widths, the 32-bit frame
// layout of a measurement (type 1, channel 4, edge 1, coarse 13, medium 5,
// DLL 6, interpolation 2) and of the leading+TOT frames (leading 16 + TOT 11
// or leading 19 + TOT 8) follow the document. The idle word 0xD0D0D0D0 and
// the header type codes 1000/1001 and trailer 1010 are read from printed
// frames; the field layout inside headers, trailers and group separators,
// the edge encoding and the configuration layout are this design's own.
package tdc_pkg;

  localparam int FINE_W   = 8;   // DLL tap (6) + interpolation (2)
  localparam int MED_W    = 5;   // 1.28 GHz cycles per 40 MHz period = 32
  localparam int COARSE_W = 13;
  localparam int TIME_W   = COARSE_W + MED_W + FINE_W;  // 26
  localparam int CYC_W    = COARSE_W + MED_W;           // 18: time in 1.28 GHz cycles
  localparam int NCH      = 64;
  localparam int NGROUP   = 4;   // readout ports / channel groups of 16
  localparam int BX_W     = 12;
  localparam int EVID_W   = 12;
  localparam int CNT_W    = 12;  // hit count in a trailer

  typedef logic [TIME_W-1:0] tdc_time_t;
  typedef logic [CYC_W-1:0]  cyc_t;

  typedef enum logic [1:0] {
    EDGE_RISING = 2'd0,   // leading edges only
    EDGE_BOTH   = 2'd1,   // leading and trailing edges, each its own frame
    EDGE_TOT    = 2'd2,   // leading edge + time over threshold in one frame
    EDGE_FALL   = 2'd3    // trailing edges only
  } edge_mode_e;

  // One buffered measurement.
  typedef struct packed {
    logic      rising;   // 1: leading (rising) edge
    tdc_time_t t;        // absolute (or, after matching, relative) time
    tdc_time_t tot;      // trailing - leading, TOT mode only
  } hit_t;

  typedef struct packed {
    logic        triggered;    // 0: stream every hit
    logic        relative;     // triggered: time relative to window start
    edge_mode_e  edge_mode;
    logic        tot_fmt19;    // TOT frame: 0 leading 16/TOT 11, 1 leading 19/TOT 8
    logic [3:0]  lead_shift;   // LSBs dropped from the leading time in TOT frames
    logic [4:0]  tot_shift;    // LSBs dropped from the TOT in TOT frames
    logic        single_port;  // all groups on port 0 with group separators
    logic [1:0]  port_rate;    // byte rate 320 >> port_rate MHz
    logic [1:0]  header_en;    // bit 0: header 1, bit 1: header 2
    logic [15:0] latency;      // trigger latency, 1.28 GHz cycles
    logic [15:0] window;       // window length, 1.28 GHz cycles
    logic [BX_W-1:0] bx_max;   // bunch counter wraps after this value
    logic [BX_W-1:0] bx_offset;// bunch counter value loaded by BX reset
    logic [NCH-1:0]  ch_enable;
  } tdc_cfg_t;

  localparam logic [3:0] TYPE_HEADER1 = 4'b1000;
  localparam logic [3:0] TYPE_HEADER2 = 4'b1001;
  localparam logic [3:0] TYPE_TRAILER = 4'b1010;
  localparam logic [3:0] TYPE_GROUP   = 4'b1011;
  localparam logic [31:0] IDLE_FRAME  = 32'hD0D0D0D0;

  // Measurement frame: type 0, channel, edge, 26-bit time.
  function automatic logic [31:0] frame_data(logic [3:0] ch, logic rising, tdc_time_t t);
    return {1'b0, ch, rising, t};
  endfunction

  // Programmable part of a value: drop `sh` LSBs, saturate to `w` bits.
  function automatic logic [18:0] field_part(tdc_time_t v, logic [4:0] sh, int unsigned w);
    tdc_time_t s;
    s = v >> sh;
    if ((s >> w) != '0) return 19'((1 << w) - 1);
    return 19'(s);
  endfunction

  // Leading + TOT frame.
  function automatic logic [31:0] frame_tot(logic [3:0] ch, tdc_time_t lead, tdc_time_t tot,
                                            logic fmt19, logic [3:0] lsh, logic [4:0] tsh);
    logic [18:0] l;
    logic [10:0] d;
    if (fmt19) begin
      l = field_part(lead, {1'b0, lsh}, 19);
      d = 11'(field_part(tot, tsh, 8));
      return {1'b0, ch, l[18:0], d[7:0]};
    end
    l = field_part(lead, {1'b0, lsh}, 16);
    d = 11'(field_part(tot, tsh, 11));
    return {1'b0, ch, l[15:0], d[10:0]};
  endfunction

  function automatic logic [31:0] frame_header1(logic [EVID_W-1:0] evid, logic [BX_W-1:0] bx);
    return {TYPE_HEADER1, evid, 4'b0, bx};
  endfunction

  function automatic logic [31:0] frame_header2(cyc_t trig_time);
    return {TYPE_HEADER2, 10'b0, trig_time};
  endfunction

  function automatic logic [31:0] frame_trailer(logic [EVID_W-1:0] evid, logic [3:0] flags,
                                                logic [CNT_W-1:0] count);
    return {TYPE_TRAILER, evid, flags, count};
  endfunction

  function automatic logic [31:0] frame_group(logic [1:0] grp);
    return {TYPE_GROUP, 26'b0, grp};
  endfunction

  localparam tdc_cfg_t CFG_DEFAULT = '{
    triggered: 1'b0, relative: 1'b0, edge_mode: EDGE_RISING, tot_fmt19: 1'b0,
    lead_shift: 4'd0, tot_shift: 5'd0, single_port: 1'b0, port_rate: 2'd0,
    header_en: 2'b01, latency: 16'd0, window: 16'd0, bx_max: 12'd3563,
    bx_offset: 12'd0, ch_enable: '1};

endpackage
