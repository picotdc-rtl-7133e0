// config_registers: the byte-addressed register space behind the I2C port.
//
// The document specifies 348 bytes of configuration and control, 322 more
// bytes of delay adjustment for the timing macro, and 300 bytes of status.
// They are mapped one after another: addresses 0..347 configuration,
// 348..669 delay adjustment, 670..969 status (read only; writes are ignored).
// Reads of unmapped addresses return 0. Writes take effect on the clock after
// `wr`. The first 19 configuration bytes drive the core (`cfg`); the layout,
// which is this design's choice, is
//   byte 0   [0] triggered [1] relative time [3:2] edge mode [4] TOT 19/8
//            [5] single readout port [7:6] port rate (320 >> n MHz)
//   byte 1   [1:0] headers enabled [7:4] leading-time shift
//   byte 2   [4:0] TOT shift
//   byte 3-4 trigger latency, byte 5-6 window length (1.28 GHz cycles, LSB first)
//   byte 7-8 bunch counter maximum, byte 9-10 bunch counter reset value
//   byte 11-18 channel enables, channel 0 in bit 0 of byte 11
// The remaining configuration bytes are stored and readable but drive
// nothing here, since the document does not give their meaning. The delay
// adjustment bytes are brought out on `delay_adjust` for the analog timing
// macro, byte n in bits 8n+7:8n. Reset loads the defaults of tdc_pkg.
module config_registers
  import tdc_pkg::*;
#(
  parameter int unsigned CFG_BYTES  = 348,
  parameter int unsigned DLY_BYTES  = 322,
  parameter int unsigned STAT_BYTES = 300
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [15:0]               addr,
  input  logic                      wr,
  input  logic [7:0]                wdata,
  output logic [7:0]                rdata,
  input  logic [8*STAT_BYTES-1:0]   status,
  output tdc_cfg_t                  cfg,
  output logic [8*DLY_BYTES-1:0]    delay_adjust
);

  localparam int unsigned RW_BYTES = CFG_BYTES + DLY_BYTES;
  localparam int unsigned AW       = $clog2(RW_BYTES);

  logic [7:0] regs [RW_BYTES];

  function automatic logic [7:0] reset_value(int unsigned a);
    tdc_cfg_t d;
    d = CFG_DEFAULT;
    unique case (a)
      0:  return {d.port_rate, d.single_port, d.tot_fmt19, d.edge_mode, d.relative, d.triggered};
      1:  return {d.lead_shift, 2'b00, d.header_en};
      2:  return {3'b000, d.tot_shift};
      3:  return d.latency[7:0];
      4:  return d.latency[15:8];
      5:  return d.window[7:0];
      6:  return d.window[15:8];
      7:  return d.bx_max[7:0];
      8:  return {4'b0, d.bx_max[11:8]};
      9:  return d.bx_offset[7:0];
      10: return {4'b0, d.bx_offset[11:8]};
      default: return (a >= 11 && a < 19) ? d.ch_enable[8*(a-11) +: 8] : 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < RW_BYTES; a++) regs[a] <= reset_value(a);
    end else if (wr && addr < 16'(RW_BYTES)) begin
      regs[AW'(addr)] <= wdata;
    end
  end

  always_comb begin
    if (addr < 16'(RW_BYTES))                   rdata = regs[AW'(addr)];
    else if (addr < 16'(RW_BYTES + STAT_BYTES)) rdata = status[8*(addr - 16'(RW_BYTES)) +: 8];
    else                                        rdata = 8'h00;
  end

  always_comb begin
    cfg.triggered   = regs[0][0];
    cfg.relative    = regs[0][1];
    cfg.edge_mode   = edge_mode_e'(regs[0][3:2]);
    cfg.tot_fmt19   = regs[0][4];
    cfg.single_port = regs[0][5];
    cfg.port_rate   = regs[0][7:6];
    cfg.header_en   = regs[1][1:0];
    cfg.lead_shift  = regs[1][7:4];
    cfg.tot_shift   = regs[2][4:0];
    cfg.latency     = {regs[4], regs[3]};
    cfg.window      = {regs[6], regs[5]};
    cfg.bx_max      = {regs[8][3:0], regs[7]};
    cfg.bx_offset   = {regs[10][3:0], regs[9]};
    for (int i = 0; i < 8; i++) cfg.ch_enable[8*i +: 8] = regs[11 + i];
    for (int unsigned b = 0; b < DLY_BYTES; b++) delay_adjust[8*b +: 8] = regs[CFG_BYTES + b];
  end

endmodule
