// tb_config_registers: checks reset values, writes and reads of the
// configuration and delay-adjust bytes, read-only status, unmapped reads and
// the decoding of the configuration bytes into the core's settings.
module tb_config_registers;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr = '0;
  logic wr = 0;
  logic [7:0] wdata = '0, rdata;
  logic [8*300-1:0] status;
  tdc_cfg_t cfg;
  logic [8*322-1:0] delay_adjust;
  int checks = 0, failures = 0;

  config_registers dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic write(int a, logic [7:0] d);
    @(negedge clk);
    addr = 16'(a); wdata = d; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic rdchk(string what, int a, logic [7:0] exp);
    addr = 16'(a);
    #1 chk(what, rdata, exp);
  endtask

  initial begin
    for (int i = 0; i < 300; i++) status[8*i +: 8] = 8'(i * 7 + 3);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // reset values
    chk("reset triggered", cfg.triggered, 0);
    chk("reset header_en", cfg.header_en, 2'b01);
    chk("reset bx_max", cfg.bx_max, 3563);
    chk("reset ch_enable", cfg.ch_enable, 64'hFFFF_FFFF_FFFF_FFFF);
    rdchk("reset byte 7", 7, 8'hEB);
    // configuration fields
    write(0, 8'b10_1_1_10_1_1);      // rate 2, single, tot19, TOT, relative, triggered
    write(1, 8'h53);                 // lead shift 5, both headers
    write(2, 8'h0C);
    write(3, 8'h34); write(4, 8'h12);
    write(5, 8'h78); write(6, 8'h06);
    write(9, 8'h21); write(10, 8'h03);
    write(11, 8'h0F); write(18, 8'hA0);
    chk("triggered", cfg.triggered, 1);
    chk("relative", cfg.relative, 1);
    chk("edge mode", cfg.edge_mode, EDGE_TOT);
    chk("tot19", cfg.tot_fmt19, 1);
    chk("single", cfg.single_port, 1);
    chk("rate", cfg.port_rate, 2);
    chk("headers", cfg.header_en, 3);
    chk("lead shift", cfg.lead_shift, 5);
    chk("tot shift", cfg.tot_shift, 12);
    chk("latency", cfg.latency, 16'h1234);
    chk("window", cfg.window, 16'h0678);
    chk("bx offset", cfg.bx_offset, 12'h321);
    chk("ch enable", cfg.ch_enable, 64'hA0FF_FFFF_FFFF_FF0F);
    // delay adjust bytes 348..669
    for (int i = 0; i < 322; i += 37) write(348 + i, 8'(i + 1));
    for (int i = 0; i < 322; i += 37) begin
      rdchk("delay read back", 348 + i, 8'(i + 1));
      chk("delay output", delay_adjust[8*i +: 8], {8'(i + 1)});
    end
    // spare configuration byte is stored
    write(347, 8'h5A);
    rdchk("spare byte", 347, 8'h5A);
    // status is read only
    rdchk("status 0", 670, 8'd3);
    rdchk("status 299", 969, 8'(299 * 7 + 3));
    write(700, 8'hFF);
    rdchk("status unchanged", 700, 8'(30 * 7 + 3));
    rdchk("unmapped", 2000, 0);
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
