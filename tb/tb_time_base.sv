// tb_time_base: checks the medium/coarse counters, the 320/40 MHz enables,
// trigger sampling, event counting and the bunch counter wrap and reset.
module tb_time_base;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic trigger_in = 0, evt_rst_in = 0, bx_rst_in = 0;
  logic [BX_W-1:0] bx_max = 12'd9, bx_offset = 12'd5;
  logic [MED_W-1:0] med;
  logic [COARSE_W-1:0] coarse;
  cyc_t now, trig_time;
  logic ce320, ce40, trig;
  logic [EVID_W-1:0] trig_evid, evid;
  logic [BX_W-1:0] trig_bx, bx;
  int checks = 0, failures = 0;

  time_base dut (.*);

  always #1 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // reference model, counted independently from the fast clock edges
  longint cyc = 0;
  int ref_bx = 0, ref_evid = 0, ntrig = 0;
  int exp_trig_evid [$];
  longint exp_trig_time [$];
  int exp_trig_bx [$];
  always @(posedge clk) if (rst_n) begin
    chk("ce320", ce320, (cyc % 4) == 3);
    chk("ce40", ce40, (cyc % 32) == 31);
    chk("now", now, cyc % (1 << CYC_W));
    chk("bx", bx, ref_bx);
    chk("evid", evid, ref_evid);
    if (trig) begin
      chk("trig due", exp_trig_time.size() > 0, 1);
      if (exp_trig_time.size() > 0) begin
        chk("trig_time", trig_time, exp_trig_time.pop_front());
        chk("trig_evid", trig_evid, exp_trig_evid.pop_front());
        chk("trig_bx", trig_bx, exp_trig_bx.pop_front());
      end
      ntrig++;
    end
    if ((cyc % 32) == 31) begin
      if (trigger_in) begin
        exp_trig_time.push_back(cyc % (1 << CYC_W));
        exp_trig_evid.push_back(evt_rst_in ? 0 : ref_evid);
        exp_trig_bx.push_back(ref_bx);
      end
      if (bx_rst_in) ref_bx = bx_offset;
      else ref_bx = (ref_bx == bx_max) ? 0 : ref_bx + 1;
      if (evt_rst_in) ref_evid = trigger_in ? 1 : 0;
      else if (trigger_in) ref_evid++;
    end
    cyc++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // triggers in some 40 MHz periods, resets in others
    for (int p = 0; p < 200; p++) begin
      trigger_in = (p % 3 == 0);
      evt_rst_in = (p == 50) || (p == 99);
      bx_rst_in  = (p == 70);
      repeat (32) @(negedge clk);
    end
    trigger_in = 0;
    repeat (70) @(negedge clk);
    chk("all triggers seen", exp_trig_time.size(), 0);
    chk("trigger count", ntrig, 67);
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
