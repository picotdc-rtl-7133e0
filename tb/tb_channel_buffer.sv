// tb_channel_buffer: random writes, head pops and offset reads against a
// queue model; checks occupancy, the data at every offset read, and drops
// when full.
module tb_channel_buffer;
  import tdc_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic wr = 0, pop = 0;
  hit_t wr_data = '0, rd_data;
  logic [$clog2(D):0] rd_off = '0, count;
  logic lost;
  int checks = 0, failures = 0;

  channel_buffer #(.DEPTH(D)) dut (.*);

  always #50 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  hit_t model [$];
  bit lost_due = 0;
  int nlost = 0, nfull = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit p;
      @(negedge clk);
      chk("count", count, model.size());
      chk("lost", lost, lost_due);
      if (model.size() == D) nfull++;
      for (int o = 0; o < model.size(); o += 1 + o / 3) begin
        rd_off = ($clog2(D)+1)'(o);
        #1 chk("rd_data", rd_data, model[o]);
      end
      // phases of filling and draining
      wr  = ($urandom % 100) < (((cyc / 500) % 2) ? 30 : 80);
      pop = ($urandom % 100) < (((cyc / 500) % 2) ? 70 : 30);
      wr_data = hit_t'({$urandom, $urandom});
      p = pop && model.size() > 0;
      lost_due = 0;
      if (wr && (model.size() < D || p)) begin
        if (p) void'(model.pop_front());
        model.push_back(wr_data);
      end else begin
        if (wr) begin lost_due = 1; nlost++; end
        if (p) void'(model.pop_front());
      end
    end
    chk("full reached", nfull > 0, 1);
    chk("drops seen", nlost > 0, 1);
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
