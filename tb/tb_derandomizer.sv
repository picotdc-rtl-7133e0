// tb_derandomizer: bursts of writes at the fast clock, pops at one in four
// cycles; checks order, data, occupancy limit (4) and the lost pulses.
module tb_derandomizer;
  localparam int W = 27;
  logic clk = 0, rst_n = 0;
  logic wr = 0, pop = 0;
  logic [W-1:0] wr_data = '0;
  logic rd_valid, lost;
  logic [W-1:0] rd_data;
  int checks = 0, failures = 0;

  derandomizer #(.DEPTH(4), .W(W)) dut (.*);

  always #1 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  logic [W-1:0] model [$];
  int nlost = 0, exp_lost = 0, npop = 0;
  bit lost_due = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      chk("lost", lost, lost_due);
      chk("valid", rd_valid, model.size() > 0);
      if (model.size() > 0) chk("data", rd_data, model[0]);
      // writes come in bursts of up to 6 back-to-back hits
      wr = ((cyc % 40) < 6) && ($urandom % 4 != 0) || ((cyc % 40) >= 6 && $urandom % 9 == 0);
      wr_data = W'($urandom);
      pop = (cyc % 4 == 3);
      // model
      lost_due = 0;
      begin
        bit p;
        p = pop && model.size() > 0;
        if (wr && (model.size() < 4 || p)) begin
          if (p) void'(model.pop_front());
          model.push_back(wr_data);
        end else begin
          if (wr) begin lost_due = 1; exp_lost++; end
          if (p) void'(model.pop_front());
        end
        if (p) npop++;
      end
    end
    @(negedge clk);
    chk("lost", lost, lost_due);
    chk("overflow exercised", exp_lost > 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
