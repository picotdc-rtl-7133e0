// tb_readout_port: writes frames into the readout FIFO, deserializes the
// byte stream and checks frame order, idle frames while empty, the byte
// spacing for every rate setting, and the full flag.
module tb_readout_port;
  import tdc_pkg::*;
  localparam int D = 32;
  logic clk = 0, rst_n = 0;
  logic [1:0] rate = 0;
  logic wr = 0, full, strobe, frame_start;
  logic [31:0] wr_data = '0;
  logic [7:0] data;
  logic [$clog2(D):0] level;
  int checks = 0, failures = 0;

  readout_port #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  logic [31:0] sent [$];
  logic [31:0] word;
  int nbytes = 0, nidle = 0, nwords = 0, last_strobe = -1, cyc = 0, nfull = 0;
  bit skip_gap = 1;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (full) nfull++;
    if (strobe) begin
      if (!skip_gap) chk("byte spacing", cyc - last_strobe, 4 << rate);
      skip_gap = 0;
      last_strobe = cyc;
      if (frame_start) begin
        chk("frame alignment", nbytes % 4, 0);
        nbytes = 0;
      end
      word = {word[23:0], data};
      nbytes++;
      if (nbytes == 4) begin
        if (word == IDLE_FRAME) nidle++;
        else begin
          nwords++;
          chk("frame expected", sent.size() > 0, 1);
          if (sent.size() > 0) chk("frame", word, sent.pop_front());
        end
      end
    end
  end

  task automatic put(logic [31:0] w);
    @(negedge clk);
    while (full) @(negedge clk);
    wr = 1;
    wr_data = w;
    sent.push_back(w);
    @(negedge clk);
    wr = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      rate = 2'(r);
      skip_gap = 1;
      for (int i = 0; i < 20; i++) put({4'(i % 8), 28'($urandom)});
      repeat (20 * 4 * (4 << r) + 200) @(negedge clk);
      chk("all frames out", sent.size(), 0);
    end
    // fill up at the slowest rate
    rate = 3;
    skip_gap = 1;
    for (int i = 0; i < D + 5; i++) put(32'h1000_0000 + i);
    chk("full seen", nfull > 0, 1);
    repeat ((D + 8) * 4 * 32) @(negedge clk);
    chk("all frames out after full", sent.size(), 0);
    chk("idle frames sent", nidle > 5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
