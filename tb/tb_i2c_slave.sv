// tb_i2c_slave: a bit-banged I2C controller writes and reads a register
// model behind the target: multi-byte writes with auto-increment, reads with
// repeated start, acknowledge bits, and a transfer to another device address
// that must be ignored.
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic scl = 1, sda_m = 1, sda_oe, sda_in;
  logic [15:0] reg_addr;
  logic reg_wr;
  logic [7:0] reg_wdata, reg_rdata;
  logic [7:0] regs [1024];
  int checks = 0, failures = 0, nwr = 0;
  localparam int HALF = 20;   // SCL half period in clock cycles

  assign sda_in = sda_m && !sda_oe;   // open drain bus
  assign reg_rdata = regs[reg_addr[9:0]];

  i2c_slave #(.DEV_ADDR(7'h2A)) dut (.clk, .rst_n, .scl, .sda_in, .sda_oe,
    .reg_addr, .reg_wr, .reg_wdata, .reg_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) if (reg_wr) begin
    regs[reg_addr[9:0]] <= reg_wdata;
    nwr++;
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic wait_half();
    repeat (HALF) @(negedge clk);
  endtask
  task automatic i2c_start();
    sda_m = 1; wait_half(); scl = 1; wait_half(); sda_m = 0; wait_half(); scl = 0; wait_half();
  endtask
  task automatic i2c_stop();
    sda_m = 0; wait_half(); scl = 1; wait_half(); sda_m = 1; wait_half();
  endtask
  task automatic i2c_bit_out(bit b);
    sda_m = b; wait_half(); scl = 1; wait_half(); scl = 0;
  endtask
  task automatic i2c_bit_in(output bit b);
    sda_m = 1; wait_half(); scl = 1; wait_half(); b = sda_in; scl = 0;
  endtask
  task automatic i2c_byte_out(logic [7:0] v, output bit ack);
    bit a;
    for (int i = 7; i >= 0; i--) i2c_bit_out(v[i]);
    i2c_bit_in(a);
    ack = !a;
  endtask
  task automatic i2c_byte_in(output logic [7:0] v, input bit last);
    bit b;
    for (int i = 7; i >= 0; i--) begin i2c_bit_in(b); v[i] = b; end
    i2c_bit_out(last);   // ack (0) or nack (1)
  endtask

  task automatic reg_write(logic [6:0] dev, logic [15:0] a, logic [7:0] d [], output bit ok);
    bit ack;
    ok = 1;
    i2c_start();
    i2c_byte_out({dev, 1'b0}, ack); ok &= ack;
    if (ack) begin
      i2c_byte_out(a[15:8], ack); ok &= ack;
      i2c_byte_out(a[7:0], ack);  ok &= ack;
      foreach (d[i]) begin i2c_byte_out(d[i], ack); ok &= ack; end
    end
    i2c_stop();
  endtask

  task automatic reg_read(logic [15:0] a, int n, output logic [7:0] q []);
    bit ack;
    q = new[n];
    i2c_start();
    i2c_byte_out({7'h2A, 1'b0}, ack); chk("ack addr w", ack, 1);
    i2c_byte_out(a[15:8], ack);       chk("ack reg hi", ack, 1);
    i2c_byte_out(a[7:0], ack);        chk("ack reg lo", ack, 1);
    sda_m = 1; scl = 0;
    i2c_start();                      // repeated start
    i2c_byte_out({7'h2A, 1'b1}, ack); chk("ack addr r", ack, 1);
    for (int i = 0; i < n; i++) i2c_byte_in(q[i], i == n - 1);
    i2c_stop();
  endtask

  initial begin
    logic [7:0] d [], q [];
    bit ok;
    foreach (regs[i]) regs[i] = 8'(i ^ 8'h5A);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    d = new[5];
    foreach (d[i]) d[i] = 8'($urandom);
    reg_write(7'h2A, 16'h0123, d, ok);
    chk("write acked", ok, 1);
    foreach (d[i]) chk("written", regs[16'h0123 + i], d[i]);
    chk("write count", nwr, 5);
    reg_read(16'h0122, 7, q);
    chk("read before", q[0], 8'(16'h0122 ^ 8'h5A));
    foreach (d[i]) chk("read back", q[i + 1], d[i]);
    chk("read after", q[6], 8'(16'h0128 ^ 8'h5A));
    // another device address: no acknowledge, nothing written
    d = new[1];
    d[0] = 8'hEE;
    reg_write(7'h2B, 16'h0010, d, ok);
    chk("other address not acked", ok, 0);
    chk("nothing written", regs[16'h0010], 8'(16'h0010 ^ 8'h5A));
    chk("write count unchanged", nwr, 5);
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
