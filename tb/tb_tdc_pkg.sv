// tb_tdc_pkg: checks the frame encoders of tdc_pkg against hand-computed words.
module tb_tdc_pkg;
  import tdc_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    // type 0 | ch 5 << 27 | rising << 26 | time
    chk("data", frame_data(4'd5, 1'b1, 26'h123456), 32'h2C123456);
    chk("data falling ch15", frame_data(4'd15, 1'b0, 26'h3FFFFFF), 32'h7BFFFFFF);
    // leading 16 / TOT 11: ch 3, lead 0x1234, tot 0x155
    chk("tot16", frame_tot(4'd3, 26'h1234, 26'h155, 1'b0, 4'd0, 5'd0),
        {1'b0, 4'd3, 16'h1234, 11'h155});
    // saturation of both fields
    chk("tot16 sat", frame_tot(4'd1, 26'h10000, 26'h800, 1'b0, 4'd0, 5'd0),
        {1'b0, 4'd1, 16'hFFFF, 11'h7FF});
    // shifts: lead >> 3, tot >> 4, 19/8 format
    chk("tot19 shift", frame_tot(4'd9, 26'h02BCDE8, 26'h00AB0, 1'b1, 4'd3, 5'd4),
        {1'b0, 4'd9, 19'h579BD, 8'hAB});
    chk("header1", frame_header1(12'hABC, 12'h123), 32'h8ABC0123);
    chk("header2", frame_header2(18'h2F00F), 32'h9002F00F);
    chk("trailer", frame_trailer(12'h00F, 4'h3, 12'h065), 32'hA00F3065);
    chk("group", frame_group(2'd2), 32'hB0000002);
    chk("idle", IDLE_FRAME, 32'hD0D0D0D0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
