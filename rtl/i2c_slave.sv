// i2c_slave: I2C target giving access to the chip's byte-wide registers.
//
// SCL and SDA are synchronised into the core clock and their edges detected,
// so any bus speed well below the clock works (the document specifies up to
// 1 Mbit/s against a 1.28 GHz clock). A transfer starts with the 7-bit device
// address DEV_ADDR. A write sends a 16-bit register address (high byte
// first) followed by any number of data bytes, written to consecutive
// addresses (`reg_wr` pulses with `reg_addr` and `reg_wdata`). A read
// returns bytes from the current address, also auto-incrementing, until the
// controller answers with a not-acknowledge; `reg_rdata` must show the byte
// at `reg_addr` combinationally. SDA is open drain: `sda_oe` high pulls the
// line low. The document only names the I2C interface and its speed: the
// device address, the 16-bit register address and auto-increment are this
// design's choices.
module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h2A
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  output logic [15:0] reg_addr,
  output logic        reg_wr,
  output logic [7:0]  reg_wdata,
  input  logic [7:0]  reg_rdata
);

  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_ACK_ADDR, I_WR, I_ACK_WR, I_RD, I_ACK_RD} istate_e;

  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c;
  istate_e    st;
  logic [3:0] bit_cnt;
  logic [7:0] shreg;
  logic       rw;
  logic [1:0] byte_no;
  logic       nack;

  assign scl_rise = scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] && scl_s[2];
  assign start_c  = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop_c   = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s     <= '1;
      sda_s     <= '1;
      st        <= I_IDLE;
      bit_cnt   <= '0;
      shreg     <= '0;
      rw        <= 1'b0;
      byte_no   <= '0;
      nack      <= 1'b0;
      sda_oe    <= 1'b0;
      reg_addr  <= '0;
      reg_wr    <= 1'b0;
      reg_wdata <= '0;
    end else begin
      scl_s  <= {scl_s[1:0], scl};
      sda_s  <= {sda_s[1:0], sda_in};
      reg_wr <= 1'b0;
      if (start_c) begin
        st      <= I_ADDR;
        bit_cnt <= '0;
        byte_no <= '0;
        sda_oe  <= 1'b0;
      end else if (stop_c) begin
        st     <= I_IDLE;
        sda_oe <= 1'b0;
      end else if (scl_rise) begin
        unique case (st)
          I_ADDR, I_WR: begin
            shreg   <= {shreg[6:0], sda_s[1]};
            bit_cnt <= bit_cnt + 1'b1;
          end
          I_ACK_RD: nack <= sda_s[1];
          default: ;
        endcase
      end else if (scl_fall) begin
        unique case (st)
          I_ADDR: if (bit_cnt == 4'd8) begin
            if (shreg[7:1] == DEV_ADDR) begin
              st     <= I_ACK_ADDR;
              rw     <= shreg[0];
              sda_oe <= 1'b1;
            end else begin
              st <= I_IDLE;
            end
          end
          I_ACK_ADDR: begin
            bit_cnt <= '0;
            if (rw) begin
              st       <= I_RD;
              shreg    <= {reg_rdata[6:0], 1'b0};
              sda_oe   <= !reg_rdata[7];
              reg_addr <= reg_addr + 1'b1;
            end else begin
              st     <= I_WR;
              sda_oe <= 1'b0;
            end
          end
          I_WR: if (bit_cnt == 4'd8) begin
            st     <= I_ACK_WR;
            sda_oe <= 1'b1;
            unique case (byte_no)
              2'd0: reg_addr[15:8] <= shreg;
              2'd1: reg_addr[7:0]  <= shreg;
              default: begin
                reg_wr    <= 1'b1;
                reg_wdata <= shreg;
              end
            endcase
            if (byte_no != 2'd2) byte_no <= byte_no + 1'b1;
          end
          I_ACK_WR: begin
            st      <= I_WR;
            sda_oe  <= 1'b0;
            bit_cnt <= '0;
          end
          I_RD: begin
            if (bit_cnt == 4'd7) begin
              st     <= I_ACK_RD;
              sda_oe <= 1'b0;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
              sda_oe  <= !shreg[7];
              shreg   <= {shreg[6:0], 1'b0};
            end
          end
          I_ACK_RD: begin
            if (nack) begin
              st     <= I_IDLE;
              sda_oe <= 1'b0;
            end else begin
              st       <= I_RD;
              bit_cnt  <= '0;
              shreg    <= {reg_rdata[6:0], 1'b0};
              sda_oe   <= !reg_rdata[7];
              reg_addr <= reg_addr + 1'b1;
            end
          end
          default: ;
        endcase
      end
      // auto-increment after each written data byte
      if (reg_wr) reg_addr <= reg_addr + 1'b1;
    end
  end

endmodule
