// i2c_slave: I2C target that gives byte access to the configuration
// registers.
//
// SCL and SDA are oversampled with the system clock (two-flop
// synchronizers; the clock must be at least ~20x the SCL rate). SDA is
// open-drain: sda_oe high pulls the line low.
// Protocol (7-bit target address ADDR):
//   write:  S ADDR+W A  REG_HI A  REG_LO A  DATA0 A  DATA1 A ... P
//           the first two bytes set the 16-bit register pointer, every
//           further byte is written to the pointer, which then increments;
//   read:   S ADDR+R A  DATA0 M  DATA1 M ... DATAn N P
//           bytes come from the pointer, which increments after each
//           (set it first with a write holding only REG_HI, REG_LO).
// A write reaches the register bus as a one-cycle reg_wr pulse with
// reg_waddr / reg_wdata; a read byte is taken from reg_rdata (addressed by
// reg_raddr) on the SCL falling edge that starts it.
// The I2C interface is the source design's; the target address, pointer
// width and auto-increment are this model's choices.
module i2c_slave #(
  parameter logic [6:0] ADDR = 7'h2A
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  output logic [15:0] reg_raddr,
  input  logic [7:0]  reg_rdata,
  output logic        reg_wr,
  output logic [15:0] reg_waddr,
  output logic [7:0]  reg_wdata
);
  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_ADDR_ACK, I_WR, I_WR_ACK, I_RD, I_RD_ACK} state_t;

  logic [2:0]  scl_s, sda_s;
  logic        scl_r, scl_f, start_c, stop_c, sda_v;
  state_t      state;
  logic [7:0]  shreg, txbyte;
  logic [3:0]  bitcnt;
  logic [1:0]  byte_idx;
  logic        rw;
  logic [15:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end

  assign scl_r   = scl_s[1] && !scl_s[2];
  assign scl_f   = !scl_s[1] && scl_s[2];
  assign sda_v   = sda_s[1];
  assign start_c = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop_c  = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];
  assign reg_raddr = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= I_IDLE;
      shreg     <= '0;
      txbyte    <= '0;
      bitcnt    <= '0;
      byte_idx  <= '0;
      rw        <= 1'b0;
      ptr       <= '0;
      sda_oe    <= 1'b0;
      reg_wr    <= 1'b0;
      reg_waddr <= '0;
      reg_wdata <= '0;
    end else begin
      reg_wr <= 1'b0;
      if (start_c) begin
        state    <= I_ADDR;
        bitcnt   <= '0;
        byte_idx <= '0;
        sda_oe   <= 1'b0;
      end else if (stop_c) begin
        state  <= I_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          I_IDLE: ;
          I_ADDR, I_WR: begin
            if (scl_r) begin
              shreg  <= {shreg[6:0], sda_v};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_f && bitcnt == 4'd8) begin
              if (state == I_ADDR) begin
                if (shreg[7:1] == ADDR) begin
                  sda_oe <= 1'b1;
                  rw     <= shreg[0];
                  state  <= I_ADDR_ACK;
                end else begin
                  state <= I_IDLE;
                end
              end else begin
                sda_oe <= 1'b1;
                state  <= I_WR_ACK;
                unique case (byte_idx)
                  2'd0: ptr[15:8] <= shreg;
                  2'd1: ptr[7:0]  <= shreg;
                  default: begin
                    reg_wr    <= 1'b1;
                    reg_waddr <= ptr;
                    reg_wdata <= shreg;
                    ptr       <= ptr + 1'b1;
                  end
                endcase
                if (byte_idx != 2'd2) byte_idx <= byte_idx + 1'b1;
              end
            end
          end
          I_ADDR_ACK: if (scl_f) begin
            if (rw) begin
              txbyte <= reg_rdata;
              sda_oe <= !reg_rdata[7];
              bitcnt <= 4'd1;
              state  <= I_RD;
            end else begin
              sda_oe <= 1'b0;
              bitcnt <= '0;
              state  <= I_WR;
            end
          end
          I_WR_ACK: if (scl_f) begin
            sda_oe <= 1'b0;
            bitcnt <= '0;
            state  <= I_WR;
          end
          I_RD: if (scl_f) begin
            if (bitcnt == 4'd8) begin
              sda_oe <= 1'b0;
              ptr    <= ptr + 1'b1;
              state  <= I_RD_ACK;
            end else begin
              sda_oe <= !txbyte[3'(7 - bitcnt)];
              bitcnt <= bitcnt + 1'b1;
            end
          end
          I_RD_ACK: begin
            if (scl_r && sda_v) begin
              state <= I_IDLE;      // NACK: controller ends the read
            end else if (scl_f) begin
              txbyte <= reg_rdata;
              sda_oe <= !reg_rdata[7];
              bitcnt <= 4'd1;
              state  <= I_RD;
            end
          end
          default: state <= I_IDLE;
        endcase
      end
    end
  end
endmodule
