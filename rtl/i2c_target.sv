// i2c_target: I2C target (slave) on the IO bus, through which an external
// I2C controller exchanges bytes with the scalar core (loading a program,
// reading what the program prints).
//
// SCL and SDA are sampled with the system clock through two-flop
// synchronisers, so the system clock must run several times faster than SCL.
// START and STOP are detected as SDA edges while SCL is high. After a START
// the target shifts in the address byte on SCL rising edges; if the 7-bit
// address equals ADDR it acknowledges by pulling SDA low for the ninth clock.
// In a write transfer every following byte is pushed into a 4-entry receive
// FIFO and acknowledged (not acknowledged when the FIFO is full). In a read
// transfer the target sends the byte held in its transmit register, MSB
// first, changing SDA after SCL falls, and repeats it while the controller
// acknowledges. SDA is open drain: sda_oe high pulls the line low.
//
// Registers, word addressed by addr[3:2]:
//   0x0 RXDATA  read: bit 8 = byte valid, [7:0] = oldest received byte (popped)
//   0x4 TXDATA  read/write [7:0]: byte returned to I2C reads
//   0x8 STATUS  read: bit 0 RX not empty, bit 1 RX full, [4:2] RX count
// Accesses answer in the next cycle. The reference design only names an I2C
// interface on the IO bus used by an external controller; the target role,
// the address, the FIFO and the register map are this design's.
module i2c_target
  import manic_pkg::*;
#(
  parameter logic [6:0] ADDR = 7'h42
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata,
  input  logic        scl_in,
  input  logic        sda_in,
  output logic        sda_oe
);

  typedef enum logic [2:0] {
    I_IDLE, I_ADDR, I_ACK_ADDR, I_RX, I_ACK_RX, I_TX, I_TX_ACK
  } istate_e;

  // ------------------------------------------------------------ line sampling
  logic [2:0] scl_s, sda_s;
  logic scl_rise, scl_fall, start_c, stop_c, sda_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 3'b111;
      sda_s <= 3'b111;
    end else begin
      scl_s <= {scl_s[1:0], scl_in};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end

  assign scl_rise = scl_s[2:1] == 2'b01;
  assign scl_fall = scl_s[2:1] == 2'b10;
  assign start_c  = scl_s[2] && scl_s[1] && sda_s[2:1] == 2'b10;
  assign stop_c   = scl_s[2] && scl_s[1] && sda_s[2:1] == 2'b01;
  assign sda_v    = sda_s[1];

  // ------------------------------------------------------------ receive FIFO
  logic [7:0] fifo_q [4];
  logic [1:0] wp_q, rp_q;
  logic [2:0] cnt_q;
  logic       push, pop;
  logic [7:0] tx_q;

  // ------------------------------------------------------------ protocol FSM
  istate_e    st_q;
  logic [7:0] sh_q;
  logic [3:0] bit_q;
  logic       rw_q, nack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= I_IDLE;
      sh_q   <= '0;
      bit_q  <= '0;
      rw_q   <= 1'b0;
      nack_q <= 1'b0;
      sda_oe <= 1'b0;
    end else if (start_c) begin
      st_q   <= I_ADDR;
      bit_q  <= '0;
      sda_oe <= 1'b0;
    end else if (stop_c) begin
      st_q   <= I_IDLE;
      sda_oe <= 1'b0;
    end else begin
      unique case (st_q)
        I_ADDR, I_RX: begin
          if (scl_rise && bit_q < 4'd8) begin
            sh_q  <= {sh_q[6:0], sda_v};
            bit_q <= bit_q + 1'b1;
          end
          if (scl_fall && bit_q == 4'd8) begin
            if (st_q == I_ADDR) begin
              if (sh_q[7:1] == ADDR) begin
                rw_q   <= sh_q[0];
                sda_oe <= 1'b1;
                st_q   <= I_ACK_ADDR;
              end else begin
                st_q <= I_IDLE;
              end
            end else begin
              sda_oe <= (cnt_q != 3'd4);
              st_q   <= I_ACK_RX;
            end
          end
        end
        I_ACK_ADDR, I_ACK_RX: begin
          if (scl_fall) begin
            bit_q <= '0;
            if (st_q == I_ACK_ADDR && rw_q) begin
              sh_q   <= tx_q;
              sda_oe <= !tx_q[7];
              st_q   <= I_TX;
            end else begin
              sda_oe <= 1'b0;
              st_q   <= I_RX;
            end
          end
        end
        I_TX: begin
          if (scl_fall) begin
            if (bit_q == 4'd7) begin
              sda_oe <= 1'b0;
              st_q   <= I_TX_ACK;
            end else begin
              sh_q   <= {sh_q[6:0], 1'b0};
              sda_oe <= !sh_q[6];
            end
            bit_q <= bit_q + 1'b1;
          end
        end
        I_TX_ACK: begin
          if (scl_rise) nack_q <= sda_v;
          if (scl_fall) begin
            bit_q <= '0;
            if (nack_q) begin
              st_q <= I_IDLE;
            end else begin
              sh_q   <= tx_q;
              sda_oe <= !tx_q[7];
              st_q   <= I_TX;
            end
          end
        end
        default: st_q <= I_IDLE;
      endcase
    end
  end

  assign push = !start_c && !stop_c && st_q == I_RX && scl_fall && bit_q == 4'd8 && cnt_q != 3'd4;

  // ------------------------------------------------------------ bus registers
  logic [1:0] reg_sel;
  assign reg_sel   = req.addr[3:2];
  assign req_ready = !rsp_valid;
  assign pop       = req_valid && req_ready && !req.we && reg_sel == 2'd0 && cnt_q != 3'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q      <= '0;
      rp_q      <= '0;
      cnt_q     <= '0;
      tx_q      <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      for (int i = 0; i < 4; i++) fifo_q[i] <= '0;
    end else begin
      if (push) begin
        fifo_q[wp_q] <= sh_q;
        wp_q         <= wp_q + 1'b1;
      end
      if (pop) rp_q <= rp_q + 1'b1;
      cnt_q <= cnt_q + 3'(push) - 3'(pop);

      rsp_valid <= req_valid && req_ready;
      if (req_valid && req_ready) begin
        rsp_rdata <= '0;
        if (req.we) begin
          if (reg_sel == 2'd1) tx_q <= req.wdata[7:0];
        end else begin
          unique case (reg_sel)
            2'd0:    rsp_rdata <= (cnt_q != 3'd0) ? {23'd0, 1'b1, fifo_q[rp_q]} : 32'd0;
            2'd1:    rsp_rdata <= {24'd0, tx_q};
            2'd2:    rsp_rdata <= {27'd0, cnt_q, cnt_q == 3'd4, cnt_q != 3'd0};
            default: rsp_rdata <= '0;
          endcase
        end
      end
    end
  end

endmodule
