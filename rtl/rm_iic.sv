// rm_iic: I2C (IIC) master module that can be loaded into a PR region.
//
// A single-master I2C controller driven by a command FIFO. Software writes
// commands to the TX FIFO; each one moves one byte on the bus and may start
// with a START (or repeated START) and end with a STOP. Read commands clock
// a byte in and push it into the RX FIFO; the master answers ACK unless the
// command also asks for a STOP, in which case it answers NACK. Pins are
// open drain: pin 0 = SCL, pin 1 = SDA; the module only ever pulls a pin low
// (gpio_o = 0, gpio_t = 0 to pull, 1 to release). Both pins are read back
// through two-flop synchronisers; a slave holding SCL low (clock stretching)
// pauses the master.
// Registers (byte offsets):
//   0x1C GIE    bit 31 global interrupt enable
//   0x20 ISR    bit 1 NACK received, bit 2 command queue drained; write 1 to clear
//   0x28 IER    same bits, enables
//   0x40 SOFTR  write 0x0000000A: reset the module
//   0x100 CR    bit 0 enable, bit 1 reset TX FIFO (self-clearing)
//   0x104 SR    bit 2 bus busy, 4 TX full, 5 RX full, 6 RX empty, 7 TX empty
//   0x108 TX    command: [7:0] byte to send, [8] START first, [9] STOP after,
//               [10] read a byte instead of sending one
//   0x10C RX    oldest received byte (read pops; 0 if empty)
// Timing: each SCL period is four phases of SCL_Q cycles (low, high, high,
// low); SDA changes only while SCL is low and is sampled at the middle of
// the high time. After a byte without STOP the master holds SCL low until
// the next command. A NACK to a sent byte sets ISR bit 1, empties the TX
// FIFO and ends the transfer with a STOP. The drive outputs are registered.
// The document names the controller only. The register offsets follow the
// usual vendor AXI IIC core from general knowledge; the command format, the
// reduced register set and the NACK handling are this design's choices.
module rm_iic
  import pr_pkg::*;
#(
  parameter int unsigned SCL_Q      = 250,  // cycles per quarter SCL period (100 kHz at 100 MHz)
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_req,
  output axil_rsp_t  s_rsp,
  input  logic [7:0] gpio_i,
  output logic [7:0] gpio_o,
  output logic [7:0] gpio_t,
  output logic       irq
);

  localparam int unsigned TW  = $clog2(SCL_Q + 1);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  logic                 wr_en, rd_en;
  logic [AXIL_AW-1:0]   wr_addr, rd_addr;
  logic [AXIL_DW-1:0]   wr_data, rd_data;
  logic [AXIL_DW/8-1:0] wr_strb;

  axil_reg_port u_port (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err(1'b0)
  );

  logic soft_rst;
  assign soft_rst = wr_en && wr_addr[11:0] == 12'h040 && wr_data[3:0] == 4'hA;

  // ---------------- pin synchronisers
  logic [1:0] scl_sync_q, sda_sync_q;
  logic       scl_s, sda_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync_q <= 2'b11;
      sda_sync_q <= 2'b11;
    end else begin
      scl_sync_q <= {scl_sync_q[0], gpio_i[0]};
      sda_sync_q <= {sda_sync_q[0], gpio_i[1]};
    end
  end
  assign scl_s = scl_sync_q[1];
  assign sda_s = sda_sync_q[1];

  // ---------------- FIFOs
  typedef struct packed {
    logic       rd;
    logic       stop;
    logic       start;
    logic [7:0] data;
  } cmd_t;

  cmd_t       tx_dout;
  logic       tx_push, tx_pop, tx_empty, tx_full, tx_clr;
  logic       rx_push, rx_pop, rx_empty, rx_full;
  logic [7:0] rx_dout;
  logic [FCW-1:0] tx_cnt, rx_cnt;
  logic       nack_ev;

  sync_fifo #(.W(11), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .clear(tx_clr), .push(tx_push), .din(wr_data[10:0]),
    .pop(tx_pop), .dout(tx_dout), .empty(tx_empty), .full(tx_full), .count(tx_cnt));

  // ---------------- bus engine
  typedef enum logic [2:0] {E_IDLE, E_HOLD, E_START, E_BITS, E_STOP} eng_e;

  eng_e    st_q;
  logic [1:0] q_q;          // phase within the current step
  logic [TW-1:0] tmr_q;
  logic [3:0] bitn_q;       // 0..7 data bits, 8 = acknowledge bit
  logic [7:0] sh_q;
  cmd_t    cmd_q;
  logic    samp_q, ack_q, from_hold_q, en_q;
  logic    scl_lo, sda_lo, scl_lo_q, sda_lo_q;
  logic    need_high, tick, out_bit;

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .clear(soft_rst), .push(rx_push), .din(sh_q),
    .pop(rx_pop), .dout(rx_dout), .empty(rx_empty), .full(rx_full), .count(rx_cnt));

  // level the master wants on SDA during the current bit (1 = release)
  always_comb begin
    if (bitn_q < 4'd8) out_bit = cmd_q.rd ? 1'b1 : sh_q[7];
    else               out_bit = cmd_q.rd ? cmd_q.stop : 1'b1;
  end

  // pin drive for the current step and phase (1 = pull low)
  always_comb begin
    scl_lo = 1'b0;
    sda_lo = 1'b0;
    unique case (st_q)
      E_IDLE: ;
      E_HOLD: scl_lo = 1'b1;
      E_START: begin
        scl_lo = (q_q == 2'd0) ? from_hold_q : (q_q == 2'd3);
        sda_lo = (q_q >= 2'd2);
      end
      E_BITS: begin
        scl_lo = (q_q == 2'd0) || (q_q == 2'd3);
        sda_lo = !out_bit;
      end
      E_STOP: begin
        scl_lo = (q_q == 2'd0);
        sda_lo = (q_q != 2'd2);
      end
      default: ;
    endcase
  end

  // a phase with SCL released only counts once SCL is really high
  assign need_high = (st_q == E_START || st_q == E_BITS || st_q == E_STOP) && !scl_lo;
  assign tick      = (st_q != E_IDLE) && (st_q != E_HOLD) && (tmr_q == 0) && (!need_high || scl_s);
  assign tx_pop    = en_q && !tx_empty && (st_q == E_IDLE || st_q == E_HOLD);
  assign rx_push   = tick && st_q == E_BITS && q_q == 2'd3 && bitn_q == 4'd8 && cmd_q.rd;
  assign nack_ev   = tick && st_q == E_BITS && q_q == 2'd3 && bitn_q == 4'd8 && !cmd_q.rd && ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= E_IDLE;
      q_q         <= '0;
      tmr_q       <= '0;
      bitn_q      <= '0;
      sh_q        <= '0;
      cmd_q       <= '0;
      samp_q      <= 1'b1;
      ack_q       <= 1'b1;
      from_hold_q <= 1'b0;
      scl_lo_q    <= 1'b0;
      sda_lo_q    <= 1'b0;
    end else if (soft_rst) begin
      st_q        <= E_IDLE;
      q_q         <= '0;
      scl_lo_q    <= 1'b0;
      sda_lo_q    <= 1'b0;
    end else begin
      scl_lo_q <= scl_lo;
      sda_lo_q <= sda_lo;
      if (tx_pop) begin
        cmd_q  <= tx_dout;
        sh_q   <= tx_dout.data;
        q_q    <= '0;
        bitn_q <= '0;
        tmr_q  <= TW'(SCL_Q - 1);
        from_hold_q <= (st_q == E_HOLD);
        st_q   <= (tx_dout.start || st_q == E_IDLE) ? E_START : E_BITS;
      end else if (st_q != E_IDLE && st_q != E_HOLD) begin
        if (tmr_q != 0) begin
          if (!need_high || scl_s) tmr_q <= tmr_q - 1'b1;
        end else if (tick) begin
          tmr_q <= TW'(SCL_Q - 1);
          q_q   <= q_q + 1'b1;
          unique case (st_q)
            E_START: if (q_q == 2'd3) st_q <= E_BITS;
            E_BITS: begin
              if (q_q == 2'd1) begin
                if (bitn_q == 4'd8) ack_q <= sda_s;
                else                samp_q <= sda_s;
              end
              if (q_q == 2'd3) begin
                if (bitn_q < 4'd8) begin
                  sh_q   <= {sh_q[6:0], samp_q};
                  bitn_q <= bitn_q + 1'b1;
                end else if (nack_ev || cmd_q.stop) begin
                  st_q <= E_STOP;
                end else begin
                  st_q <= E_HOLD;
                end
              end
            end
            E_STOP: if (q_q == 2'd2) begin
              st_q <= E_IDLE;
              q_q  <= '0;
            end
            default: ;
          endcase
        end
      end
    end
  end

  // ---------------- registers
  logic       gie_q;
  logic [2:1] isr_q, ier_q;
  logic       drained, drained_q;

  assign tx_push = wr_en && wr_addr[11:0] == 12'h108 && !tx_full;
  assign tx_clr  = soft_rst || nack_ev || (wr_en && wr_addr[11:0] == 12'h100 && wr_data[1]);
  assign rx_pop  = rd_en && rd_addr[11:0] == 12'h10C;
  assign drained = tx_empty && (st_q == E_IDLE || st_q == E_HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q      <= 1'b0;
      gie_q     <= 1'b0;
      isr_q     <= '0;
      ier_q     <= '0;
      drained_q <= 1'b1;
    end else if (soft_rst) begin
      en_q      <= 1'b0;
      gie_q     <= 1'b0;
      isr_q     <= '0;
      ier_q     <= '0;
      drained_q <= 1'b1;
    end else begin
      drained_q <= drained;
      if (wr_en) begin
        unique case (wr_addr[11:0])
          12'h01C: gie_q <= wr_data[31];
          12'h020: isr_q <= isr_q & ~wr_data[2:1];
          12'h028: ier_q <= wr_data[2:1];
          12'h100: en_q  <= wr_data[0];
          default: ;
        endcase
      end
      if (nack_ev)                isr_q[1] <= 1'b1;
      if (drained && !drained_q)  isr_q[2] <= 1'b1;
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr[11:0])
      12'h01C: rd_data[31]  = gie_q;
      12'h020: rd_data[2:1] = isr_q;
      12'h028: rd_data[2:1] = ier_q;
      12'h100: rd_data[0]   = en_q;
      12'h104: rd_data[7:0] = {tx_empty, rx_empty, rx_full, tx_full, 1'b0,
                               st_q != E_IDLE, 2'b00};
      12'h10C: rd_data[7:0] = rx_empty ? 8'h00 : rx_dout;
      default: ;
    endcase
  end

  assign gpio_o = 8'h00;
  assign gpio_t = {6'b11_1111, !sda_lo_q, !scl_lo_q};
  assign irq    = gie_q && |(isr_q & ier_q);

endmodule
