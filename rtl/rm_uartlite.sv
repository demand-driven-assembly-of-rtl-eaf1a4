// rm_uartlite: UART module that can be loaded into a PR region.
//
// A fixed-rate 8N1 UART (8 data bits, no parity, 1 stop bit, LSB first)
// with 16-word transmit and receive FIFOs. It sits behind the region template:
// AXI4-Lite slave, eight tristate pins, one interrupt. Pin 0 is TX (driven),
// pin 1 is RX (input); the other pins are released.
// The baud rate is a build-time parameter, as in the reference system, where
// changing it means building a new module: one bit lasts
// CLKS_PER_BIT = CLK_HZ / BAUD clock cycles.
// Registers (byte offsets):
//   0x0 RX FIFO  read: oldest received byte (0 if empty); the read pops it
//   0x4 TX FIFO  write: byte to send (ignored when full)
//   0x8 STAT     0 rx valid, 1 rx full, 2 tx empty, 3 tx full,
//                4 interrupt enabled, 5 overrun, 6 frame error (read clears 5, 6)
//   0xC CTRL     write: 0 reset TX FIFO, 1 reset RX FIFO, 4 interrupt enable
// Interrupt: a flag set when a byte enters the RX FIFO or when the TX FIFO
// drains to empty, cleared by reading STAT; irq = flag & enable.
// Receiver: two-flop synchroniser, a start bit is confirmed at its middle,
// then each bit is sampled CLKS_PER_BIT later; a stop bit of 0 is a frame
// error (the byte is dropped). The register layout follows the usual vendor
// "UART Lite" core from general knowledge. The pin assignment, the interrupt
// flag that is cleared by a STAT read and the 100 MHz / 9600 baud defaults
// are this design's choices.
module rm_uartlite
  import pr_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 9600,
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

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [AXIL_DW/8-1:0] wr_strb;

  axil_reg_port u_port (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err(1'b0)
  );

  // ---------------- FIFOs
  logic       tx_push, tx_pop, tx_empty, tx_full, tx_clr;
  logic       rx_push, rx_pop, rx_empty, rx_full, rx_clr;
  logic [7:0] tx_dout, rx_dout, rx_byte;
  logic [FCW-1:0] tx_cnt, rx_cnt;

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .clear(tx_clr), .push(tx_push), .din(wr_data[7:0]),
    .pop(tx_pop), .dout(tx_dout), .empty(tx_empty), .full(tx_full), .count(tx_cnt));
  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .clear(rx_clr), .push(rx_push), .din(rx_byte),
    .pop(rx_pop), .dout(rx_dout), .empty(rx_empty), .full(rx_full), .count(rx_cnt));

  assign tx_push = wr_en && wr_addr[3:0] == 4'h4 && wr_strb[0];
  assign tx_clr  = wr_en && wr_addr[3:0] == 4'hC && wr_data[0];
  assign rx_clr  = wr_en && wr_addr[3:0] == 4'hC && wr_data[1];
  assign rx_pop  = rd_en && rd_addr[3:0] == 4'h0;

  // ---------------- transmitter
  typedef enum logic [1:0] {TX_IDLE, TX_SHIFT} tx_state_e;
  tx_state_e     tx_st_q;
  logic [9:0]    tx_sh_q;      // {stop, data, start}, sent LSB first
  logic [3:0]    tx_bits_q;
  logic [CW-1:0] tx_cnt_q;
  logic          tx_line;

  assign tx_pop  = (tx_st_q == TX_IDLE) && !tx_empty;
  assign tx_line = (tx_st_q == TX_IDLE) ? 1'b1 : tx_sh_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_st_q   <= TX_IDLE;
      tx_sh_q   <= '1;
      tx_bits_q <= '0;
      tx_cnt_q  <= '0;
    end else begin
      unique case (tx_st_q)
        TX_IDLE: if (tx_pop) begin
          tx_sh_q   <= {1'b1, tx_dout, 1'b0};
          tx_bits_q <= 4'd10;
          tx_cnt_q  <= CW'(CLKS_PER_BIT - 1);
          tx_st_q   <= TX_SHIFT;
        end
        TX_SHIFT: begin
          if (tx_cnt_q != 0) begin
            tx_cnt_q <= tx_cnt_q - 1'b1;
          end else begin
            tx_sh_q   <= {1'b1, tx_sh_q[9:1]};
            tx_bits_q <= tx_bits_q - 1'b1;
            tx_cnt_q  <= CW'(CLKS_PER_BIT - 1);
            if (tx_bits_q == 4'd1) tx_st_q <= TX_IDLE;
          end
        end
        default: tx_st_q <= TX_IDLE;
      endcase
    end
  end

  // ---------------- receiver
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e     rx_st_q;
  logic [1:0]    rx_sync_q;
  logic          rx_line;
  logic [CW-1:0] rx_cnt_q;
  logic [2:0]    rx_bit_q;
  logic [7:0]    rx_sh_q;
  logic          overrun_q, frame_q, rx_done;

  assign rx_line = rx_sync_q[1];
  assign rx_done = (rx_st_q == RX_STOP) && (rx_cnt_q == 0);
  assign rx_push = rx_done && rx_line && !rx_full;
  assign rx_byte = rx_sh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync_q <= '1;
      rx_st_q   <= RX_IDLE;
      rx_cnt_q  <= '0;
      rx_bit_q  <= '0;
      rx_sh_q   <= '0;
    end else begin
      rx_sync_q <= {rx_sync_q[0], gpio_i[1]};
      unique case (rx_st_q)
        RX_IDLE: if (!rx_line) begin
          rx_cnt_q <= CW'(CLKS_PER_BIT / 2 - 1);
          rx_st_q  <= RX_START;
        end
        RX_START: begin
          if (rx_cnt_q != 0) rx_cnt_q <= rx_cnt_q - 1'b1;
          else if (rx_line)  rx_st_q  <= RX_IDLE;     // glitch, not a start bit
          else begin
            rx_cnt_q <= CW'(CLKS_PER_BIT - 1);
            rx_bit_q <= '0;
            rx_st_q  <= RX_DATA;
          end
        end
        RX_DATA: begin
          if (rx_cnt_q != 0) rx_cnt_q <= rx_cnt_q - 1'b1;
          else begin
            rx_sh_q  <= {rx_line, rx_sh_q[7:1]};
            rx_cnt_q <= CW'(CLKS_PER_BIT - 1);
            rx_bit_q <= rx_bit_q + 1'b1;
            if (rx_bit_q == 3'd7) rx_st_q <= RX_STOP;
          end
        end
        RX_STOP: begin
          if (rx_cnt_q != 0) rx_cnt_q <= rx_cnt_q - 1'b1;
          else rx_st_q <= RX_IDLE;
        end
        default: rx_st_q <= RX_IDLE;
      endcase
    end
  end

  // ---------------- status, control, interrupt
  logic ie_q, flag_q, tx_busy_q, stat_rd;

  assign stat_rd = rd_en && rd_addr[3:0] == 4'h8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie_q      <= 1'b0;
      flag_q    <= 1'b0;
      overrun_q <= 1'b0;
      frame_q   <= 1'b0;
      tx_busy_q <= 1'b0;
    end else begin
      tx_busy_q <= !tx_empty;
      if (stat_rd) begin
        flag_q    <= 1'b0;
        overrun_q <= 1'b0;
        frame_q   <= 1'b0;
      end
      if (rx_push || (tx_busy_q && tx_empty)) flag_q <= 1'b1;
      if (rx_done && rx_line && rx_full) overrun_q <= 1'b1;
      if (rx_done && !rx_line) frame_q <= 1'b1;
      if (wr_en && wr_addr[3:0] == 4'hC) ie_q <= wr_data[4];
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr[3:0])
      4'h0: rd_data[7:0] = rx_empty ? 8'h00 : rx_dout;
      4'h8: rd_data[6:0] = {frame_q, overrun_q, ie_q, tx_full, tx_empty, rx_full, !rx_empty};
      default: ;
    endcase
  end

  assign gpio_o = {7'b0, tx_line};
  assign gpio_t = 8'b1111_1110;
  assign irq    = ie_q && flag_q;

endmodule
