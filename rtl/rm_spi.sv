// rm_spi: SPI master module that can be loaded into a PR region.
//
// A standard (single-lane) SPI master with 8-bit transfers, 16-word transmit
// and receive FIFOs, all four clock modes (CPOL, CPHA), MSB- or LSB-first
// order, one slave select and an internal loopback. It sits behind the
// region template (AXI4-Lite slave, eight tristate pins, one interrupt).
// Pins: 0 = SS (active low), 1 = MOSI, 2 = MISO (input), 3 = SCK; the others
// are released. SCK runs at the clock divided by SCK_RATIO.
// Registers (byte offsets):
//   0x1C DGIER  bit 31 global interrupt enable
//   0x20 IPISR  bit 2 TX FIFO drained; write 1 to clear
//   0x28 IPIER  bit 2 enables that interrupt
//   0x40 SRR    write 0x0000000A: reset the module's registers and FIFOs
//   0x60 SPICR  0 loopback, 1 enable, 2 master, 3 CPOL, 4 CPHA, 5 reset TX
//               FIFO, 6 reset RX FIFO (both self-clearing), 7 manual slave
//               select, 8 master transaction inhibit, 9 LSB first
//   0x64 SPISR  0 rx empty, 1 rx full, 2 tx empty, 3 tx full
//   0x68 DTR    write: byte to send
//   0x6C DRR    read: oldest received byte (pops it; 0 if empty)
//   0x70 SSR    bit 0: slave select value used in manual mode (0 = selected)
// A transfer starts when the core is enabled as master, not inhibited, idle
// and the TX FIFO holds a byte. In automatic mode SS goes low for the
// transfer, one cycle past the last SCK edge, and stays low while bytes
// follow back to back. Timing: SCK has
// SCK_RATIO cycles per bit; with CPHA = 0 data is sampled on the leading SCK
// edge and changed on the trailing one, with CPHA = 1 the other way round;
// the received byte enters the RX FIFO one cycle after the last edge.
// The register layout follows the usual vendor Quad SPI core in its standard
// mode from general knowledge; the pin assignment, the write-1-to-clear
// interrupt status and the reduced register set are this design's choices.
module rm_spi
  import pr_pkg::*;
#(
  parameter int unsigned SCK_RATIO  = 16,   // clock cycles per SCK period, even, >= 2
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

  localparam int unsigned HALF = SCK_RATIO / 2;
  localparam int unsigned HW   = $clog2(HALF + 1);
  localparam int unsigned FCW  = $clog2(FIFO_DEPTH + 1);

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [AXIL_DW/8-1:0] wr_strb;

  axil_reg_port u_port (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err(1'b0)
  );

  typedef struct packed {
    logic lsb_first, inhibit, manual_ss, cpha, cpol, master, spe, loop;
  } spicr_t;

  spicr_t cr_q;
  logic   ssr_q, gie_q, ipisr_q, ipier_q;
  logic   soft_rst;

  assign soft_rst = wr_en && wr_addr[7:0] == 8'h40 && wr_data[3:0] == 4'hA;

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

  assign tx_push = wr_en && wr_addr[7:0] == 8'h68 && wr_strb[0];
  assign tx_clr  = soft_rst || (wr_en && wr_addr[7:0] == 8'h60 && wr_data[5]);
  assign rx_clr  = soft_rst || (wr_en && wr_addr[7:0] == 8'h60 && wr_data[6]);
  assign rx_pop  = rd_en && rd_addr[7:0] == 8'h6C;

  // ---------------- shift engine
  logic          busy_q, sck_q, mosi_q, miso;
  logic [7:0]    tx_sh_q, rx_sh_q;
  logic [4:0]    edge_q;        // SCK edges done in this byte, 0..16
  logic [HW-1:0] tmr_q;
  logic          start, edge_now, leading, last_edge;
  logic [2:0]    bit_sel;

  assign start     = !busy_q && cr_q.spe && cr_q.master && !cr_q.inhibit && !tx_empty;
  assign tx_pop    = start;
  assign edge_now  = busy_q && (tmr_q == 0);
  assign leading   = !edge_q[0];              // edges 1, 3, ... lead
  assign last_edge = edge_now && (edge_q == 5'd15);
  assign miso      = cr_q.loop ? mosi_q : gpio_i[2];
  // bit k of the frame (k = 0 first) in the chosen order
  function automatic logic pick(logic [7:0] b, logic [2:0] k, logic lsb);
    return lsb ? b[k] : b[3'd7 - k];
  endfunction
  assign bit_sel = edge_q[3:1];               // index of the bit in flight

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      sck_q   <= 1'b0;
      mosi_q  <= 1'b0;
      tx_sh_q <= '0;
      rx_sh_q <= '0;
      edge_q  <= '0;
      tmr_q   <= '0;
    end else if (soft_rst) begin
      busy_q  <= 1'b0;
      sck_q   <= 1'b0;
      edge_q  <= '0;
    end else begin
      if (!busy_q) sck_q <= cr_q.cpol;
      if (start) begin
        busy_q  <= 1'b1;
        tx_sh_q <= tx_dout;
        edge_q  <= '0;
        tmr_q   <= HW'(HALF - 1);
        if (!cr_q.cpha) mosi_q <= pick(tx_dout, 3'd0, cr_q.lsb_first);
      end else if (busy_q) begin
        if (tmr_q != 0) begin
          tmr_q <= tmr_q - 1'b1;
        end else begin
          tmr_q  <= HW'(HALF - 1);
          sck_q  <= ~sck_q;
          edge_q <= edge_q + 1'b1;
          if (leading) begin
            if (cr_q.cpha) mosi_q <= pick(tx_sh_q, bit_sel, cr_q.lsb_first);
            else           rx_sh_q <= cr_q.lsb_first ? {miso, rx_sh_q[7:1]} : {rx_sh_q[6:0], miso};
          end else begin
            if (cr_q.cpha) rx_sh_q <= cr_q.lsb_first ? {miso, rx_sh_q[7:1]} : {rx_sh_q[6:0], miso};
            else if (!last_edge) mosi_q <= pick(tx_sh_q, bit_sel + 3'd1, cr_q.lsb_first);
          end
          if (last_edge) busy_q <= 1'b0;
        end
      end
    end
  end

  logic done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= last_edge;
  end
  assign rx_push = done_q;
  assign rx_byte = rx_sh_q;

  // ---------------- registers
  logic tx_was_busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_q          <= '0;
      ssr_q         <= 1'b1;
      gie_q         <= 1'b0;
      ipisr_q       <= 1'b0;
      ipier_q       <= 1'b0;
      tx_was_busy_q <= 1'b0;
    end else if (soft_rst) begin
      cr_q          <= '0;
      ssr_q         <= 1'b1;
      gie_q         <= 1'b0;
      ipisr_q       <= 1'b0;
      ipier_q       <= 1'b0;
      tx_was_busy_q <= 1'b0;
    end else begin
      tx_was_busy_q <= !tx_empty || busy_q;
      if (wr_en) begin
        unique case (wr_addr[7:0])
          8'h1C: gie_q   <= wr_data[31];
          8'h20: if (wr_data[2]) ipisr_q <= 1'b0;
          8'h28: ipier_q <= wr_data[2];
          8'h60: cr_q    <= '{lsb_first: wr_data[9], inhibit: wr_data[8],
                              manual_ss: wr_data[7], cpha: wr_data[4],
                              cpol: wr_data[3], master: wr_data[2],
                              spe: wr_data[1], loop: wr_data[0]};
          8'h70: ssr_q   <= wr_data[0];
          default: ;
        endcase
      end
      if (tx_was_busy_q && tx_empty && !busy_q) ipisr_q <= 1'b1;
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr[7:0])
      8'h1C: rd_data[31] = gie_q;
      8'h20: rd_data[2]  = ipisr_q;
      8'h28: rd_data[2]  = ipier_q;
      8'h60: rd_data[9:0] = {cr_q.lsb_first, cr_q.inhibit, cr_q.manual_ss, 2'b00,
                             cr_q.cpha, cr_q.cpol, cr_q.master, cr_q.spe, cr_q.loop};
      8'h64: rd_data[3:0] = {tx_full, tx_empty, rx_full, rx_empty};
      8'h6C: rd_data[7:0] = rx_empty ? 8'h00 : rx_dout;
      8'h70: rd_data[0]   = ssr_q;
      default: ;
    endcase
  end

  logic ss;
  assign ss     = cr_q.manual_ss ? ssr_q : !(busy_q || start || done_q);
  assign gpio_o = {4'b0000, sck_q, 1'b0, mosi_q, ss};
  assign gpio_t = 8'b1111_0100;
  assign irq    = gie_q && ipier_q && ipisr_q;

endmodule
