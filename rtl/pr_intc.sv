// pr_intc: interrupt controller that gathers the PR regions' interrupt lines
// into the single interrupt of the host processor.
//
// Input k is region k's interrupt. Inputs are level sensitive: while input k
// is high, ISR bit k is set; it stays set until software writes 1 to IAR bit
// k, and is set again at once if the input is still high. The output irq is
// high while the master enable is set and an enabled bit is pending.
// Registers (byte offsets):
//   0x00 ISR  status (read only here)      0x10 SIE  write 1: set IER bits
//   0x04 IPR  ISR & IER (read only)        0x14 CIE  write 1: clear IER bits
//   0x08 IER  enable                       0x18 IVR  lowest pending enabled
//   0x0C IAR  write 1: acknowledge                   input, all ones if none
//   0x1C MER  bit 0 master enable, bit 1 hardware enable (stored only)
// The source design names only "IntC" and the line-per-region wiring; the
// register layout follows the usual vendor interrupt controller and the level
// semantics and read-only ISR are this design's choice. Timing: ISR follows an
// input one cycle later, irq is combinational from the registers.
module pr_intc
  import pr_pkg::*;
#(
  parameter int unsigned N_IRQ = N_RP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        s_req,
  output axil_rsp_t        s_rsp,
  input  logic [N_IRQ-1:0] irq_in,
  output logic             irq
);

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [AXIL_DW/8-1:0] wr_strb;

  axil_reg_port u_port (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err(1'b0)
  );

  logic [N_IRQ-1:0] isr_q, ier_q, ipr, ack;
  logic [1:0]       mer_q;
  logic [31:0]      ivr;

  assign ipr = isr_q & ier_q;
  assign ack = (wr_en && wr_addr[7:0] == 8'h0C) ? wr_data[N_IRQ-1:0] : '0;

  always_comb begin
    ivr = '1;
    for (int k = N_IRQ - 1; k >= 0; k--)
      if (ipr[k]) ivr = k;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      isr_q <= '0;
      ier_q <= '0;
      mer_q <= '0;
    end else begin
      isr_q <= (isr_q & ~ack) | irq_in;
      if (wr_en) begin
        unique case (wr_addr[7:0])
          8'h08: ier_q <= wr_data[N_IRQ-1:0];
          8'h10: ier_q <= ier_q | wr_data[N_IRQ-1:0];
          8'h14: ier_q <= ier_q & ~wr_data[N_IRQ-1:0];
          8'h1C: mer_q <= wr_data[1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr[7:0])
      8'h00: rd_data[N_IRQ-1:0] = isr_q;
      8'h04: rd_data[N_IRQ-1:0] = ipr;
      8'h08: rd_data[N_IRQ-1:0] = ier_q;
      8'h18: rd_data = ivr;
      8'h1C: rd_data[1:0] = mer_q;
      default: ;
    endcase
  end

  assign irq = mer_q[0] && (ipr != '0);

endmodule
