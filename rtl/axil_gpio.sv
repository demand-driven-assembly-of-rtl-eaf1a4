// axil_gpio: AXI4-Lite general-purpose IO with an interrupt on input change.
//
// The same core serves twice in the system: as the GPIO module that can be
// loaded into a PR region (eight tristate pins, interrupt on any input
// toggle, the mechanism used to measure interrupt latency), and in the static
// part as the output-only GPIO that drives the region decouplers.
//
// Registers (byte offsets within the slave window):
//   0x000 DATA  write: output value; read: pin value for inputs, output
//               register for outputs
//   0x004 TRI   direction, 1 = input (pin released), 0 = output
//   0x11C GIER  bit 31: global interrupt enable
//   0x120 ISR   bit 0: an input changed; write 1 to clear
//   0x128 IER   bit 0: enable the change interrupt
// Other offsets read 0 and ignore writes. The register layout follows the
// usual vendor GPIO core; the write-1-to-clear ISR, the two-stage input
// synchroniser and reset values set by parameters are this design's choices.
// Timing: gpio_o and gpio_t change one cycle after the write strobe; an input
// edge reaches ISR SYNC_STAGES+1 cycles after it appears on gpio_i and irq
// follows combinationally.
module axil_gpio
  import pr_pkg::*;
#(
  parameter int unsigned      WIDTH       = 8,
  parameter int unsigned      SYNC_STAGES = 2,
  parameter logic [WIDTH-1:0] RST_DATA    = '0,
  parameter logic [WIDTH-1:0] RST_TRI     = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        s_req,
  output axil_rsp_t        s_rsp,
  input  logic [WIDTH-1:0] gpio_i,
  output logic [WIDTH-1:0] gpio_o,
  output logic [WIDTH-1:0] gpio_t,
  output logic             irq
);

  localparam logic [11:0] A_DATA = 12'h000;
  localparam logic [11:0] A_TRI  = 12'h004;
  localparam logic [11:0] A_GIER = 12'h11C;
  localparam logic [11:0] A_ISR  = 12'h120;
  localparam logic [11:0] A_IER  = 12'h128;

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [AXIL_DW/8-1:0] wr_strb;

  axil_reg_port u_port (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err(1'b0)
  );

  logic [WIDTH-1:0] data_q, tri_q;
  logic             gier_q, isr_q, ier_q;
  logic [SYNC_STAGES-1:0][WIDTH-1:0] sync_q;
  logic [WIDTH-1:0] in_s, in_prev_q;

  assign in_s = sync_q[SYNC_STAGES-1];

  // Byte-lane merge of a write into a WIDTH-bit register.
  function automatic logic [WIDTH-1:0] merge(logic [WIDTH-1:0] old,
                                             logic [AXIL_DW-1:0] d,
                                             logic [AXIL_DW/8-1:0] s);
    logic [WIDTH-1:0] r;
    r = old;
    for (int b = 0; b < WIDTH; b++)
      if (s[b/8]) r[b] = d[b];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q    <= RST_DATA;
      tri_q     <= RST_TRI;
      gier_q    <= 1'b0;
      isr_q     <= 1'b0;
      ier_q     <= 1'b0;
      sync_q    <= '0;
      in_prev_q <= '0;
    end else begin
      sync_q[0] <= gpio_i;
      for (int s = 1; s < SYNC_STAGES; s++) sync_q[s] <= sync_q[s-1];
      in_prev_q <= in_s;
      if (in_s != in_prev_q) isr_q <= 1'b1;
      if (wr_en) begin
        unique case (wr_addr[11:0])
          A_DATA: data_q <= merge(data_q, wr_data, wr_strb);
          A_TRI:  tri_q  <= merge(tri_q, wr_data, wr_strb);
          A_GIER: if (wr_strb[3]) gier_q <= wr_data[31];
          A_ISR:  if (wr_strb[0] && wr_data[0] && (in_s == in_prev_q)) isr_q <= 1'b0;
          A_IER:  if (wr_strb[0]) ier_q <= wr_data[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr[11:0])
      A_DATA: rd_data[WIDTH-1:0] = (in_s & tri_q) | (data_q & ~tri_q);
      A_TRI:  rd_data[WIDTH-1:0] = tri_q;
      A_GIER: rd_data[31] = gier_q;
      A_ISR:  rd_data[0] = isr_q;
      A_IER:  rd_data[0] = ier_q;
      default: ;
    endcase
  end

  assign gpio_o = data_q;
  assign gpio_t = tri_q;
  assign irq    = gier_q && ier_q && isr_q;

endmodule
