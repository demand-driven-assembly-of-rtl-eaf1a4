// pr_decoupler: isolates one PR region from the static system while the
// region is being reconfigured.
//
// Reconfiguration is bracketed by software: decouple is raised, the partial
// bitstream is written, decouple is lowered. While a region is isolated its
// logic is undefined, so nothing it drives may reach the static side:
//   * AXI4-Lite: no valid is passed to the region, and the decoupler answers
//     any transfer itself with SLVERR (read data 0), so a stray access during
//     reconfiguration completes instead of hanging the bus;
//   * the interrupt line is held low;
//   * all pins are released (tristate enable forced to 1).
// The decouple request takes effect only between transfers: `decoupled`
// follows `decouple` one cycle later in a cycle with no transfer in progress
// and none starting, so a transfer is never cut in half. Answering with
// SLVERR and switching only between transfers are this design's choices; the
// source design gives the decoupler's purpose and the software sequence.
module pr_decoupler
  import pr_pkg::*;
#(
  parameter int unsigned PINS = RP_PINS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            decouple,
  output logic            decoupled,
  // static side
  input  axil_req_t       s_req,
  output axil_rsp_t       s_rsp,
  output logic            s_irq,
  output logic [PINS-1:0] s_pin_o,
  output logic [PINS-1:0] s_pin_t,
  // region side
  output axil_req_t       rm_req,
  input  axil_rsp_t       rm_rsp,
  input  logic            rm_irq,
  input  logic [PINS-1:0] rm_pin_o,
  input  logic [PINS-1:0] rm_pin_t
);

  logic iso_q;
  logic aw_done_q, w_done_q, ar_done_q;
  logic aw_hs, w_hs, b_hs, ar_hs, r_hs, idle;
  logic own_b_q, own_r_q;
  logic own_wr, own_rd;

  // Local responder used while isolated.
  assign own_wr = iso_q && s_req.awvalid && s_req.wvalid && !own_b_q;
  assign own_rd = iso_q && s_req.arvalid && !own_r_q;

  always_comb begin
    if (iso_q) begin
      rm_req        = '0;
      s_rsp         = '0;
      s_rsp.awready = own_wr;
      s_rsp.wready  = own_wr;
      s_rsp.bvalid  = own_b_q;
      s_rsp.bresp   = RESP_SLVERR;
      s_rsp.arready = own_rd;
      s_rsp.rvalid  = own_r_q;
      s_rsp.rresp   = RESP_SLVERR;
    end else begin
      rm_req = s_req;
      s_rsp  = rm_rsp;
    end
  end

  assign aw_hs = s_req.awvalid && s_rsp.awready;
  assign w_hs  = s_req.wvalid  && s_rsp.wready;
  assign b_hs  = s_rsp.bvalid  && s_req.bready;
  assign ar_hs = s_req.arvalid && s_rsp.arready;
  assign r_hs  = s_rsp.rvalid  && s_req.rready;
  assign idle  = !aw_done_q && !w_done_q && !ar_done_q && !aw_hs && !w_hs && !ar_hs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iso_q     <= 1'b1;
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
      ar_done_q <= 1'b0;
      own_b_q   <= 1'b0;
      own_r_q   <= 1'b0;
    end else begin
      if (b_hs) begin
        aw_done_q <= 1'b0;
        w_done_q  <= 1'b0;
      end else begin
        if (aw_hs) aw_done_q <= 1'b1;
        if (w_hs)  w_done_q  <= 1'b1;
      end
      if (r_hs)       ar_done_q <= 1'b0;
      else if (ar_hs) ar_done_q <= 1'b1;
      if (own_wr)                       own_b_q <= 1'b1;
      else if (own_b_q && s_req.bready) own_b_q <= 1'b0;
      if (own_rd)                       own_r_q <= 1'b1;
      else if (own_r_q && s_req.rready) own_r_q <= 1'b0;
      if (idle) iso_q <= decouple;
    end
  end

  assign decoupled = iso_q;
  assign s_irq     = iso_q ? 1'b0 : rm_irq;
  assign s_pin_o   = iso_q ? '0 : rm_pin_o;
  assign s_pin_t   = iso_q ? '1 : rm_pin_t;

endmodule
