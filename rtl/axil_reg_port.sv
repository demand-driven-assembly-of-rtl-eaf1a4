// axil_reg_port: AXI4-Lite slave front end that turns bus transfers into
// single-cycle register strobes.
//
// A write is taken when address and data are both valid and no write
// response is pending: awready and wready rise together for that one cycle,
// wr_en pulses in the same cycle with the bus address, data and strobes, and
// the write response (OKAY, or SLVERR when wr_err is high) is offered from the
// next cycle until bready. A read is taken when no read data is pending:
// arready and rd_en pulse, the register file presents rd_data for rd_addr
// combinationally, and it is returned on R from the next cycle until rready.
// One write and one read may be in progress at a time. The strobe interface
// and the one-cycle response latency are this design's own choice.
module axil_reg_port
  import pr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t           s_req,
  output axil_rsp_t           s_rsp,
  // register-file side
  output logic                wr_en,
  output logic [AXIL_AW-1:0]  wr_addr,
  output logic [AXIL_DW-1:0]  wr_data,
  output logic [AXIL_DW/8-1:0] wr_strb,
  input  logic                wr_err,
  output logic                rd_en,
  output logic [AXIL_AW-1:0]  rd_addr,
  input  logic [AXIL_DW-1:0]  rd_data,
  input  logic                rd_err
);

  logic              bvalid_q, rvalid_q;
  axi_resp_e         bresp_q, rresp_q;
  logic [AXIL_DW-1:0] rdata_q;

  assign wr_en   = s_req.awvalid && s_req.wvalid && !bvalid_q;
  assign wr_addr = s_req.awaddr;
  assign wr_data = s_req.wdata;
  assign wr_strb = s_req.wstrb;
  assign rd_en   = s_req.arvalid && !rvalid_q;
  assign rd_addr = s_req.araddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      bresp_q  <= RESP_OKAY;
      rvalid_q <= 1'b0;
      rresp_q  <= RESP_OKAY;
      rdata_q  <= '0;
    end else begin
      if (wr_en) begin
        bvalid_q <= 1'b1;
        bresp_q  <= wr_err ? RESP_SLVERR : RESP_OKAY;
      end else if (s_req.bready) begin
        bvalid_q <= 1'b0;
      end
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rresp_q  <= rd_err ? RESP_SLVERR : RESP_OKAY;
        rdata_q  <= rd_data;
      end else if (s_req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    s_rsp         = '0;
    s_rsp.awready = wr_en;
    s_rsp.wready  = wr_en;
    s_rsp.bvalid  = bvalid_q;
    s_rsp.bresp   = bresp_q;
    s_rsp.arready = rd_en;
    s_rsp.rvalid  = rvalid_q;
    s_rsp.rresp   = rresp_q;
    s_rsp.rdata   = rdata_q;
  end

endmodule
