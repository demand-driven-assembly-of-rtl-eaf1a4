// axil_xbar: AXI4-Lite interconnect from the host's bus master to N slaves.
//
// Each slave k owns the addresses a with (a & MASK[k]) == BASE[k]. Writes and
// reads are handled by two independent paths, each carrying one transfer at
// a time. A path idles until its address is valid, spends one cycle decoding
// it, then connects the master to the chosen slave until the response
// handshake completes. An address that matches no slave is accepted and
// answered locally with DECERR. Latency added: one cycle on the address
// channel. The address map (defaults from pr_pkg: decouple GPIO, interrupt
// controller, then rp0..rp5 at 0x41A1_0000 + k*0x1_0000) follows the source
// design for the regions; the single-outstanding serialising structure is
// this design's choice. Assertions check that the master holds valid and its
// payload until the slave takes it.
module axil_xbar
  import pr_pkg::*;
#(
  parameter int unsigned              N    = N_SLV,
  parameter logic [N-1:0][31:0]       BASE = SLV_BASE,
  parameter logic [N-1:0][31:0]       MASK = {N{SLV_MASK}}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         m_req,
  output axil_rsp_t         m_rsp,
  output axil_req_t [N-1:0] s_req,
  input  axil_rsp_t [N-1:0] s_rsp
);

  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {P_IDLE, P_SLAVE, P_DECERR} path_e;

  path_e         wst_q, rst_q;
  logic [SW-1:0] wsel_q, rsel_q;
  logic          aw_done_q, w_done_q, dec_b_q, dec_r_q;
  logic          aw_hit_any, ar_hit_any;
  logic [SW-1:0] aw_idx, ar_idx;

  always_comb begin
    aw_hit_any = 1'b0;
    ar_hit_any = 1'b0;
    aw_idx     = '0;
    ar_idx     = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if ((m_req.awaddr & MASK[k]) == BASE[k]) begin
        aw_hit_any = 1'b1;
        aw_idx     = SW'(k);
      end
      if ((m_req.araddr & MASK[k]) == BASE[k]) begin
        ar_hit_any = 1'b1;
        ar_idx     = SW'(k);
      end
    end
  end

  always_comb begin
    m_rsp = '0;
    for (int k = 0; k < N; k++) begin
      s_req[k] = '0;
      s_req[k].awaddr = m_req.awaddr;
      s_req[k].wdata  = m_req.wdata;
      s_req[k].wstrb  = m_req.wstrb;
      s_req[k].araddr = m_req.araddr;
    end
    // write path
    if (wst_q == P_SLAVE) begin
      s_req[wsel_q].awvalid = m_req.awvalid && !aw_done_q;
      s_req[wsel_q].wvalid  = m_req.wvalid && !w_done_q;
      s_req[wsel_q].bready  = m_req.bready;
      m_rsp.awready = s_rsp[wsel_q].awready && !aw_done_q;
      m_rsp.wready  = s_rsp[wsel_q].wready && !w_done_q;
      m_rsp.bvalid  = s_rsp[wsel_q].bvalid;
      m_rsp.bresp   = s_rsp[wsel_q].bresp;
    end else if (wst_q == P_DECERR) begin
      m_rsp.awready = !aw_done_q;
      m_rsp.wready  = !w_done_q;
      m_rsp.bvalid  = dec_b_q;
      m_rsp.bresp   = RESP_DECERR;
    end
    // read path
    if (rst_q == P_SLAVE) begin
      s_req[rsel_q].arvalid = m_req.arvalid && !dec_r_q;
      s_req[rsel_q].rready  = m_req.rready;
      m_rsp.arready = s_rsp[rsel_q].arready && !dec_r_q;
      m_rsp.rvalid  = s_rsp[rsel_q].rvalid;
      m_rsp.rresp   = s_rsp[rsel_q].rresp;
      m_rsp.rdata   = s_rsp[rsel_q].rdata;
    end else if (rst_q == P_DECERR) begin
      m_rsp.arready = !dec_r_q;
      m_rsp.rvalid  = dec_r_q;
      m_rsp.rresp   = RESP_DECERR;
    end
  end

  // dec_r_q doubles as "address taken" on the slave read path.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst_q     <= P_IDLE;
      rst_q     <= P_IDLE;
      wsel_q    <= '0;
      rsel_q    <= '0;
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
      dec_b_q   <= 1'b0;
      dec_r_q   <= 1'b0;
    end else begin
      unique case (wst_q)
        P_IDLE: if (m_req.awvalid) begin
          wsel_q    <= aw_idx;
          wst_q     <= aw_hit_any ? P_SLAVE : P_DECERR;
          aw_done_q <= 1'b0;
          w_done_q  <= 1'b0;
          dec_b_q   <= 1'b0;
        end
        default: begin
          if (m_req.awvalid && m_rsp.awready) aw_done_q <= 1'b1;
          if (m_req.wvalid && m_rsp.wready)   w_done_q  <= 1'b1;
          if (wst_q == P_DECERR && (aw_done_q || m_req.awvalid) &&
              (w_done_q || m_req.wvalid) && !dec_b_q &&
              (aw_done_q || m_rsp.awready) && (w_done_q || m_rsp.wready))
            dec_b_q <= 1'b1;
          if (m_rsp.bvalid && m_req.bready) begin
            wst_q   <= P_IDLE;
            dec_b_q <= 1'b0;
          end
        end
      endcase
      unique case (rst_q)
        P_IDLE: if (m_req.arvalid) begin
          rsel_q  <= ar_idx;
          rst_q   <= ar_hit_any ? P_SLAVE : P_DECERR;
          dec_r_q <= 1'b0;
        end
        default: begin
          if (m_req.arvalid && m_rsp.arready) dec_r_q <= 1'b1;
          if (m_rsp.rvalid && m_req.rready && (rst_q == P_DECERR || dec_r_q)) begin
            rst_q   <= P_IDLE;
            dec_r_q <= 1'b0;
          end
        end
      endcase
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.awvalid && !m_rsp.awready |=> m_req.awvalid && $stable(m_req.awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.wvalid && !m_rsp.wready |=> m_req.wvalid && $stable(m_req.wdata));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.arvalid && !m_rsp.arready |=> m_req.arvalid && $stable(m_req.araddr));

endmodule
