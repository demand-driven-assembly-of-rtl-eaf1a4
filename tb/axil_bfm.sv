// axil_bfm: AXI4-Lite bus master for testbenches.
//
// write() and read() perform one transfer each and return the response code
// and the number of clock cycles from issuing the address to the end of the
// response handshake. Signals are driven and sampled on the falling clock
// edge, so the design's rising-edge logic always sees stable inputs; ready is
// sampled 1 time unit after valid is driven, once the design has responded. A
// transfer that takes longer than TIMEOUT cycles is reported with resp = -1.
module axil_bfm
  import pr_pkg::*;
#(
  parameter int unsigned TIMEOUT = 1000
) (
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output int resp, output int cycles,
                       input logic [3:0] strb = 4'hF);
    bit aw_ok, w_ok;
    int n;
    n = 0;
    @(negedge clk);
    req.awaddr  = addr;
    req.awvalid = 1'b1;
    req.wdata   = data;
    req.wstrb   = strb;
    req.wvalid  = 1'b1;
    req.bready  = 1'b1;
    while ((req.awvalid || req.wvalid) && n < TIMEOUT) begin
      #1;                        // let the design's combinational logic settle
      aw_ok = rsp.awready;
      w_ok  = rsp.wready;
      @(negedge clk);
      n++;
      if (aw_ok) req.awvalid = 1'b0;
      if (w_ok)  req.wvalid  = 1'b0;
    end
    while (!rsp.bvalid && n < TIMEOUT) begin
      @(negedge clk);
      n++;
    end
    resp = (n >= TIMEOUT) ? -1 : int'(rsp.bresp);
    @(negedge clk);
    n++;
    req.bready  = 1'b0;
    req.awvalid = 1'b0;
    req.wvalid  = 1'b0;
    cycles = n;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output int resp, output int cycles);
    bit ar_ok;
    int n;
    n = 0;
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1'b1;
    req.rready  = 1'b1;
    while (req.arvalid && n < TIMEOUT) begin
      #1;
      ar_ok = rsp.arready;
      @(negedge clk);
      n++;
      if (ar_ok) req.arvalid = 1'b0;
    end
    while (!rsp.rvalid && n < TIMEOUT) begin
      @(negedge clk);
      n++;
    end
    resp = (n >= TIMEOUT) ? -1 : int'(rsp.rresp);
    data = rsp.rdata;
    @(negedge clk);
    n++;
    req.rready  = 1'b0;
    req.arvalid = 1'b0;
    cycles = n;
  endtask

endmodule
