// tb_axil_xbar: self-checking test of the AXI4-Lite interconnect with its
// default address map and eight GPIO slaves. Writes a different value to
// each slave, checks that only the addressed slave changed, reads all back,
// checks DECERR for unmapped addresses and the write and read latency
// (3 cycles from address valid to the end of the response handshake: one
// decode cycle, one transfer cycle, one response cycle).
module tb_axil_xbar;
  import pr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  axil_req_t [N_SLV-1:0] s_req;
  axil_rsp_t [N_SLV-1:0] s_rsp;
  logic [N_SLV-1:0][7:0] po, pt;
  int checks = 0, failures = 0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  axil_xbar dut (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .s_req, .s_rsp);
  for (genvar k = 0; k < N_SLV; k++) begin : g_s
    axil_gpio u_s (.clk, .rst_n, .s_req(s_req[k]), .s_rsp(s_rsp[k]),
                   .gpio_i(8'h00), .gpio_o(po[k]), .gpio_t(pt[k]), .irq());
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, base;
    logic [N_SLV-1:0][7:0] m;
    int r, c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    m = '0;
    for (int i = 0; i < 300; i++) begin
      int k;
      logic [7:0] v;
      k = $urandom_range(0, N_SLV - 1);
      v = 8'($urandom);
      base = SLV_BASE[k];
      u_bfm.write(base, {24'h0, v}, r, c);
      chk(r == 0, "write OKAY");
      chk(c == 3, $sformatf("write latency %0d", c));
      m[k] = v;
      chk(po == m, $sformatf("only slave %0d changed", k));
      k = $urandom_range(0, N_SLV - 1);
      u_bfm.read(SLV_BASE[k], d, r, c);
      chk(r == 0 && d[7:0] == (m[k] & ~pt[k]), "DATA read through the interconnect");
      chk(c == 3, $sformatf("read latency %0d", c));
      u_bfm.write(SLV_BASE[k] + 32'h4, {24'h0, v}, r, c);
      u_bfm.read(SLV_BASE[k] + 32'h4, d, r, c);
      chk(d[7:0] == v && pt[k] == v, "TRI through the interconnect");
    end
    u_bfm.write(32'h4000_0000, 32'h1, r, c);
    chk(r == int'(RESP_DECERR), "unmapped write DECERR");
    u_bfm.read(32'h41A8_0000, d, r, c);
    chk(r == int'(RESP_DECERR), "unmapped read DECERR");
    u_bfm.read(SLV_BASE[2] + 32'h4, d, r, c);
    chk(r == 0, "mapped access still fine after DECERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
