// tb_pr_decoupler: self-checking test of the region decoupler, with a GPIO
// module behind it. While decoupled: accesses end with SLVERR and never reach
// the module, its interrupt is masked and its pins are released. Coupled:
// accesses, interrupt and pins pass through. A decouple request raised
// during a transfer takes effect only after the transfer has completed.
module tb_pr_decoupler;
  import pr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req, rm_req;
  axil_rsp_t rsp, rm_rsp;
  logic decouple = 1'b1, decoupled, s_irq, rm_irq;
  logic [7:0] s_pin_o, s_pin_t, rm_pin_o, rm_pin_t, pins_i = '0;
  int checks = 0, failures = 0, rm_valids = 0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  pr_decoupler dut (.clk, .rst_n, .decouple, .decoupled, .s_req(req), .s_rsp(rsp),
                    .s_irq, .s_pin_o, .s_pin_t, .rm_req, .rm_rsp, .rm_irq,
                    .rm_pin_o, .rm_pin_t);
  axil_gpio u_rm (.clk, .rst_n, .s_req(rm_req), .s_rsp(rm_rsp), .gpio_i(pins_i),
                  .gpio_o(rm_pin_o), .gpio_t(rm_pin_t), .irq(rm_irq));

  always @(posedge clk)
    if (rm_req.awvalid || rm_req.wvalid || rm_req.arvalid) rm_valids++;

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
    logic [31:0] d;
    int r, c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(decoupled == 1'b1, "starts decoupled");
    u_bfm.read(32'h4, d, r, c);
    chk(r == int'(RESP_SLVERR) && d == 0, "read while decoupled: SLVERR, data 0");
    u_bfm.write(32'h4, 32'h0, r, c);
    chk(r == int'(RESP_SLVERR), "write while decoupled: SLVERR");
    chk(rm_valids == 0, "module saw no transfer while decoupled");
    chk(s_pin_t == 8'hFF, "pins released while decoupled");

    decouple = 1'b0;
    repeat (2) @(negedge clk);
    chk(decoupled == 1'b0, "coupled after request");
    u_bfm.write(32'h4, 32'h0F, r, c); chk(r == 0, "coupled write OKAY");
    u_bfm.write(32'h0, 32'hA0, r, c); chk(r == 0, "coupled write OKAY");
    u_bfm.read(32'h4, d, r, c);
    chk(r == 0 && d == 32'h0F, "coupled read returns module data");
    chk(s_pin_t == 8'h0F && s_pin_o == 8'hA0, "pins pass through");
    u_bfm.write(32'h128, 32'h1, r, c);
    u_bfm.write(32'h11C, 32'h8000_0000, r, c);
    pins_i = 8'h01;
    repeat (6) @(negedge clk);
    chk(rm_irq && s_irq, "interrupt passes when coupled");

    // decouple raised in the middle of a read
    fork
      u_bfm.read(32'h4, d, r, c);
      begin @(negedge clk); decouple = 1'b1; end
    join
    chk(r == 0 && d == 32'h0F, "transfer in flight completes normally");
    @(negedge clk);
    chk(decoupled == 1'b1, "decoupled after the transfer");
    chk(s_irq == 1'b0 && rm_irq == 1'b1, "interrupt masked while decoupled");
    chk(s_pin_t == 8'hFF && s_pin_o == 8'h00, "pins released again");
    rm_valids = 0;
    u_bfm.read(32'h0, d, r, c);
    chk(r == int'(RESP_SLVERR) && rm_valids == 0, "isolated again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
