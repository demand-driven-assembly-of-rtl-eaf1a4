// tb_pr_region: self-checking test of one reconfigurable partition.
// Loads the GPIO module and uses it, then runs the reconfiguration sequence
// (decouple, change the loaded module, recouple), uses the Timer/PWM module,
// and switches back, checking that the newly loaded module starts from reset
// and that the region is isolated during the change. It then loads the UART,
// SPI and I2C modules in turn and checks that each one gets the pins (its own
// direction pattern) and the bus (a status register at its reset value).
module tb_pr_region;
  import pr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  rm_kind_e rm_sel = RM_GPIO;
  logic decouple = 1'b1, decoupled, irq;
  logic [7:0] pin_i = 8'h00, pin_o, pin_t;
  int checks = 0, failures = 0, reconfigs = 0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  pr_region dut (.clk, .rst_n, .rm_sel, .decouple, .decoupled, .s_req(req),
                 .s_rsp(rsp), .pin_i, .pin_o, .pin_t, .irq);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d, int exp = 0);
    int r, c; u_bfm.write(a, d, r, c); chk(r == exp, $sformatf("write 0x%0h resp %0d", a, r));
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d, input int exp = 0);
    int r, c; u_bfm.read(a, d, r, c); chk(r == exp, $sformatf("read 0x%0h resp %0d", a, r));
  endtask
  task automatic reconfigure(rm_kind_e k);
    decouple = 1'b1;
    while (!decoupled) @(negedge clk);
    rm_sel = k;                 // partial bitstream written here
    repeat (4) @(negedge clk);
    decouple = 1'b0;
    while (decoupled) @(negedge clk);
    reconfigs++;
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
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rd(32'h0, d, int'(RESP_SLVERR));
    chk(pin_t == 8'hFF, "decoupled region releases pins");
    reconfigure(RM_GPIO);
    wr(32'h4, 32'h0F);
    wr(32'h0, 32'h30);
    chk(pin_t == 8'h0F && pin_o == 8'h30, "GPIO module drives pins");
    pin_i = 8'h05;
    repeat (4) @(negedge clk);
    rd(32'h0, d); chk(d[7:0] == 8'h35, "GPIO reads inputs and outputs");

    reconfigure(RM_TIMER_PWM);
    chk(pin_t == 8'h00 && pin_o == 8'h00, "Timer/PWM module drives all pins low at start");
    wr(32'h04, 32'd7);
    rd(32'h04, d); chk(d == 7, "timer register reachable after reconfiguration");
    rd(32'h0, d); chk(d == 0, "timer TCSR from reset");
    wr(32'h00, 32'h020);
    wr(32'h00, 32'h0D6);
    repeat (20) @(negedge clk);
    chk(irq == 1'b1, "timer interrupt through the region");

    reconfigure(RM_GPIO);
    rd(32'h4, d); chk(d == 32'hFF, "reloaded GPIO starts from reset");
    chk(irq == 1'b0, "old module's interrupt gone");
    wr(32'h0, 32'h01);          // a GPIO output that must not leak into the next module

    reconfigure(RM_UARTLITE);
    chk(pin_t == 8'hFE && pin_o[0] == 1'b1, "UART drives TX idle high, rest released");
    rd(32'h8, d); chk(d[7:0] == 8'h04, "UART status from reset (TX empty)");

    reconfigure(RM_SPI);
    chk(pin_t == 8'hF4 && pin_o[0] == 1'b1, "SPI drives SS high, MOSI and SCK");
    rd(32'h64, d); chk(d[3:0] == 4'b0101, "SPI status from reset (both FIFOs empty)");

    reconfigure(RM_IIC);
    chk(pin_t == 8'hFF && pin_o == 8'h00, "I2C releases SCL and SDA");
    rd(32'h104, d); chk(d[7:0] == 8'hC0, "I2C status from reset (both FIFOs empty)");
    chk(irq == 1'b0, "no interrupt from the freshly loaded I2C module");
    chk(reconfigs == 6, "six reconfigurations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
