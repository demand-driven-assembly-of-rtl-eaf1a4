// tb_rm_timer_pwm: self-checking test of the Timer/PWM region module.
// Programs the timer over AXI4-Lite and checks the pin mapping: gpio_o[0]
// carries the generate pulses (period TLR0+1), gpio_o[1] the PWM waveform
// (period TLR0+1, high TLR1+1), gpio_o[7:2] the constant, gpio_t the constant
// (all driven), and the interrupt line.
module tb_rm_timer_pwm;
  import pr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [7:0] gpio_o, gpio_t;
  logic intr;
  int checks = 0, failures = 0, cyc = 0;
  int g_t[$], p_r[$], p_f[$];
  logic p_prev = 1'b0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  rm_timer_pwm dut (.s_axi_aclk(clk), .s_axi_aresetn(rst_n), .s_axi_req(req),
                    .s_axi_rsp(rsp), .gpio_i(8'h5A), .gpio_o, .gpio_t, .interrupt(intr));

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (gpio_o[0]) g_t.push_back(cyc);
    if (gpio_o[1] && !p_prev) p_r.push_back(cyc);
    if (!gpio_o[1] && p_prev) p_f.push_back(cyc);
    p_prev <= gpio_o[1];
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    int r, c; u_bfm.write(a, d, r, c); chk(r == 0, "write resp");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(gpio_t == 8'h00, "all pins driven");
    chk(gpio_o == 8'h00, "outputs low after reset");
    wr(32'h04, 32'd29);                     // period 30
    wr(32'h14, 32'd11);                     // high 12
    wr(32'h00, 32'h020);
    wr(32'h10, 32'h020);
    wr(32'h10, 32'h216);                    // UDT|GENT|ARHT|PWMA
    wr(32'h00, 32'h656);                    // + ENIT | ENALL
    repeat (200) @(negedge clk);
    chk(g_t.size() >= 6, "generate pulses on pin 0");
    for (int i = 1; i < g_t.size(); i++)
      chk(g_t[i] - g_t[i-1] == 30, $sformatf("pin 0 period %0d", g_t[i] - g_t[i-1]));
    chk(p_r.size() >= 6, "pwm on pin 1");
    for (int i = 1; i < p_r.size(); i++)
      chk(p_r[i] - p_r[i-1] == 30, $sformatf("pin 1 period %0d", p_r[i] - p_r[i-1]));
    for (int i = 0; i < p_f.size() && i < p_r.size(); i++)
      chk(p_f[i] - p_r[i] == 12, $sformatf("pin 1 high %0d", p_f[i] - p_r[i]));
    chk(gpio_o[7:2] == 6'h00, "pins 7:2 constant");
    chk(intr == 1'b1, "interrupt line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
