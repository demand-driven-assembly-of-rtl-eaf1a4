// rm_timer_pwm: the Timer/PWM module that can be loaded into a PR region.
//
// It has the region template's pins: an AXI4-Lite slave, eight tristate IO
// pins (gpio_i, gpio_o, gpio_t) and one interrupt. Inside is the two-counter
// timer (axil_timer). Its generate output 0 and its PWM output are packed with
// a 6-bit constant into gpio_o: bit 0 = generateout0, bit 1 = pwm0, bits 7:2 =
// OUT_CONST. An 8-bit constant, TRI_CONST, drives gpio_t. The pin inputs, the
// capture triggers, freeze and generateout1 are not used.
// From the source design: the core, the two constants, the concat, the
// widths 6 and 8, and which timer pins are used. Own choices: the constant
// values (the pins are driven low, all eight driven), and the bit order,
// which follows how the drawing places the two wires on the concat's first
// and second inputs, with input 0 as the least significant bit.
// Timing: as axil_timer; the pins are wired straight from its outputs.
module rm_timer_pwm
  import pr_pkg::*;
#(
  parameter logic [5:0] OUT_CONST = 6'h00,
  parameter logic [7:0] TRI_CONST = 8'h00
) (
  input  logic      s_axi_aclk,
  input  logic      s_axi_aresetn,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp,
  input  logic [7:0] gpio_i,
  output logic [7:0] gpio_o,
  output logic [7:0] gpio_t,
  output logic       interrupt
);

  logic generateout0, generateout1, pwm0;

  axil_timer u_axi_timer_0 (
    .clk          (s_axi_aclk),
    .rst_n        (s_axi_aresetn),
    .s_req        (s_axi_req),
    .s_rsp        (s_axi_rsp),
    .capturetrig0 (1'b0),
    .capturetrig1 (1'b0),
    .freeze       (1'b0),
    .generateout0 (generateout0),
    .generateout1 (generateout1),
    .pwm0         (pwm0),
    .interrupt    (interrupt)
  );

  assign gpio_o = {OUT_CONST, pwm0, generateout0};
  assign gpio_t = TRI_CONST;

endmodule
