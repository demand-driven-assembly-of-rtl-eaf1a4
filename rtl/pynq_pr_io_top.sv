// pynq_pr_io_top: demand-driven external-IO system of the board.
//
// The fixed set of IO controllers behind the Pmod and Arduino pins is
// replaced by six identical partial-reconfiguration regions, rp0..rp5. Each
// region is loaded at run time with the controller the attached peripheral
// needs (here: GPIO, Timer/PWM, UART, SPI master or I2C master).
// All regions hang directly off the host processor's AXI bus (s_axil_*),
// through one interconnect (axil_xbar), at fixed 64 KiB windows:
//   0x4120_0000  decouple GPIO: bit k raises region k's decoupler
//                (all regions start decoupled)
//   0x4180_0000  interrupt controller: input k = region k, output irq
//   0x41A1_0000 + k*0x1_0000  region rpk
// Pin assignment:
//   rp0 -> PmodA (8 pins)            rp1 -> PmodB (8 pins)
//   rp2 -> Arduino inner header 7:0  rp3 -> inner header 15:8
//   rp4 -> Arduino shield 6:0        rp5 -> shield 13:7 (7 pins each)
// rp_config[k] says which module region k holds. It stands for the partial
// bitstream last loaded into that region. The device's configuration port
// changes it, only while the region is decoupled; rp_decoupled reports that
// state. Pins are brought out as input, output and tristate enable (1 =
// released) for external IO buffers.
// From the source design: six regions, the Pmod and Arduino pin groups
// (8, 8, 16 and 14 pins), the region addresses and interrupt numbers, and the
// decouple GPIO and interrupt controller. Own choices: the GPIO and
// interrupt-controller addresses, which regions take which half of each
// Arduino group, and the AXI4-Lite bus width.
module pynq_pr_io_top
  import pr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  axil_req_t            s_axil_req,
  output axil_rsp_t            s_axil_rsp,
  output logic                 irq,
  input  rm_kind_e [N_RP-1:0]  rp_config,
  output logic [N_RP-1:0]      rp_decoupled,
  input  logic [7:0]           pmod_a_i,
  output logic [7:0]           pmod_a_o,
  output logic [7:0]           pmod_a_t,
  input  logic [7:0]           pmod_b_i,
  output logic [7:0]           pmod_b_o,
  output logic [7:0]           pmod_b_t,
  input  logic [15:0]          ar_gpio_i,
  output logic [15:0]          ar_gpio_o,
  output logic [15:0]          ar_gpio_t,
  input  logic [13:0]          ar_shield_i,
  output logic [13:0]          ar_shield_o,
  output logic [13:0]          ar_shield_t
);

  axil_req_t [N_SLV-1:0] slv_req;
  axil_rsp_t [N_SLV-1:0] slv_rsp;
  logic [N_RP-1:0] decouple, rp_irq;
  logic [N_RP-1:0][RP_PINS-1:0] rp_i, rp_o, rp_t;

  axil_xbar u_xbar (
    .clk, .rst_n, .m_req(s_axil_req), .m_rsp(s_axil_rsp),
    .s_req(slv_req), .s_rsp(slv_rsp)
  );

  // Output-only GPIO driving the decouplers; every region starts decoupled.
  axil_gpio #(.WIDTH(N_RP), .RST_DATA('1), .RST_TRI('0)) u_decouple_gpio (
    .clk, .rst_n, .s_req(slv_req[0]), .s_rsp(slv_rsp[0]),
    .gpio_i('0), .gpio_o(decouple), .gpio_t(), .irq()
  );

  pr_intc #(.N_IRQ(N_RP)) u_intc (
    .clk, .rst_n, .s_req(slv_req[1]), .s_rsp(slv_rsp[1]),
    .irq_in(rp_irq), .irq
  );

  for (genvar k = 0; k < N_RP; k++) begin : g_rp
    pr_region #(.PINS(RP_PINS)) u_rp (
      .clk, .rst_n, .rm_sel(rp_config[k]),
      .decouple(decouple[k]), .decoupled(rp_decoupled[k]),
      .s_req(slv_req[k+2]), .s_rsp(slv_rsp[k+2]),
      .pin_i(rp_i[k]), .pin_o(rp_o[k]), .pin_t(rp_t[k]), .irq(rp_irq[k])
    );
  end

  // Pin groups. The 7-pin shield regions leave their pin 7 unconnected.
  always_comb begin
    rp_i    = '0;
    rp_i[0] = pmod_a_i;
    rp_i[1] = pmod_b_i;
    rp_i[2] = ar_gpio_i[7:0];
    rp_i[3] = ar_gpio_i[15:8];
    rp_i[4][6:0] = ar_shield_i[6:0];
    rp_i[5][6:0] = ar_shield_i[13:7];
  end

  assign pmod_a_o    = rp_o[0];
  assign pmod_a_t    = rp_t[0];
  assign pmod_b_o    = rp_o[1];
  assign pmod_b_t    = rp_t[1];
  assign ar_gpio_o   = {rp_o[3], rp_o[2]};
  assign ar_gpio_t   = {rp_t[3], rp_t[2]};
  assign ar_shield_o = {rp_o[5][6:0], rp_o[4][6:0]};
  assign ar_shield_t = {rp_t[5][6:0], rp_t[4][6:0]};

endmodule
