// pr_region: one reconfigurable partition of the external-IO system.
//
// Every region has the same boundary: an AXI4-Lite slave (its fixed 64 KiB
// window), PINS tristate IO pins and one interrupt line. Behind the
// boundary sits a decoupler (pr_decoupler), then the region's module.
//
// On the device the module is changed by writing a partial bitstream into
// the region's configuration memory. In RTL, rm_sel stands for that memory's
// content. The library modules of this design, GPIO (axil_gpio), Timer/PWM
// (rm_timer_pwm), UART (rm_uartlite), SPI master (rm_spi) and I2C master
// (rm_iic), are all elaborated. Only the one
// rm_sel names gets the bus
// and the pins, and the others are held in reset. When rm_sel changes, the
// newly loaded module starts from reset, as freshly configured logic does.
// The rule that the configuration may only change while the region is
// decoupled is checked by an assertion. Regions with fewer physical pins than
// PINS (the 7-pin Arduino regions) leave the upper pins unconnected at the
// top level.
// From the source design: the uniform region template, the decoupler in
// front of the module, and the module library. Own choices: modelling the
// loaded module as a select input, and resetting it on a change.
module pr_region
  import pr_pkg::*;
#(
  parameter int unsigned PINS = RP_PINS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  rm_kind_e        rm_sel,
  input  logic            decouple,
  output logic            decoupled,
  input  axil_req_t       s_req,
  output axil_rsp_t       s_rsp,
  input  logic [PINS-1:0] pin_i,
  output logic [PINS-1:0] pin_o,
  output logic [PINS-1:0] pin_t,
  output logic            irq
);

  axil_req_t rm_req, gpio_req, tmr_req;
  axil_rsp_t rm_rsp, gpio_rsp, tmr_rsp;
  logic      rm_irq, gpio_irq, pin_i8rq;
  logic [PINS-1:0] rm_pin_o, rm_pin_t, gpio_o, gpio_t;
  logic [7:0] tmr_o, tmr_t, pin_i8;
  rm_kind_e  rm_sel_q;
  logic      loaded_n;   // low for one cycle after a new module is loaded
  logic      gpio_rst_n, tmr_rst_n, uart_rst_n;
  axil_req_t uart_req;
  axil_rsp_t uart_rsp;
  logic      uart_irq;
  logic [7:0] uart_o, uart_t;
  logic      spi_rst_n, spi_irq;
  axil_req_t spi_req;
  axil_rsp_t spi_rsp;
  logic [7:0] spi_o, spi_t;
  logic      iic_rst_n, iic_irq;
  axil_req_t iic_req;
  axil_rsp_t iic_rsp;
  logic [7:0] iic_o, iic_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rm_sel_q <= RM_GPIO;
    else        rm_sel_q <= rm_sel;
  end

  assign loaded_n = (rm_sel == rm_sel_q);

  // Module resets come from flops so that no comparator glitch reaches an
  // asynchronous reset pin.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_rst_n <= 1'b0;
      tmr_rst_n  <= 1'b0;
      uart_rst_n <= 1'b0;
      spi_rst_n  <= 1'b0;
      iic_rst_n  <= 1'b0;
    end else begin
      gpio_rst_n <= loaded_n && (rm_sel == RM_GPIO);
      tmr_rst_n  <= loaded_n && (rm_sel == RM_TIMER_PWM);
      uart_rst_n <= loaded_n && (rm_sel == RM_UARTLITE);
      spi_rst_n  <= loaded_n && (rm_sel == RM_SPI);
      iic_rst_n  <= loaded_n && (rm_sel == RM_IIC);
    end
  end

  pr_decoupler #(.PINS(PINS)) u_decoupler (
    .clk, .rst_n, .decouple, .decoupled,
    .s_req, .s_rsp, .s_irq(irq), .s_pin_o(pin_o), .s_pin_t(pin_t),
    .rm_req, .rm_rsp, .rm_irq, .rm_pin_o, .rm_pin_t
  );

  axil_gpio #(.WIDTH(PINS)) u_rm_gpio (
    .clk, .rst_n(gpio_rst_n), .s_req(gpio_req), .s_rsp(gpio_rsp),
    .gpio_i(pin_i), .gpio_o, .gpio_t, .irq(gpio_irq)
  );

  always_comb begin
    pin_i8 = '0;
    pin_i8[PINS-1:0] = pin_i;
  end

  rm_timer_pwm u_rm_timer_pwm (
    .s_axi_aclk(clk), .s_axi_aresetn(tmr_rst_n),
    .s_axi_req(tmr_req), .s_axi_rsp(tmr_rsp),
    .gpio_i(pin_i8), .gpio_o(tmr_o), .gpio_t(tmr_t), .interrupt(pin_i8rq)
  );

  rm_uartlite u_rm_uartlite (
    .clk, .rst_n(uart_rst_n), .s_req(uart_req), .s_rsp(uart_rsp),
    .gpio_i(pin_i8), .gpio_o(uart_o), .gpio_t(uart_t), .irq(uart_irq)
  );

  rm_spi u_rm_spi (
    .clk, .rst_n(spi_rst_n), .s_req(spi_req), .s_rsp(spi_rsp),
    .gpio_i(pin_i8), .gpio_o(spi_o), .gpio_t(spi_t), .irq(spi_irq)
  );

  rm_iic u_rm_iic (
    .clk, .rst_n(iic_rst_n), .s_req(iic_req), .s_rsp(iic_rsp),
    .gpio_i(pin_i8), .gpio_o(iic_o), .gpio_t(iic_t), .irq(iic_irq)
  );

  always_comb begin
    gpio_req = '0;
    spi_req  = '0;
    iic_req  = '0;
    tmr_req  = '0;
    uart_req = '0;
    unique case (rm_sel)
      RM_IIC: begin
        iic_req  = rm_req;
        rm_rsp   = iic_rsp;
        rm_irq   = iic_irq;
        rm_pin_o = iic_o[PINS-1:0];
        rm_pin_t = iic_t[PINS-1:0];
      end
      RM_SPI: begin
        spi_req  = rm_req;
        rm_rsp   = spi_rsp;
        rm_irq   = spi_irq;
        rm_pin_o = spi_o[PINS-1:0];
        rm_pin_t = spi_t[PINS-1:0];
      end
      RM_UARTLITE: begin
        uart_req = rm_req;
        rm_rsp   = uart_rsp;
        rm_irq   = uart_irq;
        rm_pin_o = uart_o[PINS-1:0];
        rm_pin_t = uart_t[PINS-1:0];
      end
      RM_TIMER_PWM: begin
        tmr_req  = rm_req;
        rm_rsp   = tmr_rsp;
        rm_irq   = pin_i8rq;
        rm_pin_o = tmr_o[PINS-1:0];
        rm_pin_t = tmr_t[PINS-1:0];
      end
      default: begin
        gpio_req = rm_req;
        rm_rsp   = gpio_rsp;
        rm_irq   = gpio_irq;
        rm_pin_o = gpio_o;
        rm_pin_t = gpio_t;
      end
    endcase
  end

  // A partial bitstream may only be loaded into an isolated region.
  a_config_while_decoupled: assert property (
    @(posedge clk) disable iff (!rst_n) (rm_sel != rm_sel_q) |-> decoupled)
    else $error("region reconfigured while coupled to the static system");

endmodule
