// tb_pynq_pr_io_top: end-to-end test of the reconfigurable external-IO system
// at its default (and only) size: six regions, all pin groups.
// The testbench plays the host processor (AXI4-Lite master and interrupt
// handler) and the device's configuration port (rp_config, changed only while
// a region is decoupled). It runs:
//   1. accesses to decoupled regions (SLVERR) and to an unmapped address
//      (DECERR);
//   2. loading GPIO into all six regions and driving every pin group;
//   3. the interrupt-latency set-up of the source design: a GPIO output pin
//      wired back to a GPIO input pin, toggled by software, with the change
//      interrupt routed through the interrupt controller; the latency from
//      pin toggle to processor interrupt is checked (4 cycles);
//   4. reconfiguring rp0 from GPIO to Timer/PWM and checking the PWM pin,
//      the timer interrupt and its vector, then reconfiguring back;
//   5. the example program of the source design: rp0 loaded with the UART,
//      the bytes DE AD BE EF sent at the default 9600 baud (decoded on the
//      PmodA TX pin by a reference receiver, and looped back into RX), then
//      rp2 as GPIO with all pins outputs and LED0 (pin 0) on;
//   6. rp1 reconfigured to the SPI master with PmodB MOSI wired to MISO:
//      three bytes are exchanged, the SCK edges under SS are counted and
//      the looped-back bytes are read from the receive FIFO;
//   7. rp5 reconfigured to the I2C master on shield pins 7 (SCL) and 8 (SDA)
//      with pull-ups and no device on the bus: the START condition is seen
//      on the pins, the address is not acknowledged, and the NACK interrupt
//      reaches the processor through the interrupt controller (vector 5).
// Each mechanism is counted and a failure is counted for any that never ran.
module tb_pynq_pr_io_top;
  import pr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic irq;
  rm_kind_e [N_RP-1:0] rp_config;
  logic [N_RP-1:0] rp_decoupled;
  logic [7:0]  pmod_a_i, pmod_a_o, pmod_a_t, pmod_b_i, pmod_b_o, pmod_b_t;
  logic [15:0] ar_gpio_i, ar_gpio_o, ar_gpio_t;
  logic [13:0] ar_shield_i, ar_shield_o, ar_shield_t;

  int checks = 0, failures = 0;
  int n_slverr = 0, n_decerr = 0, n_reconfig = 0, n_irq = 0, n_pwm = 0, n_pins = 0, n_uart = 0, n_spi = 0, n_iic = 0;
  int iic_starts = 0;
  logic scl_p = 1'b1, sda_p = 1'b1;
  int sck_rises = 0;
  logic sck_prev = 1'b0;
  int cyc = 0, t_toggle = -1, t_irq = -1, pwm_r[$], pwm_f[$];
  logic pwm_prev = 1'b0, irq_prev = 1'b0, lb_prev = 1'b0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  pynq_pr_io_top dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp), .irq, .rp_config,
    .rp_decoupled, .pmod_a_i, .pmod_a_o, .pmod_a_t, .pmod_b_i, .pmod_b_o,
    .pmod_b_t, .ar_gpio_i, .ar_gpio_o, .ar_gpio_t, .ar_shield_i, .ar_shield_o,
    .ar_shield_t);

  // Board wiring: inner-header pin 0 looped back to pin 1; others idle low.
  always_comb begin
    pmod_a_i    = '0;
    pmod_a_i[1] = pmod_a_t[0] ? 1'b1 : pmod_a_o[0];   // PmodA TX looped to RX
    pmod_b_i    = '0;
    pmod_b_i[2] = pmod_b_t[1] ? 1'b0 : pmod_b_o[1];   // PmodB MOSI looped to MISO
    ar_shield_i = '0;
    ar_shield_i[7] = ar_shield_t[7] || ar_shield_o[7];   // pull-ups on SCL, SDA
    ar_shield_i[8] = ar_shield_t[8] || ar_shield_o[8];
    ar_gpio_i   = '0;
    ar_gpio_i[1] = ar_gpio_t[0] ? 1'b0 : ar_gpio_o[0];
  end

  always @(posedge clk) if (rst_n) begin
    if (pmod_b_t[3] == 1'b0 && pmod_b_o[0] == 1'b0 && pmod_b_o[3] && !sck_prev) sck_rises++;
    sck_prev = pmod_b_o[3];
    if (rp_config[5] == RM_IIC && scl_p && ar_shield_i[7] && sda_p && !ar_shield_i[8]) iic_starts++;
    scl_p = ar_shield_i[7];
    sda_p = ar_shield_i[8];
    cyc <= cyc + 1;
    if (ar_gpio_i[1] != lb_prev) t_toggle = cyc;
    if (irq && !irq_prev) t_irq = cyc;
    if (pmod_a_o[1] && !pwm_prev) pwm_r.push_back(cyc);
    if (!pmod_a_o[1] && pwm_prev) pwm_f.push_back(cyc);
    lb_prev  <= ar_gpio_i[1];
    irq_prev <= irq;
    pwm_prev <= pmod_a_o[1];
  end

  // Reference UART receiver on PmodA pin 0 (8N1, CPB cycles per bit).
  localparam int CPB = 100_000_000 / 9600;
  logic [7:0] uart_seen[$];
  logic u_prev = 1'b1, u_ok = 1'b1;
  int   u_t = -1;
  logic [9:0] u_b;
  always @(posedge clk) if (rst_n) begin
    if (rp_config[0] == RM_UARTLITE && !rp_decoupled[0]) begin
      if (u_t < 0) begin
        if (u_prev && !pmod_a_o[0]) u_t = 0;
      end else begin
        u_t++;
        if (u_t % CPB == CPB / 2) u_b[u_t / CPB] = pmod_a_o[0];
        if (u_t == 9 * CPB + CPB / 2) begin
          if (u_b[0] != 1'b0 || u_b[9] != 1'b1) u_ok = 1'b0;
          uart_seen.push_back(u_b[8:1]);
          u_t = -1;
        end
      end
    end
    u_prev = pmod_a_o[0];
  end

  localparam logic [31:0] GPIO_A = DECOUPLE_GPIO_BASE;
  localparam logic [31:0] INTC_A = INTC_BASE;
  function automatic logic [31:0] rp(int k); return RP_BASE + RP_SPAN * k; endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    int r, c;
    u_bfm.write(a, d, r, c);
    chk(r == 0, $sformatf("write 0x%08h resp %0d", a, r));
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    int r, c;
    u_bfm.read(a, d, r, c);
    chk(r == 0, $sformatf("read 0x%08h resp %0d", a, r));
  endtask

  // Software reconfiguration sequence for one region.
  logic [31:0] decouple_word = 32'h3F;
  task automatic reconfigure(int k, rm_kind_e kind);
    decouple_word[k] = 1'b1;
    wr(GPIO_A, decouple_word);
    while (!rp_decoupled[k]) @(negedge clk);
    rp_config[k] = kind;            // partial bitstream loaded
    repeat (3) @(negedge clk);
    decouple_word[k] = 1'b0;
    wr(GPIO_A, decouple_word);
    while (rp_decoupled[k]) @(negedge clk);
    n_reconfig++;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The configuration port may only change a region while it is decoupled.
  rm_kind_e [N_RP-1:0] cfg_q;
  always @(posedge clk) begin
    if (rst_n)
      for (int k = 0; k < N_RP; k++)
        if (rp_config[k] != cfg_q[k] && !rp_decoupled[k]) begin
          failures++;
          $display("FAIL: region %0d reconfigured while coupled", k);
        end
    cfg_q <= rp_config;
  end

  initial begin
    logic [31:0] d;
    int r, c;
    for (int k = 0; k < N_RP; k++) rp_config[k] = RM_GPIO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. isolation and decode errors
    chk(rp_decoupled == 6'h3F, "all regions start decoupled");
    for (int k = 0; k < N_RP; k++) begin
      u_bfm.read(rp(k), d, r, c);
      chk(r == int'(RESP_SLVERR), $sformatf("rp%0d decoupled read SLVERR", k));
      if (r == int'(RESP_SLVERR)) n_slverr++;
    end
    chk(pmod_a_t == 8'hFF && ar_shield_t == 14'h3FFF, "decoupled pins released");
    u_bfm.write(32'h41A7_0000, 32'h0, r, c);
    chk(r == int'(RESP_DECERR), "unmapped write DECERR");
    if (r == int'(RESP_DECERR)) n_decerr++;

    // 2. GPIO in every region
    for (int k = 0; k < N_RP; k++) reconfigure(k, RM_GPIO);
    chk(rp_decoupled == 6'h00, "all regions coupled");
    for (int k = 0; k < N_RP; k++) begin
      wr(rp(k) + 32'h4, 32'h00);
      wr(rp(k), 32'h11 * (k + 1) & 32'hFF);
    end
    chk(pmod_a_o == 8'h11 && pmod_a_t == 8'h00, "PmodA from rp0");
    chk(pmod_b_o == 8'h22 && pmod_b_t == 8'h00, "PmodB from rp1");
    chk(ar_gpio_o == 16'h4433 && ar_gpio_t == 16'h0000, "inner header from rp2, rp3");
    chk(ar_shield_o == {7'(8'h66), 7'(8'h55)} && ar_shield_t == 14'h0000, "shield from rp4, rp5");
    n_pins = 4;

    // 3. interrupt latency loop on rp2: pin 0 output, pin 1 input
    wr(rp(2) + 32'h4, 32'hFE);
    wr(rp(2), 32'h00);
    repeat (5) @(negedge clk);
    wr(rp(2) + 32'h120, 32'h1);
    wr(rp(2) + 32'h128, 32'h1);
    wr(rp(2) + 32'h11C, 32'h8000_0000);
    wr(INTC_A + 32'h08, 32'h04);
    wr(INTC_A + 32'h1C, 32'h01);
    chk(irq == 1'b0, "quiet before the toggle");
    for (int i = 0; i < 8; i++) begin
      t_toggle = -1; t_irq = -1;
      wr(rp(2), (i % 2 == 0) ? 32'h01 : 32'h00);
      repeat (8) @(negedge clk);
      chk(irq == 1'b1, "toggle raised the processor interrupt");
      chk(t_irq - t_toggle == 4, $sformatf("pin-to-irq latency %0d cycles", t_irq - t_toggle));
      rd(INTC_A + 32'h18, d);
      chk(d == 2, $sformatf("vector %0d, expect 2", d));
      wr(rp(2) + 32'h120, 32'h1);   // clear the source, then acknowledge
      wr(INTC_A + 32'h0C, 32'h04);
      @(negedge clk);
      chk(irq == 1'b0, "interrupt cleared");
      if (t_irq >= 0) n_irq++;
    end

    // 4. rp0 becomes Timer/PWM: period 16, high 4
    reconfigure(0, RM_TIMER_PWM);
    chk(pmod_a_t == 8'h00 && pmod_a_o == 8'h00, "Timer/PWM pins after load");
    wr(rp(0) + 32'h04, 32'd15);
    wr(rp(0) + 32'h14, 32'd3);
    wr(rp(0) + 32'h00, 32'h020);
    wr(rp(0) + 32'h10, 32'h020);
    wr(rp(0) + 32'h10, 32'h216);
    wr(INTC_A + 32'h10, 32'h01);
    pwm_r.delete(); pwm_f.delete();
    wr(rp(0) + 32'h00, 32'h656);
    repeat (100) @(negedge clk);
    for (int i = 1; i < pwm_r.size(); i++) begin
      chk(pwm_r[i] - pwm_r[i-1] == 16, $sformatf("PmodA pwm period %0d", pwm_r[i] - pwm_r[i-1]));
      n_pwm++;
    end
    for (int i = 0; i < pwm_f.size() && i < pwm_r.size(); i++)
      chk(pwm_f[i] - pwm_r[i] == 4, $sformatf("PmodA pwm high %0d", pwm_f[i] - pwm_r[i]));
    chk(irq == 1'b1, "timer interrupt reaches the processor");
    rd(INTC_A + 32'h18, d);
    chk(d == 0, "vector 0 for rp0");
    if (irq) n_irq++;

    // decouple rp0 while it runs: interrupt and pins isolated, access SLVERR
    decouple_word[0] = 1'b1;
    wr(GPIO_A, decouple_word);
    @(negedge clk);
    u_bfm.read(rp(0), d, r, c);
    chk(r == int'(RESP_SLVERR), "running region decoupled: SLVERR");
    if (r == int'(RESP_SLVERR)) n_slverr++;
    chk(pmod_a_t == 8'hFF, "decoupled PmodA released");
    wr(INTC_A + 32'h0C, 32'h01);
    @(negedge clk);
    chk(irq == 1'b0, "decoupled timer cannot interrupt");
    decouple_word[0] = 1'b0;
    wr(GPIO_A, decouple_word);
    reconfigure(0, RM_GPIO);
    rd(rp(0) + 32'h4, d);
    chk(d == 32'hFF, "rp0 GPIO reloaded from reset");
    rd(rp(1), d);
    chk(d[7:0] == 8'h22, "rp1 kept running during rp0's reconfiguration");

    // 5. example program: UART on rp0, GPIO LED on rp2
    reconfigure(0, RM_UARTLITE);
    chk(pmod_a_t == 8'hFE && pmod_a_o[0] == 1'b1, "UART TX pin driven idle high");
    begin
      logic [7:0] msg[4] = '{8'hDE, 8'hAD, 8'hBE, 8'hEF};
      foreach (msg[i]) wr(rp(0) + 32'h4, {24'h0, msg[i]});
      wait (uart_seen.size() == 4);
      repeat (2 * CPB) @(negedge clk);
      chk(u_ok, "UART start and stop bits");
      foreach (msg[i]) begin
        chk(uart_seen[i] == msg[i], $sformatf("PmodA TX byte %0d = %02h", i, uart_seen[i]));
        rd(rp(0), d);
        chk(d[7:0] == msg[i], $sformatf("looped-back RX byte %0d = %02h", i, d[7:0]));
        if (uart_seen[i] == msg[i] && d[7:0] == msg[i]) n_uart++;
      end
    end
    reconfigure(2, RM_GPIO);
    wr(rp(2) + 32'h4, 32'h00);       // all outputs
    wr(rp(2), 32'h01);               // LED0 on
    chk(ar_gpio_o[7:0] == 8'h01 && ar_gpio_t[7:0] == 8'h00, "LED0 on rp2");

    // 6. SPI master on rp1, MOSI looped to MISO
    reconfigure(1, RM_SPI);
    chk(pmod_b_t == 8'b1111_0100 && pmod_b_o[0] == 1'b1, "SPI pins driven, SS idle high");
    wr(rp(1) + 32'h60, 32'h0000_0006);            // master, enabled, mode 0
    sck_rises = 0;
    begin
      logic [7:0] sb[3] = '{8'h5A, 8'hC3, 8'h01};
      foreach (sb[i]) wr(rp(1) + 32'h68, {24'h0, sb[i]});
      repeat (3 * 8 * 16 + 64) @(negedge clk);
      chk(sck_rises == 24, $sformatf("SPI SCK edges under SS: %0d", sck_rises));
      foreach (sb[i]) begin
        rd(rp(1) + 32'h6C, d);
        chk(d[7:0] == sb[i], $sformatf("SPI looped byte %0d = %02h", i, d[7:0]));
        if (d[7:0] == sb[i]) n_spi++;
      end
    end

    // 7. I2C master on rp5, nobody on the bus
    reconfigure(5, RM_IIC);
    chk(ar_shield_t[13:7] == 7'h7F, "I2C lines released");
    wr(rp(5) + 32'h01C, 32'h8000_0000);
    wr(rp(5) + 32'h028, 32'h2);                   // NACK interrupt
    wr(rp(5) + 32'h100, 32'h1);
    wr(INTC_A + 32'h08, 32'h20);
    wr(INTC_A + 32'h0C, 32'h3F);
    iic_starts = 0;
    wr(rp(5) + 32'h108, 32'h100 | 32'hA0);        // START, address 0x50, write
    wr(rp(5) + 32'h108, 32'h200 | 32'h00);
    repeat (40 * 1000) begin
      @(negedge clk);
      if (irq) break;
    end
    chk(iic_starts == 1, $sformatf("I2C START conditions on the shield pins: %0d", iic_starts));
    chk(irq == 1'b1, "I2C NACK interrupt at the processor");
    rd(INTC_A + 32'h18, d);
    chk(d == 32'd5, $sformatf("I2C interrupt vector %0d", d));
    rd(rp(5) + 32'h020, d);
    chk(d[1] == 1'b1, "I2C NACK flagged");
    if (iic_starts == 1 && irq && d[1]) n_iic++;
    wr(rp(5) + 32'h020, 32'h2);
    wr(INTC_A + 32'h0C, 32'h20);
    repeat (4) @(negedge clk);
    chk(irq == 1'b0, "I2C interrupt cleared");

    chk(n_uart == 4, "mechanism: UART frames");
    chk(n_iic == 1, "mechanism: I2C transfer");
    chk(n_spi == 3, "mechanism: SPI transfers");
    chk(n_slverr > 0, "mechanism: access to decoupled region");
    chk(n_decerr > 0, "mechanism: unmapped address");
    chk(n_reconfig > 0, "mechanism: reconfiguration");
    chk(n_irq > 0, "mechanism: interrupt through controller");
    chk(n_pwm > 0, "mechanism: PWM on a region pin");
    chk(n_pins > 0, "mechanism: pin groups");
    $display("mechanisms: slverr=%0d decerr=%0d reconfig=%0d irq=%0d pwm=%0d pin_groups=%0d uart=%0d spi=%0d iic=%0d",
             n_slverr, n_decerr, n_reconfig, n_irq, n_pwm, n_pins, n_uart, n_spi, n_iic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
