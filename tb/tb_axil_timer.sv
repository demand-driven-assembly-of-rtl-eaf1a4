// tb_axil_timer: self-checking test of the two-counter timer.
// Generate mode counting down with auto-reload (events TLR+1 cycles apart,
// interrupt), counting up without auto-reload (one event, then stopped), PWM
// (period TLR0+1, high time TLR1+1 cycles), capture of the counter on a
// trigger edge, and freeze.
module tb_axil_timer;
  import pr_pkg::*;

  localparam logic [31:0] MDT = 32'h001, UDT = 32'h002, GENT = 32'h004,
    CAPT = 32'h008, ARHT = 32'h010, LOAD = 32'h020, ENIT = 32'h040,
    ENT = 32'h080, TINT = 32'h100, PWMA = 32'h200, ENALL = 32'h400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic cap0 = 1'b0, cap1 = 1'b0, freeze = 1'b0;
  logic gen0, gen1, pwm0, intr;
  int checks = 0, failures = 0;
  int cyc = 0;
  int gen0_t[$], gen1_t[$], pwm_rise[$], pwm_fall[$];
  logic pwm_prev = 1'b0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  axil_timer dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp),
                  .capturetrig0(cap0), .capturetrig1(cap1), .freeze,
                  .generateout0(gen0), .generateout1(gen1), .pwm0, .interrupt(intr));

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (gen0) gen0_t.push_back(cyc);
    if (gen1) gen1_t.push_back(cyc);
    if (pwm0 && !pwm_prev) pwm_rise.push_back(cyc);
    if (!pwm0 && pwm_prev) pwm_fall.push_back(cyc);
    pwm_prev <= pwm0;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    int r, c; u_bfm.write(a, d, r, c); chk(r == 0, "write resp");
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    int r, c; u_bfm.read(a, d, r, c); chk(r == 0, "read resp");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, a, b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: generate mode, down, auto-reload, period 10
    wr(32'h04, 32'd9);
    wr(32'h00, LOAD);
    chk(intr == 0, "no interrupt before start");
    gen0_t.delete();
    wr(32'h00, UDT | GENT | ARHT | ENIT | ENT);
    repeat (75) @(negedge clk);
    chk(gen0_t.size() >= 6, $sformatf("generateout0 pulses: %0d", gen0_t.size()));
    for (int i = 1; i < gen0_t.size(); i++)
      chk(gen0_t[i] - gen0_t[i-1] == 10, $sformatf("generate period %0d", gen0_t[i] - gen0_t[i-1]));
    chk(intr == 1, "interrupt after event");
    wr(32'h00, TINT);
    @(negedge clk);
    chk(intr == 0, "TINT cleared, timer stopped");

    // 2: up count, no auto-reload: one event, then stop
    wr(32'h14, 32'hFFFF_FFF0);
    wr(32'h10, LOAD);
    gen1_t.delete();
    wr(32'h10, GENT | ENT);
    repeat (60) @(negedge clk);
    chk(gen1_t.size() == 1, $sformatf("one event without auto-reload, got %0d", gen1_t.size()));
    rd(32'h10, d);
    chk(d[7] == 1'b0 && d[8] == 1'b1, "ENT cleared and TINT set after terminal count");
    rd(32'h18, d);
    chk(d == 32'hFFFF_FFFF, "counter holds at terminal count");

    // 3: PWM, period 20, high 5
    wr(32'h10, TINT);
    wr(32'h00, TINT);
    wr(32'h04, 32'd19);
    wr(32'h14, 32'd4);
    wr(32'h00, LOAD);
    wr(32'h10, LOAD);
    wr(32'h10, UDT | GENT | ARHT | PWMA);
    pwm_rise.delete(); pwm_fall.delete();
    wr(32'h00, UDT | GENT | ARHT | PWMA | ENALL);
    repeat (130) @(negedge clk);
    chk(pwm_rise.size() >= 5, $sformatf("pwm periods seen: %0d", pwm_rise.size()));
    for (int i = 1; i < pwm_rise.size(); i++)
      chk(pwm_rise[i] - pwm_rise[i-1] == 20, $sformatf("pwm period %0d", pwm_rise[i] - pwm_rise[i-1]));
    for (int i = 0; i < pwm_fall.size(); i++)
      if (i < pwm_rise.size())
        chk(pwm_fall[i] - pwm_rise[i] == 5, $sformatf("pwm high %0d", pwm_fall[i] - pwm_rise[i]));
    wr(32'h00, 32'h0);
    wr(32'h10, 32'h0);
    repeat (3) @(negedge clk);
    chk(pwm0 == 1'b0, "pwm0 low when PWM is off");

    // 4: capture
    wr(32'h04, 32'd0);
    wr(32'h00, LOAD);
    wr(32'h00, MDT | CAPT | ENT | ENIT);
    repeat (17) @(negedge clk);
    rd(32'h08, a);
    repeat (5) @(negedge clk);
    cap0 = 1'b1;
    repeat (2) @(negedge clk);
    cap0 = 1'b0;
    repeat (5) @(negedge clk);
    rd(32'h08, b);
    rd(32'h04, d);
    chk(d > a && d < b, $sformatf("captured %0d between %0d and %0d", d, a, b));
    chk(intr == 1'b1, "capture raises interrupt");
    rd(32'h00, d);
    chk(d[8] == 1'b1, "capture sets TINT");

    // 5: freeze
    freeze = 1'b1;
    rd(32'h08, a);
    repeat (20) @(negedge clk);
    rd(32'h08, b);
    chk(a == b, "freeze holds the counter");
    freeze = 1'b0;
    repeat (5) @(negedge clk);
    rd(32'h08, b);
    chk(b > a, "counter resumes after freeze");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
