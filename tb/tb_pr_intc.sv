// tb_pr_intc: self-checking test of the region interrupt controller.
// Checks the enable, master enable, pending, vector and acknowledge registers
// and the level behaviour (an acknowledged input that is still high is
// pending again), with random input patterns against a reference model.
module tb_pr_intc;
  import pr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [5:0] irq_in = '0;
  logic irq;
  int checks = 0, failures = 0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  pr_intc dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .irq_in, .irq);

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
    logic [31:0] d;
    logic [5:0] m_isr, m_ier;
    logic m_me;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    irq_in = 6'b000100;
    repeat (2) @(negedge clk);
    chk(irq == 0, "disabled controller raises nothing");
    rd(32'h00, d); chk(d[5:0] == 6'b000100, "ISR records input 2");
    rd(32'h18, d); chk(d == 32'hFFFF_FFFF, "IVR all ones with nothing enabled");
    wr(32'h08, 32'h04);
    chk(irq == 0, "no irq without master enable");
    wr(32'h1C, 32'h1);
    chk(irq == 1, "irq with IER and MER");
    rd(32'h18, d); chk(d == 2, "IVR = 2");
    wr(32'h0C, 32'h04);
    rd(32'h00, d); chk(d[2] == 1'b1, "level input still high re-sets ISR");
    irq_in = 6'b0;
    wr(32'h0C, 32'h04);
    @(negedge clk);
    chk(irq == 0, "acknowledged and input low: irq drops");
    wr(32'h10, 32'h30);
    rd(32'h08, d); chk(d[5:0] == 6'b110100, "SIE sets bits");
    wr(32'h14, 32'h04);
    rd(32'h08, d); chk(d[5:0] == 6'b110000, "CIE clears bits");

    // random pulses against a model
    wr(32'h0C, 32'h3F);
    m_isr = '0; m_ier = 6'b110000; m_me = 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic [5:0] p;
      p = 6'($urandom);
      @(negedge clk); irq_in = p;
      @(negedge clk); irq_in = '0;
      m_isr |= p;
      if ($urandom_range(0, 3) == 0) begin
        logic [5:0] e; e = 6'($urandom);
        wr(32'h08, {26'h0, e}); m_ier = e;
      end
      @(negedge clk);
      chk(irq == (m_me && ((m_isr & m_ier) != 0)), "irq matches model");
      rd(32'h04, d); chk(d[5:0] == (m_isr & m_ier), "IPR matches model");
      rd(32'h18, d);
      begin
        logic [31:0] exp; exp = '1;
        for (int k = 5; k >= 0; k--) if (m_isr[k] & m_ier[k]) exp = k;
        chk(d == exp, $sformatf("IVR %0d expect %0d", d, exp));
      end
      if ($urandom_range(0, 1) == 0) begin
        logic [5:0] a; a = 6'($urandom);
        wr(32'h0C, {26'h0, a}); m_isr &= ~a;
      end
    end
    wr(32'h1C, 32'h0);
    chk(irq == 0, "MER off masks everything");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
