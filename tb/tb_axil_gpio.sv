// tb_axil_gpio: self-checking test of the AXI4-Lite GPIO.
// Checks reset values, direction and data registers against a reference
// model over random traffic, byte strobes, the change interrupt and its
// latency (input edge to irq: three clock edges with two synchroniser stages),
// the write-1-to-clear status bit and an unmapped offset.
module tb_axil_gpio;
  import pr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [7:0] gpio_i = 8'h00, gpio_o, gpio_t;
  logic irq;
  int checks = 0, failures = 0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  axil_gpio dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp),
                 .gpio_i, .gpio_o, .gpio_t, .irq);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d, logic [3:0] s = 4'hF);
    int r, c;
    u_bfm.write(a, d, r, c, s);
    chk(r == 0, $sformatf("write 0x%0h resp %0d", a, r));
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    int r, c;
    u_bfm.read(a, d, r, c);
    chk(r == 0, $sformatf("read 0x%0h resp %0d", a, r));
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
    logic [7:0] m_data, m_tri;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    chk(gpio_t == 8'hFF, "reset: all pins inputs");
    chk(irq == 1'b0, "reset: no interrupt");
    rd(32'h4, d); chk(d == 32'hFF, "TRI reset value");

    // random data/direction traffic against a model
    m_data = 8'h00; m_tri = 8'hFF;
    for (int i = 0; i < 200; i++) begin
      logic [7:0] v;
      int op;
      v = 8'($urandom);
      op = $urandom_range(0, 2);
      case (op)
        0: begin wr(32'h0, {24'h0, v}); m_data = v; end
        1: begin wr(32'h4, {24'h0, v}); m_tri = v; end
        default: begin gpio_i = v; repeat (3) @(negedge clk); end
      endcase
      rd(32'h0, d);
      chk(d[7:0] == ((gpio_i & m_tri) | (m_data & ~m_tri)), $sformatf("DATA read %0h", d));
      chk(gpio_o == m_data && gpio_t == m_tri, "pins follow registers");
    end
    // byte strobe off: no change
    wr(32'h0, 32'h0000_00C3, 4'h0);
    chk(gpio_o == m_data, "write with no strobe ignored");
    rd(32'h40, d); chk(d == 0, "unmapped offset reads zero");

    // change interrupt
    wr(32'h4, 32'hFF);
    repeat (4) @(negedge clk);
    wr(32'h120, 32'h1);             // clear anything pending
    wr(32'h128, 32'h1);
    wr(32'h11C, 32'h8000_0000);
    chk(irq == 1'b0, "no interrupt without an input change");
    @(negedge clk);
    gpio_i = gpio_i ^ 8'h10;
    lat = 0;
    while (!irq && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat == 3, $sformatf("interrupt latency %0d edges, expect 3", lat));
    rd(32'h120, d); chk(d[0] == 1'b1, "ISR set");
    wr(32'h120, 32'h1);
    @(negedge clk);
    chk(irq == 1'b0, "ISR cleared by write 1");
    wr(32'h11C, 32'h0);
    gpio_i = gpio_i ^ 8'h01;
    repeat (5) @(negedge clk);
    chk(irq == 1'b0, "GIER gates the interrupt");
    rd(32'h120, d); chk(d[0] == 1'b1, "ISR set with GIER off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
