// tb_rm_uartlite: self-checking test of the UART region module at 10 clock
// cycles per bit. A reference receiver in the testbench decodes the TX pin
// and checks every byte and the bit period; TX is looped back to RX to check
// the receive FIFO, status bits, interrupt and overrun; a hand-made frame
// with a zero stop bit checks the frame error. The sent bytes are
// DE AD BE EF, then a burst of 20 that overfills the 16-word receive FIFO.
module tb_rm_uartlite;
  import pr_pkg::*;

  localparam int CPB = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [7:0] gpio_i, gpio_o, gpio_t;
  logic irq, loopback = 1'b1, rx_drive = 1'b1;
  int checks = 0, failures = 0;
  logic [7:0] seen[$];

  axil_bfm u_bfm (.clk, .req, .rsp);
  rm_uartlite #(.CLK_HZ(1_000_000), .BAUD(100_000)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .gpio_i, .gpio_o, .gpio_t, .irq);

  always_comb begin
    gpio_i = '0;
    gpio_i[1] = loopback ? gpio_o[0] : rx_drive;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference receiver on the TX pin, sampling every clock: a frame starts
  // on a falling edge of an idle line; bit i is sampled CPB/2 + i*CPB cycles
  // later, so each bit must last exactly CPB cycles.
  logic tx_prev = 1'b1;
  int   mon_t = -1;
  logic [9:0] mon_b;
  always @(posedge clk) begin
    if (rst_n) begin
      if (mon_t < 0) begin
        if (tx_prev && !gpio_o[0]) mon_t = 0;
      end else begin
        mon_t++;
        if (mon_t % CPB == CPB / 2) mon_b[mon_t / CPB] = gpio_o[0];
        if (mon_t == 9 * CPB + CPB / 2) begin
          chk(mon_b[0] == 1'b0, "start bit");
          chk(mon_b[9] == 1'b1, "stop bit");
          seen.push_back(mon_b[8:1]);
          mon_t = -1;
        end
      end
      tx_prev = gpio_o[0];
    end
  end

  task automatic wr(logic [31:0] a, logic [31:0] d);
    int r, c; u_bfm.write(a, d, r, c); chk(r == 0, "write resp");
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    int r, c; u_bfm.read(a, d, r, c); chk(r == 0, "read resp");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0] msg[4] = '{8'hDE, 8'hAD, 8'hBE, 8'hEF};
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(gpio_t == 8'hFE && gpio_o[0] == 1'b1, "TX driven idle high, others released");
    rd(32'h8, d);
    chk(d[2] == 1'b1 && d[0] == 1'b0, "STAT: tx empty, rx empty");
    wr(32'hC, 32'h10);
    rd(32'h8, d);
    chk(d[4] == 1'b1, "interrupt enabled");
    foreach (msg[i]) wr(32'h4, {24'h0, msg[i]});
    t0 = $time / 10;
    wait (seen.size() == 4);
    repeat (CPB * 2) @(negedge clk);
    foreach (msg[i]) chk(seen[i] == msg[i], $sformatf("TX byte %0d = %02h", i, seen[i]));
    chk(($time / 10 - t0) < 4 * 10 * CPB + 4 * CPB, "four frames back to back");
    chk(irq == 1'b1, "interrupt after receive / tx empty");
    rd(32'h8, d);
    chk(d[0] == 1'b1 && d[2] == 1'b1 && d[5] == 1'b0, "STAT: rx valid, tx empty, no overrun");
    @(negedge clk);
    chk(irq == 1'b0, "STAT read clears the interrupt flag");
    foreach (msg[i]) begin
      rd(32'h0, d);
      chk(d[7:0] == msg[i], $sformatf("RX byte %0d = %02h", i, d[7:0]));
    end
    rd(32'h8, d);
    chk(d[0] == 1'b0, "RX FIFO empty after four reads");

    // overrun: 20 bytes into a 16-word FIFO
    seen.delete();
    for (int i = 0; i < 17; i++) wr(32'h4, i);   // one goes straight to the shifter
    rd(32'h8, d);
    chk(d[3] == 1'b1, "TX FIFO full after 17 writes");
    wait (seen.size() == 4);
    for (int i = 17; i < 20; i++) wr(32'h4, i);
    wait (seen.size() == 20);
    repeat (CPB * 2) @(negedge clk);
    rd(32'h8, d);
    chk(d[1] == 1'b1 && d[5] == 1'b1, "RX full and overrun");
    for (int i = 0; i < 16; i++) begin
      rd(32'h0, d);
      chk(d[7:0] == 8'(i), $sformatf("burst byte %0d", i));
    end
    for (int i = 0; i < 20; i++) chk(seen[i] == 8'(i), $sformatf("burst on the TX pin %0d: %02h", i, seen[i]));

    // frame error: stop bit 0
    loopback = 1'b0;
    wr(32'hC, 32'h12);             // clear RX FIFO, keep interrupt enabled
    rd(32'h8, d);
    @(negedge clk); rx_drive = 1'b0;                     // start
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx_drive = 1'b1; repeat (CPB) @(negedge clk); end
    rx_drive = 1'b0;                                     // bad stop bit
    repeat (CPB) @(negedge clk);
    rx_drive = 1'b1;
    repeat (3 * CPB) @(negedge clk);
    rd(32'h8, d);
    chk(d[6] == 1'b1 && d[0] == 1'b0, "frame error, byte dropped");
    rd(32'h8, d);
    chk(d[6] == 1'b0, "frame error cleared by STAT read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
