// tb_rm_spi: self-checking test of the SPI master region module with
// SCK_RATIO = 8. A reference SPI slave in the testbench follows SS and SCK
// in whichever clock mode is under test, collects the MOSI bytes and
// answers with its own bytes on MISO. For every combination of CPOL, CPHA
// and bit order, bursts of bytes are exchanged and checked both ways,
// together with the SCK idle level, the SCK period and SS framing. Further
// steps check loopback, manual slave select, transaction inhibit, the
// interrupt, FIFO status, FIFO resets and the software reset.
module tb_rm_spi;
  import pr_pkg::*;

  localparam int RATIO = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [7:0] gpio_i, gpio_o, gpio_t;
  logic irq;
  int checks = 0, failures = 0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  rm_spi #(.SCK_RATIO(RATIO)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .gpio_i, .gpio_o, .gpio_t, .irq);

  wire ss = gpio_o[0], mosi = gpio_o[1], sck = gpio_o[3];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference slave
  logic m_cpol = 0, m_cpha = 0, m_lsb = 0;
  logic [7:0] s_out[$];      // bytes the slave sends
  logic [7:0] s_got[$];      // bytes the slave received
  logic [7:0] s_cur = 8'h00, s_rx = 8'h00;
  int   s_idx = 0;
  logic s_miso = 1'b0, sck_prev = 1'b0, ss_prev = 1'b1;
  int   last_lead = -1, cyc = 0, bad_period = 0, lead_cnt = 0;

  function automatic logic bitof(logic [7:0] b, int k, logic lsb);
    return lsb ? b[k] : b[7 - k];
  endfunction

  always_comb begin
    gpio_i = '0;
    gpio_i[2] = m_cpha ? s_miso : bitof(s_cur, s_idx, m_lsb);
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (ss_prev && !ss) begin
        s_idx = 0;
        s_cur = (s_out.size() > 0) ? s_out.pop_front() : 8'h00;
      end
      if (!ss && sck != sck_prev) begin
        if (sck != m_cpol) begin   // leading edge
          lead_cnt++;
          if (s_idx != 0 && last_lead >= 0 && cyc - last_lead != RATIO) bad_period++;
          last_lead = cyc;
          if (m_cpha) s_miso = bitof(s_cur, s_idx, m_lsb);
          else        s_rx[7 - s_idx] = mosi;
        end else begin             // trailing edge
          if (m_cpha) s_rx[7 - s_idx] = mosi;
          s_idx++;
          if (s_idx == 8) begin
            logic [7:0] v;
            v = m_lsb ? {<<{s_rx}} : s_rx;
            s_got.push_back(v);
            s_idx = 0;
            s_cur = (s_out.size() > 0) ? s_out.pop_front() : 8'h00;
          end
        end
      end
      sck_prev = sck;
      ss_prev  = ss;
    end
  end

  task automatic wr(logic [31:0] a, logic [31:0] d);
    int r, c; u_bfm.write(a, d, r, c); chk(r == 0, "write resp");
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    int r, c; u_bfm.read(a, d, r, c); chk(r == 0, "read resp");
  endtask
  task automatic wait_idle();
    logic [31:0] d;
    int n = 0;
    do begin
      rd(32'h64, d);
      n++;
    end while (!d[2] && n < 1000);
    repeat (RATIO * 10) @(posedge clk);
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
    logic [7:0] mo[$], so[$];
    logic [9:0] cr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    chk(gpio_t == 8'b1111_0100, "pin directions");
    chk(ss == 1'b1, "SS idle high");
    rd(32'h64, d); chk(d[3:0] == 4'b0101, "status after reset");
    rd(32'h70, d); chk(d[0] == 1'b1, "SSR reset value");

    // ---- all modes and bit orders
    for (int mode = 0; mode < 8; mode++) begin
      m_cpol = mode[0]; m_cpha = mode[1]; m_lsb = mode[2];
      cr = '0;
      cr[9] = m_lsb; cr[4] = m_cpha; cr[3] = m_cpol; cr[2] = 1'b1; cr[1] = 1'b1;
      cr[8] = 1'b1;                     // inhibit while loading
      wr(32'h60, {22'd0, cr});
      repeat (4) @(negedge clk);
      chk(sck == m_cpol, $sformatf("mode %0d SCK idle level", mode));
      mo.delete(); so.delete(); s_got.delete(); s_out.delete();
      for (int i = 0; i < 4; i++) begin
        mo.push_back(8'($urandom));
        so.push_back(8'($urandom));
        s_out.push_back(so[i]);
        wr(32'h68, {24'd0, mo[i]});
      end
      rd(32'h64, d); chk(d[2] == 1'b0, "inhibit holds the TX FIFO");
      chk(ss == 1'b1, "no SS while inhibited");
      lead_cnt = 0; bad_period = 0;
      cr[8] = 1'b0;
      wr(32'h60, {22'd0, cr});
      wait_idle();
      chk(sck == m_cpol, $sformatf("mode %0d SCK back at idle", mode));
      chk(ss == 1'b1, "SS released after burst");
      chk(lead_cnt == 32, $sformatf("mode %0d leading edges %0d", mode, lead_cnt));
      chk(bad_period == 0, $sformatf("mode %0d SCK period", mode));
      chk(s_got.size() == 4, $sformatf("mode %0d slave got %0d bytes", mode, s_got.size()));
      for (int i = 0; i < 4 && i < s_got.size(); i++)
        chk(s_got[i] == mo[i], $sformatf("mode %0d MOSI byte %0d: %h vs %h", mode, i, s_got[i], mo[i]));
      for (int i = 0; i < 4; i++) begin
        rd(32'h6C, d);
        chk(d[7:0] == so[i], $sformatf("mode %0d MISO byte %0d: %h vs %h", mode, i, d[7:0], so[i]));
      end
      rd(32'h64, d); chk(d[0] == 1'b1, "RX empty after reading");
    end

    // ---- loopback
    m_cpol = 0; m_cpha = 0; m_lsb = 0;
    wr(32'h60, 32'h0000_0007);
    s_out.delete(); s_out.push_back(8'h00);
    wr(32'h68, 32'h0000_00A5);
    wait_idle();
    rd(32'h6C, d); chk(d[7:0] == 8'hA5, "loopback byte");

    // ---- manual slave select
    wr(32'h60, 32'h0000_0086);
    wr(32'h70, 32'h0);
    repeat (2) @(negedge clk);
    chk(ss == 1'b0, "manual SS low");
    wr(32'h70, 32'h1);
    repeat (2) @(negedge clk);
    chk(ss == 1'b1, "manual SS high");
    wr(32'h60, 32'h0000_0006);

    // ---- interrupt on TX FIFO drained
    wr(32'h1C, 32'h8000_0000);
    wr(32'h28, 32'h4);
    wr(32'h20, 32'h4);
    chk(irq == 1'b0, "irq low before send");
    wr(32'h68, 32'h0000_003C);
    wait_idle();
    chk(irq == 1'b1, "irq after TX drained");
    rd(32'h20, d); chk(d[2] == 1'b1, "IPISR bit 2");
    wr(32'h20, 32'h4);
    @(negedge clk);
    chk(irq == 1'b0, "irq cleared");
    rd(32'h6C, d);

    // ---- RX full after 16 bytes, RX FIFO reset
    wr(32'h1C, 32'h0);
    for (int i = 0; i < 16; i++) wr(32'h68, i);
    wait_idle();
    rd(32'h64, d); chk(d[1:0] == 2'b10, "RX full after 16");
    chk(irq == 1'b0, "irq masked by DGIER");
    wr(32'h60, 32'h0000_0046);
    rd(32'h64, d); chk(d[1:0] == 2'b01, "RX FIFO reset");

    // ---- TX full, TX FIFO reset (inhibited so nothing leaves)
    wr(32'h60, 32'h0000_0106);
    for (int i = 0; i < 16; i++) wr(32'h68, i);
    rd(32'h64, d); chk(d[3:2] == 2'b10, "TX full after 16");
    wr(32'h60, 32'h0000_0126);
    rd(32'h64, d); chk(d[3:2] == 2'b01, "TX FIFO reset");

    // ---- software reset
    wr(32'h68, 32'h55);
    wr(32'h40, 32'h0000_000A);
    rd(32'h60, d); chk(d[9:0] == 10'd0, "SPICR cleared by SRR");
    rd(32'h64, d); chk(d[3:0] == 4'b0101, "FIFOs cleared by SRR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
