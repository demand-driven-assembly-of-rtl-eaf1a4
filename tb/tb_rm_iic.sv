// tb_rm_iic: self-checking test of the I2C master region module with
// SCL_Q = 5 (20 cycles per SCL period). The two bus lines are wired-AND of
// the master's and a reference slave's open-drain drives. The slave is a
// small register device at address 0x50: the first byte after its address
// sets a pointer, further written bytes are stored, reads return stored
// bytes, and it stretches SCL after each acknowledge. A bus monitor checks
// that SDA changes only while SCL is low except for START and STOP, and
// counts START, repeated START and STOP conditions. Steps: a write of three
// bytes, a pointer write with repeated START and a three-byte read, an
// address that nobody acknowledges (NACK, queue flushed, STOP), the
// interrupt, FIFO status and the software reset.
module tb_rm_iic;
  import pr_pkg::*;

  localparam int Q = 5;
  localparam logic [6:0] SADDR = 7'h50;
  localparam int STRETCH = 23;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [7:0] gpio_i, gpio_o, gpio_t;
  logic irq;
  int checks = 0, failures = 0;

  axil_bfm u_bfm (.clk, .req, .rsp);
  rm_iic #(.SCL_Q(Q)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .gpio_i, .gpio_o, .gpio_t, .irq);

  logic s_sda_lo = 1'b0, s_scl_lo = 1'b0;
  wire  m_scl_lo = !gpio_t[0] && !gpio_o[0];
  wire  m_sda_lo = !gpio_t[1] && !gpio_o[1];
  wire  scl = !(m_scl_lo || s_scl_lo);
  wire  sda = !(m_sda_lo || s_sda_lo);

  always_comb begin
    gpio_i = 8'h00;
    gpio_i[0] = scl;
    gpio_i[1] = sda;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference slave and bus monitor
  typedef enum {S_IDLE, S_RX, S_RACK, S_TX, S_TACK} sst_e;
  sst_e st = S_IDLE;
  logic [7:0] mem[256];
  logic [7:0] sh = 0, cur = 0, ptr = 0;
  int   cnt = 0, stretch = 0;
  logic addr_ph = 0, first = 0, rdm = 0, mack = 0;
  logic scl_p = 1, sda_p = 1;
  int   n_start = 0, n_stop = 0, n_bad = 0, n_nack_addr = 0, n_stretched = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (!m_scl_lo && s_scl_lo) n_stretched++;
      if (stretch > 0) begin
        stretch--;
        if (stretch == 0) s_scl_lo = 1'b0;
      end
      if (scl && scl_p && sda_p && !sda) begin          // START
        n_start++;
        st = S_RX; cnt = 0; addr_ph = 1; s_sda_lo = 0;
      end else if (scl && scl_p && !sda_p && sda) begin  // STOP
        n_stop++;
        st = S_IDLE; s_sda_lo = 0;
      end else begin
        if (scl && scl_p && sda != sda_p) n_bad++;
        if (scl && !scl_p) begin                         // rising SCL
          if (st == S_RX) begin sh = {sh[6:0], sda}; cnt++; end
          if (st == S_TACK) mack = !sda;
        end
        if (!scl && scl_p) begin                         // falling SCL
          unique case (st)
            S_RX: if (cnt == 8) begin
              if (addr_ph) begin
                if (sh[7:1] == SADDR) begin
                  rdm = sh[0]; addr_ph = 0;
                  if (!rdm) first = 1;
                  st = S_RACK; s_sda_lo = 1;
                end else begin
                  n_nack_addr++;
                  st = S_IDLE;
                end
              end else begin
                if (first) begin ptr = sh; first = 0; end
                else begin mem[ptr] = sh; ptr++; end
                st = S_RACK; s_sda_lo = 1;
              end
            end
            S_RACK: begin
              s_sda_lo = 0;
              s_scl_lo = 1; stretch = STRETCH;
              if (rdm) begin
                cur = mem[ptr]; ptr++; cnt = 0; st = S_TX; s_sda_lo = !cur[7];
              end else begin
                cnt = 0; st = S_RX;
              end
            end
            S_TX: begin
              cnt++;
              if (cnt < 8) s_sda_lo = !cur[7 - cnt];
              else begin s_sda_lo = 0; st = S_TACK; end
            end
            S_TACK: begin
              if (mack) begin
                cur = mem[ptr]; ptr++; cnt = 0; st = S_TX; s_sda_lo = !cur[7];
              end else st = S_IDLE;
            end
            default: ;
          endcase
        end
      end
      scl_p = scl;
      sda_p = sda;
    end
  end

  task automatic wr(logic [31:0] a, logic [31:0] d);
    int r, c; u_bfm.write(a, d, r, c); chk(r == 0, "write resp");
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    int r, c; u_bfm.read(a, d, r, c); chk(r == 0, "read resp");
  endtask
  task automatic wait_free();
    logic [31:0] d;
    int n = 0;
    do begin rd(32'h104, d); n++; end while ((d[2] || !d[7]) && n < 5000);
    chk(n < 5000, "bus becomes free");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] START = 32'h100, STOP = 32'h200, READ = 32'h400;

  initial begin
    logic [31:0] d;
    foreach (mem[i]) mem[i] = 8'(i ^ 8'hA5);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);

    chk(gpio_o == 8'h00 && gpio_t == 8'hFF, "pins released after reset");
    rd(32'h104, d); chk(d[7:0] == 8'hC0, "SR after reset");
    wr(32'h100, 32'h1);

    // ---- write 11 22 33 at pointer 0x10
    wr(32'h108, START | {SADDR, 1'b0});
    wr(32'h108, 32'h10);
    wr(32'h108, 32'h11);
    wr(32'h108, 32'h22);
    wr(32'h108, STOP | 32'h33);
    wait_free();
    chk(mem[8'h10] == 8'h11 && mem[8'h11] == 8'h22 && mem[8'h12] == 8'h33,
        $sformatf("slave stored %h %h %h", mem[8'h10], mem[8'h11], mem[8'h12]));
    chk(n_start == 1 && n_stop == 1, $sformatf("write: %0d START %0d STOP", n_start, n_stop));
    chk(gpio_t[1:0] == 2'b11, "lines released after STOP");

    // ---- pointer 0x10, repeated START, read 3 bytes
    wr(32'h108, START | {SADDR, 1'b0});
    wr(32'h108, 32'h10);
    wr(32'h108, START | {SADDR, 1'b1});
    wr(32'h108, READ);
    wr(32'h108, READ);
    wr(32'h108, READ | STOP);
    wait_free();
    chk(n_start == 3 && n_stop == 2, $sformatf("read: %0d START %0d STOP", n_start, n_stop));
    begin
      logic [7:0] exp[3] = '{8'h11, 8'h22, 8'h33};
      foreach (exp[i]) begin
        rd(32'h10C, d);
        chk(d[7:0] == exp[i], $sformatf("read byte %0d = %h, expected %h", i, d[7:0], exp[i]));
      end
    end
    rd(32'h104, d); chk(d[6] == 1'b1, "RX empty after reading");
    rd(32'h020, d); chk(d[1] == 1'b0, "no NACK so far");

    // ---- held bus: a byte without STOP keeps SCL low until the next command
    wr(32'h108, START | {SADDR, 1'b0});
    repeat (80 * Q) @(negedge clk);
    chk(!scl, "SCL held low between commands");
    rd(32'h104, d); chk(d[2] == 1'b1, "bus busy while held");
    wr(32'h108, STOP | 32'h40);
    wait_free();
    chk(scl && sda, "bus free after STOP");

    // ---- nobody answers: NACK, queue flushed, STOP, interrupt
    wr(32'h01C, 32'h8000_0000);
    wr(32'h028, 32'h2);
    wr(32'h020, 32'h6);
    wr(32'h108, START | {7'h33, 1'b0});
    wr(32'h108, 32'h01);
    wr(32'h108, STOP | 32'h02);
    wait_free();
    rd(32'h020, d); chk(d[1] == 1'b1, "NACK flagged");
    chk(irq == 1'b1, "NACK interrupt");
    chk(n_nack_addr == 1, "slave ignored the wrong address");
    rd(32'h104, d); chk(d[7] == 1'b1 && d[2] == 1'b0, "queue flushed and bus free");
    chk(n_stop == 4, $sformatf("STOP after NACK (%0d)", n_stop));
    wr(32'h020, 32'h2);
    @(negedge clk);
    chk(irq == 1'b0, "interrupt cleared");

    // ---- queue-drained interrupt
    wr(32'h028, 32'h4);
    wr(32'h020, 32'h4);
    wr(32'h108, START | {SADDR, 1'b0});
    wr(32'h108, STOP | 32'h20);
    wait_free();
    chk(irq == 1'b1, "drained interrupt");
    wr(32'h020, 32'h4);

    // ---- TX full with the core disabled, then software reset
    wr(32'h100, 32'h0);
    for (int i = 0; i < 16; i++) wr(32'h108, i);
    rd(32'h104, d); chk(d[4] == 1'b1 && d[7] == 1'b0, "TX full after 16");
    wr(32'h100, 32'h2);
    rd(32'h104, d); chk(d[7] == 1'b1, "TX FIFO reset");
    wr(32'h108, 32'h5);
    wr(32'h040, 32'hA);
    rd(32'h104, d); chk(d[7:0] == 8'hC0, "SR after software reset");
    rd(32'h100, d); chk(d[0] == 1'b0, "disabled after software reset");

    chk(n_stretched > 0, "master waited for a stretched SCL");
    chk(n_bad == 0, $sformatf("SDA changed while SCL high %0d times", n_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
