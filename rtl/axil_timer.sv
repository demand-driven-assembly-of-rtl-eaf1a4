// axil_timer: two-counter AXI4-Lite timer with generate, capture and PWM modes.
//
// This is the core inside the Timer/PWM region module. It has two counters,
// timer 0 and timer 1. Each has a control/status register TCSRk, a load
// register TLRk and a read-only counter register TCRk, at byte offsets 0x00,
// 0x04 and 0x08 for timer 0 and 0x10, 0x14 and 0x18 for timer 1.
// TCSR bits:
//   0 MDT  0 = generate mode, 1 = capture mode   6 ENIT  interrupt enable
//   1 UDT  0 = count up, 1 = count down          7 ENT   counter enable
//   2 GENT drive generateoutk                    8 TINT  event flag, write 1 clears
//   3 CAPT enable capturetrigk                   9 PWMA  PWM enable
//   4 ARHT auto-reload                          10 ENALL enable both counters
//   5 LOAD hold the counter at TLR
// Generate mode: a terminal count (all ones counting up, zero counting down)
// sets TINT and pulses generateoutk for one cycle if GENT is set. Then the
// counter reloads from TLR if ARHT is set, or stops (ENT cleared) if not.
// Counting down from TLR, events are TLR+1 cycles apart.
// Capture mode: a rising edge on capturetrigk copies the counter into TLR and
// sets TINT. The counter runs freely.
// PWM mode: PWMA, GENT and generate mode are set in both TCSRs. Timer 0 sets
// the period, and each timer-0 event sets pwm0 and reloads timer 1. Timer 1
// sets the high time: its event clears pwm0, and it then holds until the next
// timer-0 event. Counting down, the period is TLR0+1 cycles and the high time
// is TLR1+1 cycles.
// freeze high holds both counters. interrupt = OR over k of (TINTk & ENITk).
// The source design shows only this core's name and pins. The register set
// and modes follow the usual vendor timer, written from its public behaviour.
// The exact cycle counts are this design's own.
module axil_timer
  import pr_pkg::*;
#(
  parameter int unsigned CW = 32   // counter width
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  input  logic      capturetrig0,
  input  logic      capturetrig1,
  input  logic      freeze,
  output logic      generateout0,
  output logic      generateout1,
  output logic      pwm0,
  output logic      interrupt
);

  typedef struct packed {
    logic enall, pwma, tint, ent, enit, load, arht, capt, gent, udt, mdt;
  } tcsr_t;

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [AXIL_DW/8-1:0] wr_strb;

  axil_reg_port u_port (
    .clk, .rst_n, .s_req, .s_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err(1'b0),
    .rd_en, .rd_addr, .rd_data, .rd_err(1'b0)
  );

  tcsr_t         tcsr_q [2];
  logic [CW-1:0] tlr_q  [2];
  logic [CW-1:0] tcr_q  [2];
  logic [1:0]    cap_prev_q, cap_in, cap_rise, term, event_k, run;
  logic          t1_hold_q, pwm_mode, pwm_q;
  logic [1:0]    gen_q;

  assign cap_in   = {capturetrig1, capturetrig0};
  assign cap_rise = cap_in & ~cap_prev_q;
  assign pwm_mode = tcsr_q[0].pwma && tcsr_q[1].pwma && tcsr_q[0].gent &&
                    tcsr_q[1].gent && !tcsr_q[0].mdt && !tcsr_q[1].mdt;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      run[k]  = (tcsr_q[k].ent || tcsr_q[0].enall || tcsr_q[1].enall) &&
                !tcsr_q[k].load && !freeze;
      term[k] = tcsr_q[k].udt ? (tcr_q[k] == '0) : (tcr_q[k] == '1);
      event_k[k] = run[k] && !tcsr_q[k].mdt && term[k];
    end
    if (pwm_mode && t1_hold_q) event_k[1] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 2; k++) begin
        tcsr_q[k] <= '0;
        tlr_q[k]  <= '0;
        tcr_q[k]  <= '0;
      end
      cap_prev_q <= '0;
      t1_hold_q  <= 1'b0;
      pwm_q      <= 1'b0;
      gen_q      <= '0;
    end else begin
      cap_prev_q <= cap_in;
      for (int k = 0; k < 2; k++) begin
        gen_q[k] <= event_k[k] && tcsr_q[k].gent;
        // counter
        if (tcsr_q[k].load) begin
          tcr_q[k] <= tlr_q[k];
        end else if (run[k] && !(k == 1 && pwm_mode && t1_hold_q)) begin
          if (event_k[k] && tcsr_q[k].arht)
            tcr_q[k] <= tlr_q[k];
          else if (!event_k[k])
            tcr_q[k] <= tcsr_q[k].udt ? tcr_q[k] - 1'b1 : tcr_q[k] + 1'b1;
        end
        // event flag and stop without auto-reload
        if (event_k[k]) begin
          tcsr_q[k].tint <= 1'b1;
          if (!tcsr_q[k].arht && !(k == 1 && pwm_mode)) tcsr_q[k].ent <= 1'b0;
        end
        // capture
        if (tcsr_q[k].mdt && tcsr_q[k].capt && cap_rise[k] && run[k]) begin
          tlr_q[k]       <= tcr_q[k];
          tcsr_q[k].tint <= 1'b1;
        end
      end
      // PWM: timer 0 event restarts timer 1 and raises pwm0
      if (pwm_mode) begin
        if (event_k[0]) begin
          tcr_q[1]  <= tlr_q[1];
          t1_hold_q <= 1'b0;
          pwm_q     <= 1'b1;
        end else if (event_k[1]) begin
          t1_hold_q <= 1'b1;
          pwm_q     <= 1'b0;
        end
      end else begin
        t1_hold_q <= 1'b0;
        pwm_q     <= 1'b0;
      end
      // register writes (after the counter so that software wins)
      if (wr_en) begin
        for (int k = 0; k < 2; k++) begin
          if (wr_addr[7:4] == 4'(k)) begin
            unique case (wr_addr[3:0])
              4'h0: begin
                tcsr_q[k].mdt   <= wr_data[0];
                tcsr_q[k].udt   <= wr_data[1];
                tcsr_q[k].gent  <= wr_data[2];
                tcsr_q[k].capt  <= wr_data[3];
                tcsr_q[k].arht  <= wr_data[4];
                tcsr_q[k].load  <= wr_data[5];
                tcsr_q[k].enit  <= wr_data[6];
                tcsr_q[k].ent   <= wr_data[7];
                if (wr_data[8]) tcsr_q[k].tint <= 1'b0;
                tcsr_q[k].pwma  <= wr_data[9];
                tcsr_q[k].enall <= wr_data[10];
              end
              4'h4: tlr_q[k] <= wr_data[CW-1:0];
              default: ;
            endcase
          end
        end
      end
    end
  end

  always_comb begin
    rd_data = '0;
    for (int k = 0; k < 2; k++) begin
      if (rd_addr[7:4] == 4'(k)) begin
        unique case (rd_addr[3:0])
          4'h0: rd_data[10:0] = {tcsr_q[k].enall, tcsr_q[k].pwma, tcsr_q[k].tint,
                                 tcsr_q[k].ent, tcsr_q[k].enit, tcsr_q[k].load,
                                 tcsr_q[k].arht, tcsr_q[k].capt, tcsr_q[k].gent,
                                 tcsr_q[k].udt, tcsr_q[k].mdt};
          4'h4: rd_data[CW-1:0] = tlr_q[k];
          4'h8: rd_data[CW-1:0] = tcr_q[k];
          default: ;
        endcase
      end
    end
  end

  assign generateout0 = gen_q[0];
  assign generateout1 = gen_q[1];
  assign pwm0         = pwm_q;
  assign interrupt    = (tcsr_q[0].tint && tcsr_q[0].enit) ||
                        (tcsr_q[1].tint && tcsr_q[1].enit);

endmodule
