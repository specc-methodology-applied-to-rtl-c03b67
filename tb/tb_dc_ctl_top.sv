// End-to-end testbench of dc_ctl_top at its default sizes (50 clocks per
// microsecond, Tc = 284 us, 5 us current sampling, 1 ms speed window).
//
// Each architecture drives its own simple motor model: the armature
// current rises towards full scale while C0 is high and decays while it is
// low (time constant 50 us, in ADC codes), and the encoder edge rate
// follows the current with a 2 ms mechanical time constant. Each motor
// starts turning backwards, so negative speeds are measured too.
//
// A DSP56600 model per architecture plays the processor. Architecture 1:
// on IRQC it writes alpha, reads i_m and Omega_m, then runs the current
// loop in software (the same PI law as the architecture-2 ASIC).
// Architecture 2: on the ASIC's interrupt it reads alpha from the ASIC,
// writes it to the PWM register, reads the current register and writes
// i_m and I_ref to the ASIC; once per 20 ms speed period it reads the
// speed register (the signed encoder period), converts it to a speed and
// recomputes I_ref. One architecture-2 exchange is
// deliberately skipped to provoke an overrun.
//
// Checks: values read over each bus equal the producing block's state;
// the pulse width in use equals the one just written; the ASIC's alpha is
// the PI law applied to the previous period's i_m and I_ref; both current
// loops track I_ref at the end. Every mechanism (interrupts, each bus
// transfer, PWM update, control saturation, overrun, both speed signs)
// must occur at least once.
module tb_dc_ctl_top;
  import dcctl_pkg::*;
  localparam int CPU = 50, TC = 284, KP = 64, KI = 8, SH = 8;
  localparam int TM_US = 20000;
  localparam int RUN_US = 55000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADC_W-1:0] a1_n_im = '0, a2_n_im = '0;
  logic a1_s0 = 1'b0, a1_s1 = 1'b0, a2_s0 = 1'b0, a2_s1 = 1'b0;
  logic a1_c0, a1_c1, a1_irqc, a2_c0, a2_c1, a2_irq, a1_period_start, a2_sat;
  dsp_bus_m_t a1_bus_m = BUS_IDLE, a2_bus_m = BUS_IDLE;
  dsp_bus_s_t a1_bus_s, a2_bus_s;
  logic [ALPHA_W-1:0] a1_alpha, a2_alpha;
  logic [ADC_W-1:0] a1_i_m, a2_i_m;
  logic signed [SPEED_W-1:0] a1_omega, a2_omega;
  logic [7:0] a2_overruns;
  int checks = 0, failures = 0;

  dc_ctl_top dut (
    .clk(clk), .rst_n(rst_n),
    .a1_n_im(a1_n_im), .a1_s0(a1_s0), .a1_s1(a1_s1), .a1_c0(a1_c0), .a1_c1(a1_c1),
    .a1_irqc(a1_irqc), .a1_bus_m(a1_bus_m), .a1_bus_s(a1_bus_s),
    .a1_period_start(a1_period_start), .a1_alpha(a1_alpha), .a1_i_m(a1_i_m), .a1_omega(a1_omega),
    .a2_n_im(a2_n_im), .a2_s0(a2_s0), .a2_s1(a2_s1), .a2_c0(a2_c0), .a2_c1(a2_c1),
    .a2_irq(a2_irq), .a2_bus_m(a2_bus_m), .a2_bus_s(a2_bus_s),
    .a2_alpha(a2_alpha), .a2_i_m(a2_i_m), .a2_omega(a2_omega), .a2_sat(a2_sat),
    .a2_overruns(a2_overruns));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat ((RUN_US + 3000) * CPU) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // ---------------- motor models, updated every microsecond ----------------
  real i1 = 0.0, i2 = 0.0, w1 = -150.0, w2 = -150.0, ph1 = 0.0, ph2 = 0.0;
  int  hi1 = 0, hi2 = 0, pos1 = 0, pos2 = 0;

  function automatic logic [1:0] enc(int k);
    case (k & 3)
      0: return 2'b00;
      1: return 2'b01;
      2: return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  always @(posedge clk) begin
    if (a1_c0) hi1++;
    if (a2_c0) hi2++;
  end

  int now_us = 0;
  always begin
    repeat (CPU) @(posedge clk);
    now_us++;
    // duty of the last microsecond drives the current (ADC codes)
    i1 += (1023.0 * hi1 / CPU - i1) / 50.0;
    i2 += (1023.0 * hi2 / CPU - i2) / 50.0;
    hi1 = 0; hi2 = 0;
    // speed in encoder edges per ms follows 0.5 * current
    w1 += (0.5 * i1 - w1) / 2000.0;
    w2 += (0.5 * i2 - w2) / 2000.0;
    ph1 += w1 / 1000.0;
    ph2 += w2 / 1000.0;
    if (ph1 >= 1.0) begin pos1++; ph1 -= 1.0; end
    if (ph1 <= -1.0) begin pos1--; ph1 += 1.0; end
    if (ph2 >= 1.0) begin pos2++; ph2 -= 1.0; end
    if (ph2 <= -1.0) begin pos2--; ph2 += 1.0; end
    {a1_s1, a1_s0} <= enc(pos1);
    {a2_s1, a2_s0} <= enc(pos2);
    a1_n_im <= 10'($rtoi(i1));
    a2_n_im <= 10'($rtoi(i2));
  end

  // ---------------- control law, as software on the DSP ----------------
  function automatic int pi_step(inout int integ, input int iref, input int im);
    int e, u;
    e = iref - im;
    integ = integ + KI * e;
    if (integ < 0) integ = 0;
    if (integ > (TC << SH)) integ = TC << SH;
    u = (KP * e + integ) >>> SH;
    return (u < 0) ? 0 : (u > TC) ? TC : u;
  endfunction

  localparam int OMEGA_REF = 200;     // edges per ms
  function automatic int speed_law(int om);
    int r;
    r = 400 + 3 * (OMEGA_REF - om);
    return (r < 0) ? 0 : (r > 800) ? 800 : r;
  endfunction

  // ---------------- bus cycles of the two DSP models ----------------
  task automatic a1_write(input logic [15:0] a, input logic [23:0] d);
    a1_bus_m.a <= a; a1_bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    a1_bus_m.d <= d; a1_bus_m.wr_n <= 1'b0;
    repeat (4) @(posedge clk);
    a1_bus_m.wr_n <= 1'b1;
    @(posedge clk);
    a1_bus_m.mcs_n <= 1'b1; a1_bus_m.d <= '0;
    repeat (3) @(posedge clk);
  endtask

  task automatic a1_read(input logic [15:0] a, output logic [23:0] d);
    a1_bus_m.a <= a; a1_bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    a1_bus_m.rd_n <= 1'b0;
    repeat (4) @(posedge clk);
    d = a1_bus_s.oe ? a1_bus_s.d : 24'hDEAD00;
    a1_bus_m.rd_n <= 1'b1;
    @(posedge clk);
    a1_bus_m.mcs_n <= 1'b1;
    repeat (3) @(posedge clk);
  endtask

  task automatic a2_write(input logic [15:0] a, input logic [23:0] d);
    a2_bus_m.a <= a; a2_bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    a2_bus_m.d <= d; a2_bus_m.wr_n <= 1'b0;
    repeat (4) @(posedge clk);
    a2_bus_m.wr_n <= 1'b1;
    @(posedge clk);
    a2_bus_m.mcs_n <= 1'b1; a2_bus_m.d <= '0;
    repeat (3) @(posedge clk);
  endtask

  task automatic a2_read(input logic [15:0] a, output logic [23:0] d);
    a2_bus_m.a <= a; a2_bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    a2_bus_m.rd_n <= 1'b0;
    repeat (4) @(posedge clk);
    d = a2_bus_s.oe ? a2_bus_s.d : 24'hDEAD00;
    a2_bus_m.rd_n <= 1'b1;
    @(posedge clk);
    a2_bus_m.mcs_n <= 1'b1;
    repeat (3) @(posedge clk);
  endtask

  // ---------------- mechanism counters ----------------
  int n_a1_irq = 0, n_a1_xchg = 0, n_a1_pwm_upd = 0, n_a1_neg = 0, n_a1_pos = 0;
  int n_a2_irq = 0, n_a2_alpha_rd = 0, n_a2_ralpha_wr = 0, n_a2_rim_rd = 0;
  int n_a2_per = 0, n_a2_asic_wr = 0, n_a2_romega_rd = 0, n_a2_sat = 0, n_a2_neg = 0, n_a2_pos = 0;
  logic a1_irqc_d = 1'b0, a2_irq_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    a1_irqc_d <= a1_irqc;
    a2_irq_d  <= a2_irq;
    if (a1_irqc && !a1_irqc_d) n_a1_irq++;
    if (a2_irq && !a2_irq_d) n_a2_irq++;
    if (a2_sat && dut.u_a2_asic.alpha_valid) n_a2_sat++;
  end

  // ---------------- architecture 1: DSP with both loops in software -------
  int a1_int = 0, a1_alpha_next = 0, a1_iref = 400, a1_last_tm = 0;
  int a1_final_err = 9999;
  initial begin : dsp1
    logic [23:0] d;
    int im, om;
    repeat (5) @(posedge clk);
    forever begin
      @(posedge clk iff a1_irqc);
      a1_write(A1_ALPHA, 24'(a1_alpha_next));
      a1_read(A1_IM, d);
      check("a1 pulse width in use", a1_alpha, a1_alpha_next);
      n_a1_pwm_upd++;
      check("a1 i_m read", d, 24'(dut.u_a1.i_m));
      im = int'(d);
      a1_read(A1_OMEGA, d);
      check("a1 omega read", $signed(d), dut.u_a1.omega);
      om = int'($signed(d));
      if (om < 0) n_a1_neg++;
      if (om > 0) n_a1_pos++;
      n_a1_xchg++;
      // speed loop every Tm, current loop every Tc
      if (now_us - a1_last_tm >= TM_US) begin
        a1_last_tm = now_us;
        a1_iref = speed_law(om);
      end
      a1_alpha_next = pi_step(a1_int, a1_iref, im);
      a1_final_err = a1_iref - im;
    end
  end

  // ---------------- architecture 2: DSP with the speed loop ----------------
  int a2_int = 0, a2_expect_alpha = 0, a2_iref = 400, a2_last_tm = -TM_US;
  int a2_final_err = 9999, a2_p = 0;
  initial begin : dsp2
    logic [23:0] d;
    int al, im, om;
    repeat (5) @(posedge clk);
    forever begin
      @(posedge clk iff a2_irq);
      a2_p++;
      if (a2_p == 30) begin
        // leave this exchange for more than a period: an overrun
        repeat ((TC + 20) * CPU) @(posedge clk);
      end
      a2_read(A2_ASIC_ALPHA, d);
      al = int'(d);
      check("a2 alpha from the ASIC", al, a2_expect_alpha);
      n_a2_alpha_rd++;
      a2_write(A2_R_ALPHA, 24'(al));
      a2_read(A2_R_IM, d);
      check("a2 pulse width in use", a2_alpha, al);
      n_a2_ralpha_wr++;
      check("a2 i_m register read", d, 24'(dut.p4_i_m));
      im = int'(d);
      n_a2_rim_rd++;
      if (now_us - a2_last_tm >= TM_US) begin
        a2_last_tm = now_us;
        a2_read(A2_R_OMEGA, d);
        check("a2 omega register read", $signed(d), a2_omega);
        // the register holds the signed period of S0 in us: 4 edges per
        // period, so edges per ms = 4000 / period
        om = int'($signed(d));
        om = (om >= 32767 || om == 0) ? 0 : 4000 / om;
        if (om < 0) n_a2_neg++;
        if (om > 0) n_a2_pos++;
        n_a2_romega_rd++;
        a2_iref = speed_law(om);
      end
      a2_write(A2_ASIC_IM, 24'(im));
      a2_write(A2_ASIC_IREF, 24'(a2_iref));
      n_a2_asic_wr += 2;
      a2_expect_alpha = pi_step(a2_int, a2_iref, im);
      a2_final_err = a2_iref - im;
    end
  end

  // architecture 2 measured speed sign, watched on its register
  always @(posedge clk) if (rst_n && dut.p3_valid) begin
    n_a2_per++;
    if (dut.p3_omega < 0) n_a2_neg++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (RUN_US * CPU) @(posedge clk);
    $display("mechanisms:");
    need("a1 interrupts", n_a1_irq);
    need("a1 complete exchanges", n_a1_xchg);
    need("a1 PWM width updates", n_a1_pwm_upd);
    need("a1 negative speed reads", n_a1_neg);
    need("a1 positive speed reads", n_a1_pos);
    need("a2 interrupts", n_a2_irq);
    need("a2 alpha reads from the ASIC", n_a2_alpha_rd);
    need("a2 writes to the PWM register", n_a2_ralpha_wr);
    need("a2 reads of the current register", n_a2_rim_rd);
    need("a2 writes to the ASIC", n_a2_asic_wr);
    need("a2 reads of the speed register", n_a2_romega_rd);
    need("a2 negative periods measured", n_a2_neg);
    need("a2 period results of the speed chip", n_a2_per);
    need("a2 positive speed reads", n_a2_pos);
    need("a2 ASIC control law saturated", n_a2_sat);
    need("a2 exchange overruns", int'(a2_overruns));
    check("a1 interrupts ~ one per Tc", (n_a1_irq > RUN_US / TC - 3) && (n_a1_irq <= RUN_US / TC + 1), 1);
    // current loops track their reference at the end
    checks++;
    if (a1_final_err > 25 || a1_final_err < -25 || a2_final_err > 25 || a2_final_err < -25) begin
      failures++;
      $display("current loops do not track: errors %0d, %0d", a1_final_err, a2_final_err);
    end
    $display("final: a1 i_m=%0d iref=%0d omega=%0d | a2 i_m=%0d iref=%0d omega=%0d",
             a1_i_m, a1_iref, a1_omega, a2_i_m, a2_iref, a2_omega);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
