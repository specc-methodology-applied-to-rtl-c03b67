// DC-motor control device: the hardware of both architectures.
//
// The control device runs two nested loops: a current loop every
// Tc = 284 us that sets the PWM pulse width, and a speed loop every 20 ms
// that sets the current reference. Its I/O functions are a PWM with
// complementary outputs C0/C1, a current acquisition averaging a 10-bit ADC
// sampled every 5 us, and a speed acquisition from an incremental encoder
// over 1 ms windows. Two partitions onto chips are built here side by side;
// they share only the clock and reset.
//
// Architecture 1 (ports a1_*): one I/O ASIC holds all the I/O functions;
// both loops are software on a DSP56600. At each Tc the ASIC interrupts
// the DSP (IRQC), which writes alpha and reads i_m and Omega_m.
//
// Architecture 2 (ports a2_*): each I/O function is its own chip with a
// one-register memory block on the bus (PE5 PWM with the alpha register,
// PE4 current acquisition with the i_m register, PE3 speed acquisition with
// the Omega_m register), the current loop is a custom ASIC, and the DSP
// runs the speed loop and is the only bus master. At each Tc the ASIC
// interrupts the DSP, which reads alpha from the ASIC, writes it to the PWM
// register, reads i_m from its register and writes i_m and I_ref to the
// ASIC. The DSP reads Omega_m from its register once per speed period.
// The architecture-2 speed chip measures the period of the encoder signal
// (signed, in us, see acq_period), so its register is refreshed at a rate
// set by the speed itself; architecture 1 counts encoder edges over fixed
// 1 ms windows (acq_speed). Both measurements are offered because the two
// are described for the speed module; each architecture uses the one
// described with it.
// Every chip of architecture 2 has its own time base, so the periods of the
// chips are not phase-locked; the slaves' replies on the shared data bus
// are ORed (each slave drives zeros when it is not selected).
//
// The DSP, its software, the ADC and the encoder are outside this design;
// their signals are the ports. The observation ports a1_alpha, a2_alpha
// etc. show the pulse width in use and the values exchanged; a2_omega is
// the signed encoder period held in the PE3 register.
module dc_ctl_top
  import dcctl_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 50,
  parameter int unsigned TC_US      = 284,
  parameter int unsigned TS_US      = 5,
  parameter int unsigned WIN_US     = 1000
) (
  input  logic               clk,
  input  logic               rst_n,
  // architecture 1
  input  logic [ADC_W-1:0]   a1_n_im,
  input  logic               a1_s0,
  input  logic               a1_s1,
  output logic               a1_c0,
  output logic               a1_c1,
  output logic               a1_irqc,
  input  dsp_bus_m_t         a1_bus_m,
  output dsp_bus_s_t         a1_bus_s,
  output logic               a1_period_start,
  output logic [ALPHA_W-1:0] a1_alpha,
  output logic [ADC_W-1:0]   a1_i_m,
  output logic signed [SPEED_W-1:0] a1_omega,
  // architecture 2
  input  logic [ADC_W-1:0]   a2_n_im,
  input  logic               a2_s0,
  input  logic               a2_s1,
  output logic               a2_c0,
  output logic               a2_c1,
  output logic               a2_irq,
  input  dsp_bus_m_t         a2_bus_m,
  output dsp_bus_s_t         a2_bus_s,
  output logic [ALPHA_W-1:0] a2_alpha,
  output logic [ADC_W-1:0]   a2_i_m,
  output logic signed [SPEED_W-1:0] a2_omega,
  output logic               a2_sat,
  output logic [7:0]         a2_overruns
);
  // ---------------- architecture 1: one I/O ASIC ----------------
  arch1_asic #(.CLK_PER_US(CLK_PER_US), .TC_US(TC_US), .TS_US(TS_US), .WIN_US(WIN_US)) u_a1 (
    .clk(clk), .rst_n(rst_n), .n_im(a1_n_im), .s0(a1_s0), .s1(a1_s1),
    .c0(a1_c0), .c1(a1_c1), .irqc(a1_irqc), .bus_m(a1_bus_m), .bus_s(a1_bus_s),
    .period_start(a1_period_start), .alpha_q(a1_alpha), .i_m(a1_i_m), .omega(a1_omega));

  // ---------------- architecture 2: four chips on one bus ----------------
  dsp_bus_s_t s_asic, s_ralpha, s_rim, s_romega;

  // PE5: PWM chip with the alpha register (written by the DSP only).
  logic               p5_us;
  logic [ALPHA_W-1:0] p5_alpha;
  logic               p5_wr;
  tick_gen #(.DIV(CLK_PER_US)) u_p5_us (.clk(clk), .rst_n(rst_n), .en(1'b1), .tick(p5_us));
  bus_reg #(.ADDR(A2_R_ALPHA), .W(ALPHA_W), .BUS_WR(1'b1), .BUS_RD(1'b0)) u_p5_reg (
    .clk(clk), .rst_n(rst_n), .bus_m(a2_bus_m), .bus_s(s_ralpha),
    .ld(1'b0), .din('0), .q(p5_alpha), .bus_wr(p5_wr));
  pwm_gen #(.TC_US(TC_US), .ALPHA_W(ALPHA_W)) u_p5_pwm (
    .clk(clk), .rst_n(rst_n), .tick_us(p5_us), .alpha(p5_alpha), .load(p5_wr),
    .c0(a2_c0), .c1(a2_c1), .period_start(), .alpha_q(a2_alpha));

  // PE4: current acquisition chip with the i_m register (read by the DSP).
  logic             p4_us, p4_tc, p4_valid;
  logic [ADC_W-1:0] p4_i_m;
  tick_gen #(.DIV(CLK_PER_US)) u_p4_us (.clk(clk), .rst_n(rst_n), .en(1'b1),  .tick(p4_us));
  tick_gen #(.DIV(TC_US))      u_p4_tc (.clk(clk), .rst_n(rst_n), .en(p4_us), .tick(p4_tc));
  acq_i #(.TS_US(TS_US), .MAX_SAMPLES(TC_US / TS_US + 1), .ADC_W(ADC_W)) u_p4_acq (
    .clk(clk), .rst_n(rst_n), .tick_us(p4_us), .period_start(p4_tc),
    .n_im(a2_n_im), .i_m(p4_i_m), .i_m_valid(p4_valid));
  bus_reg #(.ADDR(A2_R_IM), .W(ADC_W), .BUS_WR(1'b0), .BUS_RD(1'b1)) u_p4_reg (
    .clk(clk), .rst_n(rst_n), .bus_m(a2_bus_m), .bus_s(s_rim),
    .ld(p4_valid), .din(p4_i_m), .q(), .bus_wr());

  // PE3: speed acquisition chip with the Omega_m register (read by the DSP).
  // It measures the encoder period, so its results come at the speed's pace.
  logic                      p3_us, p3_valid;
  logic signed [SPEED_W-1:0] p3_omega;
  tick_gen #(.DIV(CLK_PER_US)) u_p3_us (.clk(clk), .rst_n(rst_n), .en(1'b1), .tick(p3_us));
  acq_period #(.SPEED_W(SPEED_W)) u_p3_acq (
    .clk(clk), .rst_n(rst_n), .tick_us(p3_us), .s0(a2_s0), .s1(a2_s1),
    .period(p3_omega), .period_valid(p3_valid));
  bus_reg #(.ADDR(A2_R_OMEGA), .W(SPEED_W), .BUS_WR(1'b0), .BUS_RD(1'b1), .SIGNED(1'b1)) u_p3_reg (
    .clk(clk), .rst_n(rst_n), .bus_m(a2_bus_m), .bus_s(s_romega),
    .ld(p3_valid), .din(p3_omega), .q(a2_omega), .bus_wr());

  // Current-control ASIC.
  arch2_asic #(.CLK_PER_US(CLK_PER_US), .TC_US(TC_US)) u_a2_asic (
    .clk(clk), .rst_n(rst_n), .bus_m(a2_bus_m), .bus_s(s_asic), .irq(a2_irq),
    .alpha(), .alpha_valid(), .i_ref(), .i_m(a2_i_m), .sat(a2_sat), .overruns(a2_overruns));

  // Shared data bus: at most one slave drives at a time.
  always_comb begin
    a2_bus_s.d  = s_asic.d  | s_ralpha.d  | s_rim.d  | s_romega.d;
    a2_bus_s.oe = s_asic.oe | s_ralpha.oe | s_rim.oe | s_romega.oe;
  end

  always_comb
    assert ($countones({s_asic.oe, s_ralpha.oe, s_rim.oe, s_romega.oe}) <= 1)
      else $error("dc_ctl_top: two slaves drive the architecture-2 data bus");
endmodule
