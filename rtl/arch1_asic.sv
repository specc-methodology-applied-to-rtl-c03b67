// I/O ASIC of architecture 1 (PE1).
//
// In architecture 1 the whole control algorithm (current loop and speed
// loop) runs as software on a DSP56600, and one ASIC holds all the I/O
// functions: the PWM, the current acquisition and the speed acquisition,
// plus the exchanges FSMD through which the DSP reaches them. The PWM is
// the ASIC's Tc time base: each period start averages the current of the
// period just ended; as soon as that average is ready (a few tens of clock
// cycles later, see acq_i) the exchange starts: IRQC is raised, the DSP
// writes the new pulse width and reads i_m and Omega_m (see exch_slave).
// Waiting for the average, rather than starting on the period start
// itself, is this design's choice: it guarantees that the DSP always reads
// the average of the period that has just ended.
//
// The pulse width written by the DSP is loaded into the PWM as soon as the
// write completes, a few microseconds into the period it is meant for. i_m is the average of the last complete
// Tc period; omega is the edge count of the last complete 1 ms window.
// The partition into these parts is the device's; the 1 us prescaler from
// the system clock (CLK_PER_US cycles) is this design's.
module arch1_asic
  import dcctl_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 50,
  parameter int unsigned TC_US      = 284,
  parameter int unsigned TS_US      = 5,
  parameter int unsigned WIN_US     = 1000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] n_im,
  input  logic             s0,
  input  logic             s1,
  output logic             c0,
  output logic             c1,
  output logic             irqc,
  input  dsp_bus_m_t       bus_m,
  output dsp_bus_s_t       bus_s,
  // observation of the internal state
  output logic               period_start,
  output logic [ALPHA_W-1:0] alpha_q,
  output logic [ADC_W-1:0]   i_m,
  output logic signed [SPEED_W-1:0] omega
);
  logic                      tick_us;
  logic [ALPHA_W-1:0]        alpha;
  logic                      alpha_valid;
  logic                      i_m_valid;

  tick_gen #(.DIV(CLK_PER_US)) u_us (.clk(clk), .rst_n(rst_n), .en(1'b1), .tick(tick_us));

  pwm_gen #(.TC_US(TC_US), .ALPHA_W(ALPHA_W)) u_pwm (
    .clk(clk), .rst_n(rst_n), .tick_us(tick_us), .alpha(alpha), .load(alpha_valid),
    .c0(c0), .c1(c1), .period_start(period_start), .alpha_q(alpha_q));

  acq_i #(.TS_US(TS_US), .MAX_SAMPLES(TC_US / TS_US + 1), .ADC_W(ADC_W)) u_acq_i (
    .clk(clk), .rst_n(rst_n), .tick_us(tick_us), .period_start(period_start),
    .n_im(n_im), .i_m(i_m), .i_m_valid(i_m_valid));

  acq_speed #(.WIN_US(WIN_US), .SPEED_W(SPEED_W)) u_acq_w (
    .clk(clk), .rst_n(rst_n), .tick_us(tick_us), .s0(s0), .s1(s1),
    .omega(omega), .omega_valid());

  exch_slave u_exch (
    .clk(clk), .rst_n(rst_n), .start(i_m_valid), .bus_m(bus_m), .bus_s(bus_s),
    .irqc(irqc), .alpha(alpha), .alpha_valid(alpha_valid), .i_m(i_m), .omega(omega),
    .busy());
endmodule
