// PWM module (PWM_cl) of the DC-motor control device.
//
// Produces two complementary switch commands c0/c1 whose period is the
// current-loop period Tc = TC_US microseconds, with c0 high for alpha
// microseconds at the start of each period. The counter advances on the
// 1 us tick, as in the device's 1 us PWM clock. The module also provides
// the Tc time base of its chip: period_start pulses for one cycle when a new
// period begins; the exchange with the processor is started from it.
//
// The pulse width is taken from the alpha input when load pulses (alpha_q)
// and holds until the next load. The new width is sent at the beginning of
// each period, so it governs the period in which it arrives: c0 is high
// from the period start until the counter reaches alpha_q, and once it has
// been low at a 1 us tick it stays low until the next period, so there is never more than one pulse
// per period. A load that arrives after the counter has passed the new
// width ends the pulse at once. Values above TC_US are clamped to TC_US (c0 always high). Using the
// width as soon as it arrives, the clamp, the absence of dead time between
// c0 and c1 and c0 being high first in the period are this design's
// choices.
module pwm_gen #(
  parameter int unsigned TC_US   = 284,
  parameter int unsigned ALPHA_W = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick_us,
  input  logic [ALPHA_W-1:0] alpha,
  input  logic               load,
  output logic               c0,
  output logic               c1,
  output logic               period_start,
  output logic [ALPHA_W-1:0] alpha_q
);
  localparam int unsigned CW = $clog2(TC_US);
  logic [CW-1:0] cnt;
  logic          wrap;
  logic          ended;     // the pulse of this period is over

  assign wrap = tick_us && (cnt == CW'(TC_US - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt          <= '0;
      alpha_q      <= '0;
      period_start <= 1'b0;
      ended        <= 1'b0;
    end else begin
      ended        <= wrap ? 1'b0 : (ended || (tick_us && !c0));
      period_start <= wrap;
      if (tick_us) cnt <= wrap ? '0 : cnt + 1'b1;
      if (load) alpha_q <= (alpha > ALPHA_W'(TC_US)) ? ALPHA_W'(TC_US) : alpha;
    end
  end

  always_comb begin
    c0 = !ended && (32'(cnt) < 32'(alpha_q));
    c1 = !c0;
  end
endmodule
