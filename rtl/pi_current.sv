// Current control law (C_CTL) of the DC-motor control device.
//
// Once per current-loop period, on start, computes the pulse width alpha
// (in 1 us steps, 0..TC_US) that drives the measured average current i_m
// towards the reference i_ref. The law is a proportional-integral
// controller in fixed point:
//   e      = i_ref - i_m
//   integ  = clamp(integ + KI*e, 0, TC_US << SHIFT)
//   alpha  = clamp((KP*e + integ) >> SHIFT, 0, TC_US)
// The integrator is clamped to the reachable range of alpha, so it does
// not wind up while the output is saturated. i_ref and i_m are ADC codes
// of the same scale.
//
// The device computes alpha from i_ref and i_m once per Tc; its control
// law is not published, so the PI form, gains and scaling are this
// design's choices (a PI law is the usual inner current loop of a DC
// drive). Timing: alpha and done are registered one cycle after start.
module pi_current
  import dcctl_pkg::*;
#(
  parameter int unsigned TC_US = 284,
  parameter int          KP    = 64,
  parameter int          KI    = 8,
  parameter int unsigned SHIFT = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [ADC_W-1:0]   i_ref,
  input  logic [ADC_W-1:0]   i_m,
  output logic [ALPHA_W-1:0] alpha,
  output logic               done,
  output logic               sat       // alpha was clamped this step
);
  typedef logic signed [31:0] acc_t;   // wide enough for every product
  localparam acc_t IMAX = acc_t'(TC_US) <<< SHIFT;

  acc_t e, integ_next, u, integ;

  always_comb begin
    e          = acc_t'({1'b0, i_ref}) - acc_t'({1'b0, i_m});
    integ_next = integ + acc_t'(KI) * e;
    if (integ_next < 0)    integ_next = 0;
    if (integ_next > IMAX) integ_next = IMAX;
    u = (acc_t'(KP) * e + integ_next) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ <= '0;
      alpha <= '0;
      done  <= 1'b0;
      sat   <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        integ <= integ_next;
        if (u < 0) begin
          alpha <= '0;
          sat   <= 1'b1;
        end else if (u > acc_t'(TC_US)) begin
          alpha <= ALPHA_W'(TC_US);
          sat   <= 1'b1;
        end else begin
          alpha <= ALPHA_W'(u);
          sat   <= 1'b0;
        end
      end
    end
  end
endmodule
