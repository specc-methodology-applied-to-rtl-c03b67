// Speed acquisition by period measurement (Acq_Omega of architecture 2).
//
// Measures the period of the encoder signal S0 in 1 us ticks: the time
// from one rising edge of S0 to the next. At each rising edge the result
// is stored in period with a sign giving the direction (positive when S1
// is low at the rising edge of S0, i.e. {S1,S0} stepping 00 -> 01, the
// forward direction of acq_speed), and period_valid pulses for one cycle.
// Results therefore come at a rate that follows the motor speed, not at a
// fixed rate. The processor turns a period into a speed (speed ~ 1/period).
// If no edge comes for PMAX_US ticks the motor is taken to be standing:
// period is set to the largest value, +PMAX_US, once, with a valid pulse.
//
// Measuring the period of the encoder signal, with results produced
// asynchronously, is the device's; the sign convention, the standstill
// limit, the use of S0 rising edges only and the synchronisers are this
// design's. The first edge after reset or after a standstill only starts a
// measurement.
module acq_period #(
  parameter int unsigned SPEED_W = 16,
  parameter int unsigned PMAX_US = 32767
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick_us,
  input  logic                      s0,
  input  logic                      s1,
  output logic signed [SPEED_W-1:0] period,
  output logic                      period_valid
);
  logic [2:0]         sync0;       // [1] stable, [2] previous
  logic [1:0]         sync1;
  logic               rise;
  logic [SPEED_W-1:0] cnt;         // ticks since the last rising edge
  logic               armed;       // a previous edge exists

  assign rise = sync0[1] && !sync0[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync0        <= '0;
      sync1        <= '0;
      cnt          <= '0;
      armed        <= 1'b0;
      period       <= SPEED_W'(PMAX_US);
      period_valid <= 1'b0;
    end else begin
      sync0        <= {sync0[1:0], s0};
      sync1        <= {sync1[0], s1};
      period_valid <= 1'b0;
      if (rise) begin
        if (armed) begin
          period       <= sync1[1] ? -$signed(cnt) : $signed(cnt);
          period_valid <= 1'b1;
        end
        armed <= 1'b1;
        cnt   <= tick_us ? SPEED_W'(1) : '0;
      end else if (tick_us && armed) begin
        if (cnt == SPEED_W'(PMAX_US - 1)) begin
          armed        <= 1'b0;                 // standing still
          period       <= SPEED_W'(PMAX_US);
          period_valid <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
