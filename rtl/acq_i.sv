// Current acquisition module (Acq_i) of the DC-motor control device.
//
// Every TS_US microseconds the ADC word n_im is sampled and added to an
// accumulator. At each period_start (the start of a current-loop period Tc)
// the sum and the number of samples of the period just ended are handed to
// a serial restoring divider, and the accumulator restarts. When the
// division ends, i_m holds the average current of that period and
// i_m_valid pulses for one cycle. i_m keeps its value until the next
// average is ready, so a reader always sees a complete average.
//
// The 5 us sampling period, the 10-bit ADC and averaging over the current
// period are the device's. That the ADC word is continuously available
// (no conversion handshake), the truncating division, and the divider
// itself are this design's choices. A sample that falls in the same cycle
// as period_start counts for the new period.
//
// Timing: i_m_valid follows period_start by SUM_W + 2 cycles. A period with
// no sample leaves i_m unchanged. MAX_SAMPLES bounds the samples per period
// and sets the accumulator width; it must be at least Tc / TS_US.
module acq_i #(
  parameter int unsigned TS_US       = 5,
  parameter int unsigned MAX_SAMPLES = 64,
  parameter int unsigned ADC_W       = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick_us,
  input  logic             period_start,
  input  logic [ADC_W-1:0] n_im,
  output logic [ADC_W-1:0] i_m,
  output logic             i_m_valid
);
  localparam int unsigned NW    = $clog2(MAX_SAMPLES + 1);
  localparam int unsigned SUM_W = ADC_W + NW;

  logic             sample;
  logic [SUM_W-1:0] acc;
  logic [NW-1:0]    n;

  // Serial divider state.
  logic             busy;
  logic [SUM_W-1:0] quo;        // dividend shifted out, quotient shifted in
  logic [NW-1:0]    rem;        // partial remainder
  logic [NW-1:0]    div;        // divisor (sample count)
  logic [$clog2(SUM_W+1)-1:0] steps;
  logic [NW:0]      rem_sh;
  logic             fits;

  tick_gen #(.DIV(TS_US)) u_ts (.clk(clk), .rst_n(rst_n), .en(tick_us), .tick(sample));

  // Accumulate the samples of the running period.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      n   <= '0;
    end else if (period_start) begin
      acc <= sample ? SUM_W'(n_im) : '0;
      n   <= sample ? NW'(1) : '0;
    end else if (sample && n != NW'(MAX_SAMPLES)) begin
      acc <= acc + SUM_W'(n_im);
      n   <= n + 1'b1;
    end
  end

  always_comb begin
    rem_sh = {rem, quo[SUM_W-1]};
    fits   = rem_sh >= {1'b0, div};
  end

  // Restoring division acc / n, one quotient bit per cycle.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      quo       <= '0;
      rem       <= '0;
      div       <= '0;
      steps     <= '0;
      i_m       <= '0;
      i_m_valid <= 1'b0;
    end else begin
      i_m_valid <= 1'b0;
      if (period_start && n != '0) begin
        busy  <= 1'b1;
        quo   <= acc;
        rem   <= '0;
        div   <= n;
        steps <= '0;
      end else if (busy) begin
        rem   <= fits ? NW'(rem_sh - {1'b0, div}) : NW'(rem_sh);
        quo   <= {quo[SUM_W-2:0], fits};
        steps <= steps + 1'b1;
        if (steps == ($clog2(SUM_W+1))'(SUM_W - 1)) begin
          busy      <= 1'b0;
          i_m       <= ADC_W'({quo[SUM_W-2:0], fits});
          i_m_valid <= 1'b1;
        end
      end
    end
  end
endmodule
