// Speed acquisition module (Acq_Omega) of the DC-motor control device.
//
// S0 and S1 are the two channels of an optical incremental encoder, 90
// degrees apart. Both are brought into the clock domain by two flip-flops.
// Every change of either channel is one count: up when the pair
// {S1,S0} steps 00 -> 01 -> 11 -> 10 -> 00, down in the opposite order
// (four counts per encoder line). Counts are summed over a window of
// WIN_US microseconds; at the end of each window the signed sum is stored
// in omega, omega_valid pulses for one cycle, and counting restarts.
// omega is thus proportional to the motor speed, in edges per window.
//
// The device's 1 ms speed-acquisition period is WIN_US. Counting edges over
// a fixed window, quadrature (x4) decoding, the count direction and the
// saturation of the sum at the limits of SPEED_W bits are this design's
// choices. A step that changes both channels at once (an illegal jump)
// is not counted.
//
// Timing: omega_valid comes one cycle after the last 1 us tick of a window.
module acq_speed #(
  parameter int unsigned WIN_US  = 1000,
  parameter int unsigned SPEED_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick_us,
  input  logic                      s0,
  input  logic                      s1,
  output logic signed [SPEED_W-1:0] omega,
  output logic                      omega_valid
);
  localparam logic signed [SPEED_W-1:0] CMAX = {1'b0, {(SPEED_W-1){1'b1}}};
  localparam logic signed [SPEED_W-1:0] CMIN = {1'b1, {(SPEED_W-1){1'b0}}};

  logic [1:0] sync0, sync1;     // synchronisers, [1] is the stable bit
  logic [1:0] prev, cur;
  logic       win_end;
  logic       up, dn;
  logic signed [SPEED_W-1:0] cnt;

  tick_gen #(.DIV(WIN_US)) u_win (.clk(clk), .rst_n(rst_n), .en(tick_us), .tick(win_end));

  assign cur = {sync1[1], sync0[1]};

  // Gray-code step decoding.
  always_comb begin
    up = 1'b0;
    dn = 1'b0;
    unique case ({prev, cur})
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: up = 1'b1;
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: dn = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync0       <= '0;
      sync1       <= '0;
      prev        <= '0;
      cnt         <= '0;
      omega       <= '0;
      omega_valid <= 1'b0;
    end else begin
      sync0       <= {sync0[0], s0};
      sync1       <= {sync1[0], s1};
      prev        <= cur;
      omega_valid <= win_end;
      if (win_end) begin
        omega <= cnt;
        cnt   <= up ? SPEED_W'(1) : dn ? -SPEED_W'(1) : '0;
      end else if (up && cnt != CMAX) begin
        cnt <= cnt + 1'b1;
      end else if (dn && cnt != CMIN) begin
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
