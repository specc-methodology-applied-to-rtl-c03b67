// Testbench for acq_period: drives a quadrature encoder at a series of
// known periods (a multiple of 4 us, one code step every period/4), forwards
// and backwards, and checks each reported period and its sign; then stops
// the encoder and checks the standstill report, and that the first edge
// after a standstill only re-arms the measurement.
module tb_acq_period;
  localparam int TICK = 4, PMAX = 300;
  logic clk = 1'b0, rst_n = 1'b0, tick_us = 1'b0, s0 = 1'b0, s1 = 1'b0;
  logic signed [15:0] period;
  logic period_valid;
  int checks = 0, failures = 0;

  acq_period #(.SPEED_W(16), .PMAX_US(PMAX)) dut (
    .clk(clk), .rst_n(rst_n), .tick_us(tick_us), .s0(s0), .s1(s1),
    .period(period), .period_valid(period_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1 us tick
  int tc = 0;
  always @(posedge clk) begin
    tc = (tc + 1) % TICK;
    tick_us <= (tc == 0);
  end

  // record every report
  int got[$];
  always @(posedge clk) if (rst_n && period_valid) got.push_back(int'(period));

  int now = 0;                        // 1 us ticks so far
  always @(posedge clk) if (tick_us) now++;

  int pos = 0, last_rise = -1;
  int exp_q[$];
  logic [1:0] nc;
  task automatic step(input int dir);
    pos += dir;
    case (pos & 3)
      0: nc = 2'b00;
      1: nc = 2'b01;
      2: nc = 2'b11;
      default: nc = 2'b10;
    endcase
    if (nc[0] && !s0) begin            // rising edge of S0
      if (last_rise >= 0) exp_q.push_back(nc[1] ? -(now - last_rise) : (now - last_rise));
      last_rise = now;
    end
    {s1, s0} <= nc;
  endtask

  int p, dir, n;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff tick_us);
    @(posedge clk);
    for (int k = 0; k < 12; k++) begin
      p   = 4 * $urandom_range(2, 60);
      dir = (k >= 6) ? -1 : 1;
      // 3 electrical periods at this speed: 12 steps, 3 rising edges of S0
      for (int j = 0; j < 12; j++) begin
        repeat (p / 4 * TICK) @(posedge clk);
        step(dir);
      end
    end
    // standstill
    repeat ((PMAX + 50) * TICK) @(posedge clk);
    exp_q.push_back(PMAX);
    last_rise = -1;
    n = got.size();
    checks++;
    if (n == 0 || got[n - 1] != PMAX) begin
      failures++;
      $display("standstill not reported");
    end
    // restart: one full electrical period, only the second edge measures
    for (int j = 0; j < 8; j++) begin
      repeat (10 * TICK) @(posedge clk);
      step(1);
    end
    repeat (10 * TICK) @(posedge clk);
    checks++;
    if (got.size() != n + 1 || got[got.size() - 1] != 40) begin
      failures++;
      $display("after restart: %0d reports, last %0d (expected one report of 40)",
               got.size() - n, got[got.size() - 1]);
    end
    // every report against the periods the testbench produced
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++;
      $display("%0d reports, expected %0d", got.size(), exp_q.size());
    end
    for (int k = 0; k < got.size() && k < exp_q.size(); k++) begin
      checks++;
      if (got[k] != exp_q[k]) begin
        failures++;
        $display("report %0d: got %0d expected %0d", k, got[k], exp_q[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
