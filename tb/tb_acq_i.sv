// Testbench for acq_i: the ADC word changes at known 1 us ticks, never next
// to a sampling instant, so the testbench knows every sample the block
// takes. Periods of random length (40..60 us, hence 8..12 samples, as the
// 284 us / 5 us period gives 56 or 57) are marked with period_start; after
// each, i_m must equal the truncated mean of the samples of that period,
// SUM_W + 2 cycles later.
module tb_acq_i;
  localparam int unsigned TS_US = 5;
  localparam int unsigned TICK  = 4;
  localparam int unsigned MAXS  = 16;
  localparam int unsigned LAT   = 10 + $clog2(MAXS + 1) + 2;
  logic clk = 1'b0, rst_n = 1'b0, tick_us = 1'b0, period_start = 1'b0;
  logic [9:0] n_im = '0, i_m;
  logic i_m_valid;
  int checks = 0, failures = 0;

  acq_i #(.TS_US(TS_US), .MAX_SAMPLES(MAXS), .ADC_W(10)) dut (
    .clk(clk), .rst_n(rst_n), .tick_us(tick_us), .period_start(period_start),
    .n_im(n_im), .i_m(i_m), .i_m_valid(i_m_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t = 0;              // ticks since reset
  int sum = 0, cnt = 0;   // samples of the running period
  int next_val = 0;
  int exp_avg, wait_cyc, plen, pend;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    pend = 45;
    for (int p = 0; p < 30; p++) begin
      // run ticks up to the end of this period
      while (t < pend) begin
        repeat (TICK - 1) @(posedge clk);
        tick_us <= 1'b1;
        @(posedge clk);
        tick_us <= 1'b0;
        t++;
        if (t % TS_US == 0) begin            // sampled one cycle from now
          sum += int'(n_im);
          cnt++;
        end
        if (t % TS_US == 2) n_im <= 10'($urandom_range(0, 1023));
      end
      // two cycles after the last tick: mark the period end
      @(posedge clk);
      period_start <= 1'b1;
      @(posedge clk);
      period_start <= 1'b0;
      exp_avg = sum / cnt;
      sum = 0;
      cnt = 0;
      wait_cyc = 0;
      while (!i_m_valid && wait_cyc < 100) begin
        @(posedge clk);
        wait_cyc++;
      end
      checks++;
      if (int'(i_m) != exp_avg) begin
        failures++;
        $display("period %0d: i_m=%0d expected %0d", p, i_m, exp_avg);
      end
      checks++;
      if (wait_cyc != LAT - 1) begin
        failures++;
        $display("period %0d: latency %0d cycles, expected %0d", p, wait_cyc + 1, LAT);
      end
      plen = $urandom_range(40, 60);
      pend = t + plen;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
