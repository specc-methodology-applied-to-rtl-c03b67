// Testbench for pwm_gen: checks the period length (TC_US ticks), that C1 is
// always the complement of C0, that C0 is high for exactly the pulse width
// loaded at the start of the period (clamped to TC_US), and that a change
// of the input without a load has no effect.
module tb_pwm_gen;
  localparam int unsigned TC_US = 20;
  localparam int unsigned TICK  = 3;        // clock cycles per 1 us tick
  logic clk = 1'b0, rst_n = 1'b0, tick_us = 1'b0, load = 1'b0;
  logic [8:0] alpha = '0, alpha_q;
  logic c0, c1, period_start;
  int checks = 0, failures = 0;

  pwm_gen #(.TC_US(TC_US), .ALPHA_W(9)) dut (
    .clk(clk), .rst_n(rst_n), .tick_us(tick_us), .alpha(alpha), .load(load),
    .c0(c0), .c1(c1), .period_start(period_start), .alpha_q(alpha_q));

  always #5 clk = ~clk;

  // 1 us tick every TICK cycles
  int tc = 0;
  always @(posedge clk) begin
    tc = (tc + 1) % TICK;
    tick_us <= (tc == 0);
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (c1 !== !c0) begin
      failures++;
      $display("c1 is not the complement of c0");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int a, high_ticks, cycles;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff period_start);
    @(negedge clk);
    for (int p = 0; p < 40; p++) begin
      // choose the width for the next period, including out-of-range ones
      a = (p % 7 == 3) ? TC_US + 5 : $urandom_range(0, TC_US);
      alpha <= 9'(a);
      load  <= 1'b1;
      high_ticks = 0;
      cycles = 0;
      // count this period; change the input mid-period to a wrong value
      do begin
        @(posedge clk);
        cycles++;
        if (tick_us && c0) high_ticks++;
        @(negedge clk);
        if (cycles == 1) load <= 1'b0;
        if (cycles == TC_US * TICK / 2) alpha <= 9'($urandom_range(0, TC_US));
        if (cycles == TC_US * TICK / 2 + 1) alpha <= 9'(a);
      end while (!period_start);
      if (p > 0) check("period in cycles", cycles, TC_US * TICK);
      check("c0 high ticks", high_ticks, (a > TC_US) ? TC_US : a);
      check("alpha_q", int'(alpha_q), (a > TC_US) ? TC_US : a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
