// Testbench for pi_current: random references and measurements, checked
// against an integer model of the proportional-integral law with a clamped
// integrator, including runs long enough to saturate alpha at 0 and at Tc.
module tb_pi_current;
  localparam int TC = 284, KP = 64, KI = 8, SH = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [9:0] i_ref = '0, i_m = '0;
  logic [8:0] alpha;
  logic done, sat;
  int checks = 0, failures = 0;

  pi_current #(.TC_US(TC), .KP(KP), .KI(KI), .SHIFT(SH)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .i_ref(i_ref), .i_m(i_m),
    .alpha(alpha), .done(done), .sat(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int integ = 0, e, u, exp_a, n_hi = 0, n_lo = 0;
  bit exp_sat;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 600; k++) begin
      if (k < 100)      begin i_ref <= 10'd900; i_m <= 10'($urandom_range(0, 200));   end
      else if (k < 200) begin i_ref <= 10'd50;  i_m <= 10'($urandom_range(600, 1023)); end
      else              begin i_ref <= 10'($urandom_range(0, 1023)); i_m <= 10'($urandom_range(0, 1023)); end
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      e = int'(i_ref) - int'(i_m);
      integ = integ + KI * e;
      if (integ < 0) integ = 0;
      if (integ > (TC << SH)) integ = TC << SH;
      u = (KP * e + integ) >>> SH;
      exp_sat = (u < 0) || (u > TC);
      exp_a = (u < 0) ? 0 : (u > TC) ? TC : u;
      @(posedge clk);
      checks++;
      if (!done || int'(alpha) != exp_a || sat != exp_sat) begin
        failures++;
        $display("step %0d: done=%b alpha=%0d sat=%b expected alpha %0d sat %b", k, done, alpha, sat, exp_a, exp_sat);
      end
      if (exp_a == TC) n_hi++;
      if (exp_a == 0) n_lo++;
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("saturation not reached at both ends");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
