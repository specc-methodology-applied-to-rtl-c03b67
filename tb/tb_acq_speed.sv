// Testbench for acq_speed: drives a quadrature encoder forwards and
// backwards at random rates, keeping every edge away from the window
// boundaries, and checks that each window's omega is the signed number of
// edges the testbench produced in it. Also checks that a jump of both
// channels at once is not counted.
module tb_acq_speed;
  localparam int unsigned WIN  = 50;
  localparam int unsigned TICK = 4;
  logic clk = 1'b0, rst_n = 1'b0, tick_us = 1'b0;
  logic s0 = 1'b0, s1 = 1'b0;
  logic signed [15:0] omega;
  logic omega_valid;
  int checks = 0, failures = 0;

  acq_speed #(.WIN_US(WIN), .SPEED_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .tick_us(tick_us), .s0(s0), .s1(s1),
    .omega(omega), .omega_valid(omega_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder state index 0..3 along 00 -> 01 -> 11 -> 10
  int pos = 0;
  function automatic logic [1:0] code(int k);
    case (k & 3)
      0: return 2'b00;
      1: return 2'b01;
      2: return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  int t = 0, expected = 0, dir, rate, n_pos = 0, n_neg = 0;
  logic [1:0] c;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int w = 0; w < 40; w++) begin
      dir  = (w % 3 == 2) ? -1 : 1;
      rate = $urandom_range(1, 4);           // an edge every rate ticks
      expected = 0;
      for (int k = 0; k < WIN; k++) begin
        repeat (TICK - 1) @(posedge clk);
        tick_us <= 1'b1;
        @(posedge clk);
        tick_us <= 1'b0;
        t++;
        if ((t % WIN) >= 3 && (t % WIN) <= WIN - 3 && (t % rate) == 0) begin
          if (w == 7 && (t % WIN) == 20) begin
            pos += 2;                        // illegal double step
          end else begin
            pos += dir;
            expected += dir;
          end
          c = code(pos);
          s1 <= c[1];
          s0 <= c[0];
        end
      end
      // the window ends on this tick; omega_valid follows one cycle later
      @(posedge clk);
      @(posedge clk);
      checks++;
      if (int'(omega) != expected) begin
        failures++;
        $display("window %0d: omega=%0d expected %0d", w, omega, expected);
      end
      if (omega > 0) n_pos++;
      if (omega < 0) n_neg++;
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("both directions were not seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
