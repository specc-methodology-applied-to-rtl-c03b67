// Testbench for tick_gen: with a random enable, a tick must follow exactly
// every DIV-th enabled cycle, one cycle later, and never otherwise.
module tb_tick_gen;
  localparam int unsigned DIV = 7;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, tick;
  int checks = 0, failures = 0;
  int n_en = 0, n_ticks = 0;
  bit expect_tick = 1'b0;

  tick_gen #(.DIV(DIV)) dut (.clk(clk), .rst_n(rst_n), .en(en), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (700) begin
      @(posedge clk);
      // check the tick owed from the previous cycle
      checks++;
      if (tick !== expect_tick) begin
        failures++;
        $display("tick=%b expected %b after %0d enables", tick, expect_tick, n_en);
      end
      if (tick) n_ticks++;
      expect_tick = 1'b0;
      if (en) begin
        n_en++;
        if (n_en % DIV == 0) expect_tick = 1'b1;
      end
      en <= ($urandom_range(0, 2) != 0);
    end
    checks++;
    if (n_ticks < 40) begin
      failures++;
      $display("too few ticks: %0d", n_ticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
