// Testbench for arch2_asic: a DSP56600 bus master model serves each
// interrupt with the architecture-2 exchange (read alpha, write i_m, write
// I_ref). Checks the interrupt period (Tc), that the alpha read is the
// control law's answer to the values written in the previous period
// (integer model of the PI law), and that an exchange left unserved for a
// whole period is counted as an overrun and can still be completed.
module tb_arch2_asic;
  import dcctl_pkg::*;
  localparam int CPU = 4, TC = 40, KP = 64, KI = 8, SH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  dsp_bus_m_t bus_m = BUS_IDLE;
  dsp_bus_s_t bus_s;
  logic irq, sat, alpha_valid;
  logic [ALPHA_W-1:0] alpha;
  logic [ADC_W-1:0] i_ref, i_m;
  logic [7:0] overruns;
  int checks = 0, failures = 0;

  arch2_asic #(.CLK_PER_US(CPU), .TC_US(TC)) dut (
    .clk(clk), .rst_n(rst_n), .bus_m(bus_m), .bus_s(bus_s), .irq(irq), .alpha(alpha),
    .alpha_valid(alpha_valid), .i_ref(i_ref), .i_m(i_m), .sat(sat), .overruns(overruns));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic bus_write(input logic [15:0] a, input logic [23:0] d, input int hold);
    bus_m.a <= a; bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    bus_m.d <= d; bus_m.wr_n <= 1'b0;
    repeat (hold) @(posedge clk);
    bus_m.wr_n <= 1'b1;
    @(posedge clk);
    bus_m.mcs_n <= 1'b1; bus_m.d <= '0;
    repeat (3) @(posedge clk);
  endtask

  task automatic bus_read(input logic [15:0] a, input int hold, output logic [23:0] d, output logic oe);
    bus_m.a <= a; bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    bus_m.rd_n <= 1'b0;
    repeat (hold) @(posedge clk);
    d = bus_s.d; oe = bus_s.oe;
    bus_m.rd_n <= 1'b1;
    @(posedge clk);
    bus_m.mcs_n <= 1'b1;
    repeat (3) @(posedge clk);
  endtask

  // interrupt period
  int last_rise = -1, cyc = 0, n_irq = 0;
  logic irq_d = 1'b0;
  always @(posedge clk) begin
    cyc++;
    irq_d <= irq;
    if (rst_n && irq && !irq_d) begin
      if (last_rise >= 0 && n_irq != 9 && n_irq != 10) begin
        checks++;
        if (cyc - last_rise != TC * CPU) begin
          failures++;
          $display("interrupt period %0d cycles, expected %0d", cyc - last_rise, TC * CPU);
        end
      end
      last_rise = cyc;
      n_irq++;
    end
  end

  int integ = 0, e, u, exp_alpha = 0, n_sat = 0;
  int vim, vref;
  logic [23:0] d;
  logic oe;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < 40; p++) begin
      @(posedge clk iff irq);
      if (p == 9) begin
        // leave one exchange unserved for more than a period
        repeat (TC * CPU + 20) @(posedge clk);
        check("overrun counted", overruns, 1);
        check("irq still raised", irq, 1);
      end
      bus_read(A2_ASIC_ALPHA, 3 + p % 3, d, oe);
      check("alpha driven", oe, 1);
      check("alpha", d, exp_alpha);
      check("irq dropped", irq, 0);
      vim  = (p < 6) ? $urandom_range(0, 100) : $urandom_range(0, 1023);
      vref = (p < 6) ? 1000 : $urandom_range(0, 1023);
      bus_write(A2_ASIC_IM, 24'(vim), 3);
      bus_write(A2_ASIC_IREF, 24'(vref), 3 + p % 2);
      repeat (3) @(posedge clk);
      check("i_m taken", i_m, vim);
      check("i_ref taken", i_ref, vref);
      e = vref - vim;
      integ = integ + KI * e;
      if (integ < 0) integ = 0;
      if (integ > (TC << SH)) integ = TC << SH;
      u = (KP * e + integ) >>> SH;
      exp_alpha = (u < 0) ? 0 : (u > TC) ? TC : u;
      check("alpha after the step", alpha, exp_alpha);
      if (sat) n_sat++;
    end
    check("overruns at end", overruns, 1);
    checks++;
    if (n_sat == 0) begin failures++; $display("control law never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
