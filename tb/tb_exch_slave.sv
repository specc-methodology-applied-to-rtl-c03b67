// Testbench for exch_slave: a DSP56600 bus master model answers each
// interrupt with the exchange sequence (write alpha, read i_m, read
// Omega_m) using stretched bus cycles, and checks the values moved both
// ways, the interrupt line (raised within two cycles of start, dropped once
// the ASIC is addressed), that the slave stays off the data bus for other
// addresses, and that busy covers the whole exchange.
module tb_exch_slave;
  import dcctl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  dsp_bus_m_t bus_m = BUS_IDLE;
  dsp_bus_s_t bus_s;
  logic irqc, alpha_valid, busy;
  logic [ALPHA_W-1:0] alpha;
  logic [ADC_W-1:0] i_m = '0;
  logic signed [SPEED_W-1:0] omega = '0;
  int checks = 0, failures = 0;

  exch_slave dut (.clk(clk), .rst_n(rst_n), .start(start), .bus_m(bus_m), .bus_s(bus_s),
    .irqc(irqc), .alpha(alpha), .alpha_valid(alpha_valid), .i_m(i_m), .omega(omega), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // One DSP write cycle, strobe held for `hold` clock cycles.
  task automatic bus_write(input logic [15:0] a, input logic [23:0] d, input int hold);
    bus_m.a <= a; bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    bus_m.d <= d; bus_m.wr_n <= 1'b0;
    repeat (hold) @(posedge clk);
    bus_m.wr_n <= 1'b1;
    @(posedge clk);
    bus_m.mcs_n <= 1'b1; bus_m.d <= '0;
    repeat (2) @(posedge clk);
  endtask

  // One DSP read cycle; data sampled at the end of the /RD pulse.
  task automatic bus_read(input logic [15:0] a, input int hold, output logic [23:0] d, output logic oe);
    bus_m.a <= a; bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    bus_m.rd_n <= 1'b0;
    repeat (hold) @(posedge clk);
    d = bus_s.d; oe = bus_s.oe;
    bus_m.rd_n <= 1'b1;
    @(posedge clk);
    bus_m.mcs_n <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  int n_alpha_valid = 0;
  always @(posedge clk) if (rst_n && alpha_valid) n_alpha_valid++;
  always @(posedge clk) if (rst_n && bus_s.oe && (bus_m.rd_n || bus_m.mcs_n)) begin
    failures++;
    $display("slave drives D outside a read cycle");
  end

  logic [23:0] d;
  logic oe;
  int a_val, w;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    check("irqc at rest", irqc, 0);
    for (int r = 0; r < 20; r++) begin
      i_m   <= 10'($urandom_range(0, 1023));
      omega <= (r % 2) ? -16'sd1 * 16'($urandom_range(1, 3000)) : 16'($urandom_range(0, 3000));
      a_val = $urandom_range(0, 284);
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      w = 0;
      while (!irqc) begin @(posedge clk); w++; end
      check("irqc delay", w, 1);
      check("busy", busy, 1);
      // a foreign read before the exchange: nobody answers
      bus_read(16'h1234, 4, d, oe);
      check("foreign read oe", oe, 0);
      check("irqc held", irqc, 1);
      bus_write(A1_ALPHA, 24'(a_val), 3 + r % 3);
      check("irqc dropped", irqc, 0);
      bus_read(A1_IM, 3 + r % 4, d, oe);
      check("alpha", alpha, a_val);
      check("i_m oe", oe, 1);
      check("i_m", d, 24'(i_m));
      bus_read(A1_OMEGA, 4, d, oe);
      check("omega oe", oe, 1);
      check("omega sign-extended", $signed(d), omega);
      repeat (3) @(posedge clk);
      check("busy after exchange", busy, 0);
      // a read outside an exchange is not answered
      bus_read(A1_IM, 4, d, oe);
      check("idle read oe", oe, 0);
    end
    check("alpha_valid pulses", n_alpha_valid, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
