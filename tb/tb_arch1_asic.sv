// Testbench for arch1_asic: a DSP56600 bus master model serves every IRQC
// with the architecture-1 exchange (write alpha, read i_m, read Omega_m)
// while the testbench plays the ADC (a word held constant for several
// periods) and the encoder (edges at a fixed rate, forwards then
// backwards). Checks the Tc interrupt period, that C0 is high for the
// written alpha in the following period, that i_m settles to the ADC word,
// and that Omega_m matches the encoder rate and direction.
module tb_arch1_asic;
  import dcctl_pkg::*;
  localparam int CPU = 4, TC = 40, TS = 5, WIN = 100, EDGE_US = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADC_W-1:0] n_im = '0;
  logic s0 = 1'b0, s1 = 1'b0;
  logic c0, c1, irqc, period_start;
  dsp_bus_m_t bus_m = BUS_IDLE;
  dsp_bus_s_t bus_s;
  logic [ALPHA_W-1:0] alpha_q;
  logic [ADC_W-1:0] i_m;
  logic signed [SPEED_W-1:0] omega;
  int checks = 0, failures = 0;

  arch1_asic #(.CLK_PER_US(CPU), .TC_US(TC), .TS_US(TS), .WIN_US(WIN)) dut (
    .clk(clk), .rst_n(rst_n), .n_im(n_im), .s0(s0), .s1(s1), .c0(c0), .c1(c1),
    .irqc(irqc), .bus_m(bus_m), .bus_s(bus_s), .period_start(period_start),
    .alpha_q(alpha_q), .i_m(i_m), .omega(omega));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic bus_read(input logic [15:0] a, input int hold, output logic [23:0] d);
    bus_m.a <= a; bus_m.mcs_n <= 1'b0;
    @(posedge clk);
    bus_m.rd_n <= 1'b0;
    repeat (hold) @(posedge clk);
    d = bus_s.d;
    bus_m.rd_n <= 1'b1;
    @(posedge clk);
    bus_m.mcs_n <= 1'b1;
    repeat (3) @(posedge clk);
  endtask

  // encoder: one edge every EDGE_US microseconds, direction enc_dir
  int enc_dir = 1, pos = 0;
  always begin
    repeat (EDGE_US * CPU) @(posedge clk);
    pos += enc_dir;
    case (pos & 3)
      0: {s1, s0} <= 2'b00;
      1: {s1, s0} <= 2'b01;
      2: {s1, s0} <= 2'b11;
      default: {s1, s0} <= 2'b10;
    endcase
  end

  // C0 high time per period, and period length
  int high = 0, plen = 0, last_high = -1, last_plen = -1;
  always @(posedge clk) if (rst_n) begin
    if (c1 === c0) begin failures++; $display("c0 and c1 not complementary"); end
    if (period_start) begin
      last_high = high; last_plen = plen;
      high = 0; plen = 0;
    end
    plen++;
    if (c0) high++;
  end

  logic [23:0] d;
  int a_prev = 0, a_new, n_fwd = 0, n_rev = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < 30; p++) begin
      if (p % 6 == 0) n_im <= 10'($urandom_range(0, 1023));
      if (p == 15) enc_dir = -1;
      @(posedge clk iff irqc);
      if (p >= 2) begin
        check("period cycles", last_plen, TC * CPU);
        check("c0 high cycles", last_high, a_prev * CPU);
      end
      a_new = $urandom_range(12, TC);
      bus_write(A1_ALPHA, 24'(a_new), 3);
      bus_read(A1_IM, 3, d);
      if (p % 6 >= 2) check("i_m", d, 24'(n_im));
      bus_read(A1_OMEGA, 3, d);
      // 4 quadrature edges per line; WIN/EDGE_US edges per window, +-1
      if (p >= 5 && p < 15 || p >= 21) begin
        checks++;
        if ($signed(d) < enc_dir * (WIN / EDGE_US) - 1 || $signed(d) > enc_dir * (WIN / EDGE_US) + 1) begin
          failures++;
          $display("omega %0d for %0d edges per window", $signed(d), enc_dir * (WIN / EDGE_US));
        end
        if ($signed(d) > 0) n_fwd++; else n_rev++;
      end
      a_prev = a_new;
    end
    checks++;
    if (n_fwd == 0 || n_rev == 0) begin failures++; $display("speed seen in one direction only"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
