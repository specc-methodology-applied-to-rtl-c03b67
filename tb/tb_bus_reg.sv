// Testbench for bus_reg: one register writable and readable from the bus,
// one readable only (loaded locally, as the current register), one
// writable only (as the pulse-width register). Checks bus writes, the
// bus_wr strobe, bus reads, local loads, sign extension, the address
// decode, and that a read-disabled register never drives the bus.
module tb_bus_reg;
  import dcctl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dsp_bus_m_t bus_m = BUS_IDLE;
  dsp_bus_s_t s_rw, s_ro, s_wo;
  logic ld_rw = 1'b0, ld_ro = 1'b0;
  logic [15:0] din_rw = '0, din_ro = '0, q_rw, q_ro;
  logic [8:0] q_wo;
  logic wr_rw, wr_ro, wr_wo;
  int checks = 0, failures = 0;

  bus_reg #(.ADDR(16'h0100), .W(16), .BUS_WR(1'b1), .BUS_RD(1'b1)) u_rw (
    .clk(clk), .rst_n(rst_n), .bus_m(bus_m), .bus_s(s_rw), .ld(ld_rw), .din(din_rw), .q(q_rw), .bus_wr(wr_rw));
  bus_reg #(.ADDR(16'h0101), .W(16), .BUS_WR(1'b0), .BUS_RD(1'b1), .SIGNED(1'b1)) u_ro (
    .clk(clk), .rst_n(rst_n), .bus_m(bus_m), .bus_s(s_ro), .ld(ld_ro), .din(din_ro), .q(q_ro), .bus_wr(wr_ro));
  bus_reg #(.ADDR(16'h0102), .W(9), .BUS_WR(1'b1), .BUS_RD(1'b0)) u_wo (
    .clk(clk), .rst_n(rst_n), .bus_m(bus_m), .bus_s(s_wo), .ld(1'b0), .din('0), .q(q_wo), .bus_wr(wr_wo));

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

  int n_wr_rw = 0, n_wr_wo = 0, n_wr_ro = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_rw) n_wr_rw++;
    if (wr_wo) n_wr_wo++;
    if (wr_ro) n_wr_ro++;
    if (s_wo.oe) begin failures++; $display("write-only register drove the bus"); end
    if ((s_rw.oe && s_ro.oe)) begin failures++; $display("two registers drove the bus"); end
  end

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
    d = (s_rw.oe ? s_rw.d : '0) | (s_ro.oe ? s_ro.d : '0) | (s_wo.oe ? s_wo.d : '0);
    bus_m.rd_n <= 1'b1;
    @(posedge clk);
    bus_m.mcs_n <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  logic [23:0] d;
  logic [15:0] v, v2;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 25; r++) begin
      v = 16'($urandom);
      bus_write(16'h0100, {8'hAA, v}, 3 + r % 3);
      check("rw q after bus write", q_rw, v);
      bus_read(16'h0100, 3, d);
      check("rw bus read", d, 24'(v));
      // local load, then read back over the bus
      v2 = 16'($urandom);
      din_rw <= v2; ld_rw <= 1'b1;
      @(posedge clk);
      ld_rw <= 1'b0;
      @(posedge clk);
      bus_read(16'h0100, 3, d);
      check("rw read after local load", d, 24'(v2));
      // read-only register: loaded locally, the bus cannot write it
      v = 16'($urandom);
      din_ro <= v; ld_ro <= 1'b1;
      @(posedge clk);
      ld_ro <= 1'b0;
      bus_write(16'h0101, 24'h00_5555, 3);
      check("ro not written by bus", q_ro, v);
      bus_read(16'h0101, 4, d);
      check("ro read, sign-extended", d, {{8{v[15]}}, v});
      // write-only register
      v = 16'($urandom_range(0, 511));
      bus_write(16'h0102, 24'(v), 3);
      check("wo q", q_wo, v);
      bus_read(16'h0102, 3, d);
      check("wo read gives nothing", d, 0);
      // an address nobody has
      bus_write(16'h0103, 24'h123, 3);
      check("rw untouched by other address", q_rw, v2);
    end
    check("bus_wr strobes of rw", n_wr_rw, 25);
    check("bus_wr strobes of wo", n_wr_wo, 25);
    check("bus_wr strobes of ro", n_wr_ro, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
