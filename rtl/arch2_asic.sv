// Current-control ASIC of architecture 2 (C_CTL with its exchange FSMD).
//
// In architecture 2 the current loop runs on this ASIC, the speed loop on
// the DSP56600, and each I/O function on its own small chip. The DSP is the
// only bus master. The ASIC keeps its own current-loop period Tc; at the
// start of each period it raises irq and then follows the DSP's bus cycles:
//   1. a read cycle from ADDR_ALPHA: it returns the alpha computed in the
//      previous period (the DSP forwards it to the PWM chip);
//   2. a write cycle to ADDR_IM: it takes the average current i_m (which
//      the DSP has read from the current-acquisition chip);
//   3. a write cycle to ADDR_IREF: it takes the current reference I_ref
//      produced by the DSP's speed loop.
// It then runs one step of the current control law (pi_current), whose
// result is read at the start of the next period. irq stays high until the
// first cycle addressed to the ASIC is recognised.
//
// The order of the exchange, the interrupt and the single-master bus are
// the device's; the addresses, widths and the bus-cycle handling (the same
// as the architecture-1 exchanges FSMD: synchronised strobes, write data
// captured while the raw /WR is low and committed on
// the synchronised rising /WR, read data driven combinationally) are this
// design's. The DSP must stretch its strobes, and the gaps between its cycles, to
// at least three clk periods.
// A period start that arrives while an exchange is still running is counted
// in overruns and otherwise ignored. The returned alpha is ALPHA_W bits
// wide, so the bus data bits above it are always zero.
module arch2_asic
  import dcctl_pkg::*;
#(
  parameter int unsigned       CLK_PER_US = 50,
  parameter int unsigned       TC_US      = 284,
  parameter logic [ADDR_W-1:0] ADDR_ALPHA = A2_ASIC_ALPHA,
  parameter logic [ADDR_W-1:0] ADDR_IM    = A2_ASIC_IM,
  parameter logic [ADDR_W-1:0] ADDR_IREF  = A2_ASIC_IREF,
  parameter int                KP         = 64,
  parameter int                KI         = 8,
  parameter int unsigned       SHIFT      = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  dsp_bus_m_t         bus_m,
  output dsp_bus_s_t         bus_s,
  output logic               irq,
  output logic [ALPHA_W-1:0] alpha,
  output logic               alpha_valid,
  output logic [ADC_W-1:0]   i_ref,
  output logic [ADC_W-1:0]   i_m,
  output logic               sat,
  output logic [7:0]         overruns
);
  typedef enum logic [3:0] {
    IDLE, IRQ,
    AL_SEL, AL_RD_HI, AL_DRV, AL_END,
    IM_SEL, IM_WR_HI, IM_WR_LO, IM_END,
    IR_SEL, IR_WR_HI, IR_WR_LO, CALC
  } state_t;

  state_t state, nxt;

  logic tick_us, tc_start;
  logic [1:0] mcs_s, rd_s, wr_s;
  logic       mcs, rd_n, wr_n;
  logic [ADC_W-1:0] wdata;
  logic       calc_go;

  tick_gen #(.DIV(CLK_PER_US)) u_us (.clk(clk), .rst_n(rst_n), .en(1'b1),    .tick(tick_us));
  tick_gen #(.DIV(TC_US))      u_tc (.clk(clk), .rst_n(rst_n), .en(tick_us), .tick(tc_start));

  pi_current #(.TC_US(TC_US), .KP(KP), .KI(KI), .SHIFT(SHIFT)) u_pi (
    .clk(clk), .rst_n(rst_n), .start(calc_go), .i_ref(i_ref), .i_m(i_m),
    .alpha(alpha), .done(alpha_valid), .sat(sat));

  assign mcs  = !mcs_s[1];
  assign rd_n = rd_s[1];
  assign wr_n = wr_s[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mcs_s <= 2'b11;
      rd_s  <= 2'b11;
      wr_s  <= 2'b11;
    end else begin
      mcs_s <= {mcs_s[0], bus_m.mcs_n};
      rd_s  <= {rd_s[0],  bus_m.rd_n};
      wr_s  <= {wr_s[0],  bus_m.wr_n};
    end
  end

  always_comb begin
    nxt = state;
    unique case (state)
      IDLE:     if (tc_start) nxt = IRQ;
      IRQ:      nxt = AL_SEL;
      AL_SEL:   if (mcs && bus_m.a == ADDR_ALPHA) nxt = AL_RD_HI;
      AL_RD_HI: if (!rd_n) nxt = AL_DRV;
      AL_DRV:   if (rd_n) nxt = AL_END;
      AL_END:   if (!mcs) nxt = IM_SEL;
      IM_SEL:   if (mcs && bus_m.a == ADDR_IM) nxt = IM_WR_HI;
      IM_WR_HI: if (!wr_n) nxt = IM_WR_LO;
      IM_WR_LO: if (wr_n) nxt = IM_END;
      IM_END:   if (!mcs) nxt = IR_SEL;
      IR_SEL:   if (mcs && bus_m.a == ADDR_IREF) nxt = IR_WR_HI;
      IR_WR_HI: if (!wr_n) nxt = IR_WR_LO;
      IR_WR_LO: if (wr_n) nxt = CALC;
      CALC:     if (!mcs) nxt = IDLE;
      default:  nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      calc_go  <= 1'b0;
      wdata    <= '0;
      i_ref    <= '0;
      i_m      <= '0;
      overruns <= '0;
    end else begin
      state <= nxt;
      calc_go <= (state == IR_WR_LO) && wr_n;
      if (!bus_m.mcs_n && !bus_m.wr_n &&
          (((state == IM_SEL || state == IM_WR_HI || state == IM_WR_LO) && bus_m.a == ADDR_IM) ||
           ((state == IR_SEL || state == IR_WR_HI || state == IR_WR_LO) && bus_m.a == ADDR_IREF)))
        wdata <= bus_m.d[ADC_W-1:0];
      if (state == IM_WR_LO && wr_n) i_m   <= wdata;
      if (state == IR_WR_LO && wr_n) i_ref <= wdata;
      if (tc_start && state != IDLE && overruns != 8'hFF) overruns <= overruns + 1'b1;
    end
  end

  assign irq = (state == IRQ) || (state == AL_SEL);

  always_comb begin
    bus_s = '{d: '0, oe: 1'b0};
    if (!bus_m.mcs_n && !bus_m.rd_n && bus_m.a == ADDR_ALPHA &&
        (state == AL_RD_HI || state == AL_DRV)) begin
      bus_s.d  = DATA_W'(alpha);
      bus_s.oe = 1'b1;
    end
  end

  // Bus rule: a master never asserts /RD and /WR together.
  always_ff @(posedge clk)
    if (rst_n && !bus_m.mcs_n) assert (bus_m.rd_n || bus_m.wr_n)
      else $error("arch2_asic: /RD and /WR low together");
endmodule
