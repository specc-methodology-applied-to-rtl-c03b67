// Exchanges FSMD of the architecture-1 I/O ASIC.
//
// Once per current-loop period the ASIC and the DSP56600 swap their
// variables over the DSP's external bus, the DSP being the only master.
// On start (the PWM's period start) the FSMD raises the interrupt line IRQC
// and then follows the DSP's bus cycles:
//   1. a write cycle to ADDR_ALPHA: the new pulse width alpha is taken;
//   2. a read cycle from ADDR_IM: the average current i_m is returned;
//   3. a read cycle from ADDR_OMEGA: the speed omega is returned.
// IRQC stays high from the first state until the first cycle addressed to
// the ASIC is seen. The sequence of states and the conditions between them
// (address match under /MCS, falling then rising /WR for the write, falling
// /RD for each read, end of /MCS between cycles) are the device's. Giving
// each variable its own address, the states that wait for the end of a
// read cycle before the next one, and data widths are this design's own.
//
// Bus interface: /MCS, /RD and /WR are asynchronous to clk and go through
// two-flip-flop synchronisers; the address is compared while the
// synchronised /MCS is low, which assumes the DSP holds A stable for the
// whole cycle, as the DSP56600 does: A is valid for the whole /MCS low time.
// Write data is captured on every clock edge at which the raw /WR and /MCS
// are low and A matches, and committed when the synchronised /WR rises; so
// the DSP's short data hold time after /WR is not needed. Read data is driven
// combinationally from the raw strobes so it appears as soon as /RD falls.
// The DSP must stretch its strobes (bus wait states), and the gaps between
// its cycles, to at least three clk periods so that the synchronised
// strobes are seen.
//
// Outputs: alpha and a one-cycle alpha_valid; busy is high from start to
// the end of the third cycle. A start while busy is ignored.
module exch_slave
  import dcctl_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ADDR_ALPHA = A1_ALPHA,
  parameter logic [ADDR_W-1:0] ADDR_IM    = A1_IM,
  parameter logic [ADDR_W-1:0] ADDR_OMEGA = A1_OMEGA
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  dsp_bus_m_t                bus_m,
  output dsp_bus_s_t                bus_s,
  output logic                      irqc,
  output logic [ALPHA_W-1:0]        alpha,
  output logic                      alpha_valid,
  input  logic [ADC_W-1:0]          i_m,
  input  logic signed [SPEED_W-1:0] omega,
  output logic                      busy
);
  // State names follow the exchange sequence; the comment gives the state
  // of the published state diagram each one stands for.
  typedef enum logic [3:0] {
    IDLE,        // Estart / Eend
    IRQ,         // S1:  IRQC = 1
    A_SEL,       // S2:  wait for MCS && A == &alpha
    A_WR_HI,     // S8:  wait for /WR to fall
    A_WR_LO,     // S9:  wait for /WR to rise
    A_LATCH,     // S10: alpha = D
    A_END,       // S6:  wait for end of /MCS
    I_SEL,       // S7:  wait for MCS && A == &i_m
    I_RD_HI,     // S5:  wait for /RD to fall
    I_DRV,       // S6:  D = i_m while /RD low
    I_END,       // S11: wait for end of /MCS
    O_SEL,       // S12: wait for MCS && A == &omega
    O_RD_HI,     // S5:  wait for /RD to fall
    O_DRV,       // S6:  D = omega while /RD low
    O_END        //      wait for end of /MCS
  } state_t;

  state_t state, nxt;

  logic [1:0] mcs_s, rd_s, wr_s;     // synchronisers, [1] is used
  logic       mcs, rd_n, wr_n;
  logic [ALPHA_W-1:0] wdata;

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
      IDLE:    if (start) nxt = IRQ;
      IRQ:     nxt = A_SEL;
      A_SEL:   if (mcs && bus_m.a == ADDR_ALPHA) nxt = A_WR_HI;
      A_WR_HI: if (!wr_n) nxt = A_WR_LO;
      A_WR_LO: if (wr_n) nxt = A_LATCH;
      A_LATCH: nxt = A_END;
      A_END:   if (!mcs) nxt = I_SEL;
      I_SEL:   if (mcs && bus_m.a == ADDR_IM) nxt = I_RD_HI;
      I_RD_HI: if (!rd_n) nxt = I_DRV;
      I_DRV:   if (rd_n) nxt = I_END;
      I_END:   if (!mcs) nxt = O_SEL;
      O_SEL:   if (mcs && bus_m.a == ADDR_OMEGA) nxt = O_RD_HI;
      O_RD_HI: if (!rd_n) nxt = O_DRV;
      O_DRV:   if (rd_n) nxt = O_END;
      O_END:   if (!mcs) nxt = IDLE;
      default: nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= IDLE;
      wdata       <= '0;
      alpha       <= '0;
      alpha_valid <= 1'b0;
    end else begin
      state       <= nxt;
      alpha_valid <= 1'b0;
      if ((state == A_SEL || state == A_WR_HI || state == A_WR_LO) &&
          !bus_m.mcs_n && !bus_m.wr_n && bus_m.a == ADDR_ALPHA)
        wdata <= bus_m.d[ALPHA_W-1:0];
      if (state == A_LATCH) begin
        alpha       <= wdata;
        alpha_valid <= 1'b1;
      end
    end
  end

  // IRQC from S1 until the first transfer to the ASIC is recognised.
  assign irqc = (state == IRQ) || (state == A_SEL);
  assign busy = (state != IDLE);

  // Bus rule: a master never asserts /RD and /WR together.
  always_ff @(posedge clk)
    if (rst_n && !bus_m.mcs_n) assert (bus_m.rd_n || bus_m.wr_n)
      else $error("exch_slave: /RD and /WR low together");

  // Read data: driven while the DSP's read cycle addresses the variable.
  always_comb begin
    bus_s = '{d: '0, oe: 1'b0};
    if (!bus_m.mcs_n && !bus_m.rd_n) begin
      if ((state == I_RD_HI || state == I_DRV) && bus_m.a == ADDR_IM) begin
        bus_s.d  = DATA_W'(i_m);
        bus_s.oe = 1'b1;
      end else if ((state == O_RD_HI || state == O_DRV) && bus_m.a == ADDR_OMEGA) begin
        bus_s.d  = DATA_W'(omega);   // sign-extended to the bus width
        bus_s.oe = 1'b1;
      end
    end
  end
endmodule
