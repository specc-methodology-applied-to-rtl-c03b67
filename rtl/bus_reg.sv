// Elementary memory block of an architecture-2 I/O module: one register
// with a DSP56600-bus side and a local side.
//
// Each I/O module (PWM, current acquisition, speed acquisition) keeps its
// exchanged variable in such a register, so that it never has to
// synchronise with the processor: it writes or reads the register with its
// own controller, and the DSP reads or writes it over the bus whenever it
// likes. The bus side has the pins of a small memory: A, D, /CS, /OE and
// /WE, with /CS, /OE and /WE wired to the DSP's /MCS, /RD and /WR. Only
// one direction is used on each side: BUS_WR enables writes from the bus
// (the alpha register of the PWM), BUS_RD enables reads to the bus (the
// current and speed registers). The register and this way of wiring it are
// the device's; the address decode against ADDR (several slaves share the
// bus) and the synchronisers are this design's.
//
// Bus write: /WE and /CS pass two-flip-flop synchronisers; data is captured
// at every clock edge where the raw /CS and /WE are low and A matches, and
// committed when the synchronised /WE rises, bus_wr then pulses for one
// cycle. A bus write wins over a local load in the same cycle.
// Bus read: D is driven combinationally while /CS and /OE are low and A
// matches. Local side: ld loads din; q always shows the register.
// The register is W bits wide and the data bus 24, so the bus data bits
// above W (sign-extended when SIGNED) are constant zero in a read-only
// or unsigned register.
module bus_reg
  import dcctl_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ADDR   = A2_R_ALPHA,
  parameter int unsigned       W      = 10,
  parameter bit                BUS_WR = 1'b1,
  parameter bit                BUS_RD = 1'b1,
  parameter bit                SIGNED = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dsp_bus_m_t   bus_m,
  output dsp_bus_s_t   bus_s,
  input  logic         ld,
  input  logic [W-1:0] din,
  output logic [W-1:0] q,
  output logic         bus_wr
);
  logic [1:0]   cs_s, we_s;
  logic         sel;
  logic         we_rise;
  logic [W-1:0] wdata;

  assign sel     = !cs_s[1] && (bus_m.a == ADDR);
  assign we_rise = !we_s[1] && we_s[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs_s   <= 2'b11;
      we_s   <= 2'b11;
      wdata  <= '0;
      q      <= '0;
      bus_wr <= 1'b0;
    end else begin
      cs_s   <= {cs_s[0], bus_m.mcs_n};
      we_s   <= {we_s[0], bus_m.wr_n};
      bus_wr <= 1'b0;
      if (BUS_WR && !bus_m.mcs_n && !bus_m.wr_n && bus_m.a == ADDR) wdata <= bus_m.d[W-1:0];
      if (BUS_WR && sel && we_rise) begin
        q      <= wdata;
        bus_wr <= 1'b1;
      end else if (ld) begin
        q <= din;
      end
    end
  end

  always_comb begin
    bus_s = '{d: '0, oe: 1'b0};
    if (BUS_RD && !bus_m.mcs_n && !bus_m.rd_n && bus_m.a == ADDR) begin
      bus_s.oe = 1'b1;
      bus_s.d  = SIGNED ? DATA_W'($signed(q)) : DATA_W'(q);
    end
  end
endmodule
