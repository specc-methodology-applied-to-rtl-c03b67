// Shared types and constants of the DC-motor control device.
//
// The control device talks to a DSP56600 processor over its external bus:
// a 16-bit address A, a 24-bit data bus D and the active-low strobes /MCS
// (memory chip select), /RD and /WR. The bus widths are the processor's.
// Tri-state data is not modelled: a master drives dsp_bus_m_t, and every
// slave returns a dsp_bus_s_t whose oe bit says it is driving D. A board
// (or the top level) ORs the slave replies together.
//
// The word widths of the exchanged variables follow the 10-bit ADC for the
// currents; the pulse width alpha is counted in 1 us steps of a 284 us
// period (9 bits) and the speed is a signed 16-bit encoder-edge count.
// Those two widths, and the bus addresses below, are this design's choices.
package dcctl_pkg;

  localparam int unsigned ADDR_W  = 16;
  localparam int unsigned DATA_W  = 24;
  localparam int unsigned ADC_W   = 10;
  localparam int unsigned ALPHA_W = 9;
  localparam int unsigned SPEED_W = 16;

  // Bus wires driven by the master (the DSP).
  typedef struct packed {
    logic [ADDR_W-1:0] a;
    logic [DATA_W-1:0] d;
    logic              mcs_n;
    logic              rd_n;
    logic              wr_n;
  } dsp_bus_m_t;

  // Reply of one slave: read data and whether it drives the data bus.
  typedef struct packed {
    logic [DATA_W-1:0] d;
    logic              oe;
  } dsp_bus_s_t;

  localparam dsp_bus_m_t BUS_IDLE = '{a: '0, d: '0, mcs_n: 1'b1, rd_n: 1'b1, wr_n: 1'b1};

  // Architecture 1: the I/O ASIC holds three consecutive words.
  localparam logic [ADDR_W-1:0] A1_ALPHA = 16'hFF00;
  localparam logic [ADDR_W-1:0] A1_IM    = 16'hFF01;
  localparam logic [ADDR_W-1:0] A1_OMEGA = 16'hFF02;
  // Architecture 2: current-control ASIC and the three I/O registers.
  localparam logic [ADDR_W-1:0] A2_ASIC_ALPHA = 16'hFF10;
  localparam logic [ADDR_W-1:0] A2_ASIC_IM    = 16'hFF11;
  localparam logic [ADDR_W-1:0] A2_ASIC_IREF  = 16'hFF12;
  localparam logic [ADDR_W-1:0] A2_R_ALPHA    = 16'hFF20;
  localparam logic [ADDR_W-1:0] A2_R_IM       = 16'hFF21;
  localparam logic [ADDR_W-1:0] A2_R_OMEGA    = 16'hFF22;

endpackage
