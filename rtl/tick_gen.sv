// Tick generator: the periodic "clock behaviours" of the control device.
//
// Counts enabled cycles and emits a one-cycle pulse on tick every DIV of
// them. With en tied high it turns the system clock into the 1 us time base
// (DIV = clock cycles per microsecond); with en driven by that 1 us tick it
// gives the 5 us ADC sampling period or the 284 us current-loop period Tc.
// The periods are the device's; building every period as a counter on a
// common 1 us tick is this design's choice.
//
// Timing: the first tick comes DIV enabled cycles after reset; tick is
// registered and high for exactly one clock cycle.
module tick_gen #(
  parameter int unsigned DIV = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        if (cnt == CW'(DIV - 1)) begin
          cnt  <= '0;
          tick <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
