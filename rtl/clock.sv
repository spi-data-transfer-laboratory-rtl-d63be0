// Clock divider.
//
// Counts cycles of clk_in and toggles clk_out every HALF_PERIOD cycles, so
// clk_out runs at f(clk_in) / (2 * HALF_PERIOD) with a 50 % duty cycle.
// The lab board uses two of these: HALF_PERIOD = 2,500,000 for the slow
// clock that steps the SPI state machines and 250,000 for the 100 Hz
// button-sampling clock. The counting scheme (toggle-at-terminal-count) is
// this design's choice; only the divisor values come with the lab.
//
// Interface: clk_in, the board clock; clk_out, the divided clock, a
// register output. There is no reset: the counter compares with ">=" so any
// power-up value reaches the terminal count within one wrap, and the phase
// of clk_out after power-up does not matter to its users.
module clock #(
  parameter int unsigned HALF_PERIOD = 2500000
) (
  input  logic clk_in,
  output logic clk_out
);
  localparam int unsigned CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  localparam logic [CW-1:0] LAST = CW'(HALF_PERIOD - 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk_in) begin
    if (count >= LAST) begin
      count   <= '0;
      clk_out <= ~clk_out;
    end else begin
      count   <= count + 1'b1;
    end
  end
endmodule
