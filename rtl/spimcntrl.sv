// SPI master controller.
//
// Turns the master's two debounced buttons into requests that stay set:
// rdmdat (read the master switches and send them to the slave) and rdslave
// (read the slave's word into the master). Each flag is set on a clock edge
// where its button is high and holds until the clear button (mcrst) is
// seen. If both buttons are high on one edge, rdmdat is set first; the
// other is set on a later edge if its button is still held. While a flag
// stays set, the master datapath repeats that transfer back to back.
// This follows the lab's controller; only the port widths are explicit
// here.
//
// Timing: all on the rising edge of the slow SPI clock; mcrst is a
// synchronous, highest-priority clear.
module spimcntrl (
  input  logic spimcclk,
  input  logic mcrd,
  input  logic mcrst,
  input  logic mcrdslv,
  output logic rdmdat,
  output logic rdslave
);
  always_ff @(posedge spimcclk) begin
    if (mcrst) begin
      rdmdat  <= 1'b0;
      rdslave <= 1'b0;
    end else if (mcrd) begin
      rdmdat  <= 1'b1;
    end else if (mcrdslv) begin
      rdslave <= 1'b1;
    end
  end
endmodule
