// SPI slave controller.
//
// Turns the slave's debounced read button into a request that stays set:
// rdsdat (load the slave switches and offer them on MISO). It is set on a
// clock edge where pbtn is high and holds until the clear button (scrst)
// is seen, which is synchronous and takes priority. This follows the lab's
// controller.
module spiscntrl (
  input  logic spiscclk,
  input  logic pbtn,
  input  logic scrst,
  output logic rdsdat
);
  always_ff @(posedge spiscclk) begin
    if (scrst)     rdsdat <= 1'b0;
    else if (pbtn) rdsdat <= 1'b1;
  end
endmodule
