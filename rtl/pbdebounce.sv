// Push-button debouncer.
//
// Samples the raw button on every edge of a slow clock (100 Hz on the lab
// board, so samples are 10 ms apart, longer than contact bounce) into a
// SAMPLES-deep shift register. The output is high only while every sample
// in the register is high; a single low sample (a bounce or a release)
// drops it. The shift-register method and its depth of four are this
// design's choices; the lab names the block and its 100 Hz clock.
//
// Timing: if pb is high at sampling edges k .. k+SAMPLES-1, pbreg goes
// high after edge k+SAMPLES. If pb is low at edge m, pbreg is low after
// edge m+1.
// Interface: clk, the sampling clock; pb, the raw button; pbreg, the
// debounced level (register output). No reset: the register flushes any
// power-up value within SAMPLES edges.
module pbdebounce #(
  parameter int unsigned SAMPLES = 4
) (
  input  logic clk,
  input  logic pb,
  output logic pbreg
);
  logic [SAMPLES-1:0] hist;

  always_ff @(posedge clk) begin
    hist  <= {hist[SAMPLES-2:0], pb};
    pbreg <= &hist;
  end

  initial assert (SAMPLES >= 2) else $error("pbdebounce: SAMPLES must be at least 2");
endmodule
