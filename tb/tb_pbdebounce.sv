// Testbench for the push-button debouncer. The button is driven with long
// steady presses and releases, separated by bursts of bounce. A reference
// keeps every sample and expects the output, after sampling edge n, to be
// the AND of the samples taken at edges n-SAMPLES .. n-1. It also counts
// bounce bursts that were correctly kept from reaching the output.
module tb_pbdebounce;
  localparam int SAMPLES = 4;
  logic clk = 1'b0;
  logic pb = 1'b0;
  logic pbreg;
  int checks = 0, failures = 0;
  int rejected = 0, presses = 0;
  bit samples[$];

  pbdebounce #(.SAMPLES(SAMPLES)) dut (.clk(clk), .pb(pb), .pbreg(pbreg));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sampling edge, then compare with the reference
  task automatic tick();
    bit expv;
    @(posedge clk);
    samples.push_back(pb);
    #1;
    if (samples.size() > SAMPLES) begin
      expv = 1'b1;
      for (int i = samples.size() - 1 - SAMPLES; i < samples.size() - 1; i++)
        expv &= samples[i];
      checks++;
      if (pbreg !== expv) begin
        failures++;
        $display("edge %0d: pbreg=%0b expected %0b", samples.size(), pbreg, expv);
      end
    end
  endtask

  initial begin
    bit went_high;
    repeat (SAMPLES + 2) tick();
    for (int k = 0; k < 60; k++) begin
      // bounce burst: short pulses shorter than SAMPLES
      went_high = 1'b0;
      pb = 1'b0;
      repeat (2 + $urandom_range(0, 4)) begin
        pb = 1'b1;
        repeat ($urandom_range(1, SAMPLES - 1)) begin tick(); went_high |= pbreg; end
        pb = 1'b0;
        tick(); went_high |= pbreg;
      end
      tick(); went_high |= pbreg;
      if (!went_high) rejected++;
      // steady press
      pb = 1'b1;
      repeat (SAMPLES + 1 + $urandom_range(0, 6)) tick();
      if (pbreg) presses++;
      pb = 1'b0;
      repeat ($urandom_range(1, 6)) tick();
    end
    checks++;
    if (rejected != 60 || presses != 60) begin
      failures++;
      $display("rejected %0d of 60 bursts, passed %0d of 60 presses", rejected, presses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
