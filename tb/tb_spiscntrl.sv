// Testbench for the SPI slave controller: random button levels, the flag
// compared each cycle with a reference (clear wins, a set flag holds).
module tb_spiscntrl;
  logic clk = 1'b0;
  logic pbtn, scrst, rdsdat;
  bit   e;
  int checks = 0, failures = 0;

  spiscntrl dut (.spiscclk(clk), .pbtn(pbtn), .scrst(scrst), .rdsdat(rdsdat));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pbtn = 0; scrst = 1;
    @(posedge clk); #1;
    e = 0;
    for (int i = 0; i < 2000; i++) begin
      scrst = ($urandom_range(0, 15) == 0);
      pbtn  = ($urandom_range(0, 7) == 0);
      @(posedge clk);
      if (scrst)     e = 0;
      else if (pbtn) e = 1;
      #1;
      checks++;
      if (rdsdat !== e) begin
        failures++;
        $display("cycle %0d: rdsdat=%0b expected %0b", i, rdsdat, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
