// Testbench for the SPI master controller: random button levels are
// applied and the two request flags compared each cycle with a reference:
// clear wins, then the send button, then the read-slave button, and a set
// flag stays set until clear.
module tb_spimcntrl;
  logic clk = 1'b0;
  logic mcrd, mcrst, mcrdslv, rdmdat, rdslave;
  bit   e_md, e_rs;
  int checks = 0, failures = 0;
  int both_set = 0;

  spimcntrl dut (.spimcclk(clk), .mcrd(mcrd), .mcrst(mcrst), .mcrdslv(mcrdslv),
                 .rdmdat(rdmdat), .rdslave(rdslave));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mcrd = 0; mcrst = 1; mcrdslv = 0;
    @(posedge clk); #1;
    e_md = 0; e_rs = 0;
    for (int i = 0; i < 2000; i++) begin
      mcrst   = ($urandom_range(0, 15) == 0);
      mcrd    = ($urandom_range(0, 7) == 0);
      mcrdslv = ($urandom_range(0, 7) == 0);
      @(posedge clk);
      if (mcrst)        begin e_md = 0; e_rs = 0; end
      else if (mcrd)    e_md = 1;
      else if (mcrdslv) e_rs = 1;
      #1;
      checks++;
      if (rdmdat !== e_md || rdslave !== e_rs) begin
        failures++;
        $display("cycle %0d: rdmdat=%0b rdslave=%0b expected %0b %0b",
                 i, rdmdat, rdslave, e_md, e_rs);
      end
      if (e_md && e_rs) both_set++;
    end
    checks++;
    if (both_set == 0) begin failures++; $display("both flags never set together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
