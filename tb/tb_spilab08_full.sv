// Full-size testbench of the SPI lab board: the top at its default clock
// dividers with a 50 MHz board clock, so the SPI state clock runs at 10 Hz
// and the button clock at 100 Hz. It measures both divided clock periods,
// clears the board, presses BTN0 and checks that the master's switch word
// arrives in the slave's register and shows on both sets of LEDs. About
// 2.3 simulated seconds (over 10^8 board-clock cycles).
module tb_spilab08_full;
  logic CCLK = 1'b0;
  logic BTN0 = 0, BTN1 = 0, BTN2 = 0, BTN3 = 0;
  logic [7:0] SW = 8'h3C;
  logic LD7, LD6, LD5, LD4, LD3, LD2, LD1, LD0;
  logic [3:0] mled, sled;
  int checks = 0, failures = 0;

  spilab08 dut (
    .CCLK(CCLK), .BTN0(BTN0), .BTN1(BTN1), .BTN2(BTN2), .BTN3(BTN3),
    .SW0(SW[0]), .SW1(SW[1]), .SW2(SW[2]), .SW3(SW[3]),
    .SW4(SW[4]), .SW5(SW[5]), .SW6(SW[6]), .SW7(SW[7]),
    .LD7(LD7), .LD6(LD6), .LD5(LD5), .LD4(LD4),
    .LD3(LD3), .LD2(LD2), .LD1(LD1), .LD0(LD0));

  assign mled = {LD7, LD6, LD5, LD4};
  assign sled = {LD3, LD2, LD1, LD0};

  always #10 CCLK = ~CCLK;   // 50 MHz

  initial begin
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slow(input int n);
    repeat (n) @(posedge dut.clk1);
  endtask

  task automatic check_period(input string name, ref logic c, input time expected);
    time t0, t1;
    @(posedge c) t0 = $time;
    @(posedge c) t1 = $time;
    checks++;
    if (t1 - t0 != expected) begin
      failures++;
      $display("%s period %0t ns, expected %0t ns", name, t1 - t0, expected);
    end
  endtask

  initial begin
    check_period("button clock", dut.clk100, 64'd10_000_000);     // 10 ms
    check_period("SPI state clock", dut.clk1, 64'd100_000_000);   // 100 ms

    BTN2 = 1; slow(2); BTN2 = 0; slow(1);
    checks++;
    if (mled !== 4'h0 || sled !== 4'h0) begin
      failures++; $display("clear: LEDs %h %h", mled, sled);
    end

    BTN0 = 1; slow(2); BTN0 = 0;
    slow(12);
    checks++;
    if (mled !== SW[7:4] || sled !== SW[7:4]) begin
      failures++;
      $display("send: master LEDs %h slave LEDs %h, expected %h", mled, sled, SW[7:4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
