// End-to-end testbench of the SPI lab board at shortened clock dividers
// (slow SPI clock = CCLK / 16, button clock = CCLK / 4). It works the
// board as a user would, through buttons, switches and LEDs only:
//   clear, a bouncing tap on BTN0 that must be ignored, a BTN0 press that
//   sends the master switches to the slave, switch changes that the
//   repeating send must carry over, clear, BTN1 then BTN3 so the master
//   reads the slave's switches, slave switch changes that the repeating
//   read must carry over, and a final clear.
// It also times the repeating send on the internal SS line: one send every
// 10 slow-clock cycles. Each mechanism is counted and one that never
// happened counts as a failure.
module tb_spilab08;
  localparam int CLK1_HALF = 8, CLK100_HALF = 2;
  localparam int SLOW = 2 * CLK1_HALF;          // CCLK cycles per slow cycle

  logic CCLK = 1'b0;
  logic BTN0 = 0, BTN1 = 0, BTN2 = 0, BTN3 = 0;
  logic [7:0] SW = '0;
  logic LD7, LD6, LD5, LD4, LD3, LD2, LD1, LD0;
  logic [3:0] mled, sled;
  int checks = 0, failures = 0;
  int n_clear = 0, n_glitch = 0, n_m2s = 0, n_s2m = 0, n_follow_m = 0,
      n_follow_s = 0, n_period = 0;

  spilab08 #(.CLK1_HALF(CLK1_HALF), .CLK100_HALF(CLK100_HALF)) dut (
    .CCLK(CCLK), .BTN0(BTN0), .BTN1(BTN1), .BTN2(BTN2), .BTN3(BTN3),
    .SW0(SW[0]), .SW1(SW[1]), .SW2(SW[2]), .SW3(SW[3]),
    .SW4(SW[4]), .SW5(SW[5]), .SW6(SW[6]), .SW7(SW[7]),
    .LD7(LD7), .LD6(LD6), .LD5(LD5), .LD4(LD4),
    .LD3(LD3), .LD2(LD2), .LD1(LD1), .LD0(LD0));

  assign mled = {LD7, LD6, LD5, LD4};
  assign sled = {LD3, LD2, LD1, LD0};

  always #10 CCLK = ~CCLK;

  initial begin
    repeat (200000) @(posedge CCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slow(input int n);
    repeat (n * SLOW) @(posedge CCLK);
  endtask

  task automatic press(ref logic btn, input int slow_cycles);
    btn = 1; slow(slow_cycles); btn = 0; slow(2);
  endtask

  task automatic expect_leds(input string what, input logic [3:0] em, input logic [3:0] es);
    checks++;
    if (mled !== em || sled !== es) begin
      failures++;
      $display("%s: master LEDs %h slave LEDs %h, expected %h %h", what, mled, sled, em, es);
    end
  endtask

  task automatic do_clear();
    press(BTN2, 3);
    expect_leds("clear", 4'h0, 4'h0);
    n_clear++;
  endtask

  // time between SS falls of a repeating send
  task automatic measure_send_period();
    time t0, t1;
    @(negedge dut.ss) t0 = $time;
    @(negedge dut.ss) t1 = $time;
    checks++;
    if ((t1 - t0) != 10 * SLOW * 20) begin
      failures++;
      $display("send period %0t, expected %0d slow cycles", t1 - t0, 10);
    end else n_period++;
  endtask

  initial begin
    logic [3:0] ms, ss_sw;
    SW = 8'h00;
    slow(2);
    do_clear();

    // a bouncing tap on BTN0, each pulse shorter than the debounce window
    SW[7:4] = 4'h5;
    repeat (3) begin
      BTN0 = 1; repeat (2 * CLK100_HALF) @(posedge CCLK);
      BTN0 = 0; repeat (2 * CLK100_HALF) @(posedge CCLK);
    end
    slow(30);
    checks++;
    if (mled === 4'h0 && sled === 4'h0 && dut.swmread === 1'b0) n_glitch++;
    else begin failures++; $display("bounce started a transfer"); end

    // master -> slave
    for (int i = 0; i < 3; i++) begin
      ms = 4'($urandom);
      SW[7:4] = ms; SW[3:0] = ~ms;
      press(BTN0, 2);
      slow(25);
      expect_leds("master -> slave", ms, ms);
      if (mled === ms && sled === ms) n_m2s++;
      // the send repeats: new switches reach both registers
      for (int j = 0; j < 3; j++) begin
        ms = 4'($urandom);
        SW[7:4] = ms;
        slow(25);
        expect_leds("repeated send", ms, ms);
        if (mled === ms && sled === ms) n_follow_m++;
      end
      measure_send_period();
      do_clear();
    end

    // slave -> master: BTN1 loads the slave, BTN3 makes the master read it
    for (int i = 0; i < 3; i++) begin
      ss_sw = 4'($urandom);
      SW[3:0] = ss_sw; SW[7:4] = ~ss_sw;
      press(BTN1, 2);
      slow(5);
      expect_leds("slave loaded", 4'h0, ss_sw);
      press(BTN3, 2);
      slow(30);
      expect_leds("slave -> master", ss_sw, ss_sw);
      if (mled === ss_sw && sled === ss_sw) n_s2m++;
      for (int j = 0; j < 3; j++) begin
        ss_sw = 4'($urandom);
        SW[3:0] = ss_sw;
        slow(40);
        expect_leds("repeated read", ss_sw, ss_sw);
        if (mled === ss_sw && sled === ss_sw) n_follow_s++;
      end
      do_clear();
    end

    checks++;
    if (n_clear == 0 || n_glitch == 0 || n_m2s == 0 || n_s2m == 0 ||
        n_follow_m == 0 || n_follow_s == 0 || n_period == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("clears=%0d bounce_rejected=%0d sends=%0d send_repeats=%0d reads=%0d read_repeats=%0d period_checks=%0d",
             n_clear, n_glitch, n_m2s, n_follow_m, n_s2m, n_follow_s, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
