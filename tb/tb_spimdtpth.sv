// Testbench for the SPI master datapath. After each request it compares
// SCLK, MOSI, SS and the LED register cycle by cycle with the expected
// waveform of the lab's master:
//   send (mrds), cycle k after the IDLE cycle, k = 1..9:
//     SCLK high on k = 2,4,6,8; SS low on k = 1..7; MOSI = bit 3 on k = 1,2,
//     bit 2 on 3,4, bit 1 on 5,6, bit 0 on 7..9; back in IDLE after k = 9.
//   read (rdslv), k = 1..13: SCLK high on k = 2,3,5,6,8,9,11,12; SS high
//     throughout; MISO taken at edge 3 (bit 3), 6, 9 and 12 (bit 0).
// MISO is random on every cycle, so only a sample at the right edge gives
// the right register value. It also checks that a held request repeats
// the transfer every 10 (send) or 14 (read) cycles, that rdslv wins over
// mrds, and that clear empties the register.
module tb_spimdtpth;
  localparam int W = 4;
  logic clk = 1'b0;
  logic mrds, mdrst, rdslv, miso;
  logic [W-1:0] sw, swled;
  logic sclk, mosi, ss;
  int checks = 0, failures = 0;
  int n_tx = 0, n_rx = 0, n_prio = 0;

  spimdtpth #(.W(W)) dut (.spimdclk(clk), .mrds(mrds), .mdrst(mdrst), .rdslv(rdslv),
                          .sw(sw), .swled(swled), .sclk(sclk), .mosi(mosi),
                          .ss(ss), .miso(miso));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pins(input string what, input int k, input bit e_sclk,
                             input bit e_ss, input bit chk_mosi, input bit e_mosi);
    checks++;
    if (sclk !== e_sclk || ss !== e_ss || (chk_mosi && mosi !== e_mosi)) begin
      failures++;
      $display("%s k=%0d: sclk=%0b ss=%0b mosi=%0b expected %0b %0b %0b",
               what, k, sclk, ss, mosi, e_sclk, e_ss, e_mosi);
    end
  endtask

  // One send. Called right after the edge on which IDLE saw mrds.
  task automatic run_tx(input logic [W-1:0] d, input bit hold);
    int b;
    for (int k = 1; k <= 9; k++) begin
      if (k == 1 && !hold) mrds = 0;
      @(posedge clk); #1;
      b = (k >= 7) ? 0 : 3 - (k - 1) / 2;
      expect_pins("tx", k, (k % 2 == 0) && k <= 8, !(k <= 7), 1'b1, d[b]);
      checks++;
      if (swled !== d) begin failures++; $display("tx k=%0d: swled=%h expected %h", k, swled, d); end
    end
    n_tx++;
  endtask

  // One read. Called right after the edge on which IDLE saw rdslv.
  task automatic run_rx(input logic [W-1:0] prev_reg, input bit hold,
                        output logic [W-1:0] got);
    logic [W-1:0] e;
    e = prev_reg;
    for (int k = 1; k <= 13; k++) begin
      if (k == 1 && !hold) rdslv = 0;
      miso = 1'($urandom);
      @(posedge clk);
      if (k % 3 == 0) e[W - k / 3] = miso;
      #1;
      expect_pins("rx", k, (k % 3 != 1), 1'b1, 1'b0, 1'b0);
      checks++;
      if (swled !== e) begin failures++; $display("rx k=%0d: swled=%h expected %h", k, swled, e); end
    end
    got = e;
    n_rx++;
  endtask

  initial begin
    logic [W-1:0] d, reg_now;
    mrds = 0; rdslv = 0; mdrst = 1; miso = 0; sw = '0;
    repeat (2) @(posedge clk);
    #1 mdrst = 0;
    checks++;
    if (swled !== '0 || sclk !== 0 || ss !== 1) begin failures++; $display("bad reset state"); end
    reg_now = '0;

    // single sends of every value
    for (int v = 0; v < 16; v++) begin
      sw = W'(v);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 mrds = 1;
      @(posedge clk); #1;
      run_tx(W'(v), 0);
      @(posedge clk); #1;   // IDLE
      expect_pins("idle", 0, 0, 1, 0, 0);
      reg_now = W'(v);
    end

    // single reads
    for (int v = 0; v < 16; v++) begin
      #1 rdslv = 1;
      @(posedge clk); #1;
      run_rx(reg_now, 0, reg_now);
      @(posedge clk); #1;
      expect_pins("idle", 0, 0, 1, 0, 0);
    end

    // held send request: back-to-back sends, the period is 10 cycles
    mrds = 1;
    @(posedge clk); #1;
    for (int r = 0; r < 4; r++) begin
      d = W'($urandom);
      sw = d;
      run_tx(d, 1);
      if (r == 3) mrds = 0;
      @(posedge clk); #1;   // IDLE again; starts the next send while mrds is high
    end

    // both requests at once: rdslv wins
    mrds = 1; rdslv = 1;
    @(posedge clk); #1;
    reg_now = swled;
    run_rx(reg_now, 0, reg_now);
    mrds = 0;
    n_prio++;
    @(posedge clk); #1;

    // clear in the middle of a send
    sw = 4'hA; mrds = 1;
    repeat (4) @(posedge clk);
    #1 mdrst = 1; mrds = 0;
    @(posedge clk); #1 mdrst = 0;
    checks++;
    if (swled !== '0 || sclk !== 0 || ss !== 1) begin failures++; $display("clear did not reset"); end
    repeat (3) begin
      @(posedge clk); #1;
      expect_pins("after clear", 0, 0, 1, 0, 0);
    end

    checks++;
    if (n_tx < 20 || n_rx < 17 || n_prio < 1) begin
      failures++; $display("coverage: tx=%0d rx=%0d prio=%0d", n_tx, n_rx, n_prio);
    end
    $display("sends=%0d reads=%0d", n_tx, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
