// Testbench for the SPI slave datapath. A model of the master drives SCLK,
// MOSI and SS with the lab's master waveforms, each level held for a
// random 1 to 3 cycles (the slave follows levels, not a fixed timing):
//   send: SS low with bit 3 on MOSI, then four SCLK pulses; MOSI changes
//         with each SCLK fall; SS rises with the last SCLK high.
//   read: SS stays high; four SCLK pulses; MISO is taken while SCLK is
//         high, one cycle after the rise.
// It checks that a send lands in the slave's register, that a read returns
// the slave's switches MSB first, that srds makes the slave reload its
// switches, and that clear empties the register.
module tb_spisdtpth;
  localparam int W = 4;
  logic clk = 1'b0;
  logic srds, sdrst, sclk, mosi, ss, miso;
  logic [W-1:0] sw, swled;
  int checks = 0, failures = 0;
  int n_tx = 0, n_rx = 0;

  spisdtpth #(.W(W)) dut (.spisdclk(clk), .srds(srds), .sdrst(sdrst), .sw(sw),
                          .swled(swled), .sclk(sclk), .mosi(mosi), .ss(ss),
                          .miso(miso));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one level, as a master register would after a clock edge, and
  // hold it for 1..maxhold cycles
  task automatic level(input bit s, input bit m, input bit sso, input int maxhold);
    sclk = s; mosi = m; ss = sso;
    repeat ($urandom_range(1, maxhold)) begin @(posedge clk); #1; end
  endtask

  task automatic master_send(input logic [W-1:0] d, input int maxhold);
    level(0, d[W-1], 0, maxhold);
    for (int b = W - 1; b >= 0; b--) begin
      level(1, d[b], (b == 0), maxhold);
      level(0, (b > 0) ? d[b-1] : d[0], (b == 0), maxhold);
    end
    repeat (3) begin @(posedge clk); #1; end
  endtask

  task automatic master_read(input int maxhold, input bit drop_srds, output logic [W-1:0] got);
    level(0, 0, 1, maxhold);
    for (int b = W - 1; b >= 0; b--) begin
      sclk = 1;
      @(posedge clk); #1;
      got[b] = miso;
      if (b == 0 && drop_srds) srds = 0;
      repeat ($urandom_range(0, maxhold - 1)) begin @(posedge clk); #1; end
      level(0, 0, 1, maxhold);
    end
    repeat (2) begin @(posedge clk); #1; end
  endtask

  initial begin
    logic [W-1:0] d, got;
    srds = 0; sdrst = 1; sclk = 0; mosi = 0; ss = 1; sw = '0;
    repeat (2) @(posedge clk);
    #1 sdrst = 0;
    checks++;
    if (swled !== '0) begin failures++; $display("bad reset state"); end

    // master -> slave, every value, at the lab's timing and stretched
    for (int v = 0; v < 32; v++) begin
      d = W'($urandom);
      if (v < 16) d = W'(v);
      master_send(d, (v < 16) ? 1 : 3);
      checks++;
      if (swled !== d) begin failures++; $display("send %h: swled=%h", d, swled); end
      n_tx++;
    end

    // slave -> master. First with srds raised for each read, so the slave
    // loads the switches as they are now; then with srds held, so after
    // each read the slave at once reloads the switches as they were when
    // that read ended.
    for (int v = 0; v < 32; v++) begin
      logic [W-1:0] e;
      e = sw;                      // what the slave loaded after the last read
      sw = W'($urandom);
      if (v < 16) sw = W'(v);
      if (v <= 16) e = sw;         // srds rises now: it loads the new value
      srds = 1;
      repeat (3) begin @(posedge clk); #1; end
      master_read((v < 16) ? 1 : 3, v < 16, got);
      checks++;
      if (got !== e) begin failures++; $display("read %0d: got %h expected %h", v, got, e); end
      checks++;
      // with srds held the slave has already reloaded the current switches
      if (v >= 16) e = sw;
      if (swled !== e) begin failures++; $display("read %0d: swled=%h expected %h", v, swled, e); end
      n_rx++;
    end
    srds = 0;
    repeat (8) begin @(posedge clk); #1; end

    // clear
    #1 sdrst = 1;
    @(posedge clk); #1 sdrst = 0;
    checks++;
    if (swled !== '0) begin failures++; $display("clear did not reset"); end

    // a send still works after clear
    master_send(4'h9, 1);
    checks++;
    if (swled !== 4'h9) begin failures++; $display("send after clear: swled=%h", swled); end

    $display("sends=%0d reads=%0d", n_tx, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
