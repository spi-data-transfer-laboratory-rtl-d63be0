// Testbench for the clock divider: two instances (half periods 3 and 1)
// on one input clock. Every output edge must come exactly HALF_PERIOD
// input cycles after the previous one.
module tb_clock;
  logic clk = 1'b0;
  logic out3, out1;
  int checks = 0, failures = 0;

  clock #(.HALF_PERIOD(3)) dut3 (.clk_in(clk), .clk_out(out3));
  clock #(.HALF_PERIOD(1)) dut1 (.clk_in(clk), .clk_out(out1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_div(input int half, ref logic out, input int edges);
    logic prev;
    int gap, seen;
    // let the counter reach its first terminal count (any power-up value)
    @(posedge clk); #1;
    prev = out;
    while (out == prev) begin @(posedge clk); #1; end
    prev = out; gap = 0; seen = 0;
    while (seen < edges) begin
      @(posedge clk); #1;
      gap++;
      if (out != prev) begin
        checks++;
        if (gap != half) begin
          failures++;
          $display("half=%0d: edge after %0d cycles, expected %0d", half, gap, half);
        end
        prev = out; gap = 0; seen++;
      end else if (gap > half) begin
        checks++; failures++;
        $display("half=%0d: no edge after %0d cycles", half, gap);
        prev = out; gap = 0; seen++;
      end
    end
  endtask

  initial begin
    fork
      check_div(3, out3, 40);
      check_div(1, out1, 40);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
