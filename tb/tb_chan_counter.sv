// tb_chan_counter: checks the channel-select counter for 4, 3 and 1 channels.
// After reset the count must run 0..N-1 and wrap, with wrap high exactly in
// the last slot; the expected count is kept by the testbench itself.
module tb_chan_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [1:0] sel4, sel3;
  logic [0:0] sel1;
  logic wrap4, wrap3, wrap1;

  chan_counter #(.CHANNELS(4)) u4 (.clk, .rst_n, .sel(sel4), .wrap(wrap4));
  chan_counter #(.CHANNELS(3)) u3 (.clk, .rst_n, .sel(sel3), .wrap(wrap3));
  chan_counter #(.CHANNELS(1)) u1 (.clk, .rst_n, .sel(sel1), .wrap(wrap1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 50; n++) begin
      check(sel4 == 2'(n % 4), "count mod 4");
      check(wrap4 == (n % 4 == 3), "wrap mod 4");
      check(sel3 == 2'(n % 3), "count mod 3");
      check(wrap3 == (n % 3 == 2), "wrap mod 3");
      check(sel1 == 1'b0 && wrap1, "single channel");
      @(negedge clk);
    end
    rst_n = 1'b0;
    @(negedge clk);
    check(sel4 == 0 && sel3 == 0, "reset clears count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
