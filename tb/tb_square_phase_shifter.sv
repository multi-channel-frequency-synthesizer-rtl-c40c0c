// tb_square_phase_shifter: feeds ideal 2f and 4f square waves (period of f =
// P samples) into the phase shifter and checks the three outputs sample by
// sample against squares at f whose rising edges are at P/4 (lead), 3P/8
// (mid) and P/2 (lag) after reset, delayed by the block's one-clock latency,
// which makes lead/mid/lag exactly +45/0/-45 degrees apart. A second part
// holds sample low while it forces a one-clock overlap of the two waves and
// checks that nothing toggles.
module tb_square_phase_shifter;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int toggles_mid = 0;
  always #5 clk = ~clk;

  localparam int P = 64;

  logic sample, sq_2x, sq_4x;
  logic lead, mid, lag;

  square_phase_shifter dut (
    .clk, .rst_n, .sample, .sq_2x, .sq_4x,
    .out_lead(lead), .out_mid(mid), .out_lag(lag)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit in_range(int n, int lo, int hi);
    int m;
    m = n % P;
    return (m >= lo) && (m < hi);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic mid_prev;
  initial begin
    sample = 1'b1; sq_2x = 1'b0; sq_4x = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mid_prev = 1'b0;
    for (int n = 0; n < 10 * P; n++) begin
      sq_2x = (n % (P / 2)) >= P / 4;
      sq_4x = (n % (P / 4)) >= P / 8;
      @(negedge clk);
      // Outputs now reflect samples 0..n.
      check(lead == in_range(n, P / 4, 3 * P / 4), "lead (+45)");
      check(mid  == in_range(n, 3 * P / 8, 7 * P / 8), "mid (0)");
      check(lag  == in_range(n, P / 2, P), "lag (-45)");
      if (mid != mid_prev) toggles_mid++;
      mid_prev = mid;
    end
    // Hold: no sampling, then a one-clock overlap that must be ignored.
    begin
      logic l0, m0, g0;
      l0 = lead; m0 = mid; g0 = lag;
      sample = 1'b0;
      sq_2x = 1'b1; sq_4x = 1'b1;
      @(negedge clk);
      sq_2x = 1'b1; sq_4x = 1'b0;
      @(negedge clk);
      check(lead == l0 && mid == m0 && lag == g0, "hold while sample low");
      sample = 1'b1;
      sq_2x = 1'b0; sq_4x = 1'b0;
      @(negedge clk);
      check(mid == m0, "masked overlap ignored");
    end
    check(toggles_mid == 20, "mid toggles once per half period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
