// tb_mc_square_synth: runs the multi-channel synthesizer with 1, 2, 4 and 8
// channels at the full 25-bit accumulator width (the four configurations the
// design was sized for) through mc_synth_harness, which compares every
// channel's phase with a reference model after every clock and checks each
// output's frequency against F = w * Fclk / (channels * 2^25).
module tb_mc_square_synth;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   ck [4], fl [4], wr [4], sw [4];
  logic dn [4];
  int   checks, failures;

  mc_synth_harness #(.C(1)) h1 (.clk, .checks(ck[0]), .failures(fl[0]), .wraps(wr[0]), .switches(sw[0]), .done(dn[0]));
  mc_synth_harness #(.C(2)) h2 (.clk, .checks(ck[1]), .failures(fl[1]), .wraps(wr[1]), .switches(sw[1]), .done(dn[1]));
  mc_synth_harness #(.C(4)) h4 (.clk, .checks(ck[2]), .failures(fl[2]), .wraps(wr[2]), .switches(sw[2]), .done(dn[2]));
  mc_synth_harness #(.C(8)) h8 (.clk, .checks(ck[3]), .failures(fl[3]), .wraps(wr[3]), .switches(sw[3]), .done(dn[3]));

  task automatic report(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < 4; i++) begin
      checks += ck[i] + 2;
      failures += fl[i];
      if (wr[i] == 0) begin failures++; $display("FAIL config %0d: no accumulator wrap", i); end
      if (sw[i] == 0) begin failures++; $display("FAIL config %0d: no word switch", i); end
      $display("config %0d: wraps=%0d word switches=%0d", i, wr[i], sw[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #5000000;
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    #1;
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    report(0);
    $finish;
  end
endmodule
