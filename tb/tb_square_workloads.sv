// tb_square_workloads: the four-channel square synthesizer at its default size
// (25-bit accumulator, 40 MHz clock, 10 MHz per channel) set to four operating
// points:
//   channel 0: w = 523449, 523449 * 10 MHz / 2^25 = 156.0 kHz;
//   channel 1: w = 2^24, the top of the 0-5 MHz range (a toggle every update);
//   channel 2: w = 1, the 0.298 Hz resolution step (phase grows by one LSB
//              per update, checked directly since a full period is 2^25
//              updates);
//   channel 3: w = 0, DC.
// Over K frames it counts rising edges and compares them with
// floor((K * w + 2^24) / 2^25), prints the measured frequencies, and checks
// the final phases. The clock period is 25 ns.
module tb_square_workloads;
  localparam int K = 25000;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [24:0] word [4];
  logic [3:0]  sq, sq_p;
  logic [24:0] phase [4];
  logic        frame;
  logic [1:0]  slot;
  int          rises [4];
  int          checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  mc_square_synth dut (
    .clk, .rst_n, .ctrl_word(word), .sq_out(sq), .phase, .frame, .frame_slot(slot)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word[0] = 25'd523449; word[1] = 25'd1 << 24; word[2] = 25'd1; word[3] = 25'd0;
    sq_p = '0;
    foreach (rises[c]) rises[c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4 * K; n++) begin
      @(negedge clk);
      for (int c = 0; c < 4; c++) if (!sq_p[c] && sq[c]) rises[c]++;
      sq_p = sq;
    end
    // After 4K clocks every channel has had K complete updates.
    for (int c = 0; c < 4; c++) begin
      longint unsigned want;
      real hz;
      want = (longint'(K) * word[c] + (64'd1 << 24)) >> 25;
      hz = real'(rises[c]) / (real'(4 * K) * 25.0e-9);
      $display("channel %0d: w=%0d rising edges=%0d (expected %0d), about %.1f Hz",
               c, word[c], rises[c], want, hz);
      check(rises[c] == int'(want), $sformatf("channel %0d frequency", c));
    end
    check(phase[0] == 25'(longint'(K) * 523449), "156 kHz channel phase");
    check(phase[1] == 25'(longint'(K) << 24), "5 MHz channel phase");
    check(phase[2] == 25'(K), "resolution step: one LSB per update");
    check(phase[3] == 25'd0, "DC channel holds");
    check(rises[1] == K / 2, "5 MHz channel toggles every update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
