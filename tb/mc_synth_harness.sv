// mc_synth_harness: drives one mc_square_synth of C channels (25-bit
// accumulator, 13 + 12 bit adder) and checks it against a reference model.
//
// Phase 1 changes the control words at random moments and, after every
// clock, compares every channel's phase, square output and frame flag with a
// model that simply adds each channel's word to a full-width phase in the
// channel's slot (the high half is expected one slot later). Phase 2 resets,
// fixes the words and runs K frames, then checks the number of rising edges
// of every square output against F = w * Fclk / (C * 2^25), i.e. against
// floor((K * w + 2^24) / 2^25). Results are reported through checks,
// failures and done; accumulator wraps, low-stage carries and word changes
// are counted to show they occurred.
module mc_synth_harness #(
  parameter int unsigned C = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   wraps,
  output int   switches,
  output logic done
);
  localparam int unsigned N = 25, LO = 13, HI = 12;
  localparam int unsigned SW = (C > 1) ? $clog2(C) : 1;
  localparam int unsigned K = 3000;

  logic             rst_n;
  logic [N-1:0]     word [C];
  logic [C-1:0]     sq, sq_prev;
  logic [N-1:0]     phase [C];
  logic             frame;
  logic [SW-1:0]    slot;

  mc_square_synth #(.CHANNELS(C), .ACC_W(N), .LO_W(LO)) dut (
    .clk, .rst_n, .ctrl_word(word), .sq_out(sq), .phase, .frame, .frame_slot(slot)
  );

  logic [N-1:0]  model [C];
  logic [HI-1:0] hi_snap [C];
  int unsigned   cyc;
  int unsigned   rises [C];
  bit            run_model;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL C=%0d %s at cycle %0d", C, what, cyc);
    end
  endtask

  task automatic model_reset();
    for (int c = 0; c < C; c++) begin
      model[c] = '0; hi_snap[c] = '0; rises[c] = 0;
    end
    cyc = 0;
    sq_prev = '0;
  endtask

  always @(posedge clk) begin
    if (rst_n && run_model) begin
      int unsigned s, h;
      s = cyc % C;
      h = (cyc + C - 1) % C;
      hi_snap[h] = model[h][N-1:LO];
      model[s]   = model[s] + word[s];
      cyc++;
    end
  end

  task automatic compare_all();
    for (int c = 0; c < C; c++) begin
      check(phase[c] == {hi_snap[c], model[c][LO-1:0]}, "phase");
      check(sq[c] == hi_snap[c][HI-1], "square output");
      if (sq_prev[c] && !sq[c]) wraps++;
      if (!sq_prev[c] && sq[c]) rises[c]++;
    end
    check(frame == (((cyc + C - 1) % C) == 0), "frame flag");
    check(slot == SW'(cyc % C), "slot");
    sq_prev = sq;
  endtask

  initial begin
    checks = 0; failures = 0; wraps = 0; switches = 0; done = 1'b0;
    run_model = 1'b0;
    rst_n = 1'b0;
    for (int c = 0; c < C; c++) word[c] = N'($urandom) >> 4;
    model_reset();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_model = 1'b1;
    // Phase 1: random words, random switching.
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      compare_all();
      if ($urandom_range(0, 99) < 3) begin
        int unsigned c;
        c = $urandom_range(0, C - 1);
        word[c] = N'($urandom) >> $urandom_range(0, 8);
        switches++;
      end
    end
    // Phase 2: fixed words from reset, count output periods.
    rst_n = 1'b0;
    run_model = 1'b0;
    for (int c = 0; c < C; c++) word[c] = N'(32'd300000 + 32'd77777 * c);
    @(negedge clk);
    model_reset();
    rst_n = 1'b1;
    run_model = 1'b1;
    while (cyc < K * C) begin
      @(negedge clk);
      compare_all();
    end
    for (int c = 0; c < C; c++) begin
      longint unsigned expect_rises;
      expect_rises = (longint'(K) * word[c] + (64'd1 << (N - 1))) >> N;
      check(rises[c] == int'(expect_rises), "output frequency");
      if (rises[c] != int'(expect_rises))
        $display("  channel %0d: %0d rising edges, expected %0d", c, rises[c], expect_rises);
    end
    done = 1'b1;
  end
endmodule
