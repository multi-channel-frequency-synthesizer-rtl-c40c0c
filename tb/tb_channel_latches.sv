// tb_channel_latches: random low and high writes into a 4-channel latch bank.
// A testbench copy of the latches is updated the same way; after every clock
// every latch and every msb output must match it, so writes must land only in
// the addressed channel and the other channels must hold.
module tb_channel_latches;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [1:0]  lo_sel, hi_sel;
  logic [12:0] lo_data;
  logic [11:0] hi_data;
  logic [12:0] q_lo [4];
  logic [11:0] q_hi [4];
  logic [3:0]  msb;
  logic [12:0] m_lo [4];
  logic [11:0] m_hi [4];

  channel_latches #(.N(4), .LO_W(13), .HI_W(12)) dut (
    .clk, .rst_n, .lo_sel, .lo_data, .hi_sel, .hi_data, .q_lo, .q_hi, .msb
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_lo[i]) begin m_lo[i] = '0; m_hi[i] = '0; end
    lo_sel = '0; hi_sel = '0; lo_data = '0; hi_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (q_lo[i] !== m_lo[i] || q_hi[i] !== m_hi[i] || msb[i] !== m_hi[i][11]) begin
          failures++;
          $display("FAIL channel %0d at step %0d", i, t);
        end
      end
      lo_sel  = 2'($urandom);
      hi_sel  = 2'($urandom);
      lo_data = 13'($urandom);
      hi_data = 12'($urandom);
      @(posedge clk);
      m_lo[lo_sel] = lo_data;
      m_hi[hi_sel] = hi_data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
