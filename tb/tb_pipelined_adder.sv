// tb_pipelined_adder: streams random 25-bit operand pairs through the
// two-stage adder. Operand b's high half is presented one cycle after its low
// half, as the accumulator does; the testbench reassembles the high result
// with the previous cycle's low result and compares it with a + b mod 2^25.
// Carry-heavy corner values are included.
module tb_pipelined_adder;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int carries = 0;
  always #5 clk = ~clk;

  logic [24:0] a, b, a_prev, b_prev;
  logic [12:0] b_lo, sum_lo, sum_lo_prev;
  logic [11:0] b_hi, sum_hi;

  pipelined_adder #(.LO_W(13), .HI_W(12)) dut (
    .clk, .rst_n, .a, .b_lo, .b_hi, .sum_lo, .sum_hi
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; b_lo = '0; b_hi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      a_prev      = a;
      b_prev      = b;
      sum_lo_prev = sum_lo;
      case (t % 5)
        0: begin a = 25'h1fff;    b = 25'h0001;    end
        1: begin a = 25'h1ffffff; b = 25'h1ffffff; end
        default: begin a = 25'($urandom); b = 25'($urandom); end
      endcase
      b_lo = b[12:0];
      b_hi = b_prev[24:13];
      #1;
      if (t > 0) begin
        checks++;
        if ({sum_hi, sum_lo_prev} !== 25'(a_prev + b_prev)) begin
          failures++;
          $display("FAIL %h + %h gave %h", a_prev, b_prev, {sum_hi, sum_lo_prev});
        end
        if (14'(a_prev[12:0]) + 14'(b_prev[12:0]) > 14'h1fff) carries++;
      end
      checks++;
      if (sum_lo !== 13'(a[12:0] + b[12:0])) begin
        failures++;
        $display("FAIL low stage");
      end
      @(negedge clk);
    end
    checks++;
    if (carries == 0) begin failures++; $display("FAIL no carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
