// tb_chan_mux: drives random channel words into 4-way and 3-way multiplexers
// and checks that every select value returns the selected word (and zero for
// the unused select value of the 3-way one).
module tb_chan_mux;
  int checks = 0, failures = 0;
  logic [24:0] d4 [4];
  logic [24:0] d3 [3];
  logic [1:0]  s4, s3;
  logic [24:0] y4, y3;

  chan_mux #(.N(4), .W(25)) u4 (.din(d4), .sel(s4), .dout(y4));
  chan_mux #(.N(3), .W(25)) u3 (.din(d3), .sel(s3), .dout(y3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      foreach (d4[i]) d4[i] = 25'($urandom);
      foreach (d3[i]) d3[i] = 25'($urandom);
      s4 = 2'($urandom);
      s3 = 2'($urandom);
      #1;
      checks++;
      if (y4 !== d4[s4]) begin failures++; $display("FAIL mux4 sel=%0d", s4); end
      checks++;
      if (y3 !== ((s3 < 3) ? d3[s3] : 25'd0)) begin failures++; $display("FAIL mux3 sel=%0d", s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
