// dp_mux_tb: self-checking test of the data-path multiplexer with 2 and with 3 ports. Every
// select value is driven with random data on all ports and the output compared with the
// selected port (zero for a select value past the last port).
module dp_mux_tb;
  logic [1:0][15:0] in2;
  logic [2:0][15:0] in3;
  logic       sel2;
  logic [1:0] sel3;
  logic [15:0] y2, y3, exp3;
  int checks = 0, failures = 0;

  dp_mux #(.WIDTH(16), .N(2)) u2 (.in(in2), .sel(sel2), .y(y2));
  dp_mux #(.WIDTH(16), .N(3)) u3 (.in(in3), .sel(sel3), .y(y3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int p = 0; p < 2; p++) in2[p] = 16'($urandom);
      for (int p = 0; p < 3; p++) in3[p] = 16'($urandom);
      sel2 = 1'(i);
      sel3 = 2'(i);
      #1;
      checks++;
      if (y2 !== in2[sel2]) begin failures++; $display("FAIL n2 sel=%0d y=%h", sel2, y2); end
      exp3 = (sel3 < 2'd3) ? in3[sel3] : 16'd0;
      checks++;
      if (y3 !== exp3) begin failures++; $display("FAIL n3 sel=%0d y=%h exp=%h", sel3, y3, exp3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
