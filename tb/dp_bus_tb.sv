// dp_bus_tb: self-checking test of the tri-state bus with 3 drivers. Random data is driven on
// every driver; for each legal enable pattern (none or exactly one driver) the bus must carry
// the enabled driver's data, or zero with no driver enabled.
module dp_bus_tb;
  logic [2:0][15:0] in;
  logic [2:0]       en;
  logic [15:0]      y, exp_y;
  int checks = 0, failures = 0;

  dp_bus #(.WIDTH(16), .N(3)) dut (.in, .en, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int k;
      for (int p = 0; p < 3; p++) in[p] = 16'($urandom);
      k = i % 4;  // 0: no driver, 1..3: driver k-1
      en = (k == 0) ? 3'b000 : 3'(1 << (k - 1));
      exp_y = (k == 0) ? 16'd0 : in[k-1];
      #1;
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL en=%b y=%h exp=%h", en, y, exp_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
