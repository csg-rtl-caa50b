// dp_reg_tb: self-checking test of the data-path register. Random data and write signals are
// applied around rising edges of the data-path clock; the register must load exactly when the
// write signal is set, hold otherwise, and clear on reset.
module dp_reg_tb;
  logic clk_dp = 1'b0, rst_n = 1'b1, we = 1'b0;
  logic [15:0] d = '0, q, model;
  // reset pulse: a falling edge on rst_n at time 1 resets every register
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;

  dp_reg #(.WIDTH(16)) dut (.clk_dp, .rst_n, .we, .d, .q);

  always #5 clk_dp = ~clk_dp;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (q !== 16'd0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk_dp);
      we = ($urandom % 3) != 0;
      d  = 16'($urandom);
      @(posedge clk_dp);
      if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
