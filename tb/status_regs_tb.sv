// status_regs_tb: self-checking test of a bank of 2 status registers fed by 2 condition
// inputs. Each control-path clock edge applies random load signals and random source selects
// (a condition input or the other status register, so values are also moved between registers);
// the registers are compared with a model after every edge.
module status_regs_tb;
  logic clk_cp = 1'b0, rst_n = 1'b1;
  logic [1:0] cond_in = '0, load = '0, q, model, nxt;
  logic [1:0][1:0] sel = '0;
  // reset pulse: a falling edge on rst_n at time 1 resets every register
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;

  status_regs #(.N_SR(2), .N_COND(2)) dut (.clk_cp, .rst_n, .cond_in, .load, .sel, .q);

  always #5 clk_cp = ~clk_cp;

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
    if (q !== 2'b00) begin failures++; $display("FAIL reset q=%b", q); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk_cp);
      cond_in = 2'($urandom);
      load    = 2'($urandom);
      for (int r = 0; r < 2; r++) sel[r] = 2'($urandom);
      @(posedge clk_cp);
      for (int r = 0; r < 2; r++) begin
        // sources: 0, 1 = condition inputs; 2, 3 = status registers 0, 1
        logic [3:0] src;
        src = {model, cond_in};
        nxt[r] = load[r] ? src[sel[r]] : model[r];
      end
      model = nxt;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d q=%b exp=%b", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
