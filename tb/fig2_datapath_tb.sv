// fig2_datapath_tb: self-checking test of the conditional example's data path on its own. The
// testbench plays the controller: it drives the control word of each of the four time steps
// of the unpipelined schedule, one per data-path clock edge, taking the branch select of step 2
// from the data path's condition register and remembering that value for the join of step 3.
// After every step the register it wrote is compared with arithmetic worked out here.
module fig2_datapath_tb;
  import csg_pkg::*;
  logic clk_dp = 1'b0, rst_n = 1'b1;
  ctrl_t ctrl = '0;
  operands_t in = '0;
  logic cond;
  logic [15:0] result, r1, r2, r3;
  // reset pulse: a falling edge on rst_n at time 1 resets every register
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0, taken = 0, not_taken = 0;

  fig2_datapath dut (.clk_dp, .rst_n, .ctrl, .in, .cond, .result, .r1, .r2, .r3);

  always #5 clk_dp = ~clk_dp;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    operands_t o;
    logic [15:0] v1, v2, v3, v4;
    bit c, c_saved;
    @(negedge clk_dp);
    rst_n = 1'b1;
    for (int it = 0; it < 100; it++) begin
      o = operands_t'({$urandom, $urandom, $urandom, $urandom});
      if (it % 5 == 0) o.q = o.p;                   // equal operands: not greater
      c  = o.p > o.q;
      v1 = o.a + o.b;
      v2 = c ? 16'(v1 + o.c) : v1;
      v3 = c ? 16'(v2 * o.d) : v2;
      v4 = 16'(v3 * o.e);
      if (c) taken++; else not_taken++;
      // step 1: a + b -> R1, p > q -> RC (other inputs random)
      in = operands_t'({$urandom, $urandom, $urandom, $urandom});
      in.p = o.p; in.q = o.q; in.a = o.a; in.b = o.b;
      ctrl = '0; ctrl.rc_we = 1; ctrl.r1_we = 1;
      @(posedge clk_dp); #1;
      check("R1", r1, v1);
      check("RC", 16'(cond), 16'(c));
      @(negedge clk_dp);
      // step 2: branch select from the condition register
      in = operands_t'({$urandom, $urandom, $urandom, $urandom});
      in.c = o.c;
      c_saved = cond;
      ctrl = '0; ctrl.add_a_sel = 1; ctrl.add_b_sel = 1; ctrl.r2_we = 1; ctrl.r2_sel = cond;
      @(posedge clk_dp); #1;
      check("R2", r2, v2);
      @(negedge clk_dp);
      // step 3: join bus driven by the multiplier or by R2
      in = operands_t'({$urandom, $urandom, $urandom, $urandom});
      in.d = o.d;
      ctrl = '0; ctrl.r3_we = 1; ctrl.r3_en_mul = c_saved; ctrl.r3_en_pass = !c_saved;
      @(posedge clk_dp); #1;
      check("R3", r3, v3);
      @(negedge clk_dp);
      // step 4: R3 * e -> ROUT
      in = operands_t'({$urandom, $urandom, $urandom, $urandom});
      in.e = o.e;
      ctrl = '0; ctrl.mul_a_sel = 1; ctrl.mul_b_sel = 1; ctrl.rout_we = 1;
      @(posedge clk_dp); #1;
      check("ROUT", result, v4);
      check("R1 held", r1, v1);
      @(negedge clk_dp);
    end
    checks++;
    if (taken == 0 || not_taken == 0) begin
      failures++;
      $display("FAIL a branch was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
