// ctrl_nsr_tb: self-checking test of the controller without status registers, in its default
// form (the unpipelined conditional example: S1, S2, S3_0, S3_1, S4) and in the folded form with
// initiation interval 2 (P1_0, P1_1, P2). The condition input changes at random between
// control-path clock edges. After every edge the registered control word and the state register
// are compared with the specification written out here, in which the condition value seen in
// step 2 selects which copy of step 3's state comes next. Both copies must be visited.
//
// A third instance is built from a personality written here, for a step in which two condition
// values become reserved at once: state 0 reads both condition inputs and moves to one of
// 2**2 = 4 states (codes 1-4), each issuing its own control word, which all lead to state 5 and
// back to state 0. All four must be visited.
module ctrl_nsr_tb;
  import csg_pkg::*;
  logic clk_cp = 1'b0, rst_n = 1'b1;
  logic cond_in = 1'b0;
  logic [CTRL_W-1:0] ctrl_np, ctrl_pl;
  logic [2:0] state_np;
  logic [1:0] state_pl;
  // reset pulse: a falling edge on rst_n at time 1 resets every register
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int visits [8];
  logic [1:0] cond2 = '0;
  logic [CTRL_W-1:0] ctrl_mc;
  logic [2:0] state_mc;
  int visits_mc [8];

  localparam logic [CTRL_W-1:0] MC_A = 12'h100, MC_C = 12'h400;

  function automatic pla_pers_t multi_pers();
    term_t [PLA_MAX_TERMS-1:0] t = '0;
    for (int k = 0; k < 4; k++) begin
      t[k]     = mk(6'd0, 4'b0011, 4'(k), 4'b0000, 4'b0000, 6'(1 + k), 4'b0000, MC_A);
      t[4 + k] = mk(6'(1 + k), 4'b0000, 4'b0000, 4'b0000, 4'b0000, 6'd5, 4'b0000,
                    ctrl_t'(12'(1 << k)));
    end
    t[8] = mk(6'd5, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 6'd0, 4'b0000, MC_C);
    return build_pers(t, 9, 3, 0, 2);
  endfunction

  ctrl_nsr dut_np (.clk_cp, .rst_n, .cond_in, .ctrl(ctrl_np), .state(state_np));
  ctrl_nsr #(.SW(PL_NSR_SW), .N_TERMS(PL_NSR_TERMS), .PERS(pl_nsr_pers())) dut_pl (
    .clk_cp, .rst_n, .cond_in, .ctrl(ctrl_pl), .state(state_pl));

  ctrl_nsr #(.SW(3), .N_COND(2), .N_TERMS(9), .PERS(multi_pers())) dut_mc (
    .clk_cp, .rst_n, .cond_in(cond2), .ctrl(ctrl_mc), .state(state_mc));

  always #5 clk_cp = ~clk_cp;

  function automatic ctrl_t step_ctrl(int step, bit c, bit s);
    ctrl_t k = '0;
    case (step)
      1: begin k.rc_we = 1; k.r1_we = 1; end
      2: begin k.add_a_sel = 1; k.add_b_sel = 1; k.r2_we = 1; k.r2_sel = c; end
      3: begin k.r3_we = 1; k.r3_en_mul = s; k.r3_en_pass = !s; end
      4: begin k.mul_a_sel = 1; k.mul_b_sel = 1; k.rout_we = 1; end
      default: k = '0;
    endcase
    return k;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st_np, st_pl, nx_np, nx_pl, st_mc;
    ctrl_t e_np, e_pl;
    logic [CTRL_W-1:0] e_mc;
    st_np = 0; st_pl = 0; st_mc = 0;
    foreach (visits[i]) visits[i] = 0;
    foreach (visits_mc[i]) visits_mc[i] = 0;
    @(negedge clk_cp);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 200; cyc++) begin
      cond_in = 1'($urandom);
      cond2   = 2'($urandom);
      @(posedge clk_cp);
      visits[st_np]++;
      // unpipelined: 0 = S1, 1 = S2, 2 = S3 (condition 0), 3 = S3 (condition 1), 4 = S4
      case (st_np)
        0: begin e_np = step_ctrl(1, 0, 0); nx_np = 1; end
        1: begin e_np = step_ctrl(2, cond_in, 0); nx_np = cond_in ? 3 : 2; end
        2: begin e_np = step_ctrl(3, 0, 0); nx_np = 4; end
        3: begin e_np = step_ctrl(3, 0, 1); nx_np = 4; end
        default: begin e_np = step_ctrl(4, 0, 0); nx_np = 0; end
      endcase
      // folded: 0 = P1 with step 3 on condition 0, 1 = P1 with condition 1, 2 = P2
      case (st_pl)
        0: begin e_pl = step_ctrl(1, 0, 0) | step_ctrl(3, 0, 0); nx_pl = 2; end
        1: begin e_pl = step_ctrl(1, 0, 0) | step_ctrl(3, 0, 1); nx_pl = 2; end
        default: begin
          e_pl = step_ctrl(2, cond_in, 0) | step_ctrl(4, 0, 0);
          nx_pl = cond_in ? 1 : 0;
        end
      endcase
      st_np = nx_np; st_pl = nx_pl;
      visits_mc[st_mc]++;
      case (st_mc)
        0: begin e_mc = MC_A; st_mc = 1 + int'(cond2); end
        1, 2, 3, 4: begin e_mc = CTRL_W'(1 << (st_mc - 1)); st_mc = 5; end
        default: begin e_mc = MC_C; st_mc = 0; end
      endcase
      #1;
      check("mc ctrl", 32'(ctrl_mc), 32'(e_mc));
      check("mc state", 32'(state_mc), 32'(st_mc));
      check("np ctrl", 32'(ctrl_np), 32'(e_np));
      check("np state", 32'(state_np), 32'(st_np));
      check("pl ctrl", 32'(ctrl_pl), 32'(e_pl));
      check("pl state", 32'(state_pl), 32'(st_pl));
      @(negedge clk_cp);
    end
    check("S3_0 visited", 32'(visits[2] > 0), 32'd1);
    check("S3_1 visited", 32'(visits[3] > 0), 32'd1);
    for (int k = 1; k <= 4; k++)
      check($sformatf("split state %0d visited", k), 32'(visits_mc[k] > 0), 32'd1);
    check("no unused code", 32'(visits[5] + visits[6] + visits[7]), 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
