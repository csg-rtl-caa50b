// ctrl_sr_tb: self-checking test of the status-register controller, in its default form (the
// unpipelined conditional example: ring of 4 states) and in the folded form with initiation
// interval 2 (ring of 2 states). The condition input changes at random between control-path
// clock edges, as the data path's condition register would. After every edge the registered
// control word, the state register and the status register are compared with the controller's
// specification written out here. The ring period (4 and 2 cycles) is checked by counting the
// cycles between visits of the first state.
//
// A third instance is built from a personality written here, with two condition inputs and two
// status registers, a ring of 3 states: state 0 loads status register 0 from condition 0;
// state 1 moves status register 0 into status register 1 (as a pipelined condition instance is
// moved) and loads status register 0 from condition 1; state 2 is a case state whose control
// word depends on both status registers. All four case arms must occur.
module ctrl_sr_tb;
  import csg_pkg::*;
  logic clk_cp = 1'b0, rst_n = 1'b1;
  logic cond_in = 1'b0;
  logic [CTRL_W-1:0] ctrl_np, ctrl_pl;
  logic [1:0] state_np;
  logic       state_pl;
  logic       status_np, status_pl;
  // reset pulse: a falling edge on rst_n at time 1 resets every register
  initial #1 rst_n = 1'b0;

  logic [1:0] cond2 = '0;
  logic [CTRL_W-1:0] ctrl_mc;
  logic [1:0] state_mc, status_mc;
  int checks = 0, failures = 0;
  int arm [4];

  localparam logic [CTRL_W-1:0] MC_A = 12'h100, MC_B = 12'h200, MC_C = 12'h400;

  function automatic pla_pers_t multi_pers();
    term_t [PLA_MAX_TERMS-1:0] t = '0;
    t[0] = mk(6'd0, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 6'd1, 4'b0001, MC_A);      // SR0 <- cond 0
    t[1] = with_src(with_src(mk(6'd1, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 6'd2, 4'b0011, MC_B),
                             0, 1),                                                // SR0 <- cond 1
                    1, 2);                                                         // SR1 <- SR0
    t[2] = mk(6'd2, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 6'd0, 4'b0000, MC_C);
    for (int k = 0; k < 4; k++)                                                    // case (SR1, SR0)
      t[3 + k] = mk(6'd2, 4'b0000, 4'b0000, 4'b0011, 4'(k), 6'd0, 4'b0000, ctrl_t'(12'(1 << k)));
    return build_pers(t, 7, 2, 2, 2);
  endfunction

  ctrl_sr dut_np (.clk_cp, .rst_n, .cond_in, .ctrl(ctrl_np), .state(state_np),
                  .status(status_np));
  ctrl_sr #(.SW(PL_SR_SW), .N_TERMS(PL_SR_TERMS), .PERS(pl_sr_pers())) dut_pl (
    .clk_cp, .rst_n, .cond_in, .ctrl(ctrl_pl), .state(state_pl), .status(status_pl));

  ctrl_sr #(.SW(2), .N_COND(2), .N_SR(2), .N_TERMS(7), .PERS(multi_pers())) dut_mc (
    .clk_cp, .rst_n, .cond_in(cond2), .ctrl(ctrl_mc), .state(state_mc), .status(status_mc));

  always #5 clk_cp = ~clk_cp;

  // control word of one time step of the example schedule; c = condition value seen
  // in step 2 (from the data path), s = condition value seen in step 3 (status register)
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
    foreach (arm[k]) check($sformatf("case arm %0d occurred", k), 32'(arm[k] > 0), 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st_np, st_pl, last_np, last_pl, st_mc;
    bit s_np, s_pl;
    logic [1:0] s_mc;
    ctrl_t e_np, e_pl;
    logic [CTRL_W-1:0] e_mc;
    st_np = 0; st_pl = 0; s_np = 0; s_pl = 0; last_np = -1; last_pl = -1; st_mc = 0; s_mc = '0;
    foreach (arm[k]) arm[k] = 0;
    @(negedge clk_cp);
    rst_n = 1'b1;
    check("reset ctrl", 32'(ctrl_np), 32'(0));
    for (int cyc = 0; cyc < 200; cyc++) begin
      cond_in = 1'($urandom);
      cond2   = 2'($urandom);
      @(posedge clk_cp);
      // unpipelined: state st_np issues step st_np+1
      e_np = step_ctrl(st_np + 1, cond_in, s_np);
      if (st_np == 1) s_np = cond_in;
      if (st_np == 0) begin
        if (last_np >= 0) check("np ring period", 32'(cyc - last_np), 32'd4);
        last_np = cyc;
      end
      st_np = (st_np + 1) % 4;
      // folded: state 0 issues steps 1 and 3, state 1 issues steps 2 and 4
      e_pl = (st_pl == 0) ? (step_ctrl(1, cond_in, s_pl) | step_ctrl(3, cond_in, s_pl))
                          : (step_ctrl(2, cond_in, s_pl) | step_ctrl(4, cond_in, s_pl));
      if (st_pl == 1) s_pl = cond_in;
      if (st_pl == 0) begin
        if (last_pl >= 0) check("pl ring period", 32'(cyc - last_pl), 32'd2);
        last_pl = cyc;
      end
      st_pl = (st_pl + 1) % 2;
      // two conditions, two status registers
      case (st_mc)
        0: begin e_mc = MC_A; s_mc[0] = cond2[0]; end
        1: begin e_mc = MC_B; s_mc[1] = s_mc[0]; s_mc[0] = cond2[1]; end
        default: begin e_mc = MC_C | CTRL_W'(1 << s_mc); arm[s_mc]++; end
      endcase
      st_mc = (st_mc + 1) % 3;
      #1;
      check("np ctrl", 32'(ctrl_np), 32'(e_np));
      check("np state", 32'(state_np), 32'(st_np));
      check("np status", 32'(status_np), 32'(s_np));
      check("pl ctrl", 32'(ctrl_pl), 32'(e_pl));
      check("pl state", 32'(state_pl), 32'(st_pl));
      check("pl status", 32'(status_pl), 32'(s_pl));
      check("mc ctrl", 32'(ctrl_mc), 32'(e_mc));
      check("mc state", 32'(state_mc), 32'(st_mc));
      check("mc status", 32'(status_mc), 32'(s_mc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
