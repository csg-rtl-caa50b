// csg_top_tb: end-to-end test of the four forms of the conditional example, at the top's
// default (and only) configuration.
//
// Two non-overlapping clocks are generated: each control-path edge is followed by a data-path
// edge. Random operand sets are fed to the two unpipelined systems (one set every 4 cycles) and
// to the two pipelined systems (one set every 2 cycles), each operand only in the cycle of the
// time step that reads it and random values at all other times. Every result is checked in the
// exact cycle it is due (4 cycles after its first inputs) against
//     p > q ? (a + b + c) * d * e : (a + b) * e      (16-bit arithmetic).
// The two controller styles must issue identical control words in every cycle. The test counts
// how often each mechanism occurred and fails if one never did: branch 1 and branch 0 taken,
// the join driven by the multiplier and by R2, the status register loaded, both split states of
// step 3 visited by the controllers without status registers, and overlapped execution of two
// iterations in one state of the pipelined controllers.
module csg_top_tb;
  import csg_pkg::*;
  localparam int NP_ITER = 60;
  localparam int PL_ITER = 120;
  localparam int CYCLES  = 250;

  logic clk_dp = 1'b0, clk_cp = 1'b0, rst_n = 1'b1;
  operands_t np_in = '0, pl_in = '0;
  logic [W-1:0] np_sr_result, np_nsr_result, pl_sr_result, pl_nsr_result;
  ctrl_t np_sr_ctrl, np_nsr_ctrl, pl_sr_ctrl, pl_nsr_ctrl;
  logic [3:0] cond;
  logic [3:0][2:0] state;

  csg_top dut (.*);

  operands_t np_ops [NP_ITER];
  operands_t pl_ops [PL_ITER];
  // reset pulse: a falling edge on rst_n at time 1 resets every register
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_join_mul = 0, n_join_pass = 0, n_sr_load = 0;
  int n_split0 = 0, n_split1 = 0, n_overlap = 0, n_results = 0;

  // two-phase non-overlapping clocks, period 20
  initial forever begin
    #5 clk_cp = 1'b1;
    #5 clk_cp = 1'b0;
    #5 clk_dp = 1'b1;
    #5 clk_dp = 1'b0;
  end

  function automatic logic [W-1:0] ref_result(operands_t o);
    logic [W-1:0] v;
    v = o.a + o.b;
    if (o.p > o.q) v = 16'(16'(v + o.c) * o.d);
    return 16'(v * o.e);
  endfunction

  function automatic operands_t rand_ops();
    operands_t o;
    o = operands_t'({$urandom, $urandom, $urandom, $urandom});
    if ($urandom % 6 == 0) o.q = o.p;
    return o;
  endfunction

  // operands for cycle c of a system with initiation interval ii: field read in step s belongs
  // to the iteration j with c = j*ii + s - 1
  function automatic operands_t drive(int c, int ii, int n_iter, ref operands_t ops []);
    operands_t o;
    int j;
    o = rand_ops();
    for (int s = 1; s <= 4; s++) begin
      j = c - (s - 1);
      if (j >= 0 && j % ii == 0 && j / ii < n_iter) begin
        case (s)
          1: begin o.p = ops[j/ii].p; o.q = ops[j/ii].q; o.a = ops[j/ii].a; o.b = ops[j/ii].b; end
          2: o.c = ops[j/ii].c;
          3: o.d = ops[j/ii].d;
          default: o.e = ops[j/ii].e;
        endcase
      end
    end
    return o;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp_v, $time);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    #(20 * (CYCLES + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    operands_t np_dyn [], pl_dyn [];
    np_dyn = new[NP_ITER];
    pl_dyn = new[PL_ITER];
    foreach (np_ops[i]) begin np_ops[i] = rand_ops(); np_dyn[i] = np_ops[i]; end
    foreach (pl_ops[i]) begin pl_ops[i] = rand_ops(); pl_dyn[i] = pl_ops[i]; end
    foreach (np_ops[i]) if (np_ops[i].p > np_ops[i].q) n_taken++; else n_not_taken++;
    foreach (pl_ops[i]) if (pl_ops[i].p > pl_ops[i].q) n_taken++; else n_not_taken++;
    #2 rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk_cp);
      #1;
      // control words just issued: both styles must agree
      check("np ctrl styles agree", 32'(np_sr_ctrl), 32'(np_nsr_ctrl));
      check("pl ctrl styles agree", 32'(pl_sr_ctrl), 32'(pl_nsr_ctrl));
      if (np_sr_ctrl.r3_en_mul || pl_sr_ctrl.r3_en_mul) n_join_mul++;
      if (np_sr_ctrl.r3_en_pass || pl_sr_ctrl.r3_en_pass) n_join_pass++;
      if (state[1] == 3'd2 || state[3] == 3'd0) n_split0++;
      if (state[1] == 3'd3 || state[3] == 3'd1) n_split1++;
      if (pl_sr_ctrl.r1_we && pl_sr_ctrl.r3_we) n_overlap++;
      if (pl_sr_ctrl.r2_we && pl_sr_ctrl.rout_we) n_overlap++;
      np_in = drive(c, 4, NP_ITER, np_dyn);
      pl_in = drive(c, 2, PL_ITER, pl_dyn);
      @(posedge clk_dp);
      #1;
      if (c % 4 == 3 && c / 4 < NP_ITER) begin
        check("np_sr result", 32'(np_sr_result), 32'(ref_result(np_ops[c/4])));
        check("np_nsr result", 32'(np_nsr_result), 32'(ref_result(np_ops[c/4])));
        n_results++;
      end
      if (c >= 3 && (c - 3) % 2 == 0 && (c - 3) / 2 < PL_ITER) begin
        check("pl_sr result", 32'(pl_sr_result), 32'(ref_result(pl_ops[(c-3)/2])));
        check("pl_nsr result", 32'(pl_nsr_result), 32'(ref_result(pl_ops[(c-3)/2])));
        n_results++;
      end
    end
    need("branch 1 taken (p > q)", n_taken);
    need("branch 0 taken (p <= q)", n_not_taken);
    need("join driven by multiplier", n_join_mul);
    need("join driven by R2", n_join_pass);
    need("split state, condition 0", n_split0);
    need("split state, condition 1", n_split1);
    need("overlapped iterations in one state", n_overlap);
    need("status register loaded", n_sr_load);
    need("results checked", n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // status register loads, seen on the status-register controllers' state (state 1 issues the
  // load in both the ring of 4 and the ring of 2)
  always @(posedge clk_cp) if (rst_n && (state[0] == 3'd1 || state[2] == 3'd1)) n_sr_load++;
endmodule
