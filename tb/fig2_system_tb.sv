// fig2_system_tb: test of one conditional-example system (data path and controller) in its
// default form, unpipelined with a status-register controller, next to the pipelined form with
// a controller without status registers.
//
// Two non-overlapping clocks are generated: each control-path edge is followed by a data-path
// edge. Random operand sets are fed to the unpipelined system (one set every 4 cycles) and
// to the pipelined system (one set every 2 cycles), each operand only in the cycle of the
// time step that reads it and random values at all other times. Every result is checked in the
// exact cycle it is due (4 cycles after its first inputs) against
//     p > q ? (a + b + c) * d * e : (a + b) * e      (16-bit arithmetic).
// The test counts how often each mechanism occurred and fails if one never did: branch 1 and
// branch 0 taken, the join driven by the multiplier and by R2, the status register loaded, both
// split states of the folded step 1 visited, and overlapped execution of two iterations.
module fig2_system_tb;
  import csg_pkg::*;
  localparam int NP_ITER = 60;
  localparam int PL_ITER = 120;
  localparam int CYCLES  = 250;

  logic clk_dp = 1'b0, clk_cp = 1'b0, rst_n = 1'b1;
  operands_t np_in = '0, pl_in = '0;
  logic [W-1:0] np_result, pl_result;
  ctrl_t np_ctrl, pl_ctrl;
  logic np_cond, pl_cond;
  logic [2:0] np_state, pl_state;

  fig2_system dut_np (.clk_dp, .clk_cp, .rst_n, .in(np_in), .result(np_result), .ctrl(np_ctrl),
                      .cond(np_cond), .state(np_state));
  fig2_system #(.PIPELINED(1'b1), .USE_SR(1'b0)) dut_pl (
    .clk_dp, .clk_cp, .rst_n, .in(pl_in), .result(pl_result), .ctrl(pl_ctrl),
    .cond(pl_cond), .state(pl_state));

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
      if (np_ctrl.r3_en_mul || pl_ctrl.r3_en_mul) n_join_mul++;
      if (np_ctrl.r3_en_pass || pl_ctrl.r3_en_pass) n_join_pass++;
      if (pl_state == 3'd0) n_split0++;
      if (pl_state == 3'd1) n_split1++;
      if (pl_ctrl.r1_we && pl_ctrl.r3_we) n_overlap++;
      if (pl_ctrl.r2_we && pl_ctrl.rout_we) n_overlap++;
      np_in = drive(c, 4, NP_ITER, np_dyn);
      pl_in = drive(c, 2, PL_ITER, pl_dyn);
      @(posedge clk_dp);
      #1;
      if (c % 4 == 3 && c / 4 < NP_ITER) begin
        check("np result", 32'(np_result), 32'(ref_result(np_ops[c/4])));
        n_results++;
      end
      if (c >= 3 && (c - 3) % 2 == 0 && (c - 3) / 2 < PL_ITER) begin
        check("pl result", 32'(pl_result), 32'(ref_result(pl_ops[(c-3)/2])));
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

  // status register loads: state 1 of the unpipelined ring issues the load
  always @(posedge clk_cp) if (rst_n && np_state == 3'd1) n_sr_load++;
endmodule
