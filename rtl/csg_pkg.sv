// csg_pkg: types and constants shared by the controller and data-path modules.
//
// It holds three things:
//  * the word width of the data path and the operation codes of the functional-unit library
//    (16-bit comparator, adder, subtractor and multiplier);
//  * the control word of the Fig. 2 example data path (ctrl_t): register write signals,
//    multiplexer port select signals and tri-state-driver enable signals, the three kinds of
//    control signal a controller issues;
//  * the PLA personalities of the four controllers of that example. Each controller is written
//    here as a list of symbolic product terms (state code, condition literals -> next state,
//    status-register load, control signals) and expanded by build_pers() into the AND and OR
//    planes the pla module takes. No logic minimisation is done: there is one term per state,
//    plus one per conditional group of control signals, as the templates of an unconditional
//    state, an if-then-else state and a case state suggest.
package csg_pkg;

  // Word width of the data path (the library units are 16 bits wide).
  parameter int unsigned W = 16;

  typedef enum logic [1:0] {
    FU_CMP = 2'd0,  // comparator, result 1 when a > b
    FU_ADD = 2'd1,
    FU_SUB = 2'd2,
    FU_MUL = 2'd3
  } fu_op_t;

  // Control word of the Fig. 2 example data path. Field meanings:
  //  add_a_sel  adder port A:      0 = input a,  1 = register R1
  //  add_b_sel  adder port B:      0 = input b,  1 = input c
  //  mul_a_sel  multiplier port A: 0 = R2,       1 = R3
  //  mul_b_sel  multiplier port B: 0 = input d,  1 = input e
  //  rc_we      write the comparator result (condition value) into RC
  //  r1_we      write the adder into R1
  //  r2_we      write R2;  r2_sel selects its source: 0 = R1 (branch 0), 1 = adder (branch 1)
  //  r3_we      write R3 from the join bus
  //  r3_en_pass tri-state enable: R2 drives the join bus (branch 0)
  //  r3_en_mul  tri-state enable: the multiplier drives the join bus (branch 1)
  //  rout_we    write the multiplier into the result register
  typedef struct packed {
    logic add_a_sel;
    logic add_b_sel;
    logic mul_a_sel;
    logic mul_b_sel;
    logic rc_we;
    logic r1_we;
    logic r2_we;
    logic r2_sel;
    logic r3_we;
    logic r3_en_pass;
    logic r3_en_mul;
    logic rout_we;
  } ctrl_t;

  parameter int unsigned CTRL_W = $bits(ctrl_t);

  // Primary inputs of the Fig. 2 example. Each is read in the time step of the operation that
  // uses it: p, q, a, b in step 1, c in step 2, d in step 3, e in step 4.
  typedef struct packed {
    logic [W-1:0] p;
    logic [W-1:0] q;
    logic [W-1:0] a;
    logic [W-1:0] b;
    logic [W-1:0] c;
    logic [W-1:0] d;
    logic [W-1:0] e;
  } operands_t;

  // Control signals of each time step of the Fig. 2 schedule, without their conditional parts.
  // step 1: a + b -> R1, p > q -> RC
  parameter ctrl_t C_STEP1 = '{add_a_sel: 1'b0, add_b_sel: 1'b0, rc_we: 1'b1, r1_we: 1'b1,
                               default: 1'b0};
  // step 2: R1 + c -> R2 on branch 1, R1 -> R2 on branch 0
  parameter ctrl_t C_STEP2 = '{add_a_sel: 1'b1, add_b_sel: 1'b1, r2_we: 1'b1, default: 1'b0};
  // step 3: R2 * d -> R3 on branch 1, R2 -> R3 on branch 0 (the join)
  parameter ctrl_t C_STEP3 = '{mul_a_sel: 1'b0, mul_b_sel: 1'b0, r3_we: 1'b1, default: 1'b0};
  // step 4: R3 * e -> ROUT
  parameter ctrl_t C_STEP4 = '{mul_a_sel: 1'b1, mul_b_sel: 1'b1, rout_we: 1'b1, default: 1'b0};
  // conditional parts
  parameter ctrl_t C_R2_TAKE = '{r2_sel: 1'b1, default: 1'b0};
  parameter ctrl_t C_J_PASS  = '{r3_en_pass: 1'b1, default: 1'b0};
  parameter ctrl_t C_J_MUL   = '{r3_en_mul: 1'b1, default: 1'b0};

  // Maximum PLA size the personality type can hold.
  parameter int unsigned PLA_MAX_IN    = 16;
  parameter int unsigned PLA_MAX_OUT   = 64;
  parameter int unsigned PLA_MAX_TERMS = 64;

  // A PLA personality: per product term, which inputs it looks at (care), the value each of those
  // must have (val), and which outputs it drives (orp).
  typedef struct packed {
    logic [PLA_MAX_TERMS-1:0][PLA_MAX_IN-1:0]  care;
    logic [PLA_MAX_TERMS-1:0][PLA_MAX_IN-1:0]  val;
    logic [PLA_MAX_TERMS-1:0][PLA_MAX_OUT-1:0] orp;
  } pla_pers_t;

  // Condition inputs and status registers a symbolic term can name.
  parameter int unsigned TERM_MAX_COND = 4;
  parameter int unsigned TERM_MAX_SR   = 4;

  // A symbolic controller product term. The state code is always matched in full. Bit i of
  // c_care/c_val looks at condition input i (a condition register of the data path), bit r of
  // s_care/s_val at status register r. s_load[r] loads status register r from source s_sel[r]:
  // 0 .. n_cond-1 a condition input, n_cond .. n_cond+n_sr-1 a status register.
  typedef struct packed {
    logic [5:0]                    st;
    logic [TERM_MAX_COND-1:0]      c_care;
    logic [TERM_MAX_COND-1:0]      c_val;
    logic [TERM_MAX_SR-1:0]        s_care;
    logic [TERM_MAX_SR-1:0]        s_val;
    logic [5:0]                    nxt;
    logic [TERM_MAX_SR-1:0]        s_load;
    logic [TERM_MAX_SR-1:0][2:0]   s_sel;
    ctrl_t                         ctrl;
  } term_t;

  // A term with all status-register sources at 0 (condition input 0).
  function automatic term_t mk(logic [5:0] st, logic [TERM_MAX_COND-1:0] c_care,
                               logic [TERM_MAX_COND-1:0] c_val, logic [TERM_MAX_SR-1:0] s_care,
                               logic [TERM_MAX_SR-1:0] s_val, logic [5:0] nxt,
                               logic [TERM_MAX_SR-1:0] s_load, ctrl_t ctrl);
    term_t t;
    t.st = st; t.c_care = c_care; t.c_val = c_val; t.s_care = s_care; t.s_val = s_val;
    t.nxt = nxt; t.s_load = s_load; t.s_sel = '0; t.ctrl = ctrl;
    return t;
  endfunction

  // The same term with status register r loading from source src.
  function automatic term_t with_src(term_t t, int r, logic [2:0] src);
    term_t u = t;
    u.s_sel[r] = src;
    return u;
  endfunction

  // Width of a status register's source select for n_cond inputs and n_sr registers; the same
  // formula as in ctrl_sr and status_regs.
  function automatic int sel_w(int n_cond, int n_sr);
    return (n_cond + n_sr > 1) ? $clog2(n_cond + n_sr) : 1;
  endfunction

  // Expand n symbolic terms into PLA planes, in the layout ctrl_sr and ctrl_nsr use:
  //   PLA inputs : [sw-1:0] state, then n_cond condition inputs, then n_sr status registers
  //   PLA outputs: [CTRL_W-1:0] control word, then per status register r its load bit followed
  //                by its source select (sel_w bits), then sw next-state bits.
  function automatic pla_pers_t build_pers(term_t [PLA_MAX_TERMS-1:0] t, int n, int sw,
                                           int n_sr, int n_cond = 1);
    pla_pers_t p;
    int sw_sel, nxt_lsb, base;
    p = '0;
    sw_sel  = sel_w(n_cond, n_sr);
    nxt_lsb = CTRL_W + n_sr * (1 + sw_sel);
    for (int i = 0; i < n; i++) begin
      for (int b = 0; b < sw; b++) begin
        p.care[i][b] = 1'b1;
        p.val[i][b]  = t[i].st[b];
        p.orp[i][nxt_lsb + b] = t[i].nxt[b];
      end
      for (int c = 0; c < n_cond; c++) begin
        p.care[i][sw + c] = t[i].c_care[c];
        p.val[i][sw + c]  = t[i].c_val[c];
      end
      for (int r = 0; r < n_sr; r++) begin
        p.care[i][sw + n_cond + r] = t[i].s_care[r];
        p.val[i][sw + n_cond + r]  = t[i].s_val[r];
        base = CTRL_W + r * (1 + sw_sel);
        p.orp[i][base] = t[i].s_load[r];
        for (int b = 0; b < sw_sel; b++)
          p.orp[i][base + 1 + b] = t[i].s_load[r] & t[i].s_sel[r][b];
      end
      p.orp[i][CTRL_W-1:0] = t[i].ctrl;
    end
    return p;
  endfunction

  // ---- Non-pipelined, with status registers: ring S1..S4 (codes 0..3), one status register
  // loaded from RC while step 2 is issued and read during step 3 (the reserved period).
  parameter int unsigned NP_SR_SW = 2, NP_SR_TERMS = 7;
  function automatic pla_pers_t np_sr_pers();
    term_t [PLA_MAX_TERMS-1:0] t = '0;
    t[0] = mk(6'd0, 0, 0, 0, 0, 6'd1, 0, C_STEP1);
    t[1] = mk(6'd1, 0, 0, 0, 0, 6'd2, 1, C_STEP2);
    t[2] = mk(6'd1, 1, 1, 0, 0, 6'd0, 0, C_R2_TAKE);
    t[3] = mk(6'd2, 0, 0, 0, 0, 6'd3, 0, C_STEP3);
    t[4] = mk(6'd2, 0, 0, 1, 1, 6'd0, 0, C_J_MUL);
    t[5] = mk(6'd2, 0, 0, 1, 0, 6'd0, 0, C_J_PASS);
    t[6] = mk(6'd3, 0, 0, 0, 0, 6'd0, 0, C_STEP4);
    return build_pers(t, NP_SR_TERMS, NP_SR_SW, 1);
  endfunction

  // ---- Non-pipelined, without status registers: S1=0, S2=1, S3 split by the condition value
  // into S3_0=2 and S3_1=3, S4=4.
  parameter int unsigned NP_NSR_SW = 3, NP_NSR_TERMS = 6;
  function automatic pla_pers_t np_nsr_pers();
    term_t [PLA_MAX_TERMS-1:0] t = '0;
    t[0] = mk(6'd0, 0, 0, 0, 0, 6'd1, 0, C_STEP1);
    t[1] = mk(6'd1, 1, 0, 0, 0, 6'd2, 0, C_STEP2);
    t[2] = mk(6'd1, 1, 1, 0, 0, 6'd3, 0, C_STEP2 | C_R2_TAKE);
    t[3] = mk(6'd2, 0, 0, 0, 0, 6'd4, 0, C_STEP3 | C_J_PASS);
    t[4] = mk(6'd3, 0, 0, 0, 0, 6'd4, 0, C_STEP3 | C_J_MUL);
    t[5] = mk(6'd4, 0, 0, 0, 0, 6'd0, 0, C_STEP4);
    return build_pers(t, NP_NSR_TERMS, NP_NSR_SW, 0);
  endfunction

  // ---- Pipelined, II = 2, with status registers: ring P1 (steps 1 and 3) = 0, P2 (steps 2
  // and 4) = 1. The status register is loaded while P2 is issued and read in the next P1.
  parameter int unsigned PL_SR_SW = 1, PL_SR_TERMS = 5;
  function automatic pla_pers_t pl_sr_pers();
    term_t [PLA_MAX_TERMS-1:0] t = '0;
    t[0] = mk(6'd0, 0, 0, 0, 0, 6'd1, 0, C_STEP1 | C_STEP3);
    t[1] = mk(6'd0, 0, 0, 1, 1, 6'd0, 0, C_J_MUL);
    t[2] = mk(6'd0, 0, 0, 1, 0, 6'd0, 0, C_J_PASS);
    t[3] = mk(6'd1, 0, 0, 0, 0, 6'd0, 1, C_STEP2 | C_STEP4);
    t[4] = mk(6'd1, 1, 1, 0, 0, 6'd0, 0, C_R2_TAKE);
    return build_pers(t, PL_SR_TERMS, PL_SR_SW, 1);
  endfunction

  // ---- Pipelined, II = 2, without status registers: folded step 1 is the Cartesian product of
  // step 1 (one state) and step 3 (two states): P1_0 = 0, P1_1 = 1; folded step 2 is P2 = 2.
  parameter int unsigned PL_NSR_SW = 2, PL_NSR_TERMS = 4;
  function automatic pla_pers_t pl_nsr_pers();
    term_t [PLA_MAX_TERMS-1:0] t = '0;
    t[0] = mk(6'd0, 0, 0, 0, 0, 6'd2, 0, C_STEP1 | C_STEP3 | C_J_PASS);
    t[1] = mk(6'd1, 0, 0, 0, 0, 6'd2, 0, C_STEP1 | C_STEP3 | C_J_MUL);
    t[2] = mk(6'd2, 1, 0, 0, 0, 6'd0, 0, C_STEP2 | C_STEP4);
    t[3] = mk(6'd2, 1, 1, 0, 0, 6'd1, 0, C_STEP2 | C_STEP4 | C_R2_TAKE);
    return build_pers(t, PL_NSR_TERMS, PL_NSR_SW, 0);
  endfunction

endpackage
