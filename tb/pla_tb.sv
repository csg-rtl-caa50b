// pla_tb: self-checking test of the PLA with its default personality, the unpipelined
// status-register controller of the conditional example. All 16 input combinations
// {status register, condition, state[1:0]} are applied and the outputs compared with the
// controller's specification written out here: the ring S1 -> S2 -> S3 -> S4 -> S1, the status
// register loaded in S2, the branch-1 select of step 2 following the condition input and the
// join enables of step 3 following the status register.
module pla_tb;
  import csg_pkg::*;
  localparam int unsigned NI = NP_SR_SW + 2;
  localparam int unsigned NO = CTRL_W + 2 + NP_SR_SW;
  logic [NI-1:0] in;
  logic [NO-1:0] out;
  int checks = 0, failures = 0;

  pla dut (.in, .out);

  function automatic ctrl_t spec_ctrl(int st, bit c, bit s);
    ctrl_t k = '0;
    case (st)
      0: begin k.rc_we = 1; k.r1_we = 1; end
      1: begin k.add_a_sel = 1; k.add_b_sel = 1; k.r2_we = 1; k.r2_sel = c; end
      2: begin k.r3_we = 1; k.r3_en_mul = s; k.r3_en_pass = !s; end
      default: begin k.mul_a_sel = 1; k.mul_b_sel = 1; k.rout_we = 1; end
    endcase
    return k;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int st;
      bit c, s;
      logic [NO-1:0] exp_out;
      st = v % 4; c = v[2]; s = v[3];
      in = NI'(v);
      #1;
      exp_out = {2'((st + 1) % 4), 1'b0, 1'(st == 1), spec_ctrl(st, c, s)};
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", in, out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
