// tb_ft_adder_top: end-to-end test of the three adders at their default
// width (16 bits), with no parameter override.
//
// Every iteration feeds one random operand pair (often one with long carry
// propagation) to all three adders and checks each sum against A + B + Cin.
// A random scenario is injected at the same time:
//   0  no fault
//   1  self-testing adder: detectable fault in one full adder -> its Error
//   2  self-testing adder: flipped block carry -> its E_Cnew
//   3  self-correcting adder: main copy of a full adder faulty -> first
//      redundant copy takes over
//   4  self-correcting adder: main and first redundant copies faulty ->
//      second redundant copy takes over
//   5  self-correcting adder: one carry circuit copy flipped -> outvoted
//   6  all of 3, 4 and 5 at many positions at once (multiple faults)
// Each mechanism, and a carry running through every block, is counted; one
// that never happens counts as a failure. The internal Error signals of the
// self-correcting full adder at bit 0 are read to confirm which copy was
// selected.
module tb_ft_adder_top;
  timeunit 1ns; timeprecision 1ns;
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned N = 5000;

  logic    [W-1:0]   a, b;
  logic              cin;
  logic    [W-1:0]   pl_s, st_s, sc_s, st_e_fa;
  logic              pl_cout, st_cout, sc_cout, st_fault;
  logic    [W/4-1:0] st_e_cnew, st_inj_cg;
  st_inj_t [W-1:0]   st_inj_fa;
  st_inj_t [W-1:0][SC_COPIES-1:0]     sc_inj_fa;
  logic    [W/4-1:0][TMR_COPIES-1:0] sc_inj_cg;

  int checks = 0, failures = 0;
  int n_full_prop = 0, n_st_fa = 0, n_st_cg = 0, n_sc_red1 = 0, n_sc_red2 = 0,
      n_sc_vote = 0, n_multi = 0;

  ft_adder_top dut (
    .pl_a(a), .pl_b(b), .pl_cin(cin), .pl_s(pl_s), .pl_cout(pl_cout),
    .st_a(a), .st_b(b), .st_cin(cin), .st_inj_fa(st_inj_fa), .st_inj_cg(st_inj_cg),
    .st_s(st_s), .st_cout(st_cout), .st_e_fa(st_e_fa), .st_e_cnew(st_e_cnew),
    .st_fault(st_fault),
    .sc_a(a), .sc_b(b), .sc_cin(cin), .sc_inj_fa(sc_inj_fa), .sc_inj_cg(sc_inj_cg),
    .sc_s(sc_s), .sc_cout(sc_cout)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%h b=%h cin=%0b", what, a, b, cin);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      logic [W:0]  r;
      int unsigned scen, pos, k;
      logic [2:0]  e0;
      a = 16'($urandom());
      b = 16'($urandom());
      cin = 1'($urandom());
      if (i % 3 == 0) b = ~a ^ 16'(1 << ($urandom() % W));
      if (i % 97 == 0) b = ~a;
      st_inj_fa = '0; st_inj_cg = '0; sc_inj_fa = '0; sc_inj_cg = '0;
      scen = (i < 7) ? i : $urandom() % 7;
      pos  = $urandom() % W;
      case (scen)
        1: st_inj_fa[pos] = detectable_fault($urandom());
        2: st_inj_cg[pos % (W/4)] = 1'b1;
        3: sc_inj_fa[pos][0] = detectable_fault($urandom());
        4: begin
             sc_inj_fa[pos][0] = detectable_fault($urandom());
             sc_inj_fa[pos][1] = detectable_fault($urandom());
           end
        5: sc_inj_cg[pos % (W/4)][$urandom() % 3] = 1'b1;
        6: begin
             for (int j = 0; j < W; j++) begin
               k = $urandom() % 4;
               if (k >= 1) sc_inj_fa[j][0] = detectable_fault($urandom());
               if (k >= 2) sc_inj_fa[j][1] = detectable_fault($urandom());
             end
             for (int g = 0; g < W/4; g++) sc_inj_cg[g][$urandom() % 3] = 1'b1;
           end
        default: ;
      endcase
      #1;
      r = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      e0 = dut.u_sc.g_blk[0].u_blk.g_fa[0].u_fa.e;

      expect_true({pl_cout, pl_s} == r, "plain sum");
      expect_true({sc_cout, sc_s} == r, "self-correcting sum");
      if ((a ^ b) == '1) n_full_prop++;
      case (scen)
        1: begin
             expect_true(st_e_fa[pos] == 1'b0 && st_fault, "self-test full adder detection");
             n_st_fa++;
           end
        2: begin
             expect_true(st_e_cnew[pos % (W/4)] == 1'b0 && st_fault, "self-test carry detection");
             // detection only: bits up to the faulty block carry stay correct
             expect_true(((st_s ^ r[W-1:0]) & ~(W'('1) << (4 * (pos % (W/4) + 1)))) == '0,
                         "bits below a faulty block carry");
             n_st_cg++;
           end
        3: begin
             if (pos == 0) expect_true(e0 == 3'b110, "bit 0 switched to first redundant copy");
             n_sc_red1++;
           end
        4: begin
             if (pos == 0) expect_true(e0 == 3'b100, "bit 0 switched to second redundant copy");
             n_sc_red2++;
           end
        5: n_sc_vote++;
        6: n_multi++;
        default: expect_true({st_cout, st_s} == r && st_e_fa == '1 && st_e_cnew == '1 && !st_fault,
                             "self-testing fault-free");
      endcase
    end
    $display("full carry propagation: %0d", n_full_prop);
    $display("self-test detections: full adder %0d, carry %0d", n_st_fa, n_st_cg);
    $display("self-correction: first redundant %0d, second redundant %0d, carry vote %0d, multiple %0d",
             n_sc_red1, n_sc_red2, n_sc_vote, n_multi);
    if (n_full_prop == 0 || n_st_fa == 0 || n_st_cg == 0 || n_sc_red1 == 0 ||
        n_sc_red2 == 0 || n_sc_vote == 0 || n_multi == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
