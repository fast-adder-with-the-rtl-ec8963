// tb_st_fast_adder: the self-testing fast adder at 16 bits (default) and
// 64 bits. Random and corner-case operands are added fault-free (sum, carry
// and all Error flags checked), then with one detectable fault injected at a
// random full adder or block carry circuit: the matching Error flag must drop
// and the fault summary must rise.
module tb_st_fast_adder;
  timeunit 1ns; timeprecision 1ns;
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;

  localparam int unsigned N = 2000;

  logic    [63:0] a, b;
  logic           cin;
  st_inj_t [63:0] inj_fa;
  logic    [15:0] inj_cg;
  logic    [15:0] s16, e16;  logic [3:0]  ec16;  logic c16, f16;
  logic    [63:0] s64, e64;  logic [15:0] ec64;  logic c64, f64;
  int checks = 0, failures = 0, det_fa = 0, det_cg = 0;

  st_fast_adder dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .inj_fa(inj_fa[15:0]),
                       .inj_cg(inj_cg[3:0]), .s(s16), .cout(c16), .e_fa(e16),
                       .e_cnew(ec16), .fault(f16));
  st_fast_adder #(.WIDTH(64)) dut64 (.a(a), .b(b), .cin(cin), .inj_fa(inj_fa),
                       .inj_cg(inj_cg), .s(s64), .cout(c64), .e_fa(e64),
                       .e_cnew(ec64), .fault(f64));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      logic [64:0] r64;
      logic [16:0] r16;
      int unsigned pos;
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      cin = 1'($urandom());
      if (i % 3 == 0) b = ~a ^ (64'h1 << ($urandom() % 64));
      if (i == 0) begin a = '1; b = '0; cin = 1'b1; end
      inj_fa = '0; inj_cg = '0;
      #1;
      r64 = 65'(a) + 65'(b) + 65'(cin);
      r16 = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
      checks += 2;
      if ({c64, s64} !== r64 || e64 !== '1 || ec64 !== '1 || f64 !== 1'b0) begin
        failures++; $display("FAIL64 fault-free %h+%h+%0b", a, b, cin);
      end
      if ({c16, s16} !== r16 || e16 !== '1 || ec16 !== '1 || f16 !== 1'b0) begin
        failures++; $display("FAIL16 fault-free %h+%h+%0b", a[15:0], b[15:0], cin);
      end
      // one fault in a full adder of the low 16 bits (seen by both adders)
      pos = $urandom() % 16;
      inj_fa[pos] = detectable_fault($urandom());
      #1;
      checks += 2;
      if (e16[pos] !== 1'b0 || f16 !== 1'b1 || e64[pos] !== 1'b0 || f64 !== 1'b1) begin
        failures++; $display("FAIL fa fault at %0d not flagged", pos);
      end else det_fa += 2;
      // one fault in a block carry circuit
      inj_fa = '0;
      pos = $urandom() % 4;
      inj_cg[pos] = 1'b1;
      #1;
      checks += 2;
      if (ec16[pos] !== 1'b0 || f16 !== 1'b1 || ec64[pos] !== 1'b0 || f64 !== 1'b1) begin
        failures++; $display("FAIL carry fault at block %0d not flagged", pos);
      end else det_cg += 2;
    end
    $display("detected: full adder faults %0d, carry circuit faults %0d", det_fa, det_cg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
