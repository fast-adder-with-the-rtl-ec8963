// tb_sc_fast_adder: the self-correcting fast adder at 16 bits (default) and
// 64 bits with random multiple faults: in every full adder up to two of its
// three copies carry a detectable fault, and in every block at most one of
// the three carry circuits is flipped. Sum and carry must equal A + B + Cin.
// A second phase injects faults the redundancy cannot hide (all three copies
// of a full adder flipped in their sum) and checks that the sum is wrong,
// which shows the checks see the injected faults at all.
module tb_sc_fast_adder;
  timeunit 1ns; timeprecision 1ns;
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;

  localparam int unsigned N = 2000;

  logic    [63:0] a, b;
  logic           cin;
  st_inj_t [63:0][SC_COPIES-1:0] inj_fa;
  logic    [15:0][TMR_COPIES-1:0] inj_cg;
  logic    [15:0] s16;  logic c16;
  logic    [63:0] s64;  logic c64;
  int checks = 0, failures = 0, faults = 0;

  sc_fast_adder dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .inj_fa(inj_fa[15:0]),
                       .inj_cg(inj_cg[3:0]), .s(s16), .cout(c16));
  sc_fast_adder #(.WIDTH(64)) dut64 (.a(a), .b(b), .cin(cin), .inj_fa(inj_fa),
                       .inj_cg(inj_cg), .s(s64), .cout(c64));

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
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      cin = 1'($urandom());
      if (i % 3 == 0) b = ~a ^ (64'h1 << ($urandom() % 64));
      inj_fa = '0; inj_cg = '0;
      if (i % 4 != 0) begin
        for (int j = 0; j < 64; j++) begin
          int unsigned nf, k0, k1;
          nf = $urandom() % 3;
          k0 = $urandom() % 3;
          k1 = (k0 + 1 + $urandom() % 2) % 3;
          if (nf >= 1) begin inj_fa[j][k0] = detectable_fault($urandom()); faults++; end
          if (nf == 2) begin inj_fa[j][k1] = detectable_fault($urandom()); faults++; end
        end
        for (int g = 0; g < 16; g++)
          if ($urandom() % 2 == 1) begin inj_cg[g][$urandom() % 3] = 1'b1; faults++; end
      end
      #1;
      r64 = 65'(a) + 65'(b) + 65'(cin);
      r16 = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
      checks += 2;
      if ({c64, s64} !== r64) begin failures++; $display("FAIL64 %h+%h+%0b", a, b, cin); end
      if ({c16, s16} !== r16) begin failures++; $display("FAIL16 %h+%h+%0b", a[15:0], b[15:0], cin); end
    end
    // beyond the correction capability: every copy of one full adder faulty
    for (int i = 0; i < 100; i++) begin
      int unsigned pos;
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      cin = 1'($urandom());
      inj_fa = '0; inj_cg = '0;
      pos = $urandom() % 16;
      for (int k = 0; k < 3; k++) inj_fa[pos][k] = st_inj_t'(1 << INJ_S);
      #1;
      checks++;
      if (s16[pos] === 1'(a[pos] ^ b[pos] ^ ((a[15:0] + b[15:0] + 16'(cin)) ^ a[15:0] ^ b[15:0]) >> pos)) begin
        failures++; $display("FAIL triple fault at %0d not visible", pos);
      end
    end
    $display("faults injected and corrected: %0d", faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
