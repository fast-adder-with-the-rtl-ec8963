// tb_fast_adder: the plain fast adder at its default width (16) and at the
// other widths 8, 32 and 64, checked against integer addition on corner
// cases (all-propagate operands, carry chains, zero) and random operands.
module tb_fast_adder;
  timeunit 1ns; timeprecision 1ns;

  localparam int unsigned N = 3000;

  logic [63:0] a, b;
  logic        cin;
  logic [15:0] s16;  logic c16;
  logic [7:0]  s8;   logic c8;
  logic [31:0] s32;  logic c32;
  logic [63:0] s64;  logic c64;
  int checks = 0, failures = 0;

  fast_adder             dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16), .cout(c16));
  fast_adder #(.WIDTH(8))  dut8  (.a(a[7:0]),  .b(b[7:0]),  .cin(cin), .s(s8),  .cout(c8));
  fast_adder #(.WIDTH(32)) dut32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .s(s32), .cout(c32));
  fast_adder #(.WIDTH(64)) dut64 (.a(a),       .b(b),       .cin(cin), .s(s64), .cout(c64));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [64:0] r64;
    logic [32:0] r32;
    logic [16:0] r16;
    logic [8:0]  r8;
    #1;
    r64 = 65'(a) + 65'(b) + 65'(cin);
    r32 = 33'(a[31:0]) + 33'(b[31:0]) + 33'(cin);
    r16 = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
    r8  = 9'(a[7:0]) + 9'(b[7:0]) + 9'(cin);
    checks += 4;
    if ({c64, s64} !== r64) begin failures++; $display("FAIL64 %h+%h+%0b", a, b, cin); end
    if ({c32, s32} !== r32) begin failures++; $display("FAIL32 %h+%h+%0b", a[31:0], b[31:0], cin); end
    if ({c16, s16} !== r16) begin failures++; $display("FAIL16 %h+%h+%0b", a[15:0], b[15:0], cin); end
    if ({c8,  s8}  !== r8)  begin failures++; $display("FAIL8 %h+%h+%0b", a[7:0], b[7:0], cin); end
  endtask

  initial begin
    // all bits propagate: the carry in must ripple through every carry circuit
    for (int c = 0; c < 2; c++) begin
      cin = c[0];
      a = 64'h5555_5555_5555_5555; b = ~a; check();
      a = '1; b = '0; check();
      a = '0; b = '0; check();
      a = '1; b = '1; check();
      a = 64'h8000_0000_0000_0001; b = 64'h7fff_ffff_ffff_ffff; check();
    end
    for (int i = 0; i < N; i++) begin
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      cin = 1'($urandom());
      // make long propagate runs frequent
      if (i % 3 == 0) b = ~a ^ (64'h1 << ($urandom() % 64));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
