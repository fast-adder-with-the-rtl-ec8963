// tb_sc_fault_campaign: multiple-fault workload for the self-correcting fast
// adder at 8, 16 and 32 bits with 1 to 5 simultaneous faults at random
// injection sites (see sc_campaign_unit). Prints the fraction of additions
// that came out right per width and fault count; every addition must match
// the behavioural fault model, and every single fault away from the
// carry-path XNOR must be corrected.
module tb_sc_fault_campaign;
  timeunit 1ns; timeprecision 1ns;

  logic start = 1'b0;
  logic [2:0] done;
  int ck [3], fl [3];
  int c8 [1:5], c16 [1:5], c32 [1:5];
  int checks = 0, failures = 0;
  localparam int unsigned TRIALS = 2000;

  sc_campaign_unit #(.WIDTH(8),  .TRIALS(TRIALS)) u8  (.start(start), .done(done[0]), .checks(ck[0]), .failures(fl[0]), .correct(c8));
  sc_campaign_unit #(.WIDTH(16), .TRIALS(TRIALS)) u16 (.start(start), .done(done[1]), .checks(ck[1]), .failures(fl[1]), .correct(c16));
  sc_campaign_unit #(.WIDTH(32), .TRIALS(TRIALS)) u32 (.start(start), .done(done[2]), .checks(ck[2]), .failures(fl[2]), .correct(c32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 start = 1'b1;
    wait (&done);
    $display("faults  8-bit  16-bit  32-bit   (share of additions with a correct result)");
    for (int k = 1; k <= 5; k++)
      $display("%0d       %5.1f%%  %5.1f%%  %5.1f%%", k,
               100.0 * c8[k] / TRIALS, 100.0 * c16[k] / TRIALS, 100.0 * c32[k] / TRIALS);
    for (int u = 0; u < 3; u++) begin
      checks   += ck[u];
      failures += fl[u];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
