// tb_st_fault_campaign: multiple-fault workload for the self-testing fast
// adder at 8, 16 and 32 bits with 1 to 5 simultaneous faults at random
// injection sites (see st_campaign_unit). Prints, per width and fault count,
// the share of wrong results that the adder flagged. Every addition must
// match the behavioural fault model, and every single fault away from the
// carry-path XNOR must be flagged.
module tb_st_fault_campaign;
  timeunit 1ns; timeprecision 1ns;

  logic start = 1'b0;
  logic [2:0] done;
  int ck [3], fl [3];
  int w8 [1:5], w16 [1:5], w32 [1:5], f8 [1:5], f16 [1:5], f32 [1:5];
  int checks = 0, failures = 0;
  localparam int unsigned TRIALS = 2000;

  st_campaign_unit #(.WIDTH(8),  .TRIALS(TRIALS)) u8  (.start(start), .done(done[0]), .checks(ck[0]), .failures(fl[0]), .wrong(w8),  .flagged(f8));
  st_campaign_unit #(.WIDTH(16), .TRIALS(TRIALS)) u16 (.start(start), .done(done[1]), .checks(ck[1]), .failures(fl[1]), .wrong(w16), .flagged(f16));
  st_campaign_unit #(.WIDTH(32), .TRIALS(TRIALS)) u32 (.start(start), .done(done[2]), .checks(ck[2]), .failures(fl[2]), .wrong(w32), .flagged(f32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pct(int num, int den);
    return den == 0 ? 100.0 : 100.0 * num / den;
  endfunction

  initial begin
    #1 start = 1'b1;
    wait (&done);
    $display("faults  8-bit  16-bit  32-bit   (share of wrong results that were flagged)");
    for (int k = 1; k <= 5; k++)
      $display("%0d       %5.1f%%  %5.1f%%  %5.1f%%", k,
               pct(f8[k], w8[k]), pct(f16[k], w16[k]), pct(f32[k], w32[k]));
    for (int u = 0; u < 3; u++) begin
      checks   += ck[u];
      failures += fl[u];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
