// sc_campaign_unit: random multiple-fault campaign on one self-correcting
// fast adder of width WIDTH (testbench helper).
//
// When start rises it runs TRIALS random additions for each fault count
// k = 1..5. In each trial k distinct injection sites are drawn uniformly
// from all of the adder's sites: the four nodes of each of the 3*WIDTH
// self-testing full adders and the 3*WIDTH/4 carry circuit copies. The sum
// must match a behavioural model of the faulty adder exactly (each full adder
// by tb_ft_model_pkg::sc_fa_model, each block carry as the majority of its
// copies); how often it also equals the true sum is counted per k. A single
// fault at any site other than the carry-path XNOR must always be corrected.
module sc_campaign_unit
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned TRIALS = 2000
) (
  input  logic          start,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            correct [1:5]
);

  localparam int unsigned NFA = WIDTH * SC_COPIES * ST_INJ_BITS;
  localparam int unsigned NCG = (WIDTH / 4) * TMR_COPIES;
  localparam int unsigned NS  = NFA + NCG;

  logic [WIDTH-1:0] a, b, s;
  logic             cin, cout;
  logic [NS-1:0]    flat;
  st_inj_t [WIDTH-1:0][SC_COPIES-1:0]    inj_fa;
  logic    [WIDTH/4-1:0][TMR_COPIES-1:0] inj_cg;

  assign inj_fa = flat[NFA-1:0];
  assign inj_cg = flat[NFA +: NCG];

  sc_fast_adder #(.WIDTH(WIDTH)) dut (
    .a(a), .b(b), .cin(cin), .inj_fa(inj_fa), .inj_cg(inj_cg), .s(s), .cout(cout)
  );

  // Sum and carry of the faulty adder, from the behavioural models.
  function automatic logic [WIDTH:0] model();
    logic [WIDTH-1:0] ms;
    logic             cg, c;
    cg = cin;
    for (int g = 0; g < WIDTH / 4; g++) begin
      logic [4:0] t;
      c = cg;
      for (int i = 4 * g; i < 4 * g + 4; i++) begin
        st_out_t o;
        o = sc_fa_model(a[i], b[i], c, inj_fa[i]);
        ms[i] = o.s;
        c = o.cout;
      end
      t  = 5'(a[4*g +: 4]) + 5'(b[4*g +: 4]) + 5'(cg);
      cg = maj3(t[4] ^ inj_cg[g][0], t[4] ^ inj_cg[g][1], t[4] ^ inj_cg[g][2]);
    end
    return {cg, ms};
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int k = 1; k <= 5; k++) correct[k] = 0;
    flat = '0; a = '0; b = '0; cin = 1'b0;
    wait (start);
    for (int k = 1; k <= 5; k++) begin
      for (int t = 0; t < TRIALS; t++) begin
        logic [WIDTH:0] r, m;
        bit only_xc;
        for (int i = 0; i < WIDTH; i++) begin
          a[i] = 1'($urandom());
          b[i] = 1'($urandom());
        end
        cin = 1'($urandom());
        flat = '0;
        only_xc = 1'b0;
        for (int n = 0; n < k; n++) begin
          int unsigned site;
          do site = $urandom() % NS; while (flat[site]);
          flat[site] = 1'b1;
          if (site < NFA && site % ST_INJ_BITS == INJ_XC) only_xc = 1'b1;
        end
        #1;
        r = (WIDTH+1)'(a) + (WIDTH+1)'(b) + (WIDTH+1)'(cin);
        m = model();
        checks++;
        if ({cout, s} !== m) begin
          failures++;
          if (failures < 5) $display("FAIL W=%0d k=%0d model mismatch a=%h b=%h", WIDTH, k, a, b);
        end
        if ({cout, s} == r) correct[k]++;
        else if (k == 1 && !only_xc) begin
          failures++;
          $display("FAIL W=%0d single detectable fault not corrected", WIDTH);
        end
      end
    end
    done = 1'b1;
  end

endmodule
