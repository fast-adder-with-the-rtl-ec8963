// st_campaign_unit: random multiple-fault campaign on one self-testing fast
// adder of width WIDTH (testbench helper).
//
// When start rises it runs TRIALS random additions for each fault count
// k = 1..5, with k distinct injection sites drawn uniformly from the four
// nodes of each full adder and the WIDTH/4 block carry circuits. Sum, carry
// and every Error flag must match a behavioural model of the faulty adder
// (full adders by tb_ft_model_pkg::st_fa_model along each block's ripple
// chain; Cnew as the true block carry, flipped when injected). Per k it
// counts the additions whose result was wrong and how many of those were
// flagged. A single fault away from the carry-path XNOR must always be
// flagged.
module st_campaign_unit
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned TRIALS = 2000
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   wrong   [1:5],
  output int   flagged [1:5]
);

  localparam int unsigned NFA = WIDTH * ST_INJ_BITS;
  localparam int unsigned NCG = WIDTH / 4;
  localparam int unsigned NS  = NFA + NCG;

  logic [WIDTH-1:0]   a, b, s, e_fa;
  logic [WIDTH/4-1:0] e_cnew;
  logic               cin, cout, fault;
  logic [NS-1:0]      flat;
  st_inj_t [WIDTH-1:0]   inj_fa;
  logic    [WIDTH/4-1:0] inj_cg;

  assign inj_fa = flat[NFA-1:0];
  assign inj_cg = flat[NFA +: NCG];

  st_fast_adder #(.WIDTH(WIDTH)) dut (
    .a(a), .b(b), .cin(cin), .inj_fa(inj_fa), .inj_cg(inj_cg),
    .s(s), .cout(cout), .e_fa(e_fa), .e_cnew(e_cnew), .fault(fault)
  );

  typedef struct packed {
    logic [WIDTH:0]     sum;
    logic [WIDTH-1:0]   e_fa;
    logic [WIDTH/4-1:0] e_cnew;
  } st_model_t;

  function automatic st_model_t model();
    st_model_t m;
    logic      cg, c;
    cg = cin;
    for (int g = 0; g < WIDTH / 4; g++) begin
      logic [4:0] t;
      logic       cnew;
      c = cg;
      for (int i = 4 * g; i < 4 * g + 4; i++) begin
        st_out_t o;
        o = st_fa_model(a[i], b[i], c, inj_fa[i]);
        m.sum[i]  = o.s;
        m.e_fa[i] = o.err_n;
        c = o.cout;
      end
      t    = 5'(a[4*g +: 4]) + 5'(b[4*g +: 4]) + 5'(cg);
      cnew = t[4] ^ inj_cg[g];
      m.e_cnew[g] = (c == cnew);
      cg = cnew;
    end
    m.sum[WIDTH] = cg;
    return m;
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int k = 1; k <= 5; k++) begin wrong[k] = 0; flagged[k] = 0; end
    flat = '0; a = '0; b = '0; cin = 1'b0;
    wait (start);
    for (int k = 1; k <= 5; k++) begin
      for (int t = 0; t < TRIALS; t++) begin
        logic [WIDTH:0] r;
        st_model_t      m;
        bit             has_xc;
        for (int i = 0; i < WIDTH; i++) begin
          a[i] = 1'($urandom());
          b[i] = 1'($urandom());
        end
        cin = 1'($urandom());
        flat = '0;
        has_xc = 1'b0;
        for (int n = 0; n < k; n++) begin
          int unsigned site;
          do site = $urandom() % NS; while (flat[site]);
          flat[site] = 1'b1;
          if (site < NFA && site % ST_INJ_BITS == INJ_XC) has_xc = 1'b1;
        end
        #1;
        r = (WIDTH+1)'(a) + (WIDTH+1)'(b) + (WIDTH+1)'(cin);
        m = model();
        checks++;
        if ({cout, s} !== m.sum || e_fa !== m.e_fa || e_cnew !== m.e_cnew ||
            fault !== (~&m.e_fa || ~&m.e_cnew)) begin
          failures++;
          if (failures < 5) $display("FAIL W=%0d k=%0d model mismatch a=%h b=%h", WIDTH, k, a, b);
        end
        if ({cout, s} != r) begin
          wrong[k]++;
          if (fault) flagged[k]++;
        end
        if (k == 1 && !has_xc) begin
          checks++;
          if (!fault) begin
            failures++;
            $display("FAIL W=%0d single detectable fault not flagged", WIDTH);
          end
        end
      end
    end
    done = 1'b1;
  end

endmodule
