// csla128_top_tb: end-to-end test of both 128-bit carry select adders at
// their default sizes.
//
// Each adder gets its own stream of vectors (the same boundary cases first,
// then independent random ones); each result is compared with a 129-bit
// behavioural sum, and on the boundary cases also with the other adder's. The test also counts, from
// the reference carries, how often each group of each adder had its result
// selected by carry 0 (the ripple adder's own word) and by carry 1 (the
// excess-1 word), and how often an adder's carry input was 1, the carry out
// was 1, and a carry rippled through the whole word. Every one of these must
// happen at least once, or it counts as a failure.
`include "csla_vectors.svh"

module csla128_top_tb;
  import csla_pkg::*;

  localparam int W        = 128;
  localparam int LIN_NG   = W / LIN_GROUP_W;
  localparam int SQRT_NG  = sqrt_num_groups(W, SQRT_MAX_GROUP_W);
  localparam int NVEC     = 4000;
  localparam int LIN_GROUP_W      = 4;
  localparam int SQRT_MAX_GROUP_W = 16;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] lin_a, lin_b, lin_sum, sqrt_a, sqrt_b, sqrt_sum;
  logic         lin_cin, lin_cout, sqrt_cin, sqrt_cout;
  logic [127:0] va, vb;
  logic         vc;
  logic [127:0] sa, sb;
  logic         sc;
  logic [W:0]   expected, sexpected;

  int lin_sel0 [LIN_NG];
  int lin_sel1 [LIN_NG];
  int sqrt_sel0[SQRT_NG];
  int sqrt_sel1[SQRT_NG];
  int n_cin1 = 0, n_cout1 = 0, n_full_ripple = 0;

  csla128_top dut (
    .lin_a   (lin_a),
    .lin_b   (lin_b),
    .lin_cin (lin_cin),
    .lin_sum (lin_sum),
    .lin_cout(lin_cout),
    .sqrt_a   (sqrt_a),
    .sqrt_b   (sqrt_b),
    .sqrt_cin (sqrt_cin),
    .sqrt_sum (sqrt_sum),
    .sqrt_cout(sqrt_cout)
  );

  // Carry into bit position p of a + b + cin, worked out bit-serially.
  function automatic logic carry_into(logic [W-1:0] x, logic [W-1:0] y, logic c, int p);
    logic k = c;
    for (int i = 0; i < p; i++) k = (x[i] & y[i]) | (k & (x[i] ^ y[i]));
    return k;
  endfunction

  function automatic void require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (lin_sel0[g]) begin lin_sel0[g] = 0; lin_sel1[g] = 0; end
    foreach (sqrt_sel0[g]) begin sqrt_sel0[g] = 0; sqrt_sel1[g] = 0; end

    for (int n = 0; n < NVEC; n++) begin
      next_vector(n, W, va, vb, vc);
      next_vector(n, W, sa, sb, sc);
      lin_a = va; lin_b = vb; lin_cin = vc;
      sqrt_a = sa; sqrt_b = sb; sqrt_cin = sc;
      #1;
      expected  = {1'b0, va} + {1'b0, vb} + (W + 1)'(vc);
      sexpected = {1'b0, sa} + {1'b0, sb} + (W + 1)'(sc);

      checks += 2;
      if ({lin_cout, lin_sum} != expected) begin
        failures++;
        if (failures < 10) $display("FAIL linear n=%0d a=%h b=%h cin=%0b got %h expected %h",
                                    n, va, vb, vc, {lin_cout, lin_sum}, expected);
      end
      if ({sqrt_cout, sqrt_sum} != sexpected) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt n=%0d a=%h b=%h cin=%0b got %h expected %h",
                                    n, sa, sb, sc, {sqrt_cout, sqrt_sum}, sexpected);
      end
      if (va == sa && vb == sb && vc == sc) begin
        checks++;
        if ({lin_cout, lin_sum} != {sqrt_cout, sqrt_sum}) begin
          failures++;
          if (failures < 10) $display("FAIL adders disagree n=%0d", n);
        end
      end

      for (int g = 0; g < LIN_NG; g++)
        if (carry_into(va, vb, vc, g * LIN_GROUP_W)) lin_sel1[g]++; else lin_sel0[g]++;
      for (int g = 0; g < SQRT_NG; g++)
        if (carry_into(sa, sb, sc, sqrt_group_lsb(W, SQRT_MAX_GROUP_W, g))) sqrt_sel1[g]++;
        else sqrt_sel0[g]++;
      if (vc) n_cin1++;
      if (sc) n_cin1++;
      if (expected[W]) n_cout1++;
      if (sexpected[W]) n_cout1++;
      if (vc && (va ^ vb) == '1) n_full_ripple++;
      if (sc && (sa ^ sb) == '1) n_full_ripple++;
    end

    for (int g = 0; g < LIN_NG; g++) begin
      require($sformatf("linear group %0d selects carry-0 word", g), lin_sel0[g]);
      require($sformatf("linear group %0d selects excess-1 word", g), lin_sel1[g]);
    end
    for (int g = 0; g < SQRT_NG; g++) begin
      require($sformatf("sqrt group %0d selects carry-0 word", g), sqrt_sel0[g]);
      require($sformatf("sqrt group %0d selects excess-1 word", g), sqrt_sel1[g]);
    end
    require("carry input 1", n_cin1);
    require("carry out 1", n_cout1);
    require("carry rippling through all 128 bits", n_full_ripple);
    $display("vectors=%0d cin1=%0d cout1=%0d full_ripple=%0d linear_groups=%0d sqrt_groups=%0d",
             NVEC, n_cin1, n_cout1, n_full_ripple, LIN_NG, SQRT_NG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
