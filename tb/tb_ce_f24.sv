// tb_ce_f24: exhaustive test of the controlled element F2/4.
// For all 64 (x, v) it checks the output against the reference truth tables,
// that every modification is an involution (a second element fed with y
// returns x), and it measures the nonlinearity of y1, y2 and y1^y2 with a
// Walsh transform over the 64 collected outputs: the element used in MM-128
// must give 22, 22 and 24.  Finally it computes the differential table of the
// element from the same outputs: the probability that the output difference
// has weight k when the control difference has weight i and the input
// difference weight j, averaged over all values and differences.  The rows
// i = 0 and i = 4 must equal the published values (to their 3 digits); the
// other rows must lie within 0.08 of them.
module tb_ce_f24;
  import mm128_ref_pkg::*;

  logic       clk = 1'b0;
  logic [1:0] x, y, z;
  logic [3:0] v;
  int         checks = 0, failures = 0;
  int         cycles = 0;
  logic [63:0] t1, t2;

  ce_f24 dut  (.x(x), .v(v), .y(y));
  ce_f24 dut2 (.x(y), .v(v), .y(z));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 10000) begin
      failures = failures + 1;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int nl6(logic [63:0] tt);
    int w, m;
    m = 0;
    for (int a = 0; a < 64; a++) begin
      w = 0;
      for (int i = 0; i < 64; i++) w += (tt[i] ^ ($countones(a & i) % 2 == 1)) ? -1 : 1;
      if (w < 0) w = -w;
      if (w > m) m = w;
    end
    return 32 - m / 2;
  endfunction

  // published Pr(k | i, j), index [i][j][k]
  real pub [5][3][3] = '{
    '{'{1.00, 0.00, 0.00}, '{0.00, 0.75, 0.25}, '{0.00, 0.50, 0.50}},
    '{'{0.211, 0.563, 0.227}, '{0.281, 0.500, 0.219}, '{0.227, 0.438, 0.336}},
    '{'{0.224, 0.500, 0.276}, '{0.253, 0.505, 0.242}, '{0.291, 0.484, 0.225}},
    '{'{0.273, 0.438, 0.289}, '{0.219, 0.563, 0.219}, '{0.289, 0.438, 0.273}},
    '{'{0.281, 0.500, 0.219}, '{0.250, 0.500, 0.250}, '{0.219, 0.500, 0.281}}};

  function automatic real diff_pr(logic [63:0] a, logic [63:0] b, int i, int j, int k);
    int hit, tot;
    logic [1:0] y0, y1;
    hit = 0;
    tot = 0;
    for (int dv = 0; dv < 16; dv++) begin
      if ($countones(4'(dv)) != i) continue;
      for (int dx = 0; dx < 4; dx++) begin
        if ($countones(2'(dx)) != j) continue;
        for (int idx = 0; idx < 64; idx++) begin
          int idx2;
          idx2 = idx ^ (dv * 4 + dx);
          y0 = {a[idx], b[idx]};
          y1 = {a[idx2], b[idx2]};
          tot++;
          if ($countones(y0 ^ y1) == k) hit++;
        end
      end
    end
    return real'(hit) / real'(tot);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      v = 4'(i / 4);
      x = 2'(i % 4);
      #1;
      check(y == ref_f24(x, v), $sformatf("v=%0d x=%0d y=%0d", v, x, y));
      check(z == x, $sformatf("involution v=%0d x=%0d", v, x));
      t1[i] = y[1];
      t2[i] = y[0];
      @(posedge clk);
    end
    check($countones(t1) == 32 && $countones(t2) == 32, "balanced outputs");
    check(nl6(t1) == 22, $sformatf("NL(f1)=%0d", nl6(t1)));
    check(nl6(t2) == 22, $sformatf("NL(f2)=%0d", nl6(t2)));
    check(nl6(t1 ^ t2) == 24, $sformatf("NL(f3)=%0d", nl6(t1 ^ t2)));
    $display("NL(f1)-NL(f2)-NL(f3) = %0d-%0d-%0d", nl6(t1), nl6(t2), nl6(t1 ^ t2));
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++) begin
          real pr, dev, tol;
          pr  = diff_pr(t1, t2, i, j, k);
          dev = pr - pub[i][j][k];
          if (dev < 0.0) dev = -dev;
          tol = (i == 0 || i == 4) ? 0.0015 : 0.08;
          check(dev <= tol, $sformatf("Pr(i=%0d j=%0d k=%0d) = %.3f, published %.3f", i, j, k, pr, pub[i][j][k]));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
