// tb_key_schedule: every (j, e) entry of the subkey table, with K1..K4 set to
// distinct recognisable values, then with random keys.
module tb_key_schedule;
  import mm128_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  logic [255:0] k;
  logic [3:0] j;
  logic e;
  logic [63:0] q, u;
  key_schedule dut (.k(k), .j(j), .e(e), .q(q), .u(u));
  // expected subkey numbers, one digit per round j = 1..9
  string qe = "123441341", ue = "342123232", qd = "132321241", ud = "243144323";
  logic [63:0] kk [4];
  int eq, eu;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 20000) begin
      failures = failures + 1;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 4; i++) kk[i] = (rep == 0) ? {16{4'(i + 1)}} : {$urandom, $urandom};
      k = {kk[0], kk[1], kk[2], kk[3]};
      for (int ee = 0; ee < 2; ee++)
        for (int jj = 1; jj <= 9; jj++) begin
          e = ee[0]; j = 4'(jj);
          #1;
          eq = (ee ? qd[jj-1] : qe[jj-1]) - 8'd48;
          eu = (ee ? ud[jj-1] : ue[jj-1]) - 8'd48;
          check(q == kk[eq-1], $sformatf("Q j=%0d e=%0d", jj, ee));
          check(u == kk[eu-1], $sformatf("U j=%0d e=%0d", jj, ee));
          @(posedge clk);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
