// tb_cspn_f8_48_inv: F8/48^-1 against the reference model for 2000 random
// (x, v) pairs, and the round trip F8/48(F8/48^-1(x)) = x.
module tb_cspn_f8_48_inv;
  import mm128_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  logic [7:0] x, y, z;
  logic [47:0] v;
  cspn_f8_48_inv dut (.x(x), .v(v), .y(y));
  cspn_f8_48     fwd (.x(y), .v(v), .y(z));

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
    for (int n = 0; n < 2000; n++) begin
      x = 8'($urandom); v = {16'($urandom), 32'($urandom)};
      #1;
      check(y == ref_f8(x, v, 1), $sformatf("x=%h v=%h y=%h", x, v, y));
      check(z == x, $sformatf("round trip x=%h v=%h", x, v));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
