// tb_cspn_f32_192: F32/192 and F32/192^-1 (INVERSE = 0 and 1) against the
// reference model for 1000 random (x, v) pairs, and the round trip through both.
module tb_cspn_f32_192;
  import mm128_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  logic [32-1:0] x, y, z;
  logic [192-1:0] v;
  cspn_f32_192 #(.INVERSE(1'b0)) dut (.x(x), .v(v), .y(y));
  cspn_f32_192 #(.INVERSE(1'b1)) inv (.x(y), .v(v), .y(z));

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
    for (int n = 0; n < 1000; n++) begin
      x = {$urandom}; v = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      check(y == ref_f32(x, v, 0), $sformatf("forward x=%h y=%h", x, y));
      check(z == x, $sformatf("round trip x=%h", x));
      check(z == ref_f32(y, v, 1), "inverse against model");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
