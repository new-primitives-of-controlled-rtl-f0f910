// tb_ext_e: E(X) bit by bit: output component i (i = 0..5), position p
// (1..32) must carry input position ((p - 1 + 2i) mod 32) + 1.
module tb_ext_e;
  import mm128_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  logic [31:0] x;
  logic [191:0] y;
  ext_e dut (.x(x), .y(y));

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
    for (int n = 0; n < 300; n++) begin
      x = (n < 32) ? 32'(1) << n : $urandom;
      #1;
      for (int i = 0; i < 6; i++)
        for (int p = 1; p <= 32; p++)
          check(y[192 - (32*i + p)] == x[32 - ((p - 1 + 2*i) % 32 + 1)],
                $sformatf("x=%h component %0d position %0d", x, i, p));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
