// tb_perm_i1: I1 against its printed list of cycles.  A single 1 at every
// position p must arrive at the partner of p in the list (or stay, for a fixed
// point); random words must satisfy I1(I1(x)) = x.
module tb_perm_i1;
  import mm128_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  logic [63:0] x, y, z;
  int partner [64];
  perm_i1 dut  (.x(x), .y(y));
  perm_i1 dut2 (.x(y), .y(z));
  // (1)(2,9)(3,17)(4,25)(5,33)(6,41)(7,49)(8,57)(10)(11,18)(12,26)(13,34)(14,42)
  // (15,50)(16,58)(19)(20,27)(21,35)(22,43)(23,51)(24,59)(28)(29,36)(30,44)(31,52)
  // (32,60)(37)(38,45)(39,53)(40,61)(46)(47,54)(48,62)(55)(56,63)(64)
  int pairs [56] = '{2,9, 3,17, 4,25, 5,33, 6,41, 7,49, 8,57, 11,18, 12,26, 13,34, 14,42,
                     15,50, 16,58, 20,27, 21,35, 22,43, 23,51, 24,59, 29,36, 30,44, 31,52,
                     32,60, 38,45, 39,53, 40,61, 47,54, 48,62, 56,63};

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
    for (int p = 1; p <= 64; p++) partner[p-1] = p;
    for (int i = 0; i < 56; i += 2) begin
      partner[pairs[i]-1] = pairs[i+1];
      partner[pairs[i+1]-1] = pairs[i];
    end
    for (int p = 1; p <= 64; p++) begin
      x = 64'(1) << (64 - p);
      #1;
      check(y == 64'(1) << (64 - partner[p-1]), $sformatf("position %0d -> %h", p, y));
      @(posedge clk);
    end
    for (int n = 0; n < 200; n++) begin
      x = {$urandom, $urandom};
      #1;
      check(z == x, "involution");
      check(y == ref_i1(x), "against model");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
