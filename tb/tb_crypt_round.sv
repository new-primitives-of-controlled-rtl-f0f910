// tb_crypt_round: one round against three known vectors and the reference
// model (random inputs, both modes, swap and last round), and the inverse
// property: with the control pairs exchanged (e = 1) the round body undoes
// itself, so round(e=1, keys 0, last) of round(e=0, keys Q,U, last) gives
// back the key-mixed input (L^Q, R^U).
module tb_crypt_round;
  import mm128_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  logic [63:0] l, r, q, u, qf, uf, lo, ro, lo2, ro2;
  logic e, last;
  crypt_round dut  (.l(l), .r(r), .q(q), .u(u), .e(e), .last(last), .qf(qf), .uf(uf),
                    .l_out(lo), .r_out(ro));
  crypt_round back (.l(lo), .r(ro), .q(64'd0), .u(64'd0), .e(~e), .last(1'b1), .qf(64'd0),
                    .uf(64'd0), .l_out(lo2), .r_out(ro2));
  logic [127:0] kin [3] = '{128'hf8130c4237730edf_b9d179e06c0fd4f5, 128'hf06d3fef701966a0_8d88348a7eed8d14,
                            128'hc2cd789a380208a9_f3c64af775a89294};
  logic [127:0] kkey [3] = '{128'h8712b8bc076f3787_c381e88f38c0c8fd, 128'h587fd2803bab6c39_ad45f23d3b1a11df,
                             128'hed2f89d94a2f20aa_6a8ac4ba05805975};
  logic [127:0] kout [3] = '{128'hffc1a5dc0ab9342e_7f01b4fe03518044, 128'h508efe9aaa90a47e_a812ed6fd8dab289,
                             128'h92f8b822b1b09fad_2fe2f14319e3c1c1};

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
    for (int n = 0; n < 3; n++) begin
      {l, r} = kin[n]; {q, u} = kkey[n]; e = 0; last = 0; qf = 0; uf = 0;
      #1;
      check({lo, ro} == kout[n], $sformatf("known vector %0d: %h", n, {lo, ro}));
      @(posedge clk);
    end
    for (int n = 0; n < 400; n++) begin
      l = {$urandom, $urandom}; r = {$urandom, $urandom};
      q = {$urandom, $urandom}; u = {$urandom, $urandom};
      qf = {$urandom, $urandom}; uf = {$urandom, $urandom};
      e = n[0]; last = n[1];
      #1;
      check({lo, ro} == ref_round(l, r, q, u, e, last, qf, uf), $sformatf("random %0d", n));
      @(posedge clk);
      last = 1; qf = 0; uf = 0;
      #1;
      check({lo2, ro2} == {l ^ q, r ^ u}, $sformatf("inverse e=%0d", e));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
