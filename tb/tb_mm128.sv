// tb_mm128: end-to-end test of the MM-128 core at its default configuration.
//
// 1. Known answers: six (plaintext, key, ciphertext) triples computed by a
//    separate software model are encrypted and decrypted.
// 2. Stream: 60 blocks with random data, key and mode, mostly back to back
//    with some idle gaps; every result is compared with the reference model.
// 3. Round trips: random blocks are encrypted, and each ciphertext is then
//    decrypted with the same key and must give the plaintext back.
// Timing checks: every result appears 8 cycles after its block was taken,
// and back-to-back blocks leave exactly 8 cycles apart (one block per 8
// clocks).  Mechanisms counted (each must occur): a block taken while the
// previous one is in its last round, a block taken from idle, a change of
// mode between consecutive blocks, a change of key between consecutive blocks.
module tb_mm128;
  import mm128_ref_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid, in_ready, in_decrypt, out_valid;
  logic [127:0]  in_block, out_block;
  logic [255:0]  in_key;
  int            checks = 0, failures = 0;
  longint        cycle = 0;

  mm128 dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_block, .in_key, .in_decrypt,
    .out_valid, .out_block
  );

  typedef struct {
    logic [127:0] expect_block;
    longint       taken;
  } pending_t;

  pending_t     pend [$];
  logic [127:0] results [$];
  longint       last_out = -1;
  logic         prev_e;
  logic [255:0] prev_key;
  bit           have_prev = 0;
  int           n_overlap = 0, n_idle_start = 0, n_mode_switch = 0, n_key_change = 0;
  int           n_back_to_back_out = 0;

  localparam int NKAT = 6;
  logic [127:0] kat_p [NKAT] = '{
    128'h00000000000000000000000000000000, 128'hffffffffffffffffffffffffffffffff,
    128'hcd613e30d8f16adf91b7584a2265b1f5, 128'h35bf992dc9e9c616612e7696a6cecc1b,
    128'hb2221a58008a05a6c4647159c324c985, 128'h05b6e6e307d4bedc51431193e6c3f339};
  logic [255:0] kat_k [NKAT] = '{
    256'h0,
    {256{1'b1}},
    256'h78e510617311d8a3c2ce6f447ed4d57b1e2feb89414c343c1027c4d1c386bbc4,
    256'h9b810e766ec9d28663ca828dd5f4b3b2e4b06ce60741c7a87ce42c8218072e8c,
    256'h1a2b8f1ff1fd42a29755d4c13a902931cd447e35b8b6d8fe442e3d437204e52d,
    256'hafbd67f9619699cfe1988ad9f06c144a025b413f8a9a021ea648a7dd06839eb9};
  logic [127:0] kat_c [NKAT] = '{
    128'h3f722b0cff98459875efea386309eb45, 128'hb427825cd8548cac04751626b148d8b6,
    128'h4e6cf2d8e3bdcd3fa5da616e15926410, 128'hf55f2bce885534f9aaedc02a8687b699,
    128'hafe0c78cdada449f5cc97da38312c985, 128'h7f760c399be693309f9fa66880e4cd0b};

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // watchdog
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle > 5000) begin
      failures = failures + 1;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // monitor of the results, sampling between clock edges
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      pending_t p;
      check(pend.size() > 0, "result without a block");
      if (pend.size() > 0) begin
        p = pend.pop_front();
        check(out_block == p.expect_block, $sformatf("result %h expected %h", out_block, p.expect_block));
        // the block was taken at the edge after p.taken, the result registered 8 edges later
        check(cycle - p.taken - 1 == 8, $sformatf("latency %0d cycles", cycle - p.taken - 1));
      end
      if (last_out >= 0 && cycle - last_out <= 8) begin
        n_back_to_back_out++;
        check(cycle - last_out == 8, $sformatf("result spacing %0d cycles", cycle - last_out));
      end
      last_out = cycle;
      results.push_back(out_block);
    end
  end

  // hand one block to the core; inputs change and are sampled at the falling
  // edge, the block is taken at the rising edge that follows in_ready high
  task automatic send(logic [127:0] b, logic [255:0] k, logic e);
    @(negedge clk);
    in_valid   = 1'b1;
    in_block   = b;
    in_key     = k;
    in_decrypt = e;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    pend.push_back('{expect_block: ref_cipher(b, k, e), taken: cycle});
    if (dut.busy_q) n_overlap++;
    else            n_idle_start++;
    if (have_prev && prev_e != e)   n_mode_switch++;
    if (have_prev && prev_key != k) n_key_change++;
    prev_e    = e;
    prev_key  = k;
    have_prev = 1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  task automatic drain();
    while (pend.size() > 0) @(posedge clk);
    @(posedge clk);
  endtask

  logic [127:0] pt [10];
  logic [255:0] ky [10];

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_block = '0; in_key = '0; in_decrypt = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. known answers, encryption then decryption
    for (int i = 0; i < NKAT; i++) begin
      check(ref_cipher(kat_p[i], kat_k[i], 0) == kat_c[i], $sformatf("model KAT %0d", i));
      results.delete();
      send(kat_p[i], kat_k[i], 1'b0);
      drain();
      check(results.size() == 1 && results[0] == kat_c[i], $sformatf("KAT %0d encryption", i));
      results.delete();
      send(kat_c[i], kat_k[i], 1'b1);
      drain();
      check(results.size() == 1 && results[0] == kat_p[i], $sformatf("KAT %0d decryption", i));
    end

    // 2. stream of random blocks, keys and modes
    for (int n = 0; n < 60; n++) begin
      logic [255:0] k;
      k = (n % 4 == 1) ? in_key : {$urandom, $urandom, $urandom, $urandom,
                                   $urandom, $urandom, $urandom, $urandom};
      send({$urandom, $urandom, $urandom, $urandom}, k, 1'($urandom));
      if (n % 13 == 12) repeat (3 + n % 5) @(posedge clk);
    end
    drain();

    // 3. round trips: encrypt a batch, then decrypt the ciphertexts
    results.delete();
    for (int n = 0; n < 10; n++) begin
      pt[n] = {$urandom, $urandom, $urandom, $urandom};
      ky[n] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      send(pt[n], ky[n], 1'b0);
    end
    drain();
    check(results.size() == 10, "ten ciphertexts");
    for (int n = 0; n < 10; n++) send(results[n], ky[n], 1'b1);
    drain();
    check(results.size() == 20, "ten plaintexts");
    for (int n = 0; n < 10; n++)
      check(results[10 + n] == pt[n] && results[n] != pt[n], $sformatf("round trip %0d", n));

    $display("blocks taken during round 8: %0d, from idle: %0d, mode switches: %0d, key changes: %0d, back-to-back results: %0d",
             n_overlap, n_idle_start, n_mode_switch, n_key_change, n_back_to_back_out);
    check(n_overlap > 0, "no block taken during the last round");
    check(n_idle_start > 0, "no block taken from idle");
    check(n_mode_switch > 0, "no mode switch");
    check(n_key_change > 0, "no key change");
    check(n_back_to_back_out > 0, "no back-to-back results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
