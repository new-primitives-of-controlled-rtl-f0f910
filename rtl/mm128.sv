// mm128: MM-128 block cipher core, iterative looping architecture.
//
// A 128-bit block X = (L, R) is encrypted (decrypt = 0) or decrypted
// (decrypt = 1) under a 256-bit key K = (K1, K2, K3, K4) in eight rounds of
// crypt_round, one round per clock.  The same datapath serves both directions;
// only the subkey table (key_schedule) and the control-vector order inside the
// round change with the mode.  Keys need no precomputation, so the key and the
// mode may change with every block.
//
// Interface (valid/ready on the input, valid only on the output):
//   in_valid/in_ready  a block, its key and mode are taken on a clock edge with
//                      both high; in_ready is high when the core is idle or is
//                      computing round 8 of the current block.
//   out_valid          pulses for one cycle with out_block; out_block then
//                      holds its value until the next result.
// Timing: a block taken at edge t leaves at edge t+8 (out_valid high in the
// following cycle), and a new block can be taken at that same edge, so the
// core sustains one 128-bit block every 8 clocks (throughput = 16 bits/clock).
// The handshake, the registering of key and mode with each block and the
// synchronous active-low reset are this design's choices.
module mm128
  import mm128_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_block,
  input  key_t   in_key,
  input  logic   in_decrypt,
  output logic   out_valid,
  output block_t out_block
);

  half_t       l_q, r_q;
  key_t        key_q;
  logic        e_q;
  logic        busy_q;
  logic [3:0]  round_q;      // round computed in this cycle, 1..8
  half_t       q_j, u_j, q_f, u_f, l_nx, r_nx;
  logic        last;
  logic        take;

  assign last     = (round_q == 4'(ROUNDS));
  assign in_ready = !busy_q || last;
  assign take     = in_valid && in_ready;

  key_schedule u_ks_round (.k(key_q), .j(round_q), .e(e_q), .q(q_j), .u(u_j));
  key_schedule u_ks_final (.k(key_q), .j(4'(ROUNDS + 1)), .e(e_q), .q(q_f), .u(u_f));

  crypt_round u_round (
    .l(l_q), .r(r_q), .q(q_j), .u(u_j), .e(e_q), .last(last),
    .qf(q_f), .uf(u_f), .l_out(l_nx), .r_out(r_nx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      round_q   <= 4'd1;
      l_q       <= '0;
      r_q       <= '0;
      key_q     <= '0;
      e_q       <= 1'b0;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      out_valid <= 1'b0;
      if (busy_q) begin
        if (last) begin
          out_valid <= 1'b1;
          out_block <= {l_nx, r_nx};
          busy_q    <= 1'b0;
        end else begin
          l_q     <= l_nx;
          r_q     <= r_nx;
          round_q <= round_q + 4'd1;
        end
      end
      if (take) begin
        l_q     <= in_block[127:64];
        r_q     <= in_block[63:0];
        key_q   <= in_key;
        e_q     <= in_decrypt;
        round_q <= 4'd1;
        busy_q  <= 1'b1;
      end
    end
  end

  // a block is never taken while a round other than the last is in progress
  assert property (@(posedge clk) disable iff (!rst_n) take |-> (!busy_q || last));
  assert property (@(posedge clk) disable iff (!rst_n) busy_q |-> round_q >= 4'd1 && round_q <= 4'(ROUNDS));

endmodule
