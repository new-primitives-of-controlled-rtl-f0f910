// key_schedule: subkey selection of MM-128.
//
// MM-128 has no round-key precomputation: the 64-bit subkeys K1..K4 of the
// 256-bit key are used directly.  For round j = 1..8 (and j = 9, the final
// transformation) this block selects the pair (Q_j, U_j) from a fixed table
// that depends on the mode e (0 = encrypt, 1 = decrypt):
//
//   j        1  2  3  4  5  6  7  8  9
//   Q (e=0)  K1 K2 K3 K4 K4 K1 K3 K4 K1
//   U (e=0)  K3 K4 K2 K1 K2 K3 K2 K3 K2
//   Q (e=1)  K1 K3 K2 K3 K2 K1 K2 K4 K1
//   U (e=1)  K2 K4 K3 K1 K4 K4 K3 K2 K3
//
// For j = 1..8 the decryption pair is the encryption pair of round 10-j with
// Q and U exchanged (j = 2..8) or unchanged (j = 1, which undoes the final
// transformation).  The decryption pair for j = 9 must cancel the whitening of
// encryption round 1, (K1, K3); it is used here in that order.
//
// Ports: k = {K1,K2,K3,K4}; j in 1..9 (other values give j = 9); e; q, u.
// Combinational: two 4:1 multiplexers driven by a small table.
module key_schedule
  import mm128_pkg::*;
(
  input  key_t        k,
  input  logic [3:0]  j,
  input  logic        e,
  output half_t       q,
  output half_t       u
);

  // index 0..3 = K1..K4; table column 0 is j = 1
  localparam kidx_t Q_ENC [9] = '{2'd0, 2'd1, 2'd2, 2'd3, 2'd3, 2'd0, 2'd2, 2'd3, 2'd0};
  localparam kidx_t U_ENC [9] = '{2'd2, 2'd3, 2'd1, 2'd0, 2'd1, 2'd2, 2'd1, 2'd2, 2'd1};
  localparam kidx_t Q_DEC [9] = '{2'd0, 2'd2, 2'd1, 2'd2, 2'd1, 2'd0, 2'd1, 2'd3, 2'd0};
  localparam kidx_t U_DEC [9] = '{2'd1, 2'd3, 2'd2, 2'd0, 2'd3, 2'd3, 2'd2, 2'd1, 2'd2};

  half_t  sub [4];
  kidx_t  qi, ui;
  logic [3:0] col;

  assign sub[0] = k[255:192];
  assign sub[1] = k[191:128];
  assign sub[2] = k[127:64];
  assign sub[3] = k[63:0];

  always_comb begin
    col = (j >= 4'd1 && j <= 4'd9) ? j - 4'd1 : 4'd8;
    qi  = e ? Q_DEC[col] : Q_ENC[col];
    ui  = e ? U_DEC[col] : U_ENC[col];
    q   = sub[qi];
    u   = sub[ui];
  end

endmodule
