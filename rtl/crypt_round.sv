// crypt_round: one round Crypt^(e) of MM-128, followed by the half swap or,
// in the last round, by the final transformation.
//
// Datapath (L, R are 64-bit, L = (La, Lb) with La the upper 32 bits):
//   1. key mixing       L ^= Q,  R ^= U
//   2. control vectors  all taken from La, which the round does not change:
//        W1 = E(La),                W2 = E(La<<<16)                 (192 bits)
//        V1 = (E(La<<<8), E(La<<<24)), V2 = (E(La<<<4), E(La<<<20)) (384 bits)
//   3. left branch      Lb <- F32/192^-1_{Wb}( F32/192_{Wa}(Lb) )
//   4. right branch     R  <- F64/384^-1_{Vb}( I1( F64/384_{Va}(R) ) )
//      where (Wa,Wb) = (W1,W2), (Va,Vb) = (V1,V2) for e = 0 and the pairs
//      are exchanged for e = 1.
//   5. last = 0: output (R, L) (swap); last = 1: output (L ^ Qf, R ^ Uf).
// Exchanging the control pairs turns steps 2-4 into their exact inverse, since
// La is left unchanged and I1 is an involution; with the subkeys of
// key_schedule the same datapath therefore encrypts (e = 0) and decrypts (e = 1).
//
// The use of F32/192, F32/192^-1 in the left branch, F64/384, F64/384^-1 in
// the right branch, E, I1, the key pair (Q,U) per round, the swap and the
// final XOR follow the cipher description; the order of the steps and the
// sources of the control vectors are this design's own choice.
// Combinational; mm128 registers the result once per clock.
module crypt_round
  import mm128_pkg::*;
(
  input  half_t l,
  input  half_t r,
  input  half_t q,
  input  half_t u,
  input  logic  e,
  input  logic  last,
  input  half_t qf,
  input  half_t uf,
  output half_t l_out,
  output half_t r_out
);

  half_t        lk, rk;
  logic [31:0]  la, lb, lb_mid, lb_new;
  logic [191:0] w1, w2, wa, wb;
  logic [383:0] v1, v2, va, vb;
  half_t        r_a, r_b, r_new;
  half_t        l_new;

  assign lk = l ^ q;
  assign rk = r ^ u;
  assign la = lk[63:32];
  assign lb = lk[31:0];

  ext_e u_e_w1  (.x(la),                        .y(w1));
  ext_e u_e_w2  (.x({la[15:0], la[31:16]}),     .y(w2));
  ext_e u_e_v1a (.x({la[23:0], la[31:24]}),     .y(v1[383:192]));
  ext_e u_e_v1b (.x({la[7:0],  la[31:8]}),      .y(v1[191:0]));
  ext_e u_e_v2a (.x({la[27:0], la[31:28]}),     .y(v2[383:192]));
  ext_e u_e_v2b (.x({la[11:0], la[31:12]}),     .y(v2[191:0]));

  assign wa = e ? w2 : w1;
  assign wb = e ? w1 : w2;
  assign va = e ? v2 : v1;
  assign vb = e ? v1 : v2;

  // left branch
  cspn_f32_192 #(.INVERSE(1'b0)) u_f32     (.x(lb),     .v(wa), .y(lb_mid));
  cspn_f32_192 #(.INVERSE(1'b1)) u_f32_inv (.x(lb_mid), .v(wb), .y(lb_new));

  // right branch
  cspn_f64_384 #(.INVERSE(1'b0)) u_f64     (.x(rk),  .v(va), .y(r_a));
  perm_i1                        u_i1      (.x(r_a), .y(r_b));
  cspn_f64_384 #(.INVERSE(1'b1)) u_f64_inv (.x(r_b), .v(vb), .y(r_new));

  assign l_new = {la, lb_new};

  always_comb begin
    if (last) begin
      l_out = l_new ^ qf;
      r_out = r_new ^ uf;
    end else begin
      l_out = r_new;
      r_out = l_new;
    end
  end

endmodule
