// mm128_ref_pkg: reference model of the MM-128 datapath for the testbenches.
//
// Written independently of the RTL: the F2/4 element is given by the truth
// tables of its two output functions (bit index 4*V + {x1,x2}), and the
// networks, E, I1, the round and the whole cipher are plain loops over bit
// positions.  Used to predict the outputs of every block.
package mm128_ref_pkg;

  localparam logic [63:0] F1_TT = 64'h5c953ca63c95ca6c;  // y1
  localparam logic [63:0] F2_TT = 64'h39a356caa9a36ca5;  // y2

  function automatic logic [1:0] ref_f24(logic [1:0] x, logic [3:0] v);
    int i;
    i = 4 * int'(v) + int'(x);
    return {F1_TT[i], F2_TT[i]};
  endfunction

  // one butterfly layer l (0..2) of F8/48
  function automatic logic [7:0] ref_layer(logic [7:0] x, logic [47:0] v, int l);
    logic [7:0] y;
    int d, hi, lo;
    logic [1:0] o;
    d = 1 << l;
    y = x;
    for (int k = 0; k < 4; k++) begin
      hi = 7 - (k / d) * 2 * d - (k % d);
      lo = hi - d;
      o  = ref_f24({x[hi], x[lo]}, v[47 - 16*l - 4*k -: 4]);
      y[hi] = o[1];
      y[lo] = o[0];
    end
    return y;
  endfunction

  function automatic logic [7:0] ref_f8(logic [7:0] x, logic [47:0] v, bit inv);
    logic [7:0] s;
    s = x;
    for (int t = 0; t < 3; t++) s = ref_layer(s, v, inv ? 2 - t : t);
    return s;
  endfunction

  function automatic logic [31:0] ref_f32(logic [31:0] x, logic [191:0] v, bit inv);
    logic [31:0] y;
    for (int k = 0; k < 4; k++)
      y[31 - 8*k -: 8] = ref_f8(x[31 - 8*k -: 8], v[191 - 48*k -: 48], inv);
    return y;
  endfunction

  function automatic logic [63:0] ref_f64(logic [63:0] x, logic [383:0] v, bit inv);
    logic [63:0] y;
    for (int k = 0; k < 8; k++)
      y[63 - 8*k -: 8] = ref_f8(x[63 - 8*k -: 8], v[383 - 48*k -: 48], inv);
    return y;
  endfunction

  function automatic logic [31:0] rotl32(logic [31:0] x, int b);
    return (x << b) | (x >> (32 - b));
  endfunction

  function automatic logic [191:0] ref_e(logic [31:0] x);
    logic [191:0] y;
    for (int i = 0; i < 6; i++) y[191 - 32*i -: 32] = (i == 0) ? x : rotl32(x, 2 * i);
    return y;
  endfunction

  // I1 as the printed list of transpositions: position p <-> 8*((p-1)%8) + (p-1)/8 + 1
  function automatic logic [63:0] ref_i1(logic [63:0] x);
    logic [63:0] y;
    int q;
    for (int p = 1; p <= 64; p++) begin
      q = 8 * ((p - 1) % 8) + (p - 1) / 8 + 1;
      y[64 - q] = x[64 - p];
    end
    return y;
  endfunction

  function automatic logic [127:0] ref_round(logic [63:0] l, logic [63:0] r, logic [63:0] q,
                                             logic [63:0] u, bit e, bit last,
                                             logic [63:0] qf, logic [63:0] uf);
    logic [31:0]  la, lb;
    logic [191:0] w1, w2;
    logic [383:0] v1, v2;
    l  = l ^ q;
    r  = r ^ u;
    la = l[63:32];
    lb = l[31:0];
    w1 = ref_e(la);
    w2 = ref_e(rotl32(la, 16));
    v1 = {ref_e(rotl32(la, 8)), ref_e(rotl32(la, 24))};
    v2 = {ref_e(rotl32(la, 4)), ref_e(rotl32(la, 20))};
    lb = ref_f32(ref_f32(lb, e ? w2 : w1, 0), e ? w1 : w2, 1);
    r  = ref_f64(ref_i1(ref_f64(r, e ? v2 : v1, 0)), e ? v1 : v2, 1);
    l  = {la, lb};
    return last ? {l ^ qf, r ^ uf} : {r, l};
  endfunction

  // Table of subkeys, index 1..4 = K1..K4, columns j = 1..9
  function automatic logic [63:0] ref_sub(logic [255:0] k, int idx);
    return k[255 - 64*(idx - 1) -: 64];
  endfunction

  function automatic int ref_qidx(bit e, int j);
    int qe [9] = '{1, 2, 3, 4, 4, 1, 3, 4, 1};
    int qd [9] = '{1, 3, 2, 3, 2, 1, 2, 4, 1};
    return e ? qd[j-1] : qe[j-1];
  endfunction

  function automatic int ref_uidx(bit e, int j);
    int ue [9] = '{3, 4, 2, 1, 2, 3, 2, 3, 2};
    int ud [9] = '{2, 4, 3, 1, 4, 4, 3, 2, 3};
    return e ? ud[j-1] : ue[j-1];
  endfunction

  function automatic logic [127:0] ref_cipher(logic [127:0] x, logic [255:0] k, bit e);
    logic [127:0] s;
    s = x;
    for (int j = 1; j <= 8; j++)
      s = ref_round(s[127:64], s[63:0], ref_sub(k, ref_qidx(e, j)), ref_sub(k, ref_uidx(e, j)),
                    e, j == 8, ref_sub(k, ref_qidx(e, 9)), ref_sub(k, ref_uidx(e, 9)));
    return s;
  endfunction

endpackage
