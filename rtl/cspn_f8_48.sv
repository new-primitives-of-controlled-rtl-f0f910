// cspn_f8_48: controlled substitution-permutation network F8/48.
//
// Three active layers of four F2/4 elements each act on an 8-bit word; each
// element takes 4 control bits, so the network takes 48 control bits.  The fixed
// wiring between layers is an 8-point butterfly: layer 1 pairs bits at
// distance 1 (7,6)(5,4)..., layer 2 at distance 2 (7,5)(6,4)..., layer 3 at
// distance 4 (7,3)(6,2)...  so every output bit depends on every input bit.
// The three-layer, four-element shape follows from the 8-bit/48-bit size; the
// butterfly wiring is this design's choice.
//
// Control: v = {V1,V2,V3}, V1 = v[47:32] drives layer 1, V2 layer 2, V3 layer 3.
// Within a layer, element k (k = 0..3) takes the nibble v[47-16*l-4*k -: 4].
// Element k of the layer with distance d works on bits hi = 7-(k/d)*2d-(k%d)
// (as x1) and hi-d (as x2).  Purely combinational.
module cspn_f8_48 (
  input  logic [7:0]  x,
  input  logic [47:0] v,
  output logic [7:0]  y
);

  for (genvar l = 0; l < 3; l++) begin : g_layer
    localparam int D = 1 << l;
    logic [7:0] din, dout;
    if (l == 0) begin : g_first
      assign din = x;
    end else begin : g_next
      assign din = g_layer[l-1].dout;
    end
    for (genvar k = 0; k < 4; k++) begin : g_ce
      localparam int HI = 7 - (k / D) * 2 * D - (k % D);
      localparam int LO = HI - D;
      ce_f24 u_ce (
        .x ({din[HI], din[LO]}),
        .v (v[47 - 16*l - 4*k -: 4]),
        .y ({dout[HI], dout[LO]})
      );
    end
  end

  assign y = g_layer[2].dout;

endmodule
