// cspn_f8_48_inv: the inverse network F8/48^-1.
//
// Because every F2/4 modification is an involution, the inverse of F8/48 under
// the same 48-bit control vector is the same three layers traversed in the
// opposite order: first the distance-4 layer with V3, then distance 2 with V2,
// then distance 1 with V1.  So F8/48^-1(F8/48(x, v), v) = x.  The element and
// bit assignment inside each layer is the one of cspn_f8_48.  Combinational.
module cspn_f8_48_inv (
  input  logic [7:0]  x,
  input  logic [47:0] v,
  output logic [7:0]  y
);

  // stage t applies forward layer l = 2-t
  for (genvar t = 0; t < 3; t++) begin : g_layer
    localparam int L = 2 - t;
    localparam int D = 1 << L;
    logic [7:0] din, dout;
    if (t == 0) begin : g_first
      assign din = x;
    end else begin : g_next
      assign din = g_layer[t-1].dout;
    end
    for (genvar k = 0; k < 4; k++) begin : g_ce
      localparam int HI = 7 - (k / D) * 2 * D - (k % D);
      localparam int LO = HI - D;
      ce_f24 u_ce (
        .x ({din[HI], din[LO]}),
        .v (v[47 - 16*L - 4*k -: 4]),
        .y ({dout[HI], dout[LO]})
      );
    end
  end

  assign y = g_layer[2].dout;

endmodule
