// cspn_f32_192: the 32-bit operation F32/192 (INVERSE = 0) or F32/192^-1 (INVERSE = 1).
//
// 4 networks F8/48 (or F8/48^-1) side by side, one per byte of the 32-bit
// word, each driven by its own 48 bits of the 192-bit control vector.
// Box k works on byte x[32-1-8*k -: 8] (k = 0 is the most significant byte)
// with control v[192-1-48*k -: 48].  With the same v, the INVERSE = 1
// instance undoes the INVERSE = 0 instance.  The byte-to-control assignment is
// this design's choice.  Combinational.
module cspn_f32_192 #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [32-1:0]  x,
  input  logic [192-1:0] v,
  output logic [32-1:0]  y
);

  for (genvar k = 0; k < 4; k++) begin : g_box
    if (INVERSE) begin : g_inv
      cspn_f8_48_inv u_box (
        .x (x[32-1-8*k -: 8]),
        .v (v[192-1-48*k -: 48]),
        .y (y[32-1-8*k -: 8])
      );
    end else begin : g_fwd
      cspn_f8_48 u_box (
        .x (x[32-1-8*k -: 8]),
        .v (v[192-1-48*k -: 48]),
        .y (y[32-1-8*k -: 8])
      );
    end
  end

endmodule
