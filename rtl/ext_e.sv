// ext_e: extension box E, 32 -> 192 bits.
//
// E(X) = (X, X<<<2, X<<<4, X<<<6, X<<<8, X<<<10), where X<<<b rotates the
// 32-bit vector X = (x1..x32) left by b bits; x1 is the most significant bit
// and the first component X occupies y[191:160].  Pure wiring.
module ext_e (
  input  logic [31:0]  x,
  output logic [191:0] y
);

  for (genvar i = 0; i < 6; i++) begin : g_rot
    localparam int B = 2 * i;
    if (B == 0) begin : g_id
      assign y[191 -: 32] = x;
    end else begin : g_rl
      assign y[191 - 32*i -: 32] = {x[31-B:0], x[31 -: B]};
    end
  end

endmodule
