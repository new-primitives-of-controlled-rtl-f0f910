// ce_f24: controlled element F2/4.
//
// A 2-bit data input (x1,x2) is transformed by one of sixteen 2x2 involutive
// S-boxes, chosen by the 4-bit control vector (v1,v2,v3,v4).  Equivalently the
// element is a pair of Boolean functions of six variables,
// y1 = f1(x1,x2,v1..v4) and y2 = f2(x1,x2,v1..v4).  The set of sixteen
// modifications is mm128_pkg::F24_SET.  Purely combinational (a 6-input,
// 2-output lookup, one FPGA LUT6 pair).
//
// Ports: x = {x1,x2}, v = {v1,v2,v3,v4}, y = {y1,y2}; v1 is the most
// significant control bit, so V=(0,0,0,1) selects modification F(1).
module ce_f24
  import mm128_pkg::*;
(
  input  logic [1:0] x,
  input  logic [3:0] v,
  output logic [1:0] y
);

  logic [7:0] map;

  always_comb begin
    map = mod_map(F24_SET[v]);
    y   = map[2*x +: 2];
  end

endmodule
