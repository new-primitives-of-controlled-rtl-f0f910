// mm128_pkg: types and constants shared by the MM-128 cipher datapath.
//
// The controlled element F2/4 picks one of sixteen 2x2 S-boxes ("modifications")
// by its 4-bit control vector V.  Every modification is an involution on the
// 2-bit input (x1,x2), and there are exactly ten such involutions; they are
// labelled a..j here.  A map is stored as four 2-bit fields {y(3),y(2),y(1),y(0)},
// where the index and the value are the 2-bit word {x1,x2} / {y1,y2} (x1 = MSB).
//
// The element used in the cipher is the set of modifications
//   a/b/d/e/g/h/i/j/b/d/e/f/g/h/i/g   for V = 0000, 0001, ..., 1111.
// The sequence of labels follows the published set; which involution carries
// which letter is this design's reading: with the assignment below the two
// output functions have nonlinearity 22 and 22 and their XOR 24, the values
// published for this set, and the element's differential probabilities come
// closest to the published ones (both checked by tb_ce_f24).
package mm128_pkg;

  typedef logic [63:0]  half_t;    // one 64-bit subblock (L or R) or subkey
  typedef logic [127:0] block_t;   // data block (L,R), L in the upper half
  typedef logic [255:0] key_t;     // secret key (K1,K2,K3,K4), K1 in the upper bits

  localparam int unsigned ROUNDS = 8;   // Crypt rounds per block

  typedef enum logic [3:0] {
    MOD_A, MOD_B, MOD_C, MOD_D, MOD_E, MOD_F, MOD_G, MOD_H, MOD_I, MOD_J
  } mod_label_e;

  // 2x2 involutions, {y(3),y(2),y(1),y(0)}
  function automatic logic [7:0] mod_map(mod_label_e m);
    case (m)
      MOD_A:   return 8'b10_11_00_01;  // 0 <-> 1, 2 <-> 3 (complement x2)
      MOD_B:   return 8'b01_10_11_00;  // 1 <-> 3
      MOD_C:   return 8'b11_10_01_00;  // identity
      MOD_D:   return 8'b11_01_10_00;  // 1 <-> 2 (exchange x1 and x2)
      MOD_E:   return 8'b10_11_01_00;  // 2 <-> 3
      MOD_F:   return 8'b00_01_10_11;  // 0 <-> 3, 1 <-> 2 (complement both bits)
      MOD_G:   return 8'b00_10_01_11;  // 0 <-> 3
      MOD_H:   return 8'b11_00_01_10;  // 0 <-> 2
      MOD_I:   return 8'b11_10_00_01;  // 0 <-> 1
      default: return 8'b01_00_11_10;  // MOD_J: 0 <-> 2, 1 <-> 3 (complement x1)
    endcase
  endfunction

  // Modification selected by V = 0..15 in the element used by MM-128
  localparam mod_label_e F24_SET [16] = '{
    MOD_A, MOD_B, MOD_D, MOD_E, MOD_G, MOD_H, MOD_I, MOD_J,
    MOD_B, MOD_D, MOD_E, MOD_F, MOD_G, MOD_H, MOD_I, MOD_G
  };

  // Subkey index 0..3 = K1..K4
  typedef logic [1:0] kidx_t;

endpackage
