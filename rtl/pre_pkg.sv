// pre_pkg: shared types, constants and table-building functions of the
// Polynomial Ring Engine (PRE) conversion datapath.
//
// Every residue in the engine is carried as a 3-bit word, because the
// moduli 3, 5 and 7 all fit in 3 bits. The general computing unit is a
// pipelined 6-input / 3-output look-up block; the functions below compute
// the 64-entry truth tables of those blocks at elaboration time from a
// modulus and a pair of weights, so no table is stored as data.
//
// The moduli {3,5,7}, the roots {-1,0,+1}, the nine channels per modulus
// and the output weights X = 2, Y = j follow the example architecture the
// engine is built around. The pipeline latencies listed here follow from
// registering every 6-input block and every binary adder stage; how many
// cycles each stage takes is this implementation's choice.
package pre_pkg;

  localparam int unsigned RES_W = 3;           // width of one residue
  typedef logic [RES_W-1:0] residue_t;

  // Truth table of a 6-input, 3-output block. Entry i holds the output for
  // the input word i = {a, b}, a in bits 5:3 and b in bits 2:0.
  typedef logic [63:0][RES_W-1:0] lut6_table_t;

  localparam int unsigned NROOT = 3;           // roots -1, 0, +1 per variable
  localparam int unsigned NMOD  = 3;           // number of moduli

  // Width of a reconstructed coefficient (0 .. M1*M2*M3-1).
  localparam int unsigned COEF_W = 7;
  // Width of the signed real / imaginary binary outputs.
  localparam int unsigned OUT_W  = 11;

  // Pipeline latencies in clock cycles.
  localparam int unsigned FWD_LAT = 2;  // forward map: one cycle per variable
  localparam int unsigned MAC_LAT = 2;  // multiply, then accumulate
  localparam int unsigned REV_LAT = 4;  // reverse map: two cycles per variable
  localparam int unsigned CRT_LAT = 3;  // two mixed-radix rows, one binary adder
  localparam int unsigned P2B_LAT = 2;  // subtractor row, shift-adder row

  // Residue of root r (index 0: -1, 1: 0, 2: +1) modulo m.
  function automatic int unsigned root_res(int unsigned idx, int unsigned m);
    case (idx)
      0:       return m - 1;
      1:       return 0;
      default: return 1;
    endcase
  endfunction

  // Multiplicative inverse of a modulo m (m prime to a); 0 if none exists.
  function automatic int unsigned mod_inv(int unsigned a, int unsigned m);
    for (int unsigned k = 1; k < m; k++)
      if (((a % m) * k) % m == 1) return k;
    return 0;
  endfunction

  // Table of the weighted modulo adder z = (wa*a + wb*b) mod m, with a and b
  // read as plain integers 0..7.
  function automatic lut6_table_t wmod_table(int unsigned m, int unsigned wa,
                                             int unsigned wb);
    lut6_table_t t;
    for (int unsigned i = 0; i < 64; i++)
      t[i] = RES_W'((wa * (i >> 3) + wb * (i & 7)) % m);
    return t;
  endfunction

  // Table of the modulo multiplier z = (a*b) mod m.
  function automatic lut6_table_t mult_table(int unsigned m);
    lut6_table_t t;
    for (int unsigned i = 0; i < 64; i++)
      t[i] = RES_W'(((i >> 3) * (i & 7)) % m);
    return t;
  endfunction

endpackage
