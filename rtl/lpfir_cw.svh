// lpfir_cw.svh: layout of one coefficient word.
//
// A coefficient word carries the coefficient value h, the Pre-Calculated
// Value Memory Address PCVMA of the value to be added to its product, and
// the shift flag SF. For the folded structure a word may also describe a
// second update that reuses the same product (pair = 1): its own PCVMA2 and
// SF2, and neg2, which subtracts the product instead of adding it
// (anti-symmetric filters).
//
// Packed, most significant field first:
//   { h[COEF_W], pcvma[AW], sf, pair, neg2, pcvma2[AW], sf2 }
// so the word is COEF_W + 2*AW + 4 bits wide.
`ifndef LPFIR_CW_SVH
`define LPFIR_CW_SVH

`define LPFIR_CW_T(COEF_W, AW) \
  typedef struct packed { \
    logic signed [(COEF_W)-1:0] h; \
    logic [(AW)-1:0]            pcvma; \
    logic                       sf; \
    logic                       pair; \
    logic                       neg2; \
    logic [(AW)-1:0]            pcvma2; \
    logic                       sf2; \
  } cw_t;

`define LPFIR_CW_W(COEF_W, AW) ((COEF_W) + 2*(AW) + 4)

`endif
