// mtr_pkg: types and elaboration-time helpers shared by the multiplierless
// rotators.
//
// The CCSSI rotators multiply by constants with canonic-signed-digit (CSD)
// shift-and-add networks. csd_digit() recodes an integer constant into CSD
// form (digits in {-1,0,+1}, no two adjacent non-zero digits) and
// csd_adders() gives the adder/subtractor count of a single constant
// multiplication, i.e. the number of non-zero digits minus one. Both are only
// called with constant arguments, so they cost no hardware.
//
// The MSR-CORDIC micro-rotation stages are steered by signed-power-of-two
// (SPT) terms: a sign eta/mu in {-1,0,+1} and a right shift s/t in 0..S.
// spt_term_t packs one such term. The 4-bit shift field (S = 15) is this
// design's choice; the source of the method leaves S open.
package mtr_pkg;

  // Width of the shift field of one SPT term; the largest shift is 2**SHIFT_W-1.
  localparam int SHIFT_W = 4;

  // Sign of one SPT term: off (0), add (+1) or subtract (-1).
  typedef enum logic [1:0] {
    SPT_OFF = 2'b00,
    SPT_ADD = 2'b01,
    SPT_SUB = 2'b11
  } spt_sign_e;

  // One signed-power-of-two term: sign * 2**(-shift).
  typedef struct packed {
    spt_sign_e          sign;
    logic [SHIFT_W-1:0] shift;
  } spt_term_t;

  // CSD digit number pos (weight 2**pos) of value.
  function automatic int csd_digit(input int value, input int pos);
    int     v;
    int     d;
    v = value;
    d = 0;
    for (int i = 0; i <= pos; i++) begin
      if ((v & 1) != 0) d = ((v & 3) == 1) ? 1 : -1;
      else              d = 0;
      v = (v - d) >>> 1;
    end
    return d;
  endfunction

  // Number of non-zero CSD digits of value among the lowest ndig digits.
  function automatic int csd_nonzero(input int value, input int ndig);
    int n;
    n = 0;
    for (int i = 0; i < ndig; i++) if (csd_digit(value, i) != 0) n++;
    return n;
  endfunction

  // Adders/subtractors needed to multiply by value with a CSD network.
  function automatic int csd_adders(input int value, input int ndig);
    int n;
    n = csd_nonzero(value, ndig);
    return (n > 0) ? n - 1 : 0;
  endfunction

endpackage
