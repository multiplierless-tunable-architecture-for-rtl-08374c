// csd_const_mult: multiplication of a signed word by a constant with shifts
// and adders only.
//
// The constant COEF is recoded into canonic signed digits when the module is
// elaborated (mtr_pkg::csd_digit). Every non-zero digit d at weight 2**i adds
// d * (x << i) to the product; zero digits cost nothing, so the network has
// (non-zero digits - 1) adders/subtractors, e.g. 7x = (x << 3) - x takes one.
// Negative constants use the same recoding with flipped digit signs, as the
// CSD method prescribes. The shifts are wiring.
//
// Interface: x is a signed IN_W-bit word, p the signed (IN_W+COEF_W)-bit
// product; COEF must fit in a signed COEF_W-bit word. Purely combinational.
// The CSD recoding follows the method described for multiplierless constant
// multiplication; the widths are this design's choice.
module csd_const_mult #(
  parameter int IN_W   = 16,
  parameter int COEF_W = 5,
  parameter int COEF   = 7,
  localparam int OUT_W = IN_W + COEF_W,
  localparam int NDIG  = COEF_W + 1
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] p
);

  logic signed [OUT_W-1:0] xe;
  logic signed [OUT_W-1:0] term [NDIG];

  assign xe = OUT_W'(x);

  for (genvar i = 0; i < NDIG; i++) begin : g_digit
    localparam int D = mtr_pkg::csd_digit(COEF, i);
    if (D == 1) begin : g_pos
      assign term[i] = xe <<< i;
    end else if (D == -1) begin : g_neg
      assign term[i] = -(xe <<< i);
    end else begin : g_zero
      assign term[i] = '0;
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < NDIG; i++) p = p + term[i];
  end

  initial begin
    assert (COEF >= -(2 ** (COEF_W - 1)) && COEF < 2 ** (COEF_W - 1))
      else $error("csd_const_mult: COEF %0d does not fit in %0d bits", COEF, COEF_W);
  end

endmodule
