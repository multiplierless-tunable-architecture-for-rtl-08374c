// ccssi_kernel_rotator: combined multiple-constant rotator for one CCSSI
// kernel.
//
// A kernel is the set of coefficients P_m = KC[m] + j*KS[m], one per angle of
// a multiple constant rotation problem, chosen so that all share nearly the
// same radius (fixed scaling). The rotator holds one shift-and-add constant
// rotator per coefficient and a multiplexer, steered by sel, that passes the
// product of the selected coefficient. The default kernel is the one with
// angles 0, 22.5 and 45 degrees: 7, 7+3j and 5+5j (radius about 7.31, six
// adders at most per rotation).
//
// Interface: sel picks the coefficient (0..NK-1; larger values give zero),
// x, y are signed IN_W-bit inputs, X, Y the signed (IN_W+COEF_W+1)-bit
// rotated and scaled outputs. Purely combinational.
// Selecting the coefficient with multiplexers follows the source; placing
// one full rotator per coefficient in front of a single output multiplexer
// is this design's choice (the adder graphs are not shared).
module ccssi_kernel_rotator #(
  parameter int IN_W   = 16,
  parameter int COEF_W = 5,
  parameter int NK     = 3,
  parameter int KC [NK] = '{7, 7, 5},
  parameter int KS [NK] = '{0, 3, 5},
  localparam int SEL_W = (NK > 1) ? $clog2(NK) : 1,
  localparam int OUT_W = IN_W + COEF_W + 1
) (
  input  logic [SEL_W-1:0]        sel,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  y,
  output logic signed [OUT_W-1:0] X,
  output logic signed [OUT_W-1:0] Y
);

  logic signed [OUT_W-1:0] rx [NK];
  logic signed [OUT_W-1:0] ry [NK];

  for (genvar m = 0; m < NK; m++) begin : g_coef
    ccssi_rotator #(.IN_W(IN_W), .COEF_W(COEF_W), .C(KC[m]), .S(KS[m])) u_rot (
      .x(x), .y(y), .X(rx[m]), .Y(ry[m])
    );
  end

  always_comb begin
    X = '0;
    Y = '0;
    for (int m = 0; m < NK; m++) begin
      if (int'(sel) == m) begin
        X = rx[m];
        Y = ry[m];
      end
    end
  end

endmodule
