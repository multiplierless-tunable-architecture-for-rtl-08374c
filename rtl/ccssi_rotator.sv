// ccssi_rotator: multiplierless constant rotator for one coefficient
// P = C + jS (CCSSI single constant rotation).
//
// The rotator computes (x + jy) * (C + jS), i.e.
//   X = C*x - S*y
//   Y = S*x + C*y
// which rotates the input vector by the angle of P and scales it by |P|.
// Each of the four constant products is a CSD shift-and-add network
// (csd_const_mult); two further adders combine them, which matches the
// adder count AR(P) = 2*AM(C,S) + 2 used to rank coefficients. When S = 0
// (or C = 0) the coefficient is real (imaginary) and the combining adders
// disappear: AR(P) = 2*AM(C) (2*AM(S)). When |C| = |S| the products C*x
// and S*x are the same network, so AM(C,S) = AM(C). For the 22.5 degree
// example the coefficient is 7 + 3j.
//
// Interface: x, y are signed IN_W-bit inputs; X, Y are signed
// (IN_W+COEF_W+1)-bit outputs, wide enough for any C, S that fit in signed
// COEF_W bits, so nothing is rounded or saturated. Purely combinational.
// The product structure and adder count follow the CCSSI description; the
// word widths and the full-precision output are this design's choice.
module ccssi_rotator #(
  parameter int IN_W   = 16,
  parameter int COEF_W = 5,
  parameter int C      = 7,
  parameter int S      = 3,
  localparam int P_W   = IN_W + COEF_W,
  localparam int OUT_W = IN_W + COEF_W + 1
) (
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  y,
  output logic signed [OUT_W-1:0] X,
  output logic signed [OUT_W-1:0] Y
);

  if (S == 0) begin : g_real
    // P = C: X = C*x, Y = C*y
    logic signed [P_W-1:0] cx, cy;
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(C)) u_cx (.x(x), .p(cx));
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(C)) u_cy (.x(y), .p(cy));
    assign X = OUT_W'(cx);
    assign Y = OUT_W'(cy);
  end else if (C == 0) begin : g_imag
    // P = jS: X = -S*y, Y = S*x
    logic signed [P_W-1:0] sx, sy;
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(S)) u_sx (.x(x), .p(sx));
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(S)) u_sy (.x(y), .p(sy));
    assign X = -OUT_W'(sy);
    assign Y = OUT_W'(sx);
  end else if (S == C || S == -C) begin : g_diag
    // |C| = |S| (45 degree type): C*x and S*x are one product, so
    // AM(C,S) = AM(C) and the rotator needs 2*AM(C) + 2 adders
    logic signed [P_W-1:0] cx, cy;
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(C)) u_cx (.x(x), .p(cx));
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(C)) u_cy (.x(y), .p(cy));
    if (S == C) begin : g_same
      assign X = OUT_W'(cx) - OUT_W'(cy);
      assign Y = OUT_W'(cx) + OUT_W'(cy);
    end else begin : g_opposite
      assign X = OUT_W'(cx) + OUT_W'(cy);
      assign Y = OUT_W'(cy) - OUT_W'(cx);
    end
  end else begin : g_complex
    logic signed [P_W-1:0] cx, sx, cy, sy;
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(C)) u_cx (.x(x), .p(cx));
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(S)) u_sx (.x(x), .p(sx));
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(C)) u_cy (.x(y), .p(cy));
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(S)) u_sy (.x(y), .p(sy));
    assign X = OUT_W'(cx) - OUT_W'(sy);
    assign Y = OUT_W'(sx) + OUT_W'(cy);
  end

endmodule
