// ccssi_twiddle_rotator: tunable multiplierless rotator for the twiddle
// angles of an N_POINTS-point transform.
//
// The rotator turns the input vector by theta_k = 2*pi*k/N_POINTS
// (counter-clockwise, the [C -S; S C] convention) and scales it by the
// kernel radius R. Only the angles in [0, pi/4] have coefficients: the
// kernel holds NK = N_POINTS/8 + 1 of them, one per angle m*2*pi/N_POINTS,
// m = 0..NK-1. Every other angle comes from these by exchanging components
// and changing signs:
//   * k = q*(N/4) + r, quadrant q = 0..3, offset r = 0..N/4-1;
//   * r <= N/8 uses coefficient m = r directly;
//   * r >  N/8 mirrors about 45 degrees: with m = N/4 - r and beta its angle,
//     e^{j(90-beta)} = j*conj(e^{j beta}), so the input is conjugated, turned
//     by coefficient m, conjugated again and turned by a further 90 degrees;
//   * each quadrant adds a 90 degree turn, (a + jb)*j = -b + ja.
// The turns by 90 and 180 degrees and the conjugations are sign changes and
// swaps, so the only arithmetic is the kernel's shift-and-add network.
// With the default kernel (7, 7+3j, 5+5j) the 16 twiddle angles of a
// 16-point transform are all reached with at most 6 adders per rotation.
// For an FFT twiddle W_N^k = e^{-j 2 pi k/N}, drive index (N - k) mod N.
//
// Interface: in_valid/x/y/k are sampled on the rising clock edge;
// out_valid/X/Y follow one cycle later (latency 1, one sample per cycle).
// X, Y are signed IN_W+COEF_W+1 bits and equal R*e^{j theta_k}*(x + jy)
// up to the kernel's rotation error; nothing is rounded. rst_n is an
// active-low synchronous reset that clears out_valid and the outputs.
// The symmetry mapping and the kernel follow the source; the register, the
// reset and the widths are this design's choice.
module ccssi_twiddle_rotator #(
  parameter int N_POINTS = 16,
  parameter int IN_W     = 16,
  parameter int COEF_W   = 5,
  parameter int NK       = 3,
  parameter int KC [NK]  = '{7, 7, 5},
  parameter int KS [NK]  = '{0, 3, 5},
  localparam int K_W     = $clog2(N_POINTS),
  localparam int SEL_W   = (NK > 1) ? $clog2(NK) : 1,
  localparam int OUT_W   = IN_W + COEF_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [K_W-1:0]          k,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  y,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] X,
  output logic signed [OUT_W-1:0] Y
);

  localparam int QUARTER = N_POINTS / 4;
  localparam int EIGHTH  = N_POINTS / 8;

  initial begin
    assert (N_POINTS >= 8 && (N_POINTS & (N_POINTS - 1)) == 0)
      else $error("ccssi_twiddle_rotator: N_POINTS must be a power of two >= 8");
    assert (NK == EIGHTH + 1)
      else $error("ccssi_twiddle_rotator: NK must be N_POINTS/8 + 1");
  end

  logic [1:0]             quad;      // quadrant of theta_k
  logic [K_W-1:0]         off;       // offset inside the quadrant
  logic                   mirror;    // angle lies in (45, 90) degrees of its quadrant
  logic [SEL_W-1:0]       sel;       // kernel coefficient used
  logic signed [IN_W-1:0] yin;       // conjugated input when mirrored
  logic signed [OUT_W-1:0] rx, ry;   // kernel rotator output
  logic signed [OUT_W-1:0] cx, cy;   // after the output conjugation
  logic [1:0]             turns;     // number of extra 90 degree turns
  logic signed [OUT_W-1:0] tx, ty;   // final result

  always_comb begin
    quad   = 2'(int'(k) / QUARTER);
    off    = K_W'(int'(k) % QUARTER);
    mirror = (int'(off) > EIGHTH);
    sel    = mirror ? SEL_W'(QUARTER - int'(off)) : SEL_W'(off);
  end

  // y = -y conjugates the input; -(-2**(IN_W-1)) wraps, so that one input
  // value is kept as is (the caller keeps inputs inside the symmetric range).
  assign yin = mirror ? -y : y;

  ccssi_kernel_rotator #(
    .IN_W(IN_W), .COEF_W(COEF_W), .NK(NK), .KC(KC), .KS(KS)
  ) u_kernel (
    .sel(sel), .x(x), .y(yin), .X(rx), .Y(ry)
  );

  always_comb begin
    cx    = rx;
    cy    = mirror ? -ry : ry;
    turns = quad + {1'b0, mirror};
    unique case (turns)
      2'd0: begin tx =  cx; ty =  cy; end
      2'd1: begin tx = -cy; ty =  cx; end
      2'd2: begin tx = -cx; ty = -cy; end
      2'd3: begin tx =  cy; ty = -cx; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      X         <= '0;
      Y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        X <= tx;
        Y <= ty;
      end
    end
  end

endmodule
