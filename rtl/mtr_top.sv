// mtr_top: the two multiplierless rotator datapaths side by side.
//
// * CCSSI twiddle rotator (ccssi_twiddle_rotator): rotates by any of the
//   N_POINTS twiddle angles 2*pi*k/N_POINTS with a fixed-scaling kernel of
//   constant shift-and-add rotators for the angles in [0, pi/4] and sign/swap
//   logic for the other octants. Latency 1 cycle, outputs scaled by the
//   kernel radius (about 7.31 for the default kernel 7, 7+3j, 5+5j).
// * MSR-CORDIC rotator (msr_cordic): N_ROT stages of mixed scaling and
//   rotation with run-time signed-power-of-two terms, so any angle for which
//   a parameter set has been searched can be applied per sample. Latency
//   N_ROT cycles, norm preserved up to the chosen parameters' norm error.
//
// The two share only the clock and the active-low synchronous reset; each
// has its own valid, data and control ports (prefixes tw_ and msr_).
// Which datapath to use is an application choice: the CCSSI rotator for a
// fixed set of twiddle angles, the MSR rotator where the angle set is larger
// or changes. The defaults are the configurations the method is shown with.
module mtr_top
  import mtr_pkg::*;
#(
  parameter int N_POINTS = 16,
  parameter int IN_W     = 16,
  parameter int COEF_W   = 5,
  parameter int NK       = 3,
  parameter int KC [NK]  = '{7, 7, 5},
  parameter int KS [NK]  = '{0, 3, 5},
  parameter int N_ROT    = 2,
  parameter int I_TERMS  = 2,
  parameter int J_TERMS  = 2,
  parameter int HEAD_W   = 2,
  parameter int GUARD_W  = 4,
  localparam int K_W     = $clog2(N_POINTS),
  localparam int TW_W    = IN_W + COEF_W + 1,
  localparam int MSR_W   = IN_W + HEAD_W
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // CCSSI twiddle rotator
  input  logic                                tw_in_valid,
  input  logic [K_W-1:0]                      tw_k,
  input  logic signed [IN_W-1:0]              tw_x,
  input  logic signed [IN_W-1:0]              tw_y,
  output logic                                tw_out_valid,
  output logic signed [TW_W-1:0]              tw_X,
  output logic signed [TW_W-1:0]              tw_Y,
  // MSR-CORDIC rotator
  input  logic                                msr_in_valid,
  input  logic signed [IN_W-1:0]              msr_x,
  input  logic signed [IN_W-1:0]              msr_y,
  input  spt_term_t [N_ROT-1:0][I_TERMS-1:0]  msr_eta,
  input  spt_term_t [N_ROT-1:0][J_TERMS-1:0]  msr_mu,
  output logic                                msr_out_valid,
  output logic signed [MSR_W-1:0]             msr_x_o,
  output logic signed [MSR_W-1:0]             msr_y_o
);

  ccssi_twiddle_rotator #(
    .N_POINTS(N_POINTS), .IN_W(IN_W), .COEF_W(COEF_W), .NK(NK), .KC(KC), .KS(KS)
  ) u_twiddle (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tw_in_valid),
    .k        (tw_k),
    .x        (tw_x),
    .y        (tw_y),
    .out_valid(tw_out_valid),
    .X        (tw_X),
    .Y        (tw_Y)
  );

  msr_cordic #(
    .IN_W(IN_W), .N_ROT(N_ROT), .I_TERMS(I_TERMS), .J_TERMS(J_TERMS),
    .HEAD_W(HEAD_W), .GUARD_W(GUARD_W)
  ) u_msr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (msr_in_valid),
    .x        (msr_x),
    .y        (msr_y),
    .eta      (msr_eta),
    .mu       (msr_mu),
    .out_valid(msr_out_valid),
    .x_o      (msr_x_o),
    .y_o      (msr_y_o)
  );

endmodule
