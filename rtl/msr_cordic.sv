// msr_cordic: pipelined mixed scaling and rotation CORDIC rotator.
//
// N_ROT micro-rotation stages (msr_stage) in a row rotate the input vector
// by Z(N) = sum_n atan(B_n/A_n) and scale it by V = prod_n sqrt(A_n**2 +
// B_n**2), where A_n and B_n are the signed-power-of-two sums chosen for
// stage n. The parameter sets (signs eta/mu and shifts s/t) are found off
// line so that the angle error |Z(N) - theta| and the norm error |1 - V| are
// both small; with the enhanced scheme the amplifying factor of each stage
// is weighted by the signs eta and mu. No final scaling stage is needed
// because V is already close to 1. Every sample carries its own parameter
// set, so a different angle can be used on every clock cycle.
//
// Fixed point: the IN_W-bit inputs are extended by HEAD_W integer bits
// (room for intermediate norms up to about 2 times the input, the source
// bounds them by 1.5) and GUARD_W fractional bits (for the truncated shifts).
// The output drops the guard bits with round-half-up and is IN_W+HEAD_W
// bits wide.
//
// Interface: x, y, eta, mu are sampled with in_valid on the rising edge;
// eta[n]/mu[n] are the terms of stage n (n = 0 is applied first). x_o, y_o
// and out_valid follow N_ROT cycles later, one sample per cycle. rst_n is
// an active-low synchronous reset of the valid pipeline.
// The stage equations follow the source; the default sizes (two rotations
// of two plus two terms, N_SPT = 4) are the configuration it evaluates; the
// word widths, guard bits and rounding are this design's choice.
module msr_cordic
  import mtr_pkg::*;
#(
  parameter int IN_W    = 16,
  parameter int N_ROT   = 2,
  parameter int I_TERMS = 2,
  parameter int J_TERMS = 2,
  parameter int HEAD_W  = 2,
  parameter int GUARD_W = 4,
  localparam int DATA_W = IN_W + HEAD_W + GUARD_W,
  localparam int OUT_W  = IN_W + HEAD_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  logic signed [IN_W-1:0]                x,
  input  logic signed [IN_W-1:0]                y,
  input  spt_term_t [N_ROT-1:0][I_TERMS-1:0]    eta,
  input  spt_term_t [N_ROT-1:0][J_TERMS-1:0]    mu,
  output logic                                  out_valid,
  output logic signed [OUT_W-1:0]               x_o,
  output logic signed [OUT_W-1:0]               y_o
);

  // Data and parameter pipeline; index n is the input of stage n.
  logic                                  v_p   [N_ROT+1];
  logic signed [DATA_W-1:0]              x_p   [N_ROT+1];
  logic signed [DATA_W-1:0]              y_p   [N_ROT+1];
  spt_term_t [N_ROT-1:0][I_TERMS-1:0]    eta_p [N_ROT];
  spt_term_t [N_ROT-1:0][J_TERMS-1:0]    mu_p  [N_ROT];

  assign v_p[0]   = in_valid;
  assign x_p[0]   = DATA_W'(x) <<< GUARD_W;
  assign y_p[0]   = DATA_W'(y) <<< GUARD_W;
  assign eta_p[0] = eta;
  assign mu_p[0]  = mu;

  for (genvar n = 0; n < N_ROT; n++) begin : g_stage
    msr_stage #(.DATA_W(DATA_W), .I_TERMS(I_TERMS), .J_TERMS(J_TERMS)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v_p[n]),
      .x        (x_p[n]),
      .y        (y_p[n]),
      .eta      (eta_p[n][n]),
      .mu       (mu_p[n][n]),
      .out_valid(v_p[n+1]),
      .x_o      (x_p[n+1]),
      .y_o      (y_p[n+1])
    );
    // the terms of the later stages travel along with the sample
    if (n + 1 < N_ROT) begin : g_par
      always_ff @(posedge clk) begin
        if (v_p[n]) begin
          eta_p[n+1] <= eta_p[n];
          mu_p[n+1]  <= mu_p[n];
        end
      end
    end
  end

  // Round half up and drop the guard bits.
  localparam logic signed [DATA_W-1:0] HALF =
    (GUARD_W > 0) ? (DATA_W'(1) <<< (GUARD_W - 1)) : '0;
  logic signed [DATA_W-1:0] x_sum, y_sum;
  assign x_sum = x_p[N_ROT] + HALF;
  assign y_sum = y_p[N_ROT] + HALF;

  assign out_valid = v_p[N_ROT];
  assign x_o       = x_sum[DATA_W-1 -: OUT_W];
  assign y_o       = y_sum[DATA_W-1 -: OUT_W];

endmodule
