// msr_stage: one mixed scaling and rotation (MSR) CORDIC micro-rotation.
//
// The stage multiplies the vector (x, y) by
//   [ A  -B ]      A = sum_i eta_i * 2**(-s_i),  i = 1..I_TERMS
//   [ B   A ]      B = sum_j mu_j  * 2**(-t_j),  j = 1..J_TERMS
// so it rotates by atan(B/A) and scales by sqrt(A**2 + B**2) in one step.
// Each product is a sum of arithmetically shifted copies of x or y (signs
// eta, mu in {-1, 0, +1}; a zero sign removes the term), so the stage needs
// only shifters and adders. The weighted amplifying factor of the enhanced
// scheme changes how the parameters are searched, not this datapath.
//
// Interface: x, y and the terms eta, mu (mtr_pkg::spt_term_t) are sampled with
// in_valid on the rising clock edge; x_o, y_o, out_valid appear one cycle
// later. The data are signed DATA_W-bit fixed-point words; the caller
// provides enough integer headroom for the intermediate norm (at most about
// 1.5 in the source's search constraints) and fractional guard bits for the
// truncated shifts. rst_n is an active-low synchronous reset of out_valid.
// The matrix form follows the source (its sign convention for B follows the
// [C -S; S C] rotator form); the shifter style, the truncation and the
// register at the output are this design's choice. An assertion flags the
// unused sign encoding 2'b10 on a valid sample.
module msr_stage
  import mtr_pkg::*;
#(
  parameter int DATA_W  = 22,
  parameter int I_TERMS = 2,
  parameter int J_TERMS = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  x,
  input  logic signed [DATA_W-1:0]  y,
  input  spt_term_t [I_TERMS-1:0]   eta,
  input  spt_term_t [J_TERMS-1:0]   mu,
  output logic                      out_valid,
  output logic signed [DATA_W-1:0]  x_o,
  output logic signed [DATA_W-1:0]  y_o
);

  logic signed [DATA_W-1:0] ax, ay, bx, by;
  logic signed [DATA_W-1:0] xn, yn;

  // A*x, A*y, B*x, B*y as sums of signed, shifted terms
  always_comb begin
    ax = '0;
    ay = '0;
    bx = '0;
    by = '0;
    for (int i = 0; i < I_TERMS; i++) begin
      unique case (eta[i].sign)
        SPT_ADD: begin
          ax = ax + (x >>> eta[i].shift);
          ay = ay + (y >>> eta[i].shift);
        end
        SPT_SUB: begin
          ax = ax - (x >>> eta[i].shift);
          ay = ay - (y >>> eta[i].shift);
        end
        default: ;
      endcase
    end
    for (int j = 0; j < J_TERMS; j++) begin
      unique case (mu[j].sign)
        SPT_ADD: begin
          bx = bx + (x >>> mu[j].shift);
          by = by + (y >>> mu[j].shift);
        end
        SPT_SUB: begin
          bx = bx - (x >>> mu[j].shift);
          by = by - (y >>> mu[j].shift);
        end
        default: ;
      endcase
    end
    xn = ax - by;
    yn = bx + ay;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x_o <= xn;
      y_o <= yn;
    end
  end

  // 2'b10 is not a legal sign encoding: a valid sample must not carry it
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      for (int i = 0; i < I_TERMS; i++)
        assert (eta[i].sign inside {SPT_OFF, SPT_ADD, SPT_SUB})
          else $error("msr_stage: illegal sign encoding in eta[%0d]", i);
      for (int j = 0; j < J_TERMS; j++)
        assert (mu[j].sign inside {SPT_OFF, SPT_ADD, SPT_SUB})
          else $error("msr_stage: illegal sign encoding in mu[%0d]", j);
    end
  end

endmodule
