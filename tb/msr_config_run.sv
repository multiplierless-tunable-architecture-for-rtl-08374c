// msr_config_run: test driver for one msr_cordic configuration, used by
// tb_msr_configs. It streams NSAMP random samples with random SPT parameter
// sets (every stage: A = 1 +- 2^-s, s >= 3, or a plain 1; B = one term
// +-2^-t, t >= 1, plus further terms +-2^-t, t >= 3, or off) so that the
// norm per stage stays below 1.3. Each output must be within 2 LSB of the
// floating-point product prod_n (A_n + jB_n) * (x + jy), and must appear
// exactly N_ROT cycles after its input. done rises when all outputs have
// been checked; checks/failures count the results.
module msr_config_run
  import mtr_pkg::*;
#(
  parameter int N_ROT   = 3,
  parameter int I_TERMS = 2,
  parameter int J_TERMS = 1,
  parameter int NSAMP   = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int IN_W  = 16;
  localparam int OUT_W = IN_W + 2;

  logic in_valid, out_valid;
  logic signed [IN_W-1:0]  x, y;
  logic signed [OUT_W-1:0] x_o, y_o;
  spt_term_t [N_ROT-1:0][I_TERMS-1:0] eta;
  spt_term_t [N_ROT-1:0][J_TERMS-1:0] mu;

  msr_cordic #(.N_ROT(N_ROT), .I_TERMS(I_TERMS), .J_TERMS(J_TERMS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .eta(eta), .mu(mu), .out_valid(out_valid), .x_o(x_o), .y_o(y_o));

  function automatic real term_val(input spt_term_t t);
    real v;
    v = 1.0 / real'(longint'(1) << t.shift);
    case (t.sign)
      SPT_ADD: return v;
      SPT_SUB: return -v;
      default: return 0.0;
    endcase
  endfunction

  function automatic spt_term_t rnd(input int min_shift, input bit may_be_off);
    spt_term_t t;
    t.sign  = $urandom_range(0, 1) ? SPT_ADD : SPT_SUB;
    t.shift = 4'($urandom_range(min_shift, 15));
    if (may_be_off && $urandom_range(0, 3) == 0) t.sign = SPT_OFF;
    return t;
  endfunction

  real qx[$], qy[$];
  int  qcyc[$];
  int  cycle;

  always @(posedge clk) begin
    if (rst_n && in_valid) qcyc.push_back(cycle);
    if (rst_n && out_valid) begin
      real ex, ey, dx, dy;
      int  c0;
      ex = qx.pop_front();
      ey = qy.pop_front();
      c0 = qcyc.pop_front();
      dx = real'(x_o) - ex;
      dy = real'(y_o) - ey;
      checks++;
      if (dx > 2.0 || dx < -2.0 || dy > 2.0 || dy < -2.0) begin
        failures++;
        $display("FAIL N_ROT=%0d I=%0d J=%0d got (%0d,%0d) expected (%f,%f)",
                 N_ROT, I_TERMS, J_TERMS, x_o, y_o, ex, ey);
      end
      checks++;
      if (cycle - c0 != N_ROT) begin
        failures++;
        $display("FAIL N_ROT=%0d latency %0d", N_ROT, cycle - c0);
      end
    end
    cycle++;
  end

  initial begin
    checks = 0;
    failures = 0;
    cycle = 0;
    done = 0;
    in_valid = 0;
    x = 0; y = 0; eta = '0; mu = '0;
    @(posedge rst_n);
    repeat (NSAMP) begin
      int  xi, yi;
      real re, im, a, b, t;
      spt_term_t [N_ROT-1:0][I_TERMS-1:0] e;
      spt_term_t [N_ROT-1:0][J_TERMS-1:0] m;
      for (int n = 0; n < N_ROT; n++) begin
        e[n][0].sign  = SPT_ADD;
        e[n][0].shift = '0;
        for (int i = 1; i < I_TERMS; i++) e[n][i] = rnd(3, 1);
        m[n][0] = rnd(1, 0);
        for (int j = 1; j < J_TERMS; j++) m[n][j] = rnd(3, 1);
      end
      xi = $urandom_range(0, 65534) - 32767;
      yi = $urandom_range(0, 65534) - 32767;
      re = xi;
      im = yi;
      for (int n = 0; n < N_ROT; n++) begin
        a = 0.0;
        b = 0.0;
        for (int i = 0; i < I_TERMS; i++) a += term_val(e[n][i]);
        for (int j = 0; j < J_TERMS; j++) b += term_val(m[n][j]);
        t  = re * a - im * b;
        im = re * b + im * a;
        re = t;
      end
      qx.push_back(re);
      qy.push_back(im);
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      if (!in_valid) begin
        @(negedge clk);
        in_valid = 1;
      end
      x = IN_W'(xi);
      y = IN_W'(yi);
      eta = e;
      mu = m;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (N_ROT + 2) @(posedge clk);
    checks++;
    if (qx.size() != 0) begin
      failures++;
      $display("FAIL N_ROT=%0d %0d outputs missing", N_ROT, qx.size());
    end
    done = 1;
  end
endmodule
