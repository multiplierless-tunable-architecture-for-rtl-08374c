// tb_msr_cordic: self-checking test of the pipelined MSR-CORDIC rotator
// (defaults: two stages of two plus two SPT terms, 16-bit data).
//
// Reference: plain real arithmetic. For every sample the testbench forms
// A_n = sum eta 2^-s and B_n = sum mu 2^-t, multiplies (x + jy) by
// (A_1 + jB_1)(A_2 + jB_2) in floating point and requires the rotator's
// output to be within 2 LSB (the truncated shifts and the final rounding).
// Two searched parameter sets are checked against the ideal rotation too:
// 45 deg (A,B = 1-2^-3, 2^-2+2^-5 then 1-2^-5, 2^-1-2^-8; angle error
// 0.064 deg, V = 1.0003) and 22.5 deg (A,B = 2^-3, 1-2^-6 then 2^-1,
// 2^-3-1; angle error 0.008 deg, V = 1.000002). Samples stream back to back
// with random gaps; out_valid must follow in_valid by exactly N_ROT = 2
// cycles.
module tb_msr_cordic;
  import mtr_pkg::*;
  localparam int IN_W  = 16;
  localparam int OUT_W = 18;
  localparam real PI   = 3.14159265358979;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, out_valid;
  logic signed [IN_W-1:0]  x, y;
  logic signed [OUT_W-1:0] x_o, y_o;
  spt_term_t [1:0][1:0] eta, mu;

  msr_cordic dut (
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

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // expected outputs (real); the cycle of each accepted input
  real qx[$], qy[$], qtol[$];
  int  qcyc[$];
  int  cycle = 0;

  // input capture, output check and cycle count in one process, so all
  // signals are read with their values before the clock edge
  always @(posedge clk) begin
    if (rst_n && in_valid) qcyc.push_back(cycle);
    if (rst_n && out_valid) begin
      real ex, ey, tol;
      int  c0;
      if (qx.size() == 0 || qcyc.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid");
      end else begin
        ex = qx.pop_front(); ey = qy.pop_front(); tol = qtol.pop_front();
        c0 = qcyc.pop_front();
        checks++;
        if (absr(real'(x_o) - ex) > tol || absr(real'(y_o) - ey) > tol) begin
          failures++;
          $display("FAIL got (%0d,%0d) expected (%f,%f) tol %f", x_o, y_o, ex, ey, tol);
        end
        checks++;
        if (cycle - c0 != 2) begin
          failures++;
          $display("FAIL latency %0d cycles", cycle - c0);
        end
      end
    end
    cycle++;
  end

  // drive one sample; ideal_deg < 0 means compare with the exact SPT product
  task automatic drive(input int xi, input int yi, input spt_term_t [1:0][1:0] e,
                       input spt_term_t [1:0][1:0] m, input real ideal_deg, input real ideal_tol);
    real re, im, a, b, t;
    re = xi;
    im = yi;
    if (ideal_deg < 0.0) begin
      for (int n = 0; n < 2; n++) begin
        a = term_val(e[n][0]) + term_val(e[n][1]);
        b = term_val(m[n][0]) + term_val(m[n][1]);
        t  = re * a - im * b;
        im = re * b + im * a;
        re = t;
      end
      qtol.push_back(2.0);
    end else begin
      t  = re * $cos(ideal_deg * PI / 180.0) - im * $sin(ideal_deg * PI / 180.0);
      im = re * $sin(ideal_deg * PI / 180.0) + im * $cos(ideal_deg * PI / 180.0);
      re = t;
      qtol.push_back(ideal_tol * $sqrt(real'(xi) * xi + real'(yi) * yi) + 2.0);
    end
    qx.push_back(re);
    qy.push_back(im);
    // inputs change on the falling edge, away from the sampling edge
    @(negedge clk);
    in_valid = 1;
    x = IN_W'(xi);
    y = IN_W'(yi);
    eta = e;
    mu = m;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic spt_term_t tt(input spt_sign_e s, input int sh);
    spt_term_t t;
    t.sign = s;
    t.shift = 4'(sh);
    return t;
  endfunction

  initial begin
    spt_term_t [1:0][1:0] e45, m45, e22, m22, er, mr;
    rst_n = 0;
    in_valid = 0;
    x = 0; y = 0; eta = '0; mu = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    e45[0] = {tt(SPT_SUB, 3), tt(SPT_ADD, 0)}; m45[0] = {tt(SPT_ADD, 5), tt(SPT_ADD, 2)};
    e45[1] = {tt(SPT_SUB, 5), tt(SPT_ADD, 0)}; m45[1] = {tt(SPT_SUB, 8), tt(SPT_ADD, 1)};
    e22[0] = {tt(SPT_ADD, 3), tt(SPT_OFF, 0)}; m22[0] = {tt(SPT_SUB, 6), tt(SPT_ADD, 0)};
    e22[1] = {tt(SPT_ADD, 1), tt(SPT_OFF, 0)}; m22[1] = {tt(SPT_SUB, 0), tt(SPT_ADD, 3)};
    repeat (300) begin
      int xi, yi;
      xi = $urandom_range(0, 65534) - 32767;
      yi = $urandom_range(0, 65534) - 32767;
      // 45 deg set: angle error 1.1e-3 rad, norm error 3.3e-4
      drive(xi, yi, e45, m45, 45.0, 1.5e-3);
      // 22.5 deg set: angle error 1.4e-4 rad, norm error 2e-6
      drive(yi, xi, e22, m22, 22.5, 2.0e-4);
    end
    // random parameter sets with |A| <= 1.25, |B| <= 1 (norm below 1.6 per stage)
    repeat (2000) begin
      int xi, yi;
      for (int n = 0; n < 2; n++) begin
        er[n][0] = tt(SPT_ADD, 0);
        er[n][1] = tt(spt_sign_e'($urandom_range(0, 1) ? SPT_ADD : SPT_SUB), $urandom_range(2, 15));
        if ($urandom_range(0, 3) == 0) er[n][1].sign = SPT_OFF;
        mr[n][0] = tt(spt_sign_e'($urandom_range(0, 1) ? SPT_ADD : SPT_SUB), $urandom_range(1, 15));
        mr[n][1] = tt(spt_sign_e'($urandom_range(0, 1) ? SPT_ADD : SPT_SUB), $urandom_range(1, 15));
        if ($urandom_range(0, 3) == 0) mr[n][1].sign = SPT_OFF;
      end
      xi = $urandom_range(0, 65534) - 32767;
      yi = $urandom_range(0, 65534) - 32767;
      drive(xi, yi, er, mr, -1.0, 0.0);
      if ($urandom_range(0, 3) == 0) idle();
    end
    idle();
    repeat (4) @(posedge clk);
    checks++;
    if (qx.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", qx.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
