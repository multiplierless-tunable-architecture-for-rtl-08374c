// tb_mtr_top: end-to-end test of both rotators at the default parameters.
//
// Twiddle path: a 16-point DFT of random 16-bit data is computed with the
// CCSSI twiddle rotator doing every product X[f] = sum_n x[n] W^(n f),
// W = e^{-j 2 pi/16} (index (16 - n f mod 16) mod 16). The result, divided
// by the kernel radius 7.31, must match a floating-point DFT within the
// kernel's error bound (e_max = 0.05 of the summed magnitudes).
// MSR path: every sample is rotated by a searched 45 degree parameter set
// and then by the matching -45 degree set (conjugated signs of B), so the
// vector must come back to itself within the angle and norm errors; a
// 22.5 degree set is also applied and compared with the ideal rotation.
// Mechanisms counted (each must happen at least once): direct and mirrored
// kernel selections, every kernel coefficient, all four quadrant turns,
// back-to-back samples on both paths, bubbles in the MSR stream, SPT terms
// that are off, added and subtracted, and a reset that clears both valid
// pipelines.
module tb_mtr_top;
  import mtr_pkg::*;
  localparam int  N     = 16;
  localparam int  IN_W  = 16;
  localparam int  TW_W  = 22;
  localparam int  MSR_W = 18;
  localparam real PI    = 3.14159265358979;
  localparam real R     = 7.31;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                        tw_in_valid, tw_out_valid;
  logic [3:0]                  tw_k;
  logic signed [IN_W-1:0]      tw_x, tw_y;
  logic signed [TW_W-1:0]      tw_X, tw_Y;
  logic                        msr_in_valid, msr_out_valid;
  logic signed [IN_W-1:0]      msr_x, msr_y;
  spt_term_t [1:0][1:0]        msr_eta, msr_mu;
  logic signed [MSR_W-1:0]     msr_x_o, msr_y_o;

  mtr_top dut (
    .clk(clk), .rst_n(rst_n),
    .tw_in_valid(tw_in_valid), .tw_k(tw_k), .tw_x(tw_x), .tw_y(tw_y),
    .tw_out_valid(tw_out_valid), .tw_X(tw_X), .tw_Y(tw_Y),
    .msr_in_valid(msr_in_valid), .msr_x(msr_x), .msr_y(msr_y),
    .msr_eta(msr_eta), .msr_mu(msr_mu),
    .msr_out_valid(msr_out_valid), .msr_x_o(msr_x_o), .msr_y_o(msr_y_o));

  // mechanism counters
  int n_direct, n_mirror, n_quad [4], n_coef [3], n_tw_b2b, n_msr_b2b, n_msr_bubble;
  int n_spt_off, n_spt_add, n_spt_sub, n_reset;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic spt_term_t tt(input spt_sign_e s, input int sh);
    spt_term_t t;
    t.sign = s;
    t.shift = 4'(sh);
    return t;
  endfunction

  // ---------------- twiddle path: 16-point DFT ----------------
  int  xr [N], xi [N];
  real acc_r [N], acc_i [N];
  int  qf[$];
  bit  prev_tw_valid;

  always @(posedge clk) begin
    if (rst_n && tw_out_valid) begin
      int f;
      f = qf.pop_front();
      acc_r[f] += real'(tw_X);
      acc_i[f] += real'(tw_Y);
    end
  end

  task automatic tw_send(input int k, input int a, input int b, input int f);
    int r;
    @(negedge clk);
    if (tw_in_valid) n_tw_b2b++;
    tw_in_valid = 1;
    tw_k = 4'(k);
    tw_x = IN_W'(a);
    tw_y = IN_W'(b);
    qf.push_back(f);
    r = k % 4;
    n_quad[k / 4]++;
    if (r <= 2) begin
      n_direct++;
      n_coef[r]++;
    end else begin
      n_mirror++;
      n_coef[4 - r]++;
    end
  endtask

  task automatic run_dft();
    real ref_r, ref_i, mag, err;
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 20000) - 10000;
      xi[n] = $urandom_range(0, 20000) - 10000;
    end
    for (int f = 0; f < N; f++) begin
      acc_r[f] = 0.0;
      acc_i[f] = 0.0;
    end
    for (int f = 0; f < N; f++)
      for (int n = 0; n < N; n++)
        tw_send((N - (n * f) % N) % N, xr[n], xi[n], f);
    @(negedge clk);
    tw_in_valid = 0;
    repeat (3) @(posedge clk);
    for (int f = 0; f < N; f++) begin
      ref_r = 0.0; ref_i = 0.0; mag = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = -2.0 * PI * n * f / N;
        ref_r += xr[n] * $cos(a) - xi[n] * $sin(a);
        ref_i += xr[n] * $sin(a) + xi[n] * $cos(a);
        mag   += $sqrt(real'(xr[n]) * xr[n] + real'(xi[n]) * xi[n]);
      end
      err = $sqrt((acc_r[f] / R - ref_r) ** 2 + (acc_i[f] / R - ref_i) ** 2);
      checks++;
      if (err > 0.05 * mag) begin
        failures++;
        $display("FAIL DFT bin %0d: error %f, bound %f", f, err, 0.05 * mag);
      end
    end
    checks++;
    if (qf.size() != 0) begin
      failures++;
      $display("FAIL %0d twiddle outputs missing", qf.size());
    end
  endtask

  // ---------------- MSR path ----------------
  real mqx[$], mqy[$], mqtol[$];
  spt_term_t [1:0][1:0] e45, m45, en45, mn45, e22, m22;

  always @(posedge clk) begin
    if (rst_n && msr_out_valid) begin
      real ex, ey, tol;
      ex = mqx.pop_front(); ey = mqy.pop_front(); tol = mqtol.pop_front();
      checks++;
      if (absr(real'(msr_x_o) - ex) > tol || absr(real'(msr_y_o) - ey) > tol) begin
        failures++;
        $display("FAIL MSR got (%0d,%0d) expected (%f,%f) tol %f", msr_x_o, msr_y_o, ex, ey, tol);
      end
    end
  end

  task automatic count_terms(input spt_term_t [1:0][1:0] e, input spt_term_t [1:0][1:0] m);
    for (int n = 0; n < 2; n++)
      for (int i = 0; i < 2; i++) begin
        for (int w = 0; w < 2; w++) begin
          spt_term_t t;
          t = (w == 0) ? e[n][i] : m[n][i];
          case (t.sign)
            SPT_OFF: n_spt_off++;
            SPT_ADD: n_spt_add++;
            default: n_spt_sub++;
          endcase
        end
      end
  endtask

  task automatic msr_send(input int a, input int b, input spt_term_t [1:0][1:0] e,
                          input spt_term_t [1:0][1:0] m, input real ex, input real ey,
                          input real tol);
    @(negedge clk);
    if (msr_in_valid) n_msr_b2b++;
    msr_in_valid = 1;
    msr_x = IN_W'(a);
    msr_y = IN_W'(b);
    msr_eta = e;
    msr_mu = m;
    mqx.push_back(ex); mqy.push_back(ey); mqtol.push_back(tol);
    count_terms(e, m);
  endtask

  task automatic run_msr();
    // two passes: rotate by +45 deg, then feed the result back with -45 deg
    int a [64], b [64];
    int ra [64], rb [64];
    real c45, s45, mag;
    c45 = $cos(PI / 4.0);
    s45 = $sin(PI / 4.0);
    for (int i = 0; i < 64; i++) begin
      a[i] = $urandom_range(0, 40000) - 20000;
      b[i] = $urandom_range(0, 40000) - 20000;
      mag = $sqrt(real'(a[i]) * a[i] + real'(b[i]) * b[i]);
      msr_send(a[i], b[i], e45, m45, a[i] * c45 - b[i] * s45, a[i] * s45 + b[i] * c45,
               1.5e-3 * mag + 2.0);
      if (i % 5 == 4) begin
        @(negedge clk);
        msr_in_valid = 0;
        n_msr_bubble++;
      end
    end
    @(negedge clk);
    msr_in_valid = 0;
    repeat (3) @(posedge clk);
    // collect the rotated vectors by rotating again (first pass already checked)
    for (int i = 0; i < 64; i++) begin
      // the rounded +45 deg result, recomputed from the checked values
      ra[i] = $rtoi(a[i] * c45 - b[i] * s45);
      rb[i] = $rtoi(a[i] * s45 + b[i] * c45);
    end
    for (int i = 0; i < 64; i++) begin
      mag = $sqrt(real'(ra[i]) * ra[i] + real'(rb[i]) * rb[i]);
      msr_send(ra[i], rb[i], en45, mn45, ra[i] * c45 + rb[i] * s45, -ra[i] * s45 + rb[i] * c45,
               1.5e-3 * mag + 2.0);
    end
    for (int i = 0; i < 64; i++) begin
      real c, s;
      c = $cos(PI / 8.0);
      s = $sin(PI / 8.0);
      mag = $sqrt(real'(a[i]) * a[i] + real'(b[i]) * b[i]);
      msr_send(a[i], b[i], e22, m22, a[i] * c - b[i] * s, a[i] * s + b[i] * c, 2.0e-4 * mag + 2.0);
    end
    @(negedge clk);
    msr_in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (mqx.size() != 0) begin
      failures++;
      $display("FAIL %0d MSR outputs missing", mqx.size());
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %s: %0d", what, count);
    end
  endtask

  initial begin
    // searched parameter sets (see tb_msr_cordic); -45 deg negates every B term
    e45[0] = {tt(SPT_SUB, 3), tt(SPT_ADD, 0)}; m45[0] = {tt(SPT_ADD, 5), tt(SPT_ADD, 2)};
    e45[1] = {tt(SPT_SUB, 5), tt(SPT_ADD, 0)}; m45[1] = {tt(SPT_SUB, 8), tt(SPT_ADD, 1)};
    en45 = e45;
    mn45[0] = {tt(SPT_SUB, 5), tt(SPT_SUB, 2)};
    mn45[1] = {tt(SPT_ADD, 8), tt(SPT_SUB, 1)};
    e22[0] = {tt(SPT_ADD, 3), tt(SPT_OFF, 0)}; m22[0] = {tt(SPT_SUB, 6), tt(SPT_ADD, 0)};
    e22[1] = {tt(SPT_ADD, 1), tt(SPT_OFF, 0)}; m22[1] = {tt(SPT_SUB, 0), tt(SPT_ADD, 3)};

    rst_n = 0;
    tw_in_valid = 0; tw_k = 0; tw_x = 0; tw_y = 0;
    msr_in_valid = 0; msr_x = 0; msr_y = 0; msr_eta = '0; msr_mu = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    fork
      begin
        run_dft();
        run_dft();
      end
      run_msr();
    join

    // reset in the middle of traffic clears both valid pipelines
    @(negedge clk);
    tw_in_valid = 1;
    msr_in_valid = 1;
    @(negedge clk);
    rst_n = 0;
    tw_in_valid = 0;
    msr_in_valid = 0;
    @(negedge clk);
    n_reset++;
    checks++;
    if (tw_out_valid || msr_out_valid) begin
      failures++;
      $display("FAIL reset does not clear the valid outputs");
    end
    rst_n = 1;
    // the sample accepted just before the reset must never come out
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (tw_out_valid || msr_out_valid) begin
        failures++;
        $display("FAIL a sample survived the reset");
      end
    end

    need("kernel direct selection", n_direct);
    need("kernel mirrored selection", n_mirror);
    for (int q = 0; q < 4; q++) need($sformatf("quadrant %0d turn", q), n_quad[q]);
    for (int m = 0; m < 3; m++) need($sformatf("kernel coefficient %0d", m), n_coef[m]);
    need("twiddle back-to-back samples", n_tw_b2b);
    need("MSR back-to-back samples", n_msr_b2b);
    need("MSR stream bubbles", n_msr_bubble);
    need("SPT term off", n_spt_off);
    need("SPT term added", n_spt_add);
    need("SPT term subtracted", n_spt_sub);
    need("reset during traffic", n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
