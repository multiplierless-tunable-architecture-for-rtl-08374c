// tb_ccssi_twiddle_rotator: self-checking test of the twiddle rotator.
//
// Three instances: the default 16-point rotator with kernel 7, 7+3j, 5+5j,
// a 16-point rotator with the radius-13 kernel 13, 12+5j, 9+9j and an
// 8-point rotator with kernel 7, 5+5j. The reference works out, for each
// index k, the effective Gaussian-integer coefficient directly from the
// definition of the symmetry (quadrant turn j^q, mirror j*conj(P_m)) and
// multiplies it with the input; the rotator output one cycle later must
// match exactly. Independently, every output angle must be within the
// kernel's angle error of 2*pi*k/N. Samples are streamed back to back, so
// the one-cycle latency and full throughput are checked too, and a reset in
// the middle must clear out_valid.
module tb_ccssi_twiddle_rotator;
  localparam int IN_W   = 16;
  localparam int COEF_W = 5;
  localparam int OUT_W  = IN_W + COEF_W + 1;
  localparam real PI    = 3.14159265358979;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  // 16-point instance (defaults)
  logic                    v16, ov16;
  logic [3:0]              k16;
  logic signed [IN_W-1:0]  x16, y16;
  logic signed [OUT_W-1:0] X16, Y16;
  ccssi_twiddle_rotator dut16 (
    .clk(clk), .rst_n(rst_n), .in_valid(v16), .k(k16), .x(x16), .y(y16),
    .out_valid(ov16), .X(X16), .Y(Y16));

  // 8-point instance, kernel 7, 5+5j
  logic                    v8, ov8;
  logic [2:0]              k8;
  logic signed [IN_W-1:0]  x8, y8;
  logic signed [OUT_W-1:0] X8, Y8;
  localparam int K8C [2] = '{7, 5};
  localparam int K8S [2] = '{0, 5};
  ccssi_twiddle_rotator #(
    .N_POINTS(8), .NK(2), .KC(K8C), .KS(K8S)
  ) dut8 (
    .clk(clk), .rst_n(rst_n), .in_valid(v8), .k(k8), .x(x8), .y(y8),
    .out_valid(ov8), .X(X8), .Y(Y8));

  // 16-point instance with the radius-13 kernel 13, 12+5j, 9+9j
  logic signed [OUT_W-1:0] XB, YB;
  localparam int KBC [3] = '{13, 12, 9};
  localparam int KBS [3] = '{0, 5, 9};
  logic ovb;
  ccssi_twiddle_rotator #(.KC(KBC), .KS(KBS)) dutb (
    .clk(clk), .rst_n(rst_n), .in_valid(v16), .k(k16), .x(x16), .y(y16),
    .out_valid(ovb), .X(XB), .Y(YB));

  // effective coefficient of index k for an n-point rotator with kernel kc/ks
  task automatic coef_of(input int n, input int k, input int kc [], input int ks [],
                         output int c, output int s);
    int q, r, m, t;
    q = k / (n / 4);
    r = k % (n / 4);
    if (r <= n / 8) begin
      c = kc[r];
      s = ks[r];
    end else begin
      m = n / 4 - r;
      // j * conj(C + jS) = S + jC
      c = ks[m];
      s = kc[m];
    end
    repeat (q) begin
      // multiply by j
      t = c;
      c = -s;
      s = t;
    end
  endtask

  task automatic check(input string tag, input int n, input int k, input int xi, input int yi,
                       input int kc [], input int ks [], input longint gx, input longint gy,
                       input real max_ang);
    int c, s;
    longint ex, ey;
    real d;
    coef_of(n, k, kc, ks, c, s);
    ex = longint'(c) * xi - longint'(s) * yi;
    ey = longint'(s) * xi + longint'(c) * yi;
    checks++;
    if (gx != ex || gy != ey) begin
      failures++;
      $display("FAIL %s k=%0d x=%0d y=%0d got (%0d,%0d) expected (%0d,%0d)",
               tag, k, xi, yi, gx, gy, ex, ey);
    end
    if (xi != 0 || yi != 0) begin
      d = $atan2(real'(gy), real'(gx)) - $atan2(real'(yi), real'(xi)) - 2.0 * PI * k / n;
      while (d >  PI) d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      checks++;
      if (d > max_ang || d < -max_ang) begin
        failures++;
        $display("FAIL %s k=%0d angle error %f rad", tag, k, d);
      end
    end
  endtask

  int kc16 [] = '{7, 7, 5};
  int ks16 [] = '{0, 3, 5};
  int kcb  [] = '{13, 12, 9};
  int ksb  [] = '{0, 5, 9};
  int kc8  [] = '{7, 5};
  int ks8  [] = '{0, 5};
  // largest angle error of the kernels: atan(3/7) - 22.5 deg
  real tol16, tol8, tolb;

  // queues of expected outputs
  int qk16[$], qx16[$], qy16[$];
  int qk8[$],  qx8[$],  qy8[$];
  int seen_k16 [16];
  int in_reset;

  always @(posedge clk) begin
    if (rst_n && ov16) begin
      if (qk16.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid (16)");
      end else begin
        int kk, xx, yy;
        kk = qk16.pop_front(); xx = qx16.pop_front(); yy = qy16.pop_front();
        check("N16", 16, kk, xx, yy, kc16, ks16, longint'(X16), longint'(Y16), tol16);
        check("N16-R13", 16, kk, xx, yy, kcb, ksb, longint'(XB), longint'(YB), tolb);
        seen_k16[kk]++;
      end
    end
    if (rst_n && ov8) begin
      if (qk8.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid (8)");
      end else begin
        int kk, xx, yy;
        kk = qk8.pop_front(); xx = qx8.pop_front(); yy = qy8.pop_front();
        check("N8", 8, kk, xx, yy, kc8, ks8, longint'(X8), longint'(Y8), tol8);
      end
    end
  end

  // drive one sample on each rotator (inputs kept in the symmetric range)
  task automatic drive(input bit en, input int k_16, input int k_8);
    int a, b, c, d;
    a = $urandom_range(0, 65534) - 32767;
    b = $urandom_range(0, 65534) - 32767;
    c = $urandom_range(0, 65534) - 32767;
    d = $urandom_range(0, 65534) - 32767;
    v16 <= en; k16 <= 4'(k_16); x16 <= IN_W'(a); y16 <= IN_W'(b);
    v8  <= en; k8  <= 3'(k_8);  x8  <= IN_W'(c); y8  <= IN_W'(d);
    if (en) begin
      qk16.push_back(k_16); qx16.push_back(a); qy16.push_back(b);
      qk8.push_back(k_8);   qx8.push_back(c);  qy8.push_back(d);
    end
    @(posedge clk);
  endtask

  initial begin
    tol16 = $atan(3.0 / 7.0) - PI / 8.0 + 1e-6;
    tol8  = 1e-6;
    tolb  = $atan(5.0 / 12.0) - PI / 8.0 + 1e-6;
    rst_n = 0;
    v16 = 0; v8 = 0; k16 = 0; k8 = 0; x16 = 0; y16 = 0; x8 = 0; y8 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // every index, back to back
    for (int rep = 0; rep < 40; rep++)
      for (int k = 0; k < 16; k++) drive(1, k, k % 8);
    // random indices with bubbles
    repeat (400) drive($urandom_range(0, 3) != 0, $urandom_range(0, 15), $urandom_range(0, 7));
    drive(0, 0, 0);
    @(posedge clk);
    // latency: one sample, output exactly one cycle later
    v16 <= 1; k16 <= 4'd5; x16 <= 16'sd1000; y16 <= 16'sd0;
    qk16.push_back(5); qx16.push_back(1000); qy16.push_back(0);
    @(posedge clk);
    v16 <= 0;
    #1;
    checks++;
    if (!ov16) begin
      failures++;
      $display("FAIL out_valid not one cycle after in_valid");
    end
    @(posedge clk);
    #1;
    checks++;
    if (ov16) begin
      failures++;
      $display("FAIL out_valid lasts more than one cycle");
    end
    // reset clears out_valid
    v16 <= 1;
    rst_n <= 0;
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (ov16 || ov8) begin
      failures++;
      $display("FAIL reset does not clear out_valid");
    end
    v16 <= 0;
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (seen_k16[k] == 0) begin
        failures++;
        $display("FAIL index %0d never exercised", k);
      end
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
