// tb_ccssi_kernel_rotator: self-checking test of the combined kernel
// rotator with its default kernel (7, 7+3j, 5+5j for 0, 22.5, 45 degrees).
//
// For every select value and random inputs the output must equal the
// complex product with the selected coefficient; an unused select value
// must give zero. The kernel's rotation errors are also checked against the
// radius and bound of the kernel: each coefficient must lie within
// e_max = 0.05 of R*e^{j alpha} with R = 7.31.
module tb_ccssi_kernel_rotator;
  localparam int IN_W   = 16;
  localparam int COEF_W = 5;
  localparam int OUT_W  = IN_W + COEF_W + 1;
  localparam int KC [3] = '{7, 7, 5};
  localparam int KS [3] = '{0, 3, 5};

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0]              sel;
  logic signed [IN_W-1:0]  x, y;
  logic signed [OUT_W-1:0] X, Y;

  ccssi_kernel_rotator dut (.sel(sel), .x(x), .y(y), .X(X), .Y(Y));

  initial begin
    // kernel quality: |P/R - e^{j alpha}| <= e_max
    for (int m = 0; m < 3; m++) begin
      real al, er;
      al = m * 22.5 * 3.14159265358979 / 180.0;
      er = $sqrt((KC[m] / 7.31 - $cos(al)) ** 2 + (KS[m] / 7.31 - $sin(al)) ** 2);
      checks++;
      if (er > 0.05) begin
        failures++;
        $display("FAIL coefficient %0d error %f", m, er);
      end
    end
    repeat (600) begin
      sel = 2'($urandom_range(0, 3));
      x   = IN_W'($urandom);
      y   = IN_W'($urandom);
      #1;
      checks++;
      if (sel == 2'd3) begin
        if (X != 0 || Y != 0) begin
          failures++;
          $display("FAIL sel=3 gives (%0d,%0d)", X, Y);
        end
      end else begin
        longint ex, ey;
        ex = longint'(KC[sel]) * x - longint'(KS[sel]) * y;
        ey = longint'(KS[sel]) * x + longint'(KC[sel]) * y;
        if (longint'(X) != ex || longint'(Y) != ey) begin
          failures++;
          $display("FAIL sel=%0d x=%0d y=%0d got (%0d,%0d) expected (%0d,%0d)",
                   sel, x, y, X, Y, ex, ey);
        end
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
