// tb_ccssi_rotator: self-checking test of the constant rotator.
//
// Six rotators are instantiated: the 22.5 degree coefficient 7+3j, the
// 45 degree coefficient 5+5j (shared C/S product), a real one (7), an
// imaginary one (5j), one with a negative part (-3+7j) and 6-6j (the shared
// product with opposite signs). For edge-case and random inputs the outputs
// are compared with the complex product (x + jy)(C + jS) worked out with
// integers in the testbench. The 7+3j rotator is also checked against a real
// rotation by 22.5 degrees scaled by |7+3j|: the direction error must stay
// below the coefficient's angle error (atan(3/7) - 22.5 deg).
module tb_ccssi_rotator;
  localparam int IN_W   = 16;
  localparam int COEF_W = 5;
  localparam int OUT_W  = IN_W + COEF_W + 1;
  localparam int NR     = 6;
  localparam int CC [NR] = '{7, 5, 7, 0, -3, 6};
  localparam int SS [NR] = '{3, 5, 0, 5, 7, -6};

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [IN_W-1:0]  x, y;
  logic signed [OUT_W-1:0] X [NR];
  logic signed [OUT_W-1:0] Y [NR];

  for (genvar r = 0; r < NR; r++) begin : g_dut
    ccssi_rotator #(.IN_W(IN_W), .COEF_W(COEF_W), .C(CC[r]), .S(SS[r])) dut (
      .x(x), .y(y), .X(X[r]), .Y(Y[r]));
  end

  task automatic check_all();
    for (int r = 0; r < NR; r++) begin
      longint ex, ey;
      ex = longint'(CC[r]) * x - longint'(SS[r]) * y;
      ey = longint'(SS[r]) * x + longint'(CC[r]) * y;
      checks++;
      if (longint'(X[r]) != ex || longint'(Y[r]) != ey) begin
        failures++;
        $display("FAIL P=%0d + %0dj x=%0d y=%0d got (%0d,%0d) expected (%0d,%0d)",
                 CC[r], SS[r], x, y, X[r], Y[r], ex, ey);
      end
    end
    // geometric check of the 22.5 degree rotator
    if (x != 0 || y != 0) begin
      real a_in, a_out, d, tol;
      a_in  = $atan2(real'(y), real'(x));
      a_out = $atan2(real'(Y[0]), real'(X[0]));
      d = a_out - a_in - 22.5 * 3.14159265358979 / 180.0;
      while (d >  3.14159265358979) d -= 2.0 * 3.14159265358979;
      while (d < -3.14159265358979) d += 2.0 * 3.14159265358979;
      tol = $atan(3.0 / 7.0) - 22.5 * 3.14159265358979 / 180.0 + 1e-9;
      checks++;
      if (d > tol || d < -tol) begin
        failures++;
        $display("FAIL 22.5 deg rotation angle error %f rad", d);
      end
    end
  endtask

  initial begin
    int ev [5] = '{0, 1, -1, 32767, -32768};
    foreach (ev[i]) foreach (ev[j]) begin
      x = IN_W'(ev[i]);
      y = IN_W'(ev[j]);
      #1 check_all();
    end
    repeat (500) begin
      x = IN_W'($urandom);
      y = IN_W'($urandom);
      #1 check_all();
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
