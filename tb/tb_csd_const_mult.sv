// tb_csd_const_mult: self-checking test of the CSD constant multiplier.
//
// Eight instances with different constants (positive, negative, zero, powers
// of two, the extremes of a 5-bit word) are driven with the same edge-case
// and random inputs; every product is compared with the integer product
// COEF*x. The adder counts of the CSD recoding are compared with values
// worked out by hand (7 = 8-1: one adder, 13 = 16-4+1: two, 11 = 16-4-1:
// two, -15 = -16+1: one).
module tb_csd_const_mult;
  localparam int IN_W   = 16;
  localparam int COEF_W = 5;
  localparam int OUT_W  = IN_W + COEF_W;
  localparam int NC     = 8;
  localparam int COEFS [NC] = '{7, -7, 13, 0, -16, 15, 11, 1};

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [IN_W-1:0]  x;
  logic signed [OUT_W-1:0] p [NC];

  for (genvar c = 0; c < NC; c++) begin : g_dut
    csd_const_mult #(.IN_W(IN_W), .COEF_W(COEF_W), .COEF(COEFS[c])) dut (.x(x), .p(p[c]));
  end

  task automatic check_all();
    for (int c = 0; c < NC; c++) begin
      longint expect_p;
      expect_p = longint'(COEFS[c]) * longint'(x);
      checks++;
      if (longint'(p[c]) != expect_p) begin
        failures++;
        $display("FAIL coef=%0d x=%0d got=%0d expected=%0d", COEFS[c], x, p[c], expect_p);
      end
    end
  endtask

  task automatic check_adders(input int value, input int expected);
    checks++;
    if (mtr_pkg::csd_adders(value, COEF_W + 1) != expected) begin
      failures++;
      $display("FAIL adder count of %0d: %0d, expected %0d", value,
               mtr_pkg::csd_adders(value, COEF_W + 1), expected);
    end
  endtask

  initial begin
    int edge_vals [6] = '{0, 1, -1, 32767, -32768, 12345};
    foreach (edge_vals[i]) begin
      x = IN_W'(edge_vals[i]);
      #1 check_all();
    end
    repeat (500) begin
      x = IN_W'($urandom);
      #1 check_all();
    end
    check_adders(7, 1);
    check_adders(13, 2);
    check_adders(11, 2);
    check_adders(-15, 1);
    check_adders(5, 1);
    check_adders(8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
