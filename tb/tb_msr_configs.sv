// tb_msr_configs: the MSR-CORDIC rotator in the other configurations that
// the method is evaluated with, besides the default two stages of 2+2 terms:
//   * N_SPT = 3 with N = 3 micro-rotations, (I;J) = (2;1)
//   * the normalized set (I;J) = (1;3), N_SPT = 4, N = 2
//   * N_SPT = 3 with N = 2, (I;J) = (2;1)
// Each runs in its own msr_config_run driver with random parameter sets
// checked against floating point (see that module).
module tb_msr_configs;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  logic done_a, done_b, done_c;
  int   ca, fa, cb, fb, cc, fc;
  int   checks, failures;

  msr_config_run #(.N_ROT(3), .I_TERMS(2), .J_TERMS(1)) run_a (
    .clk(clk), .rst_n(rst_n), .done(done_a), .checks(ca), .failures(fa));
  msr_config_run #(.N_ROT(2), .I_TERMS(1), .J_TERMS(3)) run_b (
    .clk(clk), .rst_n(rst_n), .done(done_b), .checks(cb), .failures(fb));
  msr_config_run #(.N_ROT(2), .I_TERMS(2), .J_TERMS(1)) run_c (
    .clk(clk), .rst_n(rst_n), .done(done_c), .checks(cc), .failures(fc));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_a && done_b && done_c);
    checks = ca + cb + cc;
    failures = fa + fb + fc;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end
endmodule
