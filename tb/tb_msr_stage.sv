// tb_msr_stage: self-checking test of one MSR-CORDIC micro-rotation stage.
//
// Random inputs and random signed-power-of-two terms (every sign, including
// "off", and every shift 0..15) are applied back to back. The reference
// computes A*x, A*y, B*x, B*y term by term with floor division by 2**shift
// (the arithmetic right shift of the datapath written as integer division)
// and then x' = A x - B y, y' = B x + A y. The output one cycle later must
// match bit for bit. A hand-worked case (A = 1 - 1/4, B = 1/2) is checked
// first, and out_valid must follow in_valid by one cycle.
module tb_msr_stage;
  import mtr_pkg::*;
  localparam int DATA_W = 22;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, out_valid;
  logic signed [DATA_W-1:0] x, y, x_o, y_o;
  spt_term_t [1:0] eta, mu;

  msr_stage dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .eta(eta), .mu(mu), .out_valid(out_valid), .x_o(x_o), .y_o(y_o));

  function automatic longint fdiv(input longint v, input int sh);
    longint d, q;
    d = longint'(1) << sh;
    q = v / d;
    if (v < 0 && q * d != v) q = q - 1;
    return q;
  endfunction

  function automatic int sgn(input spt_sign_e s);
    case (s)
      SPT_ADD: return 1;
      SPT_SUB: return -1;
      default: return 0;
    endcase
  endfunction

  task automatic expect_out(input longint xi, input longint yi,
                            input spt_term_t [1:0] e, input spt_term_t [1:0] m,
                            output longint ex, output longint ey);
    longint ax, ay, bx, by;
    ax = 0; ay = 0; bx = 0; by = 0;
    for (int i = 0; i < 2; i++) begin
      ax += sgn(e[i].sign) * fdiv(xi, e[i].shift);
      ay += sgn(e[i].sign) * fdiv(yi, e[i].shift);
      bx += sgn(m[i].sign) * fdiv(xi, m[i].shift);
      by += sgn(m[i].sign) * fdiv(yi, m[i].shift);
    end
    ex = ax - by;
    ey = bx + ay;
  endtask

  function automatic spt_term_t rand_term();
    spt_term_t t;
    case ($urandom_range(0, 2))
      0: t.sign = SPT_OFF;
      1: t.sign = SPT_ADD;
      default: t.sign = SPT_SUB;
    endcase
    t.shift = 4'($urandom_range(0, 15));
    return t;
  endfunction

  longint qx[$], qy[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint ex, ey;
      ex = qx.pop_front();
      ey = qy.pop_front();
      checks++;
      if (longint'(x_o) != ex || longint'(y_o) != ey) begin
        failures++;
        $display("FAIL got (%0d,%0d) expected (%0d,%0d)", x_o, y_o, ex, ey);
      end
    end
  end

  initial begin
    rst_n = 0;
    in_valid = 0;
    x = 0; y = 0; eta = '0; mu = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // hand-worked: x = 1024, y = 512, A = 1 - 1/4 = 0.75, B = 1/2
    // x' = 768 - 256 = 512, y' = 512 + 384 = 896
    in_valid <= 1;
    x <= 22'sd1024; y <= 22'sd512;
    eta <= {spt_term_t'{SPT_SUB, 4'd2}, spt_term_t'{SPT_ADD, 4'd0}};
    mu  <= {spt_term_t'{SPT_OFF, 4'd0}, spt_term_t'{SPT_ADD, 4'd1}};
    qx.push_back(512); qy.push_back(896);
    @(posedge clk);
    in_valid <= 0;
    #1;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL out_valid not one cycle after in_valid");
    end
    @(posedge clk);
    // random stream; inputs limited to +-2**19 so that |A|,|B| <= 2 cannot overflow
    repeat (2000) begin
      spt_term_t [1:0] e, m;
      longint xi, yi, ex, ey;
      bit en;
      en = ($urandom_range(0, 4) != 0);
      xi = longint'($urandom_range(0, 2 ** 20 - 2)) - (2 ** 19 - 1);
      yi = longint'($urandom_range(0, 2 ** 20 - 2)) - (2 ** 19 - 1);
      e[0] = rand_term(); e[1] = rand_term();
      m[0] = rand_term(); m[1] = rand_term();
      in_valid <= en;
      x <= DATA_W'(xi); y <= DATA_W'(yi);
      eta <= e; mu <= m;
      if (en) begin
        expect_out(xi, yi, e, m, ex, ey);
        qx.push_back(ex); qy.push_back(ey);
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (2) @(posedge clk);
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
