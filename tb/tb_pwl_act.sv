// tb_pwl_act: self-checking test of the piecewise-linear activation unit.
// Instance S: 16-segment sigmoid on [-8, 8), input Q(3,5), output Q(1,6).
// Instance T: 16-segment tanh, input Q(5,3) so that inputs beyond the
//             range exercise the clamping.
// Instance L: linear bypass.
// Line coefficients are computed here from the real functions (segment
// end points joined by straight lines, rounded to Q(1,8)) and loaded
// through the coefficient ports. Every output is checked bit-exactly
// against an integer model of y = a*x + b, its arrival exactly 3 cycles
// after the input is checked, and the sigmoid and tanh results are also
// checked against the real functions (error below 0.05 for the sigmoid and
// 0.1 for tanh, whose unit-width chords are coarser near zero).
module tb_pwl_act;
  import ahead_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0;
  int failures = 0;

  logic        we_a = 0, we_b = 0;
  logic [3:0]  waddr = '0;
  logic [31:0] wdata = '0;
  logic        sel_s = 0, sel_t = 0;

  logic              in_valid = 0;
  logic signed [8:0] in_x = '0;
  logic [7:0]        in_tag = '0;

  logic              s_valid, t_valid, l_valid;
  logic signed [7:0] s_y, t_y, l_y;
  logic [7:0]        s_tag, t_tag, l_tag;

  pwl_act #(.ACT(ACT_SIGMOID), .I_IN(3), .F_IN(5)) u_s (
    .clk, .rst_n, .coef_we_a(we_a && sel_s), .coef_we_b(we_b && sel_s), .coef_waddr(waddr), .coef_wdata(wdata),
    .in_valid, .in_x, .in_tag, .out_valid(s_valid), .out_y(s_y), .out_tag(s_tag));
  pwl_act #(.ACT(ACT_TANH), .I_IN(5), .F_IN(3)) u_t (
    .clk, .rst_n, .coef_we_a(we_a && sel_t), .coef_we_b(we_b && sel_t), .coef_waddr(waddr), .coef_wdata(wdata),
    .in_valid, .in_x, .in_tag, .out_valid(t_valid), .out_y(t_y), .out_tag(t_tag));
  pwl_act #(.ACT(ACT_LINEAR), .I_IN(3), .F_IN(5)) u_l (
    .clk, .rst_n, .coef_we_a(1'b0), .coef_we_b(1'b0), .coef_waddr(waddr), .coef_wdata(wdata),
    .in_valid, .in_x, .in_tag, .out_valid(l_valid), .out_y(l_y), .out_tag(l_tag));

  int ca_s [16], cb_s [16], ca_t [16], cb_t [16];

  function automatic real sigm(real x); return 1.0 / (1.0 + $exp(-x)); endfunction
  function automatic real tanh_r(real x); return (1.0 - $exp(-2.0 * x)) / (1.0 + $exp(-2.0 * x)); endfunction

  function automatic real absr(real v); return (v < 0.0) ? -v : v; endfunction

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  // Integer model: input code x with f_in fraction bits, coefficients Q(1,8),
  // intermediate Q(4,10), output Q(1,6).
  function automatic longint model(longint x, int f_in, int w_in, bit linear, int ca [16], int cb [16]);
    longint xlo, xhi, xc, p, bm, s;
    int seg;
    xlo = -8 * (64'sd1 <<< f_in);
    xhi = 8 * (64'sd1 <<< f_in) - 1;
    if (xlo < -(64'sd1 <<< (w_in - 1))) xlo = -(64'sd1 <<< (w_in - 1));
    if (xhi > (64'sd1 <<< (w_in - 1)) - 1) xhi = (64'sd1 <<< (w_in - 1)) - 1;
    if (linear) begin
      p = sat((10 >= f_in) ? (x <<< (10 - f_in)) : (x >>> (f_in - 10)), 15);
      return sat(p >>> 4, 8);
    end
    xc  = (x < xlo) ? xlo : (x > xhi) ? xhi : x;
    seg = int'((xc - xlo) >>> f_in);
    p   = xc * longint'(ca[seg]);                     // f_in + 8 fraction bits
    p   = sat((f_in + 8 >= 10) ? (p >>> (f_in + 8 - 10)) : (p <<< (10 - f_in - 8)), 15);
    bm  = longint'(cb[seg]) <<< 2;
    s   = p + bm;
    return sat(s >>> 4, 8);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic load(bit tanh_sel, int ca [16], int cb [16]);
    sel_s = !tanh_sel; sel_t = tanh_sel;
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      waddr = 4'(s); we_a = 1; we_b = 0; wdata = 32'(ca[s]);
      @(negedge clk);
      we_a = 0; we_b = 1; wdata = 32'(cb[s]);
    end
    @(negedge clk);
    we_a = 0; we_b = 0;
  endtask

  // expected outputs, queued in input order
  longint exp_s [$], exp_t [$], exp_l [$];
  real    real_s [$], real_t [$];
  int     sent_cycle [$];
  int     cycle = 0;
  always @(posedge clk) cycle++;

  // Outputs are sampled on the falling edge, half a cycle after they change.
  always @(negedge clk) begin
    if (s_valid) begin
      longint e; real r; int c;
      e = exp_s.pop_front(); r = real_s.pop_front(); c = sent_cycle.pop_front();
      check("sigmoid", longint'(s_y), e);
      check("latency", longint'(cycle - c), 3);
      checks++;
      if (absr(real'(s_y) / 64.0 - r) > 0.05) begin
        failures++; $display("FAIL sigmoid accuracy y=%f ref=%f", real'(s_y) / 64.0, r);
      end
    end
    if (t_valid) begin
      longint e; real r;
      e = exp_t.pop_front(); r = real_t.pop_front();
      check("tanh", longint'(t_y), e);
      checks++;
      if (absr(real'(t_y) / 64.0 - r) > 0.1) begin
        failures++; $display("FAIL tanh accuracy y=%f ref=%f", real'(t_y) / 64.0, r);
      end
    end
    if (l_valid) check("linear", longint'(l_y), exp_l.pop_front());
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      real x0, x1, a, b;
      x0 = -8.0 + s; x1 = x0 + 1.0;
      a = sigm(x1) - sigm(x0); b = sigm(x0) - a * x0;
      ca_s[s] = int'($floor(a * 256.0 + 0.5)); cb_s[s] = int'($floor(b * 256.0 + 0.5));
      a = tanh_r(x1) - tanh_r(x0); b = tanh_r(x0) - a * x0;
      ca_t[s] = int'($floor(a * 256.0 + 0.5)); cb_t[s] = int'($floor(b * 256.0 + 0.5));
      if (cb_t[s] > 511) cb_t[s] = 511;
      if (cb_t[s] < -512) cb_t[s] = -512;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(0, ca_s, cb_s);
    load(1, ca_t, cb_t);
    // back-to-back inputs: every 9-bit code once, then random ones
    for (int n = 0; n < 1024; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0) || n < 512;
      in_x     = (n < 512) ? 9'(n - 256) : 9'($urandom);
      in_tag   = 8'(n);
      if (in_valid) begin
        exp_s.push_back(model(longint'(in_x), 5, 9, 0, ca_s, cb_s));
        exp_t.push_back(model(longint'(in_x), 3, 9, 0, ca_t, cb_t));
        exp_l.push_back(model(longint'(in_x), 5, 9, 1, ca_s, cb_s));
        real_s.push_back(sigm(real'(in_x) / 32.0));
        real_t.push_back(tanh_r(real'(in_x) / 8.0));
        sent_cycle.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    check("all outputs arrived", longint'(exp_s.size() + exp_t.size() + exp_l.size()), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
