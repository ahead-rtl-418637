// Shared testbench code for the decoder top: an AXI4-Lite master, a
// bit-exact integer model of the fixed-point network and the PWL
// coefficient tables. It is included inside a testbench module that
// defines, before the include: clk, cyc, the s_axi_* signals, checks,
// failures, and localparams NL, N, ACT, PAR, PAR2, X_I, X_F, W_I, W_F,
// P_I, P_F, A_I, A_F, S_I, S_F matching the top's parameters, and the
// stimulus arrays xs[layer][i] (codes entering each layer), wgt[k][i][j]
// and bias[k][j].
// PWL segments: 16 of width 1 on [-8, 8); coefficients Q(1,8);
// intermediate Q(4,10) (the top's defaults).

  int n_bp = 0;                  // write responses held back by the master

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  // value with fraction fi -> fraction fo, truncated, saturated to wo bits
  function automatic longint rs(longint v, int fi, int fo, int wo);
    return sat((fo >= fi) ? (v <<< (fo - fi)) : (v >>> (fi - fo)), wo);
  endfunction

  function automatic real sigm(real x); return 1.0 / (1.0 + $exp(-x)); endfunction
  function automatic real tanh_r(real x); return (1.0 - $exp(-2.0 * x)) / (1.0 + $exp(-2.0 * x)); endfunction

  // Chord of f over segment s, rounded to Q(1,8); sel 1 = tanh, 0 = sigmoid.
  function automatic int coef(bit sel, bit intercept, int s);
    real x0, y0, y1, a, b;
    int  r;
    x0 = -8.0 + s;
    y0 = sel ? tanh_r(x0) : sigm(x0);
    y1 = sel ? tanh_r(x0 + 1.0) : sigm(x0 + 1.0);
    a  = y1 - y0;
    b  = y0 - a * x0;
    r  = int'($floor((intercept ? b : a) * 256.0 + 0.5));
    return int'(sat(longint'(r), 10));
  endfunction

  int n_clamp = 0;               // model inputs that fell outside [-8, 8)

  // One neuron's output code from the previous layer's codes.
  function automatic longint model_neuron(int k, int j);
    longint acc, s, y, sl, sh, p, bm;
    int wx, wp, wa, ws, wz, wm, seg;
    wx = X_I[k] + X_F[k] + 1;
    wp = P_I[k] + P_F[k] + 1;
    wa = A_I[k] + A_F[k] + 1;
    ws = S_I[k] + S_F[k] + 1;
    wz = X_I[k+1] + X_F[k+1] + 1;
    wm = 4 + 10 + 1;
    acc = 0;
    for (int i = 0; i < N[k]; i++) begin
      p   = rs(xs[k][i] * longint'(wgt[k][i][j]), X_F[k] + W_F[k], P_F[k], wp);
      acc = sat(acc + rs(p, P_F[k], A_F[k], wa), wa);
    end
    s = rs(acc + rs(longint'(bias[k][j]), W_F[k], A_F[k], wa), A_F[k], S_F[k], ws);
    if (ACT[k] == ACT_LINEAR) begin
      y = rs(s, S_F[k], 10, wm);
      return rs(y, 10, X_F[k+1], wz);
    end
    sl = -8 * (64'sd1 <<< S_F[k]);
    sh = 8 * (64'sd1 <<< S_F[k]) - 1;
    if (sl < -(64'sd1 <<< (ws - 1))) sl = -(64'sd1 <<< (ws - 1));
    if (sh > (64'sd1 <<< (ws - 1)) - 1) sh = (64'sd1 <<< (ws - 1)) - 1;
    if (s < sl || s > sh) n_clamp++;
    s   = (s < sl) ? sl : (s > sh) ? sh : s;
    seg = int'((s - sl) >>> S_F[k]);
    p   = rs(s * longint'(coef(ACT[k] == ACT_TANH, 0, seg)), S_F[k] + 8, 10, wm);
    bm  = rs(longint'(coef(ACT[k] == ACT_TANH, 1, seg)), 8, 10, wm);
    return rs(p + bm, 10, X_F[k+1], wz);
  endfunction

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(logic [31:0] addr, logic [31:0] data, bit slow_b = 0);
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_awvalid = 1;
    s_axi_wdata = data;  s_axi_wvalid = 1;
    s_axi_wstrb = 4'hf;
    fork
      begin
        do @(posedge clk); while (!s_axi_awready);
        #1 s_axi_awvalid = 0;
      end
      begin
        do @(posedge clk); while (!s_axi_wready);
        #1 s_axi_wvalid = 0;
      end
    join
    while (!s_axi_bvalid) @(negedge clk);
    if (slow_b) begin
      n_bp++;
      repeat (2) @(negedge clk);
    end
    s_axi_bready = 1;
    @(posedge clk);
    #1 s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    #1 s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge clk);
    data = s_axi_rdata;
    s_axi_rready = 1;
    @(posedge clk);
    #1 s_axi_rready = 0;
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // Loads the PWL tables of every non-linear layer.
  task automatic load_coefs();
    for (int k = 0; k < NL; k++) begin
      if (ACT[k] != ACT_LINEAR) begin
        for (int s = 0; s < 16; s++) begin
          axi_write(cfg_byte_addr(REG_COEF_A, k, 0, s), 32'(coef(ACT[k] == ACT_TANH, 0, s)));
          axi_write(cfg_byte_addr(REG_COEF_B, k, 0, s), 32'(coef(ACT[k] == ACT_TANH, 1, s)));
        end
      end
    end
  endtask
