// tb_mlp_layer: self-checking test of one complete layer.
// A 12-input, 5-neuron sigmoid layer with PAR = 2 multiply lanes (three
// weight banks' worth of groups, the last half empty) and PAR2 = 2
// activation lanes. Weights, biases and line coefficients are written
// through the configuration port, including writes addressed to another
// layer that must be ignored. The input vector is served by a registered
// model memory. After each inference buffer-3 is compared with an integer
// model of the whole layer, and the start-to-done time must be
// ceil(NOUT/PAR)*NIN + 4 + ceil(NOUT/PAR2) + 6 cycles.
module tb_mlp_layer;
  import ahead_pkg::*;
  localparam int unsigned NIN = 12, NOUT = 5, PAR = 2, PAR2 = 2;
  localparam int unsigned NG = 3, NC = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int   cyc = 0;
  always @(posedge clk) cyc++;

  cfg_wr_t           cfg_wr;
  logic              start = 0, busy, done, x_re, z_re = 0;
  logic [3:0]        x_raddr;
  logic signed [7:0] x_rdata;
  logic [2:0]        z_raddr = '0;
  logic signed [7:0] z_rdata;
  logic signed [7:0] buf3 [NOUT];

  mlp_layer #(.LAYER_ID(1), .NIN(NIN), .NOUT(NOUT), .PAR(PAR), .PAR2(PAR2), .ACT(ACT_SIGMOID)) dut (.*);

  int xv [NIN];
  int wv [NIN][NOUT];
  int bv [NOUT];
  int ca [16], cb [16];
  int checks = 0, failures = 0;

  // registered input memory, like the input buffer of the decoder
  always_ff @(posedge clk) if (x_re) x_rdata <= 8'(xv[x_raddr]);

  function automatic real sigm(real x); return 1.0 / (1.0 + $exp(-x)); endfunction

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  function automatic longint neuron(int j);
    longint acc, s, p, y;
    int seg;
    acc = 0;
    for (int i = 0; i < NIN; i++) acc = sat(acc + sat((longint'(xv[i]) * longint'(wv[i][j])) >>> 2, 13), 16);
    s   = sat((acc + (longint'(bv[j]) <<< 2)) >>> 3, 9);
    seg = int'((s + 256) >>> 5);
    p   = sat((s * longint'(ca[seg])) >>> 3, 15);
    y   = p + (longint'(cb[seg]) <<< 2);
    return sat(y >>> 4, 8);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic cfg(cfg_region_e r, int layer, int j, int i, int data);
    @(negedge clk);
    cfg_wr.en = 1;
    cfg_wr.addr.region = r;
    cfg_wr.addr.layer = 3'(layer);
    cfg_wr.addr.j = 8'(j);
    cfg_wr.addr.i = 12'(i);
    cfg_wr.data = 32'(data);
    @(negedge clk);
    cfg_wr.en = 0;
  endtask

  initial begin
    cfg_wr = '0;
    for (int s = 0; s < 16; s++) begin
      real x0, a, b;
      x0 = -8.0 + s;
      a = sigm(x0 + 1.0) - sigm(x0); b = sigm(x0) - a * x0;
      ca[s] = int'($floor(a * 256.0 + 0.5)); cb[s] = int'($floor(b * 256.0 + 0.5));
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 16; s++) begin
      cfg(REG_COEF_A, 1, 0, s, ca[s]);
      cfg(REG_COEF_B, 1, 0, s, cb[s]);
      cfg(REG_COEF_A, 0, 0, s, 0);          // another layer: ignored
    end
    for (int pass = 0; pass < 6; pass++) begin
      int t0;
      for (int j = 0; j < NOUT; j++) begin
        bv[j] = int'($urandom_range(255)) - 128;
        cfg(REG_BIAS, 1, j, 0, bv[j]);
        cfg(REG_BIAS, 2, j, 0, 77);         // another layer: ignored
        for (int i = 0; i < NIN; i++) begin
          // moderate weights keep most sums inside the sigmoid's range
          wv[i][j] = (pass == 5) ? int'($urandom_range(255)) - 128 : int'($urandom_range(63)) - 32;
          cfg(REG_WEIGHT, 1, j, i, wv[i][j]);
          cfg(REG_WEIGHT, 0, j, i, -wv[i][j]); // another layer: ignored
        end
      end
      for (int i = 0; i < NIN; i++) xv[i] = (pass == 5) ? int'($urandom_range(255)) - 128 : int'($urandom_range(63)) - 32;
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      check("busy", longint'(busy), 1);
      while (!done) @(negedge clk);
      check("start to done cycles", longint'(cyc - t0), NG * NIN + 4 + NC + 6);
      @(negedge clk);
      check("idle after done", longint'(busy), 0);
      for (int j = 0; j < NOUT; j++) check($sformatf("z[%0d]", j), longint'(buf3[j]), neuron(j));
      z_re = 1; z_raddr = 3'd3;
      @(negedge clk);
      z_re = 0;
      check("z read port", longint'(z_rdata), neuron(3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
