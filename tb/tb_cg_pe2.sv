// tb_cg_pe2: self-checking test of the bias / activation element.
// NOUT = 5 neurons on PAR2 = 2 lanes (three chunks, the last half empty),
// sigmoid activation with 16 unit-width segments on [-8, 8). Buffer-1 is
// driven directly, the biases come from a bias memory model in the
// testbench with a registered read (as the weight banks behave), the line
// coefficients are loaded through the write ports, and after each pass buffer-3 is compared with an integer
// model (bias aligned to Q(7,8), sum truncated and saturated to Q(3,5),
// y = a*x + b in Q(4,10), output Q(1,6)). The start-to-done time must be
// ceil(NOUT/PAR2) + 6 cycles, and the registered buffer-3 read port must
// return each word one cycle after the request.
module tb_cg_pe2;
  import ahead_pkg::*;
  localparam int unsigned NOUT = 5, PAR2 = 2, NC = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int   cyc = 0;
  always @(posedge clk) cyc++;

  logic               coef_we_a = 0, coef_we_b = 0, start = 0, done, z_re = 0;
  logic [2:0]         z_raddr = '0;
  logic [31:0]        coef_wdata = '0;
  logic               bias_re;
  logic [2:0]         bias_rj [PAR2];
  logic signed [7:0]  bias_rdata [PAR2];
  logic signed [7:0]  bias_mem [NOUT];
  int                 bias_reads = 0;

  // bias memory model: registered read, only when bias_re is high
  always @(posedge clk)
    if (bias_re) begin
      bias_reads++;
      for (int l = 0; l < PAR2; l++)
        bias_rdata[l] <= (bias_rj[l] < NOUT) ? bias_mem[bias_rj[l]] : 8'sd0;
    end
  logic [3:0]         coef_waddr = '0;
  logic signed [15:0] buf1 [NOUT];
  logic signed [7:0]  z_rdata;
  logic signed [7:0]  buf3 [NOUT];

  cg_pe2 #(.NOUT(NOUT), .PAR2(PAR2), .ACT(ACT_SIGMOID)) dut (.*);

  int checks = 0, failures = 0;
  int ca [16], cb [16], bias_v [NOUT];

  function automatic real sigm(real x); return 1.0 / (1.0 + $exp(-x)); endfunction

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  function automatic longint model(longint b1, longint bias);
    longint s, p, y;
    int seg;
    s   = sat((b1 + (bias <<< 2)) >>> 3, 9);     // Q(3,5): range [-8, 8)
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

  initial begin
    for (int j = 0; j < NOUT; j++) buf1[j] = '0;
    for (int s = 0; s < 16; s++) begin
      real x0, a, b;
      x0 = -8.0 + s;
      a = sigm(x0 + 1.0) - sigm(x0); b = sigm(x0) - a * x0;
      ca[s] = int'($floor(a * 256.0 + 0.5)); cb[s] = int'($floor(b * 256.0 + 0.5));
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      coef_waddr = 4'(s); coef_we_a = 1; coef_wdata = 32'(ca[s]);
      @(negedge clk);
      coef_we_a = 0; coef_we_b = 1; coef_wdata = 32'(cb[s]);
    end
    @(negedge clk);
    coef_we_b = 0;
    for (int pass = 0; pass < 20; pass++) begin
      int t0;
      for (int j = 0; j < NOUT; j++) begin
        @(negedge clk);
        bias_v[j] = int'($urandom_range(255)) - 128;
        bias_mem[j] = 8'(bias_v[j]);
        // wide spread: some sums fall outside [-8, 8) and saturate
        buf1[j] = 16'(int'($urandom_range(8191)) - 4096 + ((pass % 5 == 4) ? 3000 : 0));
      end
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check("start to done cycles", longint'(cyc - t0), NC + 6);
      for (int j = 0; j < NOUT; j++)
        check($sformatf("buf3[%0d]", j), longint'(buf3[j]), model(longint'(buf1[j]), longint'(bias_v[j])));
      for (int j = NOUT - 1; j >= 0; j--) begin
        z_re = 1; z_raddr = 3'(j);
        @(negedge clk);
        check("z read port", longint'(z_rdata), model(longint'(buf1[j]), longint'(bias_v[j])));
      end
      z_re = 0;
    end
    checks++;
    if (bias_reads == 0) begin
      failures++;
      $display("FAIL bias memory never read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
