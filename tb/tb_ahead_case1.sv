// tb_ahead_case1: one complete inference of the smaller evaluated decoder,
// an 800-20-2 network with sigmoid activations in both weight layers and
// all neurons of a layer in parallel, built from the same RTL by parameters.
// Everything is programmed over AXI4-Lite; the start-to-done time must be
// 863 cycles (1 + (800*1 + 4 + 20 + 6) + (20*1 + 4 + 2 + 6)) and both
// outputs must match the bit-exact integer model.
module tb_ahead_case1;
  import ahead_pkg::*;

  localparam int unsigned NL = 2;
  localparam int unsigned N    [NL+1] = '{800, 20, 2};
  localparam act_e        ACT  [NL]   = '{ACT_SIGMOID, ACT_SIGMOID};
  localparam int unsigned PAR  [NL]   = '{20, 2};
  localparam int unsigned PAR2 [NL]   = '{1, 1};
  localparam int unsigned X_I  [NL+1] = '{3, 1, 1};
  localparam int unsigned X_F  [NL+1] = '{4, 6, 6};
  localparam int unsigned W_I  [NL]   = '{1, 1};
  localparam int unsigned W_F  [NL]   = '{6, 6};
  localparam int unsigned P_I  [NL]   = '{4, 4};
  localparam int unsigned P_F  [NL]   = '{8, 8};
  localparam int unsigned A_I  [NL]   = '{7, 7};
  localparam int unsigned A_F  [NL]   = '{8, 8};
  localparam int unsigned S_I  [NL]   = '{3, 3};
  localparam int unsigned S_F  [NL]   = '{5, 5};
  localparam int unsigned NMAX = 800;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int   cyc = 0;
  always @(posedge clk) cyc++;

  logic [31:0] s_axi_awaddr = '0, s_axi_wdata = '0, s_axi_araddr = '0;
  logic        s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [3:0]  s_axi_wstrb = 4'hf;
  logic        s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  logic        busy, done;

  ahead_mlp_top #(
    .NL(NL), .N(N), .ACT(ACT), .PAR(PAR), .PAR2(PAR2), .X_I(X_I), .X_F(X_F),
    .W_I(W_I), .W_F(W_F), .P_I(P_I), .P_F(P_F), .A_I(A_I), .A_F(A_F), .S_I(S_I), .S_F(S_F)
  ) dut (.*);

  int checks = 0, failures = 0;
  longint xs   [NL+1][NMAX];
  int     wgt  [NL][NMAX][20];
  int     bias [NL][20];

  `include "tb_ahead_common.svh"

  int start_cyc = 0;
  always @(negedge clk) if (dut.start_req) start_cyc = cyc;

  initial begin
    logic [31:0] rd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_coefs();
    // small weights keep the 768-term sums mostly inside the sigmoid range
    for (int k = 0; k < NL; k++)
      for (int j = 0; j < N[k+1]; j++) begin
        bias[k][j] = int'($urandom_range(127)) - 64;
        for (int i = 0; i < N[k]; i++)
          wgt[k][i][j] = (k == 0) ? int'($urandom_range(15)) - 8 : int'($urandom_range(127)) - 64;
      end
    for (int i = 0; i < N[0]; i++) xs[0][i] = longint'($urandom_range(63)) - 32;
    for (int k = 0; k < NL; k++)
      for (int j = 0; j < N[k+1]; j++) begin
        axi_write(cfg_byte_addr(REG_BIAS, k, j, 0), 32'(bias[k][j]));
        for (int i = 0; i < N[k]; i++) axi_write(cfg_byte_addr(REG_WEIGHT, k, j, i), 32'(wgt[k][i][j]));
      end
    for (int i = 0; i < N[0]; i++) axi_write(cfg_byte_addr(REG_INPUT, 0, 0, i), 32'(xs[0][i]));
    for (int k = 0; k < NL; k++)
      for (int j = 0; j < N[k+1]; j++) xs[k+1][j] = model_neuron(k, j);
    axi_write(cfg_byte_addr(REG_CTRL, 0, 0, 0), 32'h1);
    while (!done) @(negedge clk);
    check("start to done cycles", longint'(cyc - start_cyc), 863);
    $display("inference took %0d cycles", cyc - start_cyc);
    axi_read(cfg_byte_addr(REG_CTRL, 0, 0, 0), rd);
    check("status done", longint'(rd[1:0]), 2);
    for (int j = 0; j < N[NL]; j++) begin
      axi_read(cfg_byte_addr(REG_OUTPUT, 0, j, 0), rd);
      check($sformatf("output %0d", j), longint'(signed'(rd)), xs[NL][j]);
      $display("output %0d = %0d / 64", j, signed'(rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
