// tb_ahead_mlp_top: end-to-end test of the decoder at reduced size.
// Network 16-6-4-3 with the three activation kinds of the decoder (linear,
// tanh, sigmoid), several groups of neurons in layer 0 (PAR < NOUT) and
// parallel activation lanes. Everything is programmed through the
// AXI4-Lite port; each of several inferences uses fresh weights and inputs,
// is started through the control register and ends with the outputs read
// back over AXI and compared with the bit-exact integer model. Also checked:
// the status register, the done pin, the start-to-done cycle count, that a
// start while busy is ignored, and that each mechanism happened at least
// once (multi-group layer, every activation kind, PWL clamping, response
// back-pressure, ignored start).
module tb_ahead_mlp_top;
  import ahead_pkg::*;

  localparam int unsigned NL = 3;
  localparam int unsigned N    [NL+1] = '{16, 6, 4, 3};
  localparam act_e        ACT  [NL]   = '{ACT_LINEAR, ACT_TANH, ACT_SIGMOID};
  localparam int unsigned PAR  [NL]   = '{4, 4, 3};
  localparam int unsigned PAR2 [NL]   = '{2, 1, 3};
  localparam int unsigned X_I  [NL+1] = '{3, 3, 1, 1};
  localparam int unsigned X_F  [NL+1] = '{4, 4, 6, 6};
  localparam int unsigned W_I  [NL]   = '{1, 1, 1};
  localparam int unsigned W_F  [NL]   = '{6, 6, 6};
  localparam int unsigned P_I  [NL]   = '{4, 4, 4};
  localparam int unsigned P_F  [NL]   = '{8, 8, 8};
  localparam int unsigned A_I  [NL]   = '{7, 7, 7};
  localparam int unsigned A_F  [NL]   = '{8, 8, 8};
  localparam int unsigned S_I  [NL]   = '{3, 4, 3};
  localparam int unsigned S_F  [NL]   = '{5, 4, 5};
  localparam int unsigned NMAX = 16;

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
  int     wgt  [NL][NMAX][NMAX];
  int     bias [NL][NMAX];

  `include "tb_ahead_common.svh"

  int n_multi_group = 0, n_start_ignored = 0, n_inferences = 0;
  int n_act [3] = '{0, 0, 0};

  // groups finished by layer 0 in one inference (more than one = multi-group)
  int grp_seen = 0;
  always @(negedge clk) if (dut.g_layer[0].u_layer.pe1_grp_done) grp_seen++;

  int start_cyc = 0;
  always @(negedge clk) if (dut.start_req) start_cyc = cyc;

  function automatic int expected_cycles();
    int t = 1;
    for (int k = 0; k < NL; k++)
      t += ((N[k+1] + PAR[k] - 1) / PAR[k]) * N[k] + 4 + (N[k+1] + PAR2[k] - 1) / PAR2[k] + 6;
    return t;
  endfunction

  initial begin
    logic [31:0] rd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_coefs();
    for (int run = 0; run < 6; run++) begin
      // stimulus: larger weights in some runs drive sums past [-8, 8)
      for (int k = 0; k < NL; k++)
        for (int j = 0; j < N[k+1]; j++) begin
          bias[k][j] = int'($urandom_range(255)) - 128;
          for (int i = 0; i < N[k]; i++)
            wgt[k][i][j] = (run % 2 == 1) ? int'($urandom_range(255)) - 128 : int'($urandom_range(63)) - 32;
        end
      for (int i = 0; i < N[0]; i++) xs[0][i] = longint'($urandom_range(255)) - 128;
      for (int k = 0; k < NL; k++)
        for (int j = 0; j < N[k+1]; j++) begin
          axi_write(cfg_byte_addr(REG_BIAS, k, j, 0), 32'(bias[k][j]), (j == 0));
          for (int i = 0; i < N[k]; i++) axi_write(cfg_byte_addr(REG_WEIGHT, k, j, i), 32'(wgt[k][i][j]));
        end
      for (int i = 0; i < N[0]; i++) axi_write(cfg_byte_addr(REG_INPUT, 0, 0, i), 32'(xs[0][i]));
      for (int k = 0; k < NL; k++) begin
        for (int j = 0; j < N[k+1]; j++) xs[k+1][j] = model_neuron(k, j);
        n_act[ACT[k]]++;
      end
      grp_seen = 0;
      axi_write(cfg_byte_addr(REG_CTRL, 0, 0, 0), 32'h1);
      axi_read(cfg_byte_addr(REG_CTRL, 0, 0, 0), rd);
      check("status busy", longint'(rd[1:0]), 1);
      if (run == 2) begin
        axi_write(cfg_byte_addr(REG_CTRL, 0, 0, 0), 32'h1);   // ignored: busy
        n_start_ignored++;
      end
      while (!done) @(negedge clk);
      n_inferences++;
      check("start to done cycles", longint'(cyc - start_cyc), expected_cycles());
      if (grp_seen > 1) n_multi_group++;
      axi_read(cfg_byte_addr(REG_CTRL, 0, 0, 0), rd);
      check("status done", longint'(rd[1:0]), 2);
      for (int j = 0; j < N[NL]; j++) begin
        axi_read(cfg_byte_addr(REG_OUTPUT, 0, j, 0), rd);
        check($sformatf("run %0d output %0d", run, j), longint'(signed'(rd)), xs[NL][j]);
      end
    end
    // each mechanism must have happened
    check("multi-group layer", longint'(n_multi_group > 0), 1);
    check("linear layers", longint'(n_act[ACT_LINEAR] > 0), 1);
    check("tanh layers", longint'(n_act[ACT_TANH] > 0), 1);
    check("sigmoid layers", longint'(n_act[ACT_SIGMOID] > 0), 1);
    check("PWL input clamped", longint'(n_clamp > 0), 1);
    check("B back-pressure", longint'(n_bp > 0), 1);
    check("start while busy ignored", longint'(n_start_ignored > 0 && n_inferences == 6), 1);
    $display("mechanisms: inferences=%0d multi_group=%0d linear=%0d tanh=%0d sigmoid=%0d clamp=%0d backpressure=%0d ignored_start=%0d",
             n_inferences, n_multi_group, n_act[0], n_act[1], n_act[2], n_clamp, n_bp, n_start_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
