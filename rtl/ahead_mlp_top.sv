// ahead_mlp_top: fixed-point MLP neural decoder with an AXI4-Lite port.
//
// The decoder evaluates a fully connected network of NL weight layers on
// one input vector: layer k maps N[k] inputs to N[k+1] neurons with its
// own activation ACT[k] (linear, or a piecewise-linear tanh or sigmoid).
// Every layer has its own signed fixed-point formats Q(IBW,FBW) for its six
// signal nodes: input x, weight w, product, buffer-1 (weighted sum),
// buffer-2 (sum plus bias) and buffer-3 (activation), and buffer-3 of one
// layer is the input of the next (X_I/X_F[k+1]). The defaults are the
// 768-48-20-2 sigmoid network of the larger evaluated decoder, with every
// neuron of a layer computed in parallel (PAR[k] = N[k+1]).
//
// A host programs the input buffer, the weights, the biases and the PWL
// coefficients through the AXI4-Lite port (address map in ahead_pkg),
// writes 1 to the control register to start, waits for done (status bit 1
// or the done output), and reads the outputs of the last layer from the
// output region. The layers run one after the other: layer k+1 starts in
// the cycle after layer k is done, so one inference takes the sum of the
// layer latencies given in mlp_layer (plus one cycle to start), and the
// next inference can start once done is seen. A start while busy is ignored.
//
// Follows the source: the layer chain of CG-PE1 / CG-PE2 blocks, the
// partitioned weight buffers and input buffer on the AXI bus, per-node
// fixed-point formats and PWL activations. Own choices: all default bit
// widths (the source gives only their averages), the address map, the
// start/done control and the layer-after-layer schedule.
module ahead_mlp_top
  import ahead_pkg::*;
#(
  parameter int unsigned NL = 3,
  parameter int unsigned N    [NL+1] = '{768, 48, 20, 2},
  parameter act_e        ACT  [NL]   = '{ACT_SIGMOID, ACT_SIGMOID, ACT_SIGMOID},
  parameter int unsigned PAR  [NL]   = '{48, 20, 2},
  parameter int unsigned PAR2 [NL]   = '{1, 1, 1},
  parameter int unsigned X_I  [NL+1] = '{3, 1, 1, 1},
  parameter int unsigned X_F  [NL+1] = '{4, 6, 6, 6},
  parameter int unsigned W_I  [NL]   = '{1, 1, 1},
  parameter int unsigned W_F  [NL]   = '{6, 6, 6},
  parameter int unsigned P_I  [NL]   = '{4, 4, 4},
  parameter int unsigned P_F  [NL]   = '{8, 8, 8},
  parameter int unsigned A_I  [NL]   = '{7, 7, 7},
  parameter int unsigned A_F  [NL]   = '{8, 8, 8},
  parameter int unsigned S_I  [NL]   = '{3, 3, 3},
  parameter int unsigned S_F  [NL]   = '{5, 5, 5},
  parameter int unsigned NSEG       = 16,
  parameter int          X_MIN      = -8,
  parameter int unsigned SEG_W_LOG2 = 0,
  parameter int unsigned I_CA = 1, parameter int unsigned F_CA = 8,
  parameter int unsigned I_CB = 1, parameter int unsigned F_CB = 8,
  parameter int unsigned I_M  = 4, parameter int unsigned F_M  = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [31:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        busy,
  output logic        done
);
  localparam int unsigned W_X0 = X_I[0] + X_F[0] + 1;
  localparam int unsigned NOUT = N[NL];
  localparam int unsigned IAW0 = (N[0] <= 2) ? 1 : $clog2(N[0]);
  localparam int unsigned JWL  = (NOUT <= 2) ? 1 : $clog2(NOUT);

  cfg_wr_t     cfg_wr;
  logic        rd_req;
  cfg_addr_t   rd_addr;
  logic [31:0] rd_data;

  axi_lite_slave u_axi (
    .clk, .rst_n,
    .s_awaddr(s_axi_awaddr), .s_awvalid(s_axi_awvalid), .s_awready(s_axi_awready),
    .s_wdata(s_axi_wdata), .s_wstrb(s_axi_wstrb), .s_wvalid(s_axi_wvalid), .s_wready(s_axi_wready),
    .s_bresp(s_axi_bresp), .s_bvalid(s_axi_bvalid), .s_bready(s_axi_bready),
    .s_araddr(s_axi_araddr), .s_arvalid(s_axi_arvalid), .s_arready(s_axi_arready),
    .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp), .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
    .cfg_wr, .rd_req, .rd_addr, .rd_data
  );

  // ---------------- input buffer ----------------
  logic                   in_re;
  logic [IAW0-1:0]        in_raddr;
  logic signed [W_X0-1:0] in_rdata;

  buffer_mem #(.WIDTH(W_X0), .DEPTH(N[0])) u_input_buffer (
    .clk,
    .we   (cfg_wr.en && cfg_wr.addr.region == REG_INPUT && 32'(cfg_wr.addr.i) < N[0]),
    .waddr(IAW0'(cfg_wr.addr.i)),
    .wdata(cfg_wr.data[W_X0-1:0]),
    .re   (in_re),
    .raddr(in_raddr),
    .rdata(in_rdata)
  );

  // ---------------- control ----------------
  logic start_req;
  logic layer_start [NL];
  logic layer_done  [NL];
  logic layer_busy  [NL];

  assign start_req = cfg_wr.en && cfg_wr.addr.region == REG_CTRL
                     && cfg_wr.data[CTRL_START_BIT] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start_req) begin
      busy <= 1'b1;
      done <= 1'b0;
    end else if (layer_done[NL-1]) begin
      busy <= 1'b0;
      done <= 1'b1;
    end
  end

  // ---------------- layer chain ----------------
  for (genvar k = 0; k < NL; k++) begin : g_layer
    localparam int unsigned WX  = X_I[k] + X_F[k] + 1;
    localparam int unsigned WZ  = X_I[k+1] + X_F[k+1] + 1;
    localparam int unsigned IAW = (N[k] <= 2) ? 1 : $clog2(N[k]);
    localparam int unsigned JW  = (N[k+1] <= 2) ? 1 : $clog2(N[k+1]);

    logic                 x_re;
    logic [IAW-1:0]       x_raddr;
    logic signed [WX-1:0] x_rdata;
    logic                 z_re;
    logic [JW-1:0]        z_raddr;
    logic signed [WZ-1:0] z_rdata;
    logic signed [WZ-1:0] buf3 [N[k+1]];

    if (k == 0) begin : g_first
      assign layer_start[k] = start_req;
      assign in_re          = x_re;
      assign in_raddr       = x_raddr;
      assign x_rdata        = in_rdata;
    end else begin : g_next
      assign layer_start[k]        = layer_done[k-1];
      assign g_layer[k-1].z_re     = x_re;
      assign g_layer[k-1].z_raddr  = x_raddr;
      assign x_rdata               = g_layer[k-1].z_rdata;
    end

    if (k == NL - 1) begin : g_last
      assign z_re    = 1'b0;
      assign z_raddr = '0;
    end

    mlp_layer #(
      .LAYER_ID(k), .NIN(N[k]), .NOUT(N[k+1]), .PAR(PAR[k]), .PAR2(PAR2[k]), .ACT(ACT[k]),
      .I_X(X_I[k]), .F_X(X_F[k]), .I_W(W_I[k]), .F_W(W_F[k]),
      .I_P(P_I[k]), .F_P(P_F[k]), .I_A(A_I[k]), .F_A(A_F[k]),
      .I_S(S_I[k]), .F_S(S_F[k]), .I_Z(X_I[k+1]), .F_Z(X_F[k+1]),
      .NSEG(NSEG), .X_MIN(X_MIN), .SEG_W_LOG2(SEG_W_LOG2),
      .I_CA(I_CA), .F_CA(F_CA), .I_CB(I_CB), .F_CB(F_CB), .I_M(I_M), .F_M(F_M)
    ) u_layer (
      .clk, .rst_n, .cfg_wr,
      .start(layer_start[k]), .busy(layer_busy[k]), .done(layer_done[k]),
      .x_re, .x_raddr, .x_rdata,
      .z_re, .z_raddr, .z_rdata, .buf3
    );
  end

  // ---------------- read path ----------------
  logic unused_busy;
  always_comb begin
    unused_busy = 1'b0;
    for (int k = 0; k < NL; k++) unused_busy |= layer_busy[k];
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr.region)
      REG_CTRL: begin
        rd_data[STAT_BUSY_BIT] = busy;
        rd_data[STAT_DONE_BIT] = done;
      end
      REG_OUTPUT: begin
        if (32'(rd_addr.j) < NOUT) rd_data = 32'(g_layer[NL-1].buf3[JWL'(rd_addr.j)]);
      end
      default: rd_data = '0;
    endcase
  end

  logic unused_rd;
  assign unused_rd = rd_req;
endmodule
