// cg_pe2: second coarse-grained processing element of a layer.
//
// It finishes the layer: for every neuron j it reads the bias weight b[j]
// from the layer's weight buffer and adds it to the weighted sum in
// buffer-1, stores the result in buffer-2 in the
// sum node format Q(I_S,F_S), passes it through the activation unit and
// stores the activation in buffer-3 in the output format Q(I_Z,F_Z), which
// is the input format of the next layer. PAR2 lanes, each with its own
// activation unit, handle PAR2 neurons per cycle.
//
// Timing: start (one-cycle pulse) begins a pass over ceil(NOUT/PAR2)
// chunks, one chunk per cycle. In a chunk's cycle its bias weights are
// requested (bias_re, neuron indices bias_rj); they return on bias_rdata in
// the next cycle, when the sum is formed and written to buffer-2. Buffer-2
// is read in the cycle after that, and the activation reaches buffer-3
// three cycles later. done pulses in the cycle after the last buffer-3
// write, so a pass takes ceil(NOUT/PAR2) + 6 cycles from start to done.
// Buffer-3 is read through a registered port (z_re, z_raddr, z_rdata one
// cycle later) by the next layer; buf3 shows all of it.
//
// From the source: bias accumulation, buffer-2, configurable activation,
// buffer-3, parallel lanes. The chunk order, the one-cycle buffer-2 stage
// and the port set are this design's choices. The bias weights come from the
// weight buffer, as the bias row of the weight matrix.
module cg_pe2
  import ahead_pkg::*;
#(
  parameter int unsigned NOUT = 48,
  parameter int unsigned PAR2 = 1,
  parameter act_e        ACT  = ACT_SIGMOID,
  parameter int unsigned I_A = 7, parameter int unsigned F_A = 8,
  parameter int unsigned I_W = 1, parameter int unsigned F_W = 6,
  parameter int unsigned I_S = 3, parameter int unsigned F_S = 5,
  parameter int unsigned I_Z = 1, parameter int unsigned F_Z = 6,
  parameter int unsigned NSEG       = 16,
  parameter int          X_MIN      = -8,
  parameter int unsigned SEG_W_LOG2 = 0,
  parameter int unsigned I_CA = 1, parameter int unsigned F_CA = 8,
  parameter int unsigned I_CB = 1, parameter int unsigned F_CB = 8,
  parameter int unsigned I_M  = 4, parameter int unsigned F_M  = 10,
  localparam int unsigned W_A = I_A + F_A + 1,
  localparam int unsigned W_Z = I_Z + F_Z + 1,
  localparam int unsigned JW  = (NOUT <= 2) ? 1 : $clog2(NOUT),
  localparam int unsigned SAW = (NSEG <= 2) ? 1 : $clog2(NSEG)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  bias_re,
  output logic [JW-1:0]         bias_rj    [PAR2],
  input  logic signed [I_W+F_W:0] bias_rdata [PAR2],
  input  logic                  coef_we_a,
  input  logic                  coef_we_b,
  input  logic [SAW-1:0]        coef_waddr,
  input  logic [31:0]           coef_wdata,
  input  logic                  start,
  input  logic signed [W_A-1:0] buf1 [NOUT],
  output logic                  done,
  input  logic                  z_re,
  input  logic [JW-1:0]         z_raddr,
  output logic signed [W_Z-1:0] z_rdata,
  output logic signed [W_Z-1:0] buf3 [NOUT]
);
  localparam int unsigned W_S  = I_S + F_S + 1;
  localparam int unsigned NC   = (NOUT + PAR2 - 1) / PAR2;
  localparam int unsigned CW   = (NC <= 2) ? 1 : $clog2(NC);
  localparam int unsigned TAGW = $clog2(NOUT + 1);
  localparam int unsigned LAST_J = (NC - 1) * PAR2;

  logic signed [W_S-1:0] buf2 [NOUT];

  // ---------------- chunk sequencer ----------------
  logic          running;
  logic [CW-1:0] chunk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      chunk   <= '0;
    end else if (start) begin
      running <= 1'b1;
      chunk   <= '0;
    end else if (running) begin
      if (32'(chunk) == NC - 1) running <= 1'b0;
      else                      chunk   <= chunk + 1'b1;
    end
  end

  // ---------------- bias read request ----------------
  // The chunk counter requests the bias weights of its neurons; they come
  // back from the weight buffer one cycle later, when the adder uses them.
  // Lanes past NOUT in the last chunk repeat the request of lane 0, so a
  // banked bias memory never sees two different words asked of one bank.
  assign bias_re = running;
  for (genvar l = 0; l < PAR2; l++) begin : g_breq
    logic [31:0] j;
    assign j = 32'(chunk) * PAR2 + l;
    assign bias_rj[l] = (j < NOUT) ? JW'(j) : JW'(32'(chunk) * PAR2);
  end

  logic          a_valid;
  logic [CW-1:0] a_chunk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_chunk <= '0;
    end else begin
      a_valid <= running;
      a_chunk <= chunk;
    end
  end

  // ---------------- bias adder into buffer-2 ----------------
  logic          b2_valid;
  logic [CW-1:0] b2_chunk;

  for (genvar l = 0; l < PAR2; l++) begin : g_bias
    logic [31:0]           j;
    logic signed [W_A-1:0] bias_a, b1_val;
    logic signed [W_A:0]   sum;
    logic signed [W_S-1:0] sum_s;

    assign j      = 32'(a_chunk) * PAR2 + l;
    assign b1_val = (j < NOUT) ? buf1[j[JW-1:0]] : '0;
    fx_resize #(.I_IN(I_W), .F_IN(F_W), .I_OUT(I_A), .F_OUT(F_A)) u_rs_b (.din(bias_rdata[l]), .dout(bias_a));
    assign sum = (W_A+1)'(b1_val) + (W_A+1)'(bias_a);
    fx_resize #(.I_IN(I_A + 1), .F_IN(F_A), .I_OUT(I_S), .F_OUT(F_S)) u_rs_s (.din(sum), .dout(sum_s));

    always_ff @(posedge clk) begin
      if (a_valid && j < NOUT) buf2[j[JW-1:0]] <= sum_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b2_valid <= 1'b0;
      b2_chunk <= '0;
    end else begin
      b2_valid <= a_valid;
      b2_chunk <= a_chunk;
    end
  end

  // ---------------- activation lanes into buffer-3 ----------------
  logic                  act_valid [PAR2];
  logic signed [W_Z-1:0] act_y     [PAR2];
  logic [TAGW-1:0]       act_tag   [PAR2];

  for (genvar l = 0; l < PAR2; l++) begin : g_act
    logic [31:0]           j;
    logic signed [W_S-1:0] x;
    assign j = 32'(b2_chunk) * PAR2 + l;
    assign x = (j < NOUT) ? buf2[j[JW-1:0]] : '0;

    pwl_act #(
      .ACT(ACT), .NSEG(NSEG), .X_MIN(X_MIN), .SEG_W_LOG2(SEG_W_LOG2),
      .I_IN(I_S), .F_IN(F_S), .I_A(I_CA), .F_A(F_CA), .I_B(I_CB), .F_B(F_CB),
      .I_M(I_M), .F_M(F_M), .I_OUT(I_Z), .F_OUT(F_Z), .TAGW(TAGW)
    ) u_act (
      .clk, .rst_n,
      .coef_we_a, .coef_we_b, .coef_waddr, .coef_wdata,
      .in_valid (b2_valid && j < NOUT),
      .in_x     (x),
      .in_tag   (j[TAGW-1:0]),
      .out_valid(act_valid[l]),
      .out_y    (act_y[l]),
      .out_tag  (act_tag[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int j = 0; j < NOUT; j++) buf3[j] <= '0;
    end else begin
      done <= act_valid[0] && (32'(act_tag[0]) == LAST_J);
      for (int l = 0; l < PAR2; l++) begin
        if (act_valid[l] && 32'(act_tag[l]) < NOUT) buf3[JW'(act_tag[l])] <= act_y[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 z_rdata <= '0;
    else if (z_re && (32'(z_raddr) < NOUT)) z_rdata <= buf3[z_raddr];
  end
endmodule
