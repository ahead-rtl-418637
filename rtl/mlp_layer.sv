// mlp_layer: one fully connected layer of the MLP decoder.
//
// Computes z = f(x.W + b) for an input vector x of NIN elements and NOUT
// neurons. The weight matrix, with the bias weights as its last row, sits
// in PAR memory banks (the partitioned weight buffer): weight w[i][j] is
// held by bank j mod PAR at word (j div PAR)*NIN + i, so one read of all
// banks gives the PAR weights of one input for one group of neurons; the
// bias b[j] is in the same bank at word ceil(NOUT/PAR)*NIN + j div PAR and
// is read by CG-PE2. PAR2 must not exceed PAR. The layer sequencer first
// streams the inputs through CG-PE1 once per group of PAR neurons (NIN cycles per
// group), which fills buffer-1, and then starts CG-PE2, which adds the bias,
// applies the activation and fills buffer-3.
//
// Interface: start is a one-cycle pulse; the layer reads its input vector
// through a registered port (x_re, x_raddr; x_rdata one cycle later) from
// the previous layer's buffer-3 or the input buffer, and pulses done when
// buffer-3 is complete. The next layer reads buffer-3 through z_re /
// z_raddr / z_rdata. Weights, biases and PWL coefficients are written
// through cfg_wr (decoded configuration word, see ahead_pkg) when
// cfg_wr.addr.layer equals LAYER_ID.
// Latency from start to done: ceil(NOUT/PAR)*NIN + 4 cycles for CG-PE1 and
// ceil(NOUT/PAR2) + 6 cycles for CG-PE2.
//
// The structure (weight buffer, CG-PE1, CG-PE2, per-node formats) follows
// the source. The bank mapping, the strictly sequential CG-PE1 then CG-PE2
// order and the configuration port are this design's choices.
module mlp_layer
  import ahead_pkg::*;
#(
  parameter int unsigned LAYER_ID = 0,
  parameter int unsigned NIN  = 768,
  parameter int unsigned NOUT = 48,
  parameter int unsigned PAR  = 48,
  parameter int unsigned PAR2 = 1,
  parameter act_e        ACT  = ACT_SIGMOID,
  parameter int unsigned I_X = 3, parameter int unsigned F_X = 4,
  parameter int unsigned I_W = 1, parameter int unsigned F_W = 6,
  parameter int unsigned I_P = 4, parameter int unsigned F_P = 8,
  parameter int unsigned I_A = 7, parameter int unsigned F_A = 8,
  parameter int unsigned I_S = 3, parameter int unsigned F_S = 5,
  parameter int unsigned I_Z = 1, parameter int unsigned F_Z = 6,
  parameter int unsigned NSEG       = 16,
  parameter int          X_MIN      = -8,
  parameter int unsigned SEG_W_LOG2 = 0,
  parameter int unsigned I_CA = 1, parameter int unsigned F_CA = 8,
  parameter int unsigned I_CB = 1, parameter int unsigned F_CB = 8,
  parameter int unsigned I_M  = 4, parameter int unsigned F_M  = 10,
  localparam int unsigned W_X  = I_X + F_X + 1,
  localparam int unsigned W_Z  = I_Z + F_Z + 1,
  localparam int unsigned IAW  = (NIN <= 2) ? 1 : $clog2(NIN),
  localparam int unsigned JW   = (NOUT <= 2) ? 1 : $clog2(NOUT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cfg_wr_t               cfg_wr,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic                  x_re,
  output logic [IAW-1:0]        x_raddr,
  input  logic signed [W_X-1:0] x_rdata,
  input  logic                  z_re,
  input  logic [JW-1:0]         z_raddr,
  output logic signed [W_Z-1:0] z_rdata,
  output logic signed [W_Z-1:0] buf3 [NOUT]
);
  localparam int unsigned W_W   = I_W + F_W + 1;
  localparam int unsigned W_A   = I_A + F_A + 1;
  localparam int unsigned NG    = (NOUT + PAR - 1) / PAR;
  localparam int unsigned GW    = (NG <= 2) ? 1 : $clog2(NG);
  localparam int unsigned BDEPTH = NG * NIN + NG;   // weights, then one bias word per group
  localparam int unsigned BAW   = (BDEPTH <= 2) ? 1 : $clog2(BDEPTH);
  localparam int unsigned SAW   = (NSEG <= 2) ? 1 : $clog2(NSEG);

  // ---------------- configuration decode ----------------
  logic mine;
  assign mine = cfg_wr.en && (32'(cfg_wr.addr.layer) == LAYER_ID);

  logic [31:0] cfg_j, cfg_i;
  assign cfg_j = 32'(cfg_wr.addr.j);
  assign cfg_i = 32'(cfg_wr.addr.i);

  // ---------------- partitioned weight buffer ----------------
  typedef enum logic [1:0] {S_IDLE, S_PE1, S_WAIT1, S_PE2} state_e;
  state_e state;

  logic [IAW-1:0]        rd_i;
  logic [GW-1:0]         rd_g;
  logic                  rd_en;
  logic signed [W_W-1:0] w_rdata [PAR];

  // Bias read requests of CG-PE2: PAR2 <= PAR consecutive neurons always
  // sit in different banks, so each bank serves at most one lane.
  logic                  bias_re;
  logic [JW-1:0]         bias_rj   [PAR2];
  logic [JW-1:0]         bias_rj_q [PAR2];
  logic signed [W_W-1:0] bias_rdata [PAR2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int l = 0; l < PAR2; l++) bias_rj_q[l] <= '0;
    else if (bias_re) for (int l = 0; l < PAR2; l++) bias_rj_q[l] <= bias_rj[l];
  end

  for (genvar l = 0; l < PAR2; l++) begin : g_bias_rd
    assign bias_rdata[l] = w_rdata[32'(bias_rj_q[l]) % PAR];
  end

  for (genvar b = 0; b < PAR; b++) begin : g_bank
    logic           we, re;
    logic [BAW-1:0] waddr, raddr, bias_addr;
    logic           bias_hit;
    logic [W_W-1:0] rdata;

    always_comb begin
      we    = 1'b0;
      waddr = '0;
      if (mine && cfg_j < NOUT && cfg_j % PAR == b) begin
        if (cfg_wr.addr.region == REG_WEIGHT && cfg_i < NIN) begin
          we    = 1'b1;
          waddr = BAW'((cfg_j / PAR) * NIN + cfg_i);
        end else if (cfg_wr.addr.region == REG_BIAS) begin
          we    = 1'b1;
          waddr = BAW'(NG * NIN + cfg_j / PAR);
        end
      end
    end

    always_comb begin
      bias_hit  = 1'b0;
      bias_addr = '0;
      for (int l = 0; l < PAR2; l++) begin
        if (32'(bias_rj[l]) % PAR == b) begin
          bias_hit  = 1'b1;
          bias_addr = BAW'(NG * NIN + 32'(bias_rj[l]) / PAR);
        end
      end
    end

    assign re    = rd_en || (bias_re && bias_hit);
    assign raddr = rd_en ? BAW'(32'(rd_g) * NIN + 32'(rd_i)) : bias_addr;

    buffer_mem #(.WIDTH(W_W), .DEPTH(BDEPTH)) u_bank (
      .clk, .we, .waddr, .wdata(cfg_wr.data[W_W-1:0]),
      .re, .raddr, .rdata
    );
    assign w_rdata[b] = rdata;
  end

  if (PAR2 > PAR) begin : g_par_check
    $error("mlp_layer: PAR2 must not exceed PAR");
  end

  // ---------------- layer sequencer ----------------
  logic          rd_first, rd_last;
  logic          d_valid, d_first, d_last;   // aligned with memory outputs
  logic [GW-1:0] d_grp;
  logic          pe1_grp_done, pe2_start, pe2_done;

  // Groups whose sums CG-PE1 has written; the last one ends the CG-PE1 phase.
  logic [GW:0] grp_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        grp_cnt <= '0;
    else if (start && state == S_IDLE) grp_cnt <= '0;
    else if (pe1_grp_done)             grp_cnt <= grp_cnt + 1'b1;
  end

  assign rd_en    = (state == S_PE1);
  assign rd_first = (rd_i == '0);
  assign rd_last  = (32'(rd_i) == NIN - 1);
  assign x_re     = rd_en;
  assign x_raddr  = rd_i;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_i      <= '0;
      rd_g      <= '0;
      pe2_start <= 1'b0;
      d_valid   <= 1'b0;
      d_first   <= 1'b0;
      d_last    <= 1'b0;
      d_grp     <= '0;
    end else begin
      pe2_start <= 1'b0;
      d_valid   <= rd_en;
      d_first   <= rd_first;
      d_last    <= rd_last;
      d_grp     <= rd_g;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_PE1;
          rd_i  <= '0;
          rd_g  <= '0;
        end
        S_PE1: begin
          if (rd_last) begin
            rd_i <= '0;
            if (32'(rd_g) == NG - 1) state <= S_WAIT1;
            else                     rd_g  <= rd_g + 1'b1;
          end else begin
            rd_i <= rd_i + 1'b1;
          end
        end
        S_WAIT1: if (pe1_grp_done && 32'(grp_cnt) == NG - 1) begin
          state     <= S_PE2;
          pe2_start <= 1'b1;
        end
        S_PE2: if (pe2_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = pe2_done;


  // ---------------- processing elements ----------------
  logic signed [W_A-1:0] buf1 [NOUT];

  cg_pe1 #(
    .NOUT(NOUT), .PAR(PAR),
    .I_X(I_X), .F_X(F_X), .I_W(I_W), .F_W(F_W),
    .I_P(I_P), .F_P(F_P), .I_A(I_A), .F_A(F_A)
  ) u_pe1 (
    .clk, .rst_n,
    .in_valid(d_valid), .in_first(d_first), .in_last(d_last), .in_grp(d_grp),
    .in_x(x_rdata), .in_w(w_rdata),
    .grp_done(pe1_grp_done), .buf1
  );

  cg_pe2 #(
    .NOUT(NOUT), .PAR2(PAR2), .ACT(ACT),
    .I_A(I_A), .F_A(F_A), .I_W(I_W), .F_W(F_W),
    .I_S(I_S), .F_S(F_S), .I_Z(I_Z), .F_Z(F_Z),
    .NSEG(NSEG), .X_MIN(X_MIN), .SEG_W_LOG2(SEG_W_LOG2),
    .I_CA(I_CA), .F_CA(F_CA), .I_CB(I_CB), .F_CB(F_CB), .I_M(I_M), .F_M(F_M)
  ) u_pe2 (
    .clk, .rst_n,
    .bias_re, .bias_rj, .bias_rdata,
    .coef_we_a (mine && cfg_wr.addr.region == REG_COEF_A),
    .coef_we_b (mine && cfg_wr.addr.region == REG_COEF_B),
    .coef_waddr(SAW'(cfg_i)),
    .coef_wdata(cfg_wr.data),
    .start(pe2_start), .buf1, .done(pe2_done),
    .z_re, .z_raddr, .z_rdata, .buf3
  );
endmodule
