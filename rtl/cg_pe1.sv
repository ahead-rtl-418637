// cg_pe1: first coarse-grained processing element of a layer.
//
// It computes the vector-matrix product X'.W' (the layer's weighted sums
// without the bias) with PAR parallel multiply-accumulate lanes. Each cycle
// one input element x_i arrives together with PAR weights w[i][g*PAR+l],
// one per lane l, where g is the current group of PAR neurons. Lane l
// multiplies, converts the product to the product node format Q(I_P,F_P),
// and adds it to its accumulator in the buffer-1 format Q(I_A,F_A). On the
// first input of a group the accumulator feedback is replaced by zero (the
// zero input of the multiplexer that clears buffer-1); after the last input
// of a group the PAR sums are written to buffer-1 at g*PAR+l. Neuron
// indices beyond NOUT (the last group can be partly empty) are dropped.
//
// Timing: data in cycle t, product register in t+1, accumulator and
// buffer-1 written at the end of t+2; grp_done pulses in the cycle after the
// write of a group's sums. One input per cycle, no stalls.
//
// From the source: the lanes, the clearing multiplexer, buffer-1, the node
// formats and the parallelism as a parameter. The saturating accumulation
// and the exact pipeline depth are this design's choices.
module cg_pe1 #(
  parameter int unsigned NOUT = 48,
  parameter int unsigned PAR  = 48,
  parameter int unsigned I_X = 3, parameter int unsigned F_X = 4,
  parameter int unsigned I_W = 1, parameter int unsigned F_W = 6,
  parameter int unsigned I_P = 4, parameter int unsigned F_P = 8,
  parameter int unsigned I_A = 7, parameter int unsigned F_A = 8,
  localparam int unsigned W_X = I_X + F_X + 1,
  localparam int unsigned W_W = I_W + F_W + 1,
  localparam int unsigned W_A = I_A + F_A + 1,
  localparam int unsigned NG  = (NOUT + PAR - 1) / PAR,
  localparam int unsigned GW  = (NG <= 2) ? 1 : $clog2(NG)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [GW-1:0]         in_grp,
  input  logic signed [W_X-1:0] in_x,
  input  logic signed [W_W-1:0] in_w [PAR],
  output logic                  grp_done,
  output logic signed [W_A-1:0] buf1 [NOUT]
);
  localparam int unsigned W_FP = W_X + W_W;       // full product
  localparam int unsigned F_FP = F_X + F_W;
  localparam int unsigned I_FP = W_FP - 1 - F_FP;
  localparam int unsigned W_P  = I_P + F_P + 1;

  // ---------------- multiply stage ----------------
  logic                  m_valid, m_first, m_last;
  logic [GW-1:0]         m_grp;
  logic signed [W_P-1:0] m_prod [PAR];
  logic signed [W_P-1:0] prod_q [PAR];
  logic signed [W_A-1:0] prod_a [PAR];

  for (genvar l = 0; l < PAR; l++) begin : g_mul
    logic signed [W_FP-1:0] prod_full;
    assign prod_full = in_x * in_w[l];
    fx_resize #(.I_IN(I_FP), .F_IN(F_FP), .I_OUT(I_P), .F_OUT(F_P)) u_rs_p (.din(prod_full), .dout(prod_q[l]));
    fx_resize #(.I_IN(I_P),  .F_IN(F_P),  .I_OUT(I_A), .F_OUT(F_A)) u_rs_a (.din(m_prod[l]),  .dout(prod_a[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_first <= 1'b0;
      m_last  <= 1'b0;
      m_grp   <= '0;
      for (int l = 0; l < PAR; l++) m_prod[l] <= '0;
    end else begin
      m_valid <= in_valid;
      if (in_valid) begin
        m_first <= in_first;
        m_last  <= in_last;
        m_grp   <= in_grp;
        for (int l = 0; l < PAR; l++) m_prod[l] <= prod_q[l];
      end
    end
  end

  // ---------------- accumulate stage ----------------
  logic signed [W_A-1:0] acc     [PAR];
  logic signed [W_A-1:0] acc_in  [PAR];   // output of the clearing mux
  logic signed [W_A:0]   acc_sum [PAR];
  logic signed [W_A-1:0] acc_nxt [PAR];

  for (genvar l = 0; l < PAR; l++) begin : g_acc
    assign acc_in[l]  = m_first ? '0 : acc[l];
    assign acc_sum[l] = (W_A+1)'(acc_in[l]) + (W_A+1)'(prod_a[l]);
    fx_resize #(.I_IN(I_A + 1), .F_IN(F_A), .I_OUT(I_A), .F_OUT(F_A)) u_rs_s (.din(acc_sum[l]), .dout(acc_nxt[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp_done <= 1'b0;
      for (int l = 0; l < PAR; l++) acc[l] <= '0;
      for (int j = 0; j < NOUT; j++) buf1[j] <= '0;
    end else begin
      grp_done <= m_valid && m_last;
      if (m_valid) begin
        for (int l = 0; l < PAR; l++) acc[l] <= acc_nxt[l];
        if (m_last) begin
          for (int l = 0; l < PAR; l++) begin
            if (32'(m_grp) * PAR + l < NOUT) buf1[32'(m_grp) * PAR + l] <= acc_nxt[l];
          end
        end
      end
    end
  end
endmodule
