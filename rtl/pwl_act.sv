// pwl_act: configurable piecewise-linear activation function.
//
// The input range [X_MIN, X_MIN + NSEG*2^SEG_W_LOG2) is cut into NSEG line
// segments of equal width. For an input x the address generation unit (AGU)
// picks the segment that holds x, two small coefficient memories give the
// slope a and the intercept b of that segment, and the output is a*x + b.
// Inputs outside the range are clamped to its ends first, so the first and
// last segments are not extended beyond it. Loading the coefficients of a
// sigmoid or of a hyperbolic tangent gives that function; ACT = ACT_LINEAR
// bypasses the lines and only converts x to the output format.
//
// Interface: x arrives with in_valid and a tag (the neuron index) that
// travels with it; y leaves on out_valid exactly 3 cycles later, one result
// per cycle at full rate. Pipeline registers sit after the coefficient read,
// after the multiplier and after the adder. Coefficients are written one
// per cycle through coef_we_a / coef_we_b (segment index coef_waddr, value in
// the low bits of coef_wdata) and reset to zero.
//
// From the source: the AGU, the two coefficient memories, one multiplier and
// one adder with pipeline registers, and 16 segments over [-8, 8) as the
// default. The clamping, the segment search by integer part and the
// intermediate Q format (I_M, F_M) of a*x and b are this design's choices.
module pwl_act
  import ahead_pkg::*;
#(
  parameter act_e        ACT        = ACT_SIGMOID,
  parameter int unsigned NSEG       = 16,
  parameter int          X_MIN      = -8,
  parameter int unsigned SEG_W_LOG2 = 0,
  parameter int unsigned I_IN  = 3,  parameter int unsigned F_IN  = 5,
  parameter int unsigned I_A   = 1,  parameter int unsigned F_A   = 8,
  parameter int unsigned I_B   = 1,  parameter int unsigned F_B   = 8,
  parameter int unsigned I_M   = 4,  parameter int unsigned F_M   = 10,
  parameter int unsigned I_OUT = 1,  parameter int unsigned F_OUT = 6,
  parameter int unsigned TAGW  = 8,
  localparam int unsigned W_IN  = I_IN + F_IN + 1,
  localparam int unsigned W_OUT = I_OUT + F_OUT + 1,
  localparam int unsigned SAW   = (NSEG <= 2) ? 1 : $clog2(NSEG)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    coef_we_a,
  input  logic                    coef_we_b,
  input  logic [SAW-1:0]          coef_waddr,
  input  logic [31:0]             coef_wdata,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  in_x,
  input  logic [TAGW-1:0]         in_tag,
  output logic                    out_valid,
  output logic signed [W_OUT-1:0] out_y,
  output logic [TAGW-1:0]         out_tag
);
  localparam int unsigned W_A = I_A + F_A + 1;
  localparam int unsigned W_B = I_B + F_B + 1;
  localparam int unsigned W_M = I_M + F_M + 1;
  localparam int unsigned W_P = W_IN + W_A;          // full product width
  localparam int unsigned F_P = F_IN + F_A;
  localparam int unsigned I_P = W_P - 1 - F_P;

  // Range ends in input codes; the upper end is the last code below the top.
  localparam longint XLO_L = longint'(X_MIN) * (64'sd1 <<< F_IN);
  localparam longint XHI_L = (longint'(X_MIN) + (longint'(NSEG) <<< SEG_W_LOG2)) * (64'sd1 <<< F_IN) - 1;
  localparam longint IN_MAX = (64'sd1 <<< (W_IN - 1)) - 1;
  localparam longint IN_MIN = -(64'sd1 <<< (W_IN - 1));
  localparam logic signed [W_IN:0] XLO = (XLO_L < IN_MIN) ? (W_IN+1)'(IN_MIN) : (W_IN+1)'(XLO_L);
  localparam logic signed [W_IN:0] XHI = (XHI_L > IN_MAX) ? (W_IN+1)'(IN_MAX) : (W_IN+1)'(XHI_L);

  logic signed [W_A-1:0] coef_a [NSEG];
  logic signed [W_B-1:0] coef_b [NSEG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSEG; s++) begin
        coef_a[s] <= '0;
        coef_b[s] <= '0;
      end
    end else begin
      if (coef_we_a && (32'(coef_waddr) < NSEG)) coef_a[coef_waddr] <= coef_wdata[W_A-1:0];
      if (coef_we_b && (32'(coef_waddr) < NSEG)) coef_b[coef_waddr] <= coef_wdata[W_B-1:0];
    end
  end

  // ---------------- AGU: clamp x and find its segment ----------------
  logic signed [W_IN:0]  x_ext, x_clamp;
  logic signed [W_IN:0]  seg_off;      // (x_clamp - XLO) in input codes, >= 0
  logic [SAW-1:0]        seg_idx;

  always_comb begin
    x_ext = (W_IN+1)'(in_x);
    if (x_ext < XLO)      x_clamp = XLO;
    else if (x_ext > XHI) x_clamp = XHI;
    else                  x_clamp = x_ext;
    seg_off = x_clamp - XLO;
    seg_idx = SAW'(seg_off >>> (F_IN + SEG_W_LOG2));
  end

  // ---------------- stage 1: coefficient read ----------------
  logic                   s1_valid;
  logic signed [W_IN-1:0] s1_x;
  logic signed [W_A-1:0]  s1_a;
  logic signed [W_B-1:0]  s1_b;
  logic [TAGW-1:0]        s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_x     <= '0;
      s1_a     <= '0;
      s1_b     <= '0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_x   <= (ACT == ACT_LINEAR) ? in_x : x_clamp[W_IN-1:0];
        s1_a   <= coef_a[seg_idx];
        s1_b   <= coef_b[seg_idx];
        s1_tag <= in_tag;
      end
    end
  end

  // ---------------- stage 2: multiply ----------------
  logic signed [W_P-1:0] prod_full;
  logic signed [W_M-1:0] prod_m, b_m, x_m;

  assign prod_full = s1_x * s1_a;

  fx_resize #(.I_IN(I_P),  .F_IN(F_P),  .I_OUT(I_M), .F_OUT(F_M)) u_rs_prod (.din(prod_full), .dout(prod_m));
  fx_resize #(.I_IN(I_B),  .F_IN(F_B),  .I_OUT(I_M), .F_OUT(F_M)) u_rs_b    (.din(s1_b),      .dout(b_m));
  fx_resize #(.I_IN(I_IN), .F_IN(F_IN), .I_OUT(I_M), .F_OUT(F_M)) u_rs_x    (.din(s1_x),      .dout(x_m));

  logic                  s2_valid;
  logic signed [W_M-1:0] s2_p, s2_b;
  logic [TAGW-1:0]       s2_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_p     <= '0;
      s2_b     <= '0;
      s2_tag   <= '0;
    end else begin
      s2_valid <= s1_valid;
      if (s1_valid) begin
        // A linear layer passes x through the same registers.
        s2_p   <= (ACT == ACT_LINEAR) ? x_m : prod_m;
        s2_b   <= (ACT == ACT_LINEAR) ? '0  : b_m;
        s2_tag <= s1_tag;
      end
    end
  end

  // ---------------- stage 3: add ----------------
  logic signed [W_M:0]     sum;
  logic signed [W_OUT-1:0] sum_out;

  assign sum = (W_M+1)'(s2_p) + (W_M+1)'(s2_b);

  fx_resize #(.I_IN(I_M + 1), .F_IN(F_M), .I_OUT(I_OUT), .F_OUT(F_OUT)) u_rs_sum (.din(sum), .dout(sum_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_y     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= s2_valid;
      if (s2_valid) begin
        out_y   <= sum_out;
        out_tag <= s2_tag;
      end
    end
  end
endmodule
