// tb_fx_resize: self-checking test of the Q-format conversion.
// Three instances cover narrowing with truncation and saturation, widening
// of the fraction, and a format change in both directions. Random and edge
// inputs are compared with a reference computed on 64-bit integers:
// out = floor(in * 2^(F_OUT-F_IN)), clipped to the output range.
module tb_fx_resize;
  int checks = 0;
  int failures = 0;

  // instance A: Q(7,8) -> Q(3,4)
  logic signed [15:0] a_in;
  logic signed [7:0]  a_out;
  fx_resize #(.I_IN(7), .F_IN(8), .I_OUT(3), .F_OUT(4)) u_a (.din(a_in), .dout(a_out));
  // instance B: Q(1,6) -> Q(7,8)
  logic signed [7:0]  b_in;
  logic signed [15:0] b_out;
  fx_resize #(.I_IN(1), .F_IN(6), .I_OUT(7), .F_OUT(8)) u_b (.din(b_in), .dout(b_out));
  // instance C: Q(6,2) -> Q(2,7)
  logic signed [8:0]  c_in;
  logic signed [9:0]  c_out;
  fx_resize #(.I_IN(6), .F_IN(2), .I_OUT(2), .F_OUT(7)) u_c (.din(c_in), .dout(c_out));

  function automatic longint ref_resize(longint v, int fi, int fo, int wo);
    longint r, mx, mn;
    if (fo >= fi) r = v <<< (fo - fi);
    else          r = v >>> (fi - fo);
    mx = (64'sd1 <<< (wo - 1)) - 1;
    mn = -(64'sd1 <<< (wo - 1));
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return r;
  endfunction

  task automatic check(string name, longint got, longint exp, longint in);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%0d got=%0d exp=%0d", name, in, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      if (n < 8) begin
        a_in = (n[0]) ? 16'sh7fff : -16'sh8000;
        b_in = (n[1]) ? 8'sh7f : -8'sh80;
        c_in = (n[2]) ? 9'sh0ff : -9'sh100;
      end else begin
        a_in = 16'($urandom);
        b_in = 8'($urandom);
        c_in = 9'($urandom);
      end
      #1;
      check("A", longint'(a_out), ref_resize(longint'(a_in), 8, 4, 8), longint'(a_in));
      check("B", longint'(b_out), ref_resize(longint'(b_in), 6, 8, 16), longint'(b_in));
      check("C", longint'(c_out), ref_resize(longint'(c_in), 2, 7, 10), longint'(c_in));
    end
    // spot values worked out by hand: 1.5 in Q(7,8) is 384 -> 24 in Q(3,4);
    // 100.0 saturates to 127; -0.0625-1/256 truncates to -2 (-0.125).
    a_in = 16'sd384;  #1 check("A1", longint'(a_out), 24, 384);
    a_in = 16'sd25600; #1 check("A2", longint'(a_out), 127, 25600);
    a_in = -16'sd17;  #1 check("A3", longint'(a_out), -2, -17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
