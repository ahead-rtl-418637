// tb_cg_pe1: self-checking test of the parallel multiply-accumulate element.
// NOUT = 10 neurons on PAR = 4 lanes gives three groups, the last one half
// empty. For each group the 20 inputs are streamed back to back with the
// weights of the group's neurons; buffer-1 is then compared with an integer
// model (product truncated to Q(4,8), saturating accumulation in Q(7,8)).
// Several passes with fresh random data check that buffer-1 is cleared at
// the start of each group; one pass uses large values to reach saturation.
// grp_done must follow the last input of a group by exactly two cycles.
module tb_cg_pe1;
  localparam int unsigned NOUT = 10, PAR = 4, NIN = 20, NG = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int   cyc = 0;
  always @(posedge clk) cyc++;

  logic              in_valid = 0, in_first = 0, in_last = 0;
  logic [1:0]        in_grp = '0;
  logic signed [7:0] in_x = '0;
  logic signed [7:0] in_w [PAR];
  logic              grp_done;
  logic signed [15:0] buf1 [NOUT];

  cg_pe1 #(.NOUT(NOUT), .PAR(PAR)) dut (.*);

  int checks = 0, failures = 0;
  int xv [NIN];
  int wv [NIN][NOUT];
  int last_cyc, done_cnt, sat_hits;

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  always @(negedge clk) begin
    if (grp_done) begin
      done_cnt++;
      check("grp_done latency", longint'(cyc - last_cyc), 2);
    end
  end

  initial begin
    for (int l = 0; l < PAR; l++) in_w[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 6; pass++) begin
      bit big;
      big = (pass == 5);
      for (int i = 0; i < NIN; i++) begin
        xv[i] = big ? 120 + $urandom_range(7) : int'($urandom_range(255)) - 128;
        for (int j = 0; j < NOUT; j++)
          wv[i][j] = big ? ((j % 2 == 0) ? 127 : -128) : int'($urandom_range(255)) - 128;
      end
      done_cnt = 0;
      for (int g = 0; g < NG; g++) begin
        for (int i = 0; i < NIN; i++) begin
          // an idle cycle inside the stream must change nothing
          if (i == 7 && pass == 2) begin
            @(negedge clk);
            in_valid = 0; in_x = 8'sd99;
          end
          @(negedge clk);
          in_valid = 1; in_first = (i == 0); in_last = (i == NIN - 1); in_grp = 2'(g);
          in_x = 8'(xv[i]);
          for (int l = 0; l < PAR; l++) in_w[l] = (g * PAR + l < NOUT) ? 8'(wv[i][g * PAR + l]) : 8'(7 * l + 1);
          if (in_last) last_cyc = cyc;
        end
      end
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
      repeat (4) @(negedge clk);
      check("groups done", longint'(done_cnt), NG);
      for (int j = 0; j < NOUT; j++) begin
        longint acc, p;
        acc = 0;
        for (int i = 0; i < NIN; i++) begin
          p   = sat((longint'(xv[i]) * longint'(wv[i][j])) >>> 2, 13);
          acc = sat(acc + p, 16);
        end
        if (acc == 32767 || acc == -32768) sat_hits++;
        check($sformatf("buf1[%0d] pass %0d", j, pass), longint'(buf1[j]), acc);
      end
    end
    check("saturation reached", longint'(sat_hits > 0), 1);
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
