// tb_buffer_mem: self-checking test of the registered-read buffer memory.
// Fills a 100 x 8 memory with random words, reads them back in random
// order and checks the word, the one-cycle read latency, that rdata holds
// while re is low, that a same-cycle write and read return the old word and
// that writes beyond DEPTH are ignored.
module tb_buffer_mem;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 100;
  localparam int unsigned AW    = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we = 1'b0, re = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  int checks = 0;
  int failures = 0;

  buffer_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = WIDTH'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    // out-of-range writes must not alias onto low addresses
    for (int a = DEPTH; a < 128; a++) begin
      waddr = AW'(a); wdata = 8'hA5;
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < 400; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      re = 1'b1; raddr = AW'(a);
      @(posedge clk); #1;
      check("read", rdata, model[a]);
      re = 1'b0; raddr = AW'((a + 1) % DEPTH);
      @(posedge clk); #1;
      check("hold", rdata, model[a]);
    end
    // write and read of one address in the same cycle: old word comes out
    re = 1'b1; we = 1'b1; raddr = 7'd5; waddr = 7'd5; wdata = ~model[5];
    @(posedge clk); #1;
    check("read-during-write", rdata, model[5]);
    model[5] = ~model[5];
    we = 1'b0;
    @(posedge clk); #1;
    check("after write", rdata, model[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
