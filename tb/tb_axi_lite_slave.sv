// tb_axi_lite_slave: self-checking test of the AXI4-Lite port.
// A master model issues 300 writes and 300 reads with random address /
// data ordering (address first, data first, both together) and random
// response back-pressure. Every write must produce exactly one cfg_wr
// pulse carrying the decoded region, layer, neuron and input fields and
// the data, and one OKAY response. Every read must produce one rd_req whose
// answer (a function of the address supplied by the testbench) comes back
// on R and stays there until rready; the read response must come two
// cycles after the address handshake.
module tb_axi_lite_slave;
  import ahead_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int   cyc = 0;
  always @(posedge clk) cyc++;

  logic [31:0] s_awaddr = '0, s_wdata = '0, s_araddr = '0;
  logic        s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [3:0]  s_wstrb = 4'hf;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] s_rdata;
  cfg_wr_t     cfg_wr;
  logic        rd_req;
  cfg_addr_t   rd_addr;
  logic [31:0] rd_data;

  axi_lite_slave dut (.*);

  function automatic logic [31:0] answer(cfg_addr_t a);
    return {a, 6'h0} ^ 32'h5a5a_1234;
  endfunction
  assign rd_data = answer(rd_addr);

  int checks = 0, failures = 0;
  int cfg_pulses = 0, rd_pulses = 0;
  cfg_wr_t exp_wr [$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  always @(negedge clk) begin
    if (cfg_wr.en) begin
      cfg_wr_t e;
      cfg_pulses++;
      e = exp_wr.pop_front();
      check("cfg_wr addr", longint'(cfg_wr.addr), longint'(e.addr));
      check("cfg_wr data", longint'(cfg_wr.data), longint'(e.data));
    end
    if (rd_req) rd_pulses++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] addr, data;
      int order, waitb;
      addr = {4'h0, 3'($urandom_range(6)), 25'($urandom)} & 32'h0fff_fffc;
      data = $urandom;
      exp_wr.push_back('{en: 1'b1, addr: decode_addr(addr), data: data});
      order = $urandom_range(2);
      @(negedge clk);
      s_awaddr = addr; s_wdata = data;
      s_awvalid = (order != 1);
      s_wvalid  = (order != 0);
      fork
        begin : aw_ch
          if (order == 1) begin repeat ($urandom_range(1, 3)) @(negedge clk); s_awvalid = 1; end
          do @(posedge clk); while (!(s_awvalid && s_awready));
          #1 s_awvalid = 0; s_awaddr = $urandom;
        end
        begin : w_ch
          if (order == 0) begin repeat ($urandom_range(1, 3)) @(negedge clk); s_wvalid = 1; end
          do @(posedge clk); while (!(s_wvalid && s_wready));
          #1 s_wvalid = 0; s_wdata = $urandom;
        end
      join
      waitb = $urandom_range(3);
      while (!s_bvalid) @(negedge clk);
      repeat (waitb) begin
        @(negedge clk);
        check("bvalid held", longint'(s_bvalid), 1);
      end
      s_bready = 1;
      @(posedge clk); #1 s_bready = 0;
      check("bresp", longint'(s_bresp), 0);
    end
    repeat (3) @(negedge clk);
    check("one cfg pulse per write", longint'(cfg_pulses), 300);
    check("expectations used up", longint'(exp_wr.size()), 0);
    for (int n = 0; n < 300; n++) begin
      logic [31:0] addr;
      int t_ar, waitr;
      addr = {4'h0, 28'($urandom)} & 32'h0fff_fffc;
      @(negedge clk);
      s_arvalid = 1; s_araddr = addr;
      do @(posedge clk); while (!s_arready);
      t_ar = cyc;
      #1 s_arvalid = 0; s_araddr = $urandom;
      while (!s_rvalid) @(negedge clk);
      check("read latency", longint'(cyc - t_ar), 2);
      waitr = $urandom_range(3);
      repeat (waitr) begin
        @(negedge clk);
        check("rvalid held", longint'(s_rvalid), 1);
      end
      check("rdata", longint'(s_rdata), longint'(answer(decode_addr(addr))));
      check("rresp", longint'(s_rresp), 0);
      s_rready = 1;
      @(posedge clk); #1 s_rready = 0;
    end
    @(negedge clk);
    check("one rd_req per read", longint'(rd_pulses), 300);
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
