// axi_lite_slave: AXI4-Lite slave port of the decoder.
//
// It lets any master on the on-chip AXI bus program the decoder: each
// accepted write becomes one decoded configuration word (cfg_wr, valid for
// one cycle), each accepted read becomes a one-cycle read request (rd_req
// with rd_addr) whose answer rd_data must be ready in the next cycle.
//
// Write channel: the address and data channels are accepted independently
// (each is held until both are there); the write is then performed and
// answered with OKAY on the B channel. A new write is accepted only once the
// response has been taken. Read channel: one read at a time; the response
// follows two cycles after the address handshake and stays until rready.
// Byte strobes are ignored (whole-word writes); responses are always OKAY.
// The source only states that the buffers are on the AXI bus; the
// handshake details are this design's choice within the AXI4-Lite rules,
// which the assertions at the end state.
module axi_lite_slave
  import ahead_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // write address
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  // write data
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  // write response
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  // read address
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  // read data
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // configuration side
  output cfg_wr_t     cfg_wr,
  output logic        rd_req,
  output cfg_addr_t   rd_addr,
  input  logic [31:0] rd_data
);
  logic        aw_held, w_held;
  logic [31:0] aw_addr, w_data;
  logic        rd_wait;

  assign s_awready = !aw_held && !s_bvalid;
  assign s_wready  = !w_held  && !s_bvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !rd_wait && !s_rvalid;

  logic aw_fire, w_fire, ar_fire;
  assign aw_fire = s_awvalid && s_awready;
  assign w_fire  = s_wvalid  && s_wready;
  assign ar_fire = s_arvalid && s_arready;

  // Address and data of the write that is complete in this cycle.
  logic        wr_go;
  logic [31:0] wr_addr_now, wr_data_now;
  assign wr_addr_now = aw_held ? aw_addr : s_awaddr;
  assign wr_data_now = w_held  ? w_data  : s_wdata;
  assign wr_go = (aw_held || aw_fire) && (w_held || w_fire) && !s_bvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held  <= 1'b0;
      w_held   <= 1'b0;
      aw_addr  <= '0;
      w_data   <= '0;
      s_bvalid <= 1'b0;
      cfg_wr   <= '0;
    end else begin
      cfg_wr.en <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_go) begin
        aw_held     <= 1'b0;
        w_held      <= 1'b0;
        s_bvalid    <= 1'b1;
        cfg_wr.en   <= 1'b1;
        cfg_wr.addr <= decode_addr(wr_addr_now);
        cfg_wr.data <= wr_data_now;
      end else begin
        if (aw_fire) begin
          aw_held <= 1'b1;
          aw_addr <= s_awaddr;
        end
        if (w_fire) begin
          w_held <= 1'b1;
          w_data <= s_wdata;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_req   <= 1'b0;
      rd_addr  <= '0;
      rd_wait  <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      rd_req <= 1'b0;
      if (ar_fire) begin
        rd_req  <= 1'b1;
        rd_addr <= decode_addr(s_araddr);
        rd_wait <= 1'b1;
      end
      if (rd_req) begin
        rd_wait  <= 1'b0;
        s_rvalid <= 1'b1;
        s_rdata  <= rd_data;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // Byte strobes are accepted but not used: every write is a whole word.
  logic unused_strb;
  assign unused_strb = ^s_wstrb;

  // AXI4-Lite rules on both sides of this port.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_awvalid && !s_awready |=> s_awvalid && $stable(s_awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_wvalid && !s_wready |=> s_wvalid && $stable(s_wdata));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_arvalid && !s_arready |=> s_arvalid && $stable(s_araddr));
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
