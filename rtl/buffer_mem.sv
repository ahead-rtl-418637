// buffer_mem: simple dual-port memory with one write port and one
// registered read port.
//
// It holds the input vector of the decoder (the input buffer) and, one
// instance per lane, the partitioned weight memory of a layer. A write
// happens on the rising clock edge when we is high; the word at raddr
// appears on rdata one cycle after re is high and otherwise holds.
// A write and a read of the same address in one cycle return the old word.
// The source states what these buffers hold and that they may be registers
// or partitioned on-chip memories; the port set and read latency are this
// design's choice. Contents are not reset.
module buffer_mem #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 768,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
