// ahead_pkg: types and constants shared by the fixed-point MLP decoder.
//
// The decoder is programmed through a word-addressed configuration space.
// A byte address on the AXI4-Lite port is split into fields:
//   [27:25] region   which storage is addressed (cfg_region_e)
//   [24:22] layer    layer index for weights, biases and PWL coefficients
//   [21:14] j        neuron index inside the layer (0..255)
//   [13:2]  i        input index (0..4095) or PWL segment index
//   [1:0]   byte     ignored, accesses are whole 32-bit words
// The field layout, the region codes and the control register bits are
// this design's own choice; the source only says that the input buffer and
// the weight memories hang on the on-chip AXI bus and can be programmed by
// any bus master.
package ahead_pkg;

  // Activation functions named for the layers of the decoder.
  typedef enum logic [1:0] {
    ACT_LINEAR  = 2'd0,
    ACT_TANH    = 2'd1,
    ACT_SIGMOID = 2'd2
  } act_e;

  typedef enum logic [2:0] {
    REG_CTRL   = 3'd0,  // control / status registers
    REG_INPUT  = 3'd1,  // input buffer, indexed by i
    REG_WEIGHT = 3'd2,  // weight w[layer][i][j]
    REG_BIAS   = 3'd3,  // bias weight b[layer][j]
    REG_COEF_A = 3'd4,  // PWL slope a[layer][segment i]
    REG_COEF_B = 3'd5,  // PWL intercept b[layer][segment i]
    REG_OUTPUT = 3'd6   // buffer-3 of the last layer, indexed by j (read only)
  } cfg_region_e;

  localparam int unsigned I_BITS     = 12;
  localparam int unsigned J_BITS     = 8;
  localparam int unsigned LAYER_BITS = 3;

  // One decoded word access on the configuration space.
  typedef struct packed {
    cfg_region_e             region;
    logic [LAYER_BITS-1:0]   layer;
    logic [J_BITS-1:0]       j;
    logic [I_BITS-1:0]       i;
  } cfg_addr_t;

  typedef struct packed {
    logic        en;
    cfg_addr_t   addr;
    logic [31:0] data;
  } cfg_wr_t;

  // Control register (region REG_CTRL, word 0):
  //   write bit 0 = 1 : start one inference
  //   read  bit 0     : busy
  //   read  bit 1     : done (set when an inference ends, cleared by start)
  localparam int unsigned CTRL_START_BIT = 0;
  localparam int unsigned STAT_BUSY_BIT  = 0;
  localparam int unsigned STAT_DONE_BIT  = 1;

  function automatic cfg_addr_t decode_addr(input logic [31:0] byte_addr);
    cfg_addr_t a;
    a.region = cfg_region_e'(byte_addr[27:25]);
    a.layer  = byte_addr[24:22];
    a.j      = byte_addr[21:14];
    a.i      = byte_addr[13:2];
    return a;
  endfunction

  // Byte address of a configuration word, for software and testbenches.
  function automatic logic [31:0] cfg_byte_addr(input cfg_region_e region,
                                                input int unsigned layer,
                                                input int unsigned j,
                                                input int unsigned i);
    logic [31:0] a;
    a        = '0;
    a[27:25] = region;
    a[24:22] = layer[LAYER_BITS-1:0];
    a[21:14] = j[J_BITS-1:0];
    a[13:2]  = i[I_BITS-1:0];
    return a;
  endfunction


endpackage
