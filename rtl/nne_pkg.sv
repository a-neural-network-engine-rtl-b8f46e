// nne_pkg: sizes, types and the configuration register map shared by the
// neural network engine (NNE). The vector width (12 lanes of 8 bits, a 96-bit
// memory word), the 25-bit accumulators, the 5-bit per-vector shift, the 3-bit
// input realignment shift and the 13-bit vector address follow the engine's
// description. Table depths (layers, shift buffer entries, memory instance
// size) and the register map are choices of this implementation.
package nne_pkg;

  localparam int unsigned LANES       = 12;
  localparam int unsigned DATA_W      = 8;
  localparam int unsigned VEC_W       = LANES * DATA_W;   // 96-bit memory word
  localparam int unsigned ACC_W       = 25;
  localparam int unsigned ADDR_W      = 13;
  localparam int unsigned SHIFT_W     = 5;                // per-vector shift
  localparam int unsigned INP_SHIFT_W = 3;                // extra input shift
  localparam int unsigned ACCU_SH_W   = 6;                // accumulated shift
  localparam int unsigned MAX_LAYERS  = 8;
  localparam int unsigned LAYER_W     = $clog2(MAX_LAYERS);
  localparam int unsigned SBUF_DEPTH  = 16;               // vectors per layer
  localparam int unsigned SBUF_IDX_W  = $clog2(SBUF_DEPTH);
  localparam int unsigned IN_VECS_W   = 6;                // up to 63 input vectors
  localparam int unsigned OUT_VECS_W  = SBUF_IDX_W + 1;   // up to SBUF_DEPTH
  localparam int unsigned NUM_BANKS   = 7;
  localparam int unsigned BANK_DEPTH  = 1024;

  typedef logic [VEC_W-1:0]         vec_t;
  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // configuration register map (cfg_addr)
  localparam logic [5:0] CFG_NUM_LAYERS = 6'h00;
  localparam logic [5:0] CFG_W_BASE     = 6'h01;
  localparam logic [5:0] CFG_BLK0_BASE  = 6'h02;
  localparam logic [5:0] CFG_BLK1_BASE  = 6'h03;
  localparam logic [5:0] CFG_MODE       = 6'h04;  // [3:0] bias_lshift, [4] first layer inputs signed
  localparam logic [5:0] CFG_LAYER0     = 6'h10;  // 0x10+2l: in_vecs, 0x11+2l: out_vecs

  typedef struct packed {
    logic [LAYER_W:0] num_layers;
    addr_t            w_base;
    addr_t            blk0_base;
    addr_t            blk1_base;
    logic [3:0]       bias_lshift;
    logic             first_signed;
  } nne_cfg_t;

  // kind of the memory read issued in a cycle; the data returns one cycle later
  typedef enum logic [1:0] {RD_NONE, RD_BIAS, RD_INP, RD_WGT} rd_kind_e;

  // strobes from the controller to the address generators and the datapath
  typedef struct packed {
    logic     run_start;     // first cycle of an inference
    logic     layer_start;   // layer-init cycle
    logic     layer_end;     // layer-end cycle: swap roles
    logic     group_start;   // bias read of a new vector of 12 neurons
    rd_kind_e rd_kind;       // read issued this cycle
    logic     mem_write;     // store of a result vector this cycle
    logic     scale;         // scaling logic samples the accumulators
    logic [IN_VECS_W-1:0]  in_idx;   // index of the input vector being read
    logic [SBUF_IDX_W-1:0] grp_idx;  // index of the output vector
    logic     first_layer;
  } nne_ctl_t;

endpackage
