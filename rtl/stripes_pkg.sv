// stripes_pkg: sizes, types and layer descriptor shared by the bit-serial
// accelerator. The array sizes (16 tiles, 16 filter lanes x 16 window lanes of
// serial inner-product units per tile, 16-neuron bricks of 16-bit containers,
// a 64-entry NBout with 4 entries per column, 2 MB synapse buffer per tile,
// 4 MB neuron memory) follow the published organisation. The accumulator
// width, the layer descriptor fields and the beat format that carries serial
// neuron bits from the dispatcher to the tiles are this design's own choices.
package stripes_pkg;

  localparam int unsigned WORD_W     = 16;  // neuron / synapse container width
  localparam int unsigned BRICK      = 16;  // elements per brick (along i)
  localparam int unsigned N_FLANES   = 16;  // filter lanes per tile (SIP rows)
  localparam int unsigned N_WLANES   = 16;  // window lanes per tile (SIP columns)
  localparam int unsigned N_TILES    = 16;  // tiles per chip
  localparam int unsigned ACC_W      = 32;  // SIP accumulator / partial sum width
  localparam int unsigned NBOUT_ENT  = 4;   // NBout entries per SIP column
  localparam int unsigned SB_ROWS    = 4096; // 2 MB / (256 synapses * 2 B)
  localparam int unsigned NM_ROWS    = 8192; // 4 MB / (256 neurons * 2 B)
  localparam int unsigned DIM_W      = 16;  // width of layer dimension fields
  localparam int unsigned BADDR_W    = 24;  // NM brick address width
  localparam int unsigned SBADDR_W   = 16;  // SB row address width

  typedef logic signed [WORD_W-1:0]           word_t;
  typedef logic signed [ACC_W-1:0]            acc_t;
  // One brick: BRICK 16-bit containers, element e in bits [e*16 +: 16].
  typedef logic [BRICK-1:0][WORD_W-1:0]       brick_t;
  // One NM row: 16 bricks = 256 neurons.
  typedef brick_t [BRICK-1:0]                 nm_row_t;
  // One SB row: one synapse brick per filter lane.
  typedef brick_t [N_FLANES-1:0]              sb_row_t;
  // One serial slice: one bit of each of the 16 neurons of each window lane.
  typedef logic [N_WLANES-1:0][BRICK-1:0]     slice_t;
  // A brick of partial sums (one per filter lane).
  typedef logic [N_FLANES-1:0][ACC_W-1:0]     acc_brick_t;

  // SIP operating modes (serial inner product, max pooling,
  // accumulate for average pooling).
  typedef enum logic [1:0] {
    SIP_CONV = 2'd0,
    SIP_MAX  = 2'd1,
    SIP_AVG  = 2'd2
  } sip_mode_e;

  // Per-layer descriptor, the metadata the controller reads for each layer.
  typedef struct packed {
    logic [DIM_W-1:0]   nx;        // input width  (bricks along x)
    logic [DIM_W-1:0]   ny;        // input height
    logic [DIM_W-1:0]   ib;        // input depth in bricks (I/16)
    logic [3:0]         fx_m1;     // filter width  - 1
    logic [3:0]         fy_m1;     // filter height - 1
    logic [3:0]         stride;    // stride S (1..15)
    logic [DIM_W-1:0]   ox;        // output width
    logic [DIM_W-1:0]   oy;        // output height
    logic [4:0]         nb_out;    // output depth in bricks = active tiles (1..16)
    logic [BADDR_W-1:0] in_base;   // NM brick address of n(0,0,0)
    logic [BADDR_W-1:0] out_base;  // NM brick address of o(0,0,0)
    logic [SBADDR_W-1:0] sb_base;  // SB row of the layer's first phase
    logic               relu;      // apply the activation function
    logic               nsigned;   // input neurons are two's complement
    logic [3:0]         in_lsb;    // lowest container bit used for input neurons
    logic [3:0]         out_lsb;   // lowest container bit kept for outputs
    logic [4:0]         out_prec;  // bits kept for outputs (1..16)
  } layer_cfg_t;

  // One dispatcher beat: one bit of each of 256 neurons plus phase tags.
  typedef struct packed {
    slice_t                bits;
    logic                  first;       // first (most significant) bit of a phase
    logic                  last;        // last bit of a phase
    logic                  first_phase; // first phase of a window's inner product
    logic                  last_phase;  // last phase of a window's inner product
    logic [SBADDR_W-1:0]   sb_row;      // synapse row for this phase
  } beat_t;

endpackage
