// stripes_top: the bit-serial DNN accelerator chip. Convolutional layers run
// with a per-layer neuron precision p: the time a layer takes scales with p,
// because neurons travel and are multiplied one bit per cycle while 16 tiles
// x 256 serial inner-product units work in parallel.
//
// Blocks: the controller (per-layer metadata and precision profiles), the
// central neuron memory (NM), the dispatcher (reads 16 neuron bricks at a time
// from NM and broadcasts them bit-serially, 256 bits per cycle, to every
// tile), 16 tiles (each with its own synapse buffer, 16x16 SIPs, NBout,
// activation unit and reducer) and the write interconnect that takes the
// reducers' output bricks back into NM, where they become the next layer's
// input.
//
// Tile t computes output bricks of filters 16t..16t+15; all tiles take the
// same beat in the same cycle (a beat is delivered only when every tile can
// take it).
//
// Host interface (plain signals): nm_wr_* writes one brick into NM;
// nm_rd_* reads one brick (data one cycle later) while no run is active;
// sb_wr_* writes one synapse row of one tile's SB; cfg_wr_* and prec_wr_*
// load the layer descriptors and precision profiles; run_go starts a run of
// run_nlayers layers with profile run_profile, and run_done pulses when all
// outputs are in NM. The statistics outputs count dispatcher starvation
// cycles, tile backpressure cycles, NM bank conflicts, groups sent and the
// largest number of NM rows one group needed.
//
// Off-chip memory and the loading of synapses from it are outside this
// design; the host ports stand in for them.
//
// Brick addresses are BADDR_W bits wide in the descriptors; only the low bits
// that index the NMR rows reach the memory, so an address beyond the
// memory wraps around. The tiles' own hold counters are left open: the top
// counts held broadcast cycles once, for all tiles together.
module stripes_top
  import stripes_pkg::*;
#(
  parameter int unsigned TILES      = N_TILES,
  parameter int unsigned NMR        = NM_ROWS,
  parameter int unsigned SBR        = SB_ROWS,
  parameter int unsigned MAX_LAYERS = 16,
  parameter int unsigned PROFILES   = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // NM host access
  input  logic                          nm_wr_valid,
  input  logic [BADDR_W-1:0]            nm_wr_addr,
  input  brick_t                        nm_wr_data,
  input  logic                          nm_rd_en,
  input  logic [BADDR_W-1:0]            nm_rd_addr,
  output brick_t                        nm_rd_data,
  // SB loading
  input  logic                          sb_wr_en,
  input  logic [$clog2(TILES)-1:0]      sb_wr_tile,
  input  logic [$clog2(SBR)-1:0]        sb_wr_row,
  input  sb_row_t                       sb_wr_data,
  // metadata
  input  logic                          cfg_wr_en,
  input  logic [$clog2(MAX_LAYERS)-1:0] cfg_wr_layer,
  input  layer_cfg_t                    cfg_wr_data,
  input  logic                          prec_wr_en,
  input  logic [$clog2(PROFILES)-1:0]   prec_wr_profile,
  input  logic [$clog2(MAX_LAYERS)-1:0] prec_wr_layer,
  input  logic [4:0]                    prec_wr_data,
  // run control
  input  logic                          run_go,
  input  logic [$clog2(MAX_LAYERS):0]   run_nlayers,
  input  logic [$clog2(PROFILES)-1:0]   run_profile,
  output logic                          run_busy,
  output logic                          run_done,
  output logic [$clog2(MAX_LAYERS)-1:0] cur_layer,
  // statistics (of the current or last layer, conflicts since reset)
  output logic [31:0]                   stat_disp_stall,
  output logic [31:0]                   stat_tile_hold,
  output logic [31:0]                   stat_groups,
  output logic [4:0]                    stat_max_rows,
  output logic [31:0]                   stat_bank_conflicts
);

  localparam int unsigned NRW = $clog2(NMR);

  // ---------------- controller ----------------
  logic       layer_start;
  layer_cfg_t layer_cfg;
  logic [4:0] layer_prec;
  logic       disp_done;
  logic       tiles_idle;

  str_controller #(.MAX_LAYERS(MAX_LAYERS), .PROFILES(PROFILES)) u_ctrl (
    .clk, .rst_n,
    .cfg_wr_en, .cfg_wr_layer, .cfg_wr_data,
    .prec_wr_en, .prec_wr_profile, .prec_wr_layer, .prec_wr_data,
    .run_go, .run_nlayers, .run_profile,
    .run_busy, .run_done, .cur_layer,
    .layer_start, .layer_cfg, .layer_prec,
    .disp_done, .tiles_idle
  );

  // ---------------- neuron memory ----------------
  logic                          d_rd_en;
  logic [BADDR_W-5:0]            d_rd_row;
  logic                          m_rd_en;
  logic [NRW-1:0]                m_rd_row;
  nm_row_t                       m_rd_data;
  logic [BRICK-1:0]              m_wr_en;
  logic [BRICK-1:0][NRW-1:0]     m_wr_row;
  brick_t [BRICK-1:0]            m_wr_data;
  logic [3:0]                    host_slot_q;

  assign m_rd_en  = run_busy ? d_rd_en : nm_rd_en;
  assign m_rd_row = run_busy ? NRW'(d_rd_row) : NRW'(nm_rd_addr >> 4);

  always_ff @(posedge clk) begin
    if (nm_rd_en) host_slot_q <= nm_rd_addr[3:0];
  end
  assign nm_rd_data = m_rd_data[host_slot_q];

  neuron_memory #(.ROWS(NMR)) u_nm (
    .clk,
    .rd_en   (m_rd_en),
    .rd_row  (m_rd_row),
    .rd_data (m_rd_data),
    .wr_en   (m_wr_en),
    .wr_row  (m_wr_row),
    .wr_data (m_wr_data)
  );

  // ---------------- dispatcher ----------------
  logic  d_valid, d_ready;
  beat_t d_beat;

  dispatcher u_disp (
    .clk, .rst_n,
    .start        (layer_start),
    .cfg          (layer_cfg),
    .prec         (layer_prec),
    .done         (disp_done),
    .nm_rd_en     (d_rd_en),
    .nm_rd_row    (d_rd_row),
    .nm_rd_data   (m_rd_data),
    .out_valid    (d_valid),
    .out_ready    (d_ready),
    .out_beat     (d_beat),
    .stall_cycles (stat_disp_stall),
    .groups_sent  (stat_groups),
    .max_rows     (stat_max_rows)
  );

  // ---------------- tiles ----------------
  logic [TILES-1:0]                 t_ready, t_idle;
  logic [TILES-1:0]                 t_wr_valid, t_wr_ready;
  logic [TILES-1:0][BADDR_W-1:0]    t_wr_addr;
  brick_t [TILES-1:0]               t_wr_data;

  assign d_ready    = &t_ready;
  assign tiles_idle = &t_idle;

  for (genvar t = 0; t < int'(TILES); t++) begin : g_tile
    str_tile #(.SBR(SBR)) u_tile (
      .clk, .rst_n,
      .tile_id     (4'(t)),
      .start       (layer_start),
      .cfg         (layer_cfg),
      .prec        (layer_prec),
      .in_valid    (d_valid && d_ready),
      .in_ready    (t_ready[t]),
      .in_beat     (d_beat),
      .sb_wr_en    (sb_wr_en && sb_wr_tile == $clog2(TILES)'(t)),
      .sb_wr_row   (sb_wr_row),
      .sb_wr_data  (sb_wr_data),
      .wr_valid    (t_wr_valid[t]),
      .wr_addr     (t_wr_addr[t]),
      .wr_data     (t_wr_data[t]),
      .wr_ready    (t_wr_ready[t]),
      .idle        (t_idle[t]),
      .hold_cycles ()
    );
  end

  // Cycles in which a beat was ready but some tile could not take it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 stat_tile_hold <= '0;
    else if (layer_start)       stat_tile_hold <= '0;
    else if (d_valid && !d_ready) stat_tile_hold <= stat_tile_hold + 1;
  end

  // ---------------- write interconnect ----------------
  logic [BRICK-1:0] conflict;

  nm_write_arbiter #(.NREQ(TILES), .ROWS(NMR)) u_arb (
    .req_valid  (t_wr_valid),
    .req_addr   (t_wr_addr),
    .req_data   (t_wr_data),
    .req_ready  (t_wr_ready),
    .host_valid (nm_wr_valid),
    .host_addr  (nm_wr_addr),
    .host_data  (nm_wr_data),
    .wr_en      (m_wr_en),
    .wr_row     (m_wr_row),
    .wr_data    (m_wr_data),
    .conflict
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stat_bank_conflicts <= '0;
    else if (conflict != '0) stat_bank_conflicts <= stat_bank_conflicts + 1;
  end

endmodule
