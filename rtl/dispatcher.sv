// dispatcher: reads a convolutional layer's input neurons from neuron memory
// (NM), where they are kept as 16-bit containers, and broadcasts them to all
// tiles bit-serially, 256 bits per cycle.
//
// Work is organised in pallets of 16 windows that are consecutive in the
// raster order of the output (x, y) plane, one window per window lane, and
// each window's inner product in phases: one phase per filter position
// (fx, fy) and input brick ib, in the order ib fastest, then fx, then fy. The
// synapse row of a phase is sb_base + (fy*Fx + fx)*IB + ib. For each phase the address
// generator computes the NM brick address of n_B(ox*S + fx, oy*S + fy, ib)
// for every window with the layout addr = in_base + (y*IB + ib)*Nx + x, which
// places bricks that are consecutive along x at consecutive addresses. The
// shuffler gathers the 16 bricks, one NM row per cycle, and the transposer
// sends them over p cycles, most significant bit first, while the shuffler
// already gathers the next phase's bricks. When a group spreads over more rows
// than the precision leaves time for, the transposer runs dry and the tiles
// see a bubble; such cycles are counted in stall_cycles. A group over R rows
// is ready R cycles after the shuffler accepts it, so the bubble is R - p
// cycles per group when R > p, the stall rule of the published design.
//
// Interface: start (one cycle, with cfg, prec stable for the whole layer)
// begins a layer; done is high once every beat of the layer has been taken
// (out_valid/out_ready). The NM read port has one cycle of latency.
//
// The shuffler/transposer split, reading a row per cycle and overlapping
// collection with transmission follow the published dispatcher; the phase
// order, address layout and handshakes are this design's.
module dispatcher
  import stripes_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  layer_cfg_t         cfg,
  input  logic [4:0]         prec,
  output logic               done,
  // NM read port
  output logic               nm_rd_en,
  output logic [BADDR_W-5:0] nm_rd_row,
  input  nm_row_t            nm_rd_data,
  // broadcast to the tiles
  output logic               out_valid,
  input  logic               out_ready,
  output beat_t              out_beat,
  // statistics
  output logic [31:0]        stall_cycles,
  output logic [31:0]        groups_sent,
  output logic [4:0]         max_rows       // most NM rows one group needed
);

  // ---------------- address generator ----------------
  logic             run_q;
  logic             gen_done_q;
  logic [DIM_W-1:0] pox_q, poy_q;
  logic [3:0]       fx_q, fy_q;
  logic [DIM_W-1:0] ib_q;
  logic [SBADDR_W-1:0] row_q;

  logic [DIM_W-1:0]             wx [N_WLANES+1];
  logic [DIM_W-1:0]             wy [N_WLANES+1];
  logic [N_WLANES-1:0]          wv;
  logic [N_WLANES-1:0][BADDR_W-1:0] waddr;
  logic last_ib, last_fx, last_fy, last_phase, first_phase;

  // Output position of each window of the pallet: raster order, wrapping to
  // the next output row after ox - 1.
  assign wx[0] = pox_q;
  assign wy[0] = poy_q;
  for (genvar w = 0; w < int'(N_WLANES); w++) begin : g_win
    assign wx[w+1] = (wx[w] == cfg.ox - 1'b1) ? '0 : wx[w] + 1'b1;
    assign wy[w+1] = (wx[w] == cfg.ox - 1'b1) ? wy[w] + 1'b1 : wy[w];
  end

  always_comb begin
    for (int w = 0; w < int'(N_WLANES); w++) begin
      wv[w]    = (wy[w] < cfg.oy);
      waddr[w] = cfg.in_base
               + ((BADDR_W'(wy[w]) * BADDR_W'(cfg.stride) + BADDR_W'(fy_q)) * BADDR_W'(cfg.ib)
                  + BADDR_W'(ib_q)) * BADDR_W'(cfg.nx)
               + BADDR_W'(wx[w]) * BADDR_W'(cfg.stride) + BADDR_W'(fx_q);
    end
  end

  assign last_ib     = (ib_q == cfg.ib - 1'b1);
  assign last_fx     = (fx_q == cfg.fx_m1);
  assign last_fy     = (fy_q == cfg.fy_m1);
  assign last_phase  = last_ib && last_fx && last_fy;
  assign first_phase = (ib_q == '0) && (fx_q == '0) && (fy_q == '0);

  logic req_valid, req_ready;
  assign req_valid = run_q && !gen_done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q      <= 1'b0;
      gen_done_q <= 1'b0;
      pox_q      <= '0;
      poy_q      <= '0;
      fx_q       <= '0;
      fy_q       <= '0;
      ib_q       <= '0;
      row_q      <= '0;
    end else if (start) begin
      run_q      <= 1'b1;
      gen_done_q <= 1'b0;
      pox_q      <= '0;
      poy_q      <= '0;
      fx_q       <= '0;
      fy_q       <= '0;
      ib_q       <= '0;
      row_q      <= cfg.sb_base;
    end else if (req_valid && req_ready) begin
      if (!last_ib) begin
        ib_q  <= ib_q + 1'b1;
        row_q <= row_q + 1'b1;
      end else begin
        ib_q <= '0;
        if (!last_fx) begin
          fx_q  <= fx_q + 1'b1;
          row_q <= row_q + 1'b1;
        end else begin
          fx_q <= '0;
          if (!last_fy) begin
            fy_q  <= fy_q + 1'b1;
            row_q <= row_q + 1'b1;
          end else begin
            // next pallet
            fy_q  <= '0;
            row_q <= cfg.sb_base;
            pox_q <= wx[N_WLANES];
            poy_q <= wy[N_WLANES];
            if (wy[N_WLANES] >= cfg.oy) gen_done_q <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- shuffler and transposer ----------------
  logic            grp_valid, grp_take;
  nm_row_t         grp;
  logic [SBADDR_W-1:0] grp_sb_row;
  logic            grp_fph, grp_lph;
  logic [4:0]      reads_grp;
  logic            tp_busy;

  shuffler u_shuffler (
    .clk, .rst_n,
    .req_valid, .req_ready,
    .req_addr        (waddr),
    .req_wvalid      (wv),
    .req_sb_row      (row_q),
    .req_first_phase (first_phase),
    .req_last_phase  (last_phase),
    .nm_rd_en, .nm_rd_row, .nm_rd_data,
    .grp_valid, .grp_take, .grp,
    .grp_sb_row,
    .grp_first_phase (grp_fph),
    .grp_last_phase  (grp_lph),
    .reads (reads_grp)
  );

  transposer u_transposer (
    .clk, .rst_n,
    .prec,
    .in_lsb      (cfg.in_lsb),
    .load        (grp_valid),
    .load_ready  (grp_take),
    .grp,
    .sb_row      (grp_sb_row),
    .first_phase (grp_fph),
    .last_phase  (grp_lph),
    .out_valid, .out_ready, .out_beat,
    .busy        (tp_busy)
  );

  // ---------------- completion and statistics ----------------
  logic sent_any_q;
  assign done = run_q && gen_done_q && !grp_valid && !tp_busy && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall_cycles <= '0;
      groups_sent  <= '0;
      max_rows     <= '0;
      sent_any_q   <= 1'b0;
    end else if (start) begin
      stall_cycles <= '0;
      groups_sent  <= '0;
      max_rows     <= '0;
      sent_any_q   <= 1'b0;
    end else begin
      if (out_valid) sent_any_q <= 1'b1;
      if (sent_any_q && !out_valid && !done) stall_cycles <= stall_cycles + 1;
      if (grp_valid && grp_take) begin
        groups_sent <= groups_sent + 1;
        if (reads_grp > max_rows) max_rows <= reads_grp;
      end
    end
  end

endmodule
