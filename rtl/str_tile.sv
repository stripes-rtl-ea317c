// str_tile: one tile of the bit-serial accelerator: input neuron buffer
// (NBin), synapse buffer (SB), a 16x16 array of serial inner-product units
// (SIPs), the output neuron buffer (NBout), the activation unit and the
// reducer.
//
// SIP(f, w) computes the output neuron of filter lane f for window lane w.
// Filter lane f's synapse brick reaches all SIPs of row f; window lane w's 16
// neuron bits reach all SIPs of column w. The tile therefore works on 16
// windows x 16 filters at once, one bit of each of 256 neurons per cycle.
//
// Pipeline (one beat = one bit of 256 neurons, from the dispatcher):
//   A  the beat is taken into NBin (in_valid/in_ready); on the first bit of a
//      phase the SB row of that phase is read (one cycle latency);
//   B  the SIPs consume NBin and, on the first bit, the SB row, which they
//      latch into their synapse registers;
//   C  the cycle after the last bit of a phase, every SIP's result is written
//      into NBout: into the partial-sum entry (0), right-aligned by p-1 bits so
//      it has the weight of the next phase's first tree sum, or, after the
//      window's last phase, into one of two pallet entries (2 or 3), shifted
//      left by the layer's input LSB position to restore the 16-bit
//      fixed-point scale. The first bit of the next phase reads the
//      partial-sum entry in the same cycle through NBout's forwarding path.
// The reducer drains finished pallet entries through the activation unit to
// neuron memory, one brick per cycle. A new pallet's final phase is held off
// (in_ready low) while both pallet entries are still waiting for the reducer.
//
// The organisation (16x16 SIPs, row and column buses, SR, 4 NBout entries per
// column, activation after NBout, reducer) follows the published tile. The
// pipeline, the entry allocation, the alignment rule for partial sums (which
// drops the p-1 lowest bits of a carried partial sum) and the backpressure
// are this design's choices. Pooling layers are not scheduled by this tile:
// its SIPs run in convolution mode only. Tiles whose tile_id is not below the
// layer's nb_out take beats but write nothing.
//
// Left unconnected on purpose: each SIP's raw accumulator output (o_nbout),
// since the tile always stores the shifted output; NBout's forwarding flag,
// which only the NBout testbench observes; and the SB-row field of the NBin
// register, because the SB is addressed from the incoming beat one stage
// earlier.
module str_tile
  import stripes_pkg::*;
#(
  parameter int unsigned SBR = SB_ROWS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0]              tile_id,
  input  logic                    start,
  input  layer_cfg_t              cfg,
  input  logic [4:0]              prec,
  // beats from the dispatcher
  input  logic                    in_valid,
  output logic                    in_ready,
  input  beat_t                   in_beat,
  // synapse loading
  input  logic                    sb_wr_en,
  input  logic [$clog2(SBR)-1:0]  sb_wr_row,
  input  sb_row_t                 sb_wr_data,
  // brick writes to neuron memory
  output logic                    wr_valid,
  output logic [BADDR_W-1:0]      wr_addr,
  output brick_t                  wr_data,
  input  logic                    wr_ready,
  output logic                    idle,
  output logic [31:0]             hold_cycles   // cycles in_ready was low
);

  logic active;
  assign active = ({1'b0, tile_id} < cfg.nb_out);

  // ---------------- stage A: NBin and SB read ----------------
  logic   accept;
  logic   is_final_beat;
  logic [1:0] fin_cnt_q;     // pallets whose last beat was taken, not yet drained
  logic   nbin_v_q;
  beat_t  nbin_q;
  sb_row_t sb_rdata;

  assign is_final_beat = in_beat.last && in_beat.last_phase;
  assign in_ready      = !(is_final_beat && fin_cnt_q == 2'd2);
  assign accept        = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbin_v_q <= 1'b0;
      nbin_q   <= '0;
    end else begin
      nbin_v_q <= accept;
      if (accept) nbin_q <= in_beat;
    end
  end

  synapse_buffer #(.ROWS(SBR)) u_sb (
    .clk,
    .rd_en   (accept && in_beat.first),
    .rd_row  ($clog2(SBR)'(in_beat.sb_row)),
    .rd_data (sb_rdata),
    .wr_en   (sb_wr_en),
    .wr_row  (sb_wr_row),
    .wr_data (sb_wr_data)
  );

  // ---------------- stage C control ----------------
  logic       wb_q, wb_final_q;
  logic       fin_sel_q;          // pallet entry for the next final write
  logic signed [5:0] oshift;
  logic [1:0] wr_entry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_q       <= 1'b0;
      wb_final_q <= 1'b0;
    end else begin
      wb_q       <= nbin_v_q && nbin_q.last;
      wb_final_q <= nbin_v_q && nbin_q.last && nbin_q.last_phase;
    end
  end

  always_comb begin
    oshift   = '0;
    wr_entry = 2'd0;
    if (wb_q) begin
      if (wb_final_q) begin
        oshift   = 6'($signed({2'b00, cfg.in_lsb}));
        wr_entry = fin_sel_q ? 2'd3 : 2'd2;
      end else begin
        oshift   = -6'($signed({1'b0, prec - 5'd1}));
      end
    end
  end

  // ---------------- stage B: SIP array ----------------
  acc_brick_t [N_WLANES-1:0] nb_wr, nb_rd;
  logic signed [ACC_W-1:0]   sip_out  [N_FLANES][N_WLANES];
  logic signed [ACC_W-1:0]   sip_init [N_FLANES][N_WLANES];
  logic                      nb_fwd;

  for (genvar f = 0; f < int'(N_FLANES); f++) begin : g_row
    for (genvar w = 0; w < int'(N_WLANES); w++) begin : g_col
      assign sip_init[f][w] = nbin_q.first_phase ? '0 : $signed(nb_rd[w][f]);
      sip u_sip (
        .clk, .rst_n,
        .en      (nbin_v_q),
        .first   (nbin_q.first),
        .msb_neg (nbin_q.first && cfg.nsigned),
        .mode    (SIP_CONV),
        .syn_in  (sb_rdata[f]),
        .nbit    (nbin_q.bits[w]),
        .par_in  ('0),
        .i_nbout (sip_init[f][w]),
        .oshift  (oshift),
        .o_nbout (),
        .out     (sip_out[f][w])
      );
      assign nb_wr[w][f] = sip_out[f][w];
    end
  end

  // ---------------- NBout, activation, reducer ----------------
  logic [1:0] fin_avail_q;        // pallet entries written, not yet drained
  logic       drain_sel_q;
  logic [3:0] dr_col;
  acc_brick_t dr_raw, dr_act;
  logic       ent_done;
  logic       red_busy;

  nbout u_nbout (
    .clk, .rst_n,
    .wr_en    (wb_q),
    .wr_entry (wr_entry),
    .wr_data  (nb_wr),
    .rd_entry (2'd0),
    .rd_data  (nb_rd),
    .rd_fwd   (nb_fwd),
    .dr_entry (drain_sel_q ? 2'd3 : 2'd2),
    .dr_col   (dr_col),
    .dr_data  (dr_raw)
  );

  activation_unit u_act (
    .relu      (cfg.relu),
    .scale_sh  (4'd0),
    .in_brick  (dr_raw),
    .out_brick (dr_act)
  );

  logic red_wr_valid;

  reducer u_reducer (
    .clk, .rst_n,
    .start,
    .tile_id,
    .ox_dim    (cfg.ox),
    .oy_dim    (cfg.oy),
    .nb_out    (cfg.nb_out),
    .out_base  (cfg.out_base),
    .relu      (cfg.relu),
    .out_lsb   (cfg.out_lsb),
    .out_prec  (cfg.out_prec),
    .ent_valid (fin_avail_q != 2'd0),
    .dr_col,
    .dr_brick  (dr_act),
    .ent_done,
    .wr_valid  (red_wr_valid),
    .wr_addr,
    .wr_data,
    .wr_ready  (wr_ready || !active),
    .busy      (red_busy)
  );

  assign wr_valid = red_wr_valid && active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_cnt_q   <= '0;
      fin_avail_q <= '0;
      fin_sel_q   <= 1'b0;
      drain_sel_q <= 1'b0;
      hold_cycles <= '0;
    end else if (start) begin
      fin_cnt_q   <= '0;
      fin_avail_q <= '0;
      fin_sel_q   <= 1'b0;
      drain_sel_q <= 1'b0;
      hold_cycles <= '0;
    end else begin
      fin_cnt_q   <= fin_cnt_q + 2'(accept && is_final_beat) - 2'(ent_done);
      fin_avail_q <= fin_avail_q + 2'(wb_q && wb_final_q) - 2'(ent_done);
      if (wb_q && wb_final_q) fin_sel_q <= !fin_sel_q;
      if (ent_done) drain_sel_q <= !drain_sel_q;
      if (in_valid && !in_ready) hold_cycles <= hold_cycles + 1;
    end
  end

  assign idle = !nbin_v_q && !wb_q && (fin_cnt_q == 2'd0) && !red_busy;

endmodule
