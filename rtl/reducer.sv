// reducer: drains a tile's finished output pallets from NBout and writes them
// to neuron memory one brick per cycle.
//
// A pallet is 16 output bricks, one per SIP column (window), each holding the
// 16 output neurons of this tile's 16 filters. When NBout holds a finished
// pallet (ent_valid, ent_idx) the reducer steps dr_col over the 16 columns.
// For each brick it converts every activated sum to the output layer's
// precision: the sum is saturated to a 16-bit container, its bits below
// out_lsb are dropped, the rest is saturated to out_prec bits (unsigned after
// a rectifier, two's complement otherwise) and placed back at out_lsb, so the
// next layer's dispatcher finds exactly the bits it will send. The brick is
// then offered to the NM write interconnect (wr_valid/wr_ready handshake) at
// the brick address of o(ox, oy, 16*tile_id) in the layout
// addr = out_base + (oy*nb_out + tile_id)*Ox + ox, in which the bricks of a
// pallet are contiguous as the dispatcher expects. Windows of the last pallet
// that lie beyond the output array are skipped. ent_done pulses when a pallet
// has been written; start clears the output position at the start of a layer.
//
// The conversion rule, the address layout and the handshake are this design's
// choices; the published text gives the two duties (convert, write) and the
// one-brick-per-cycle rate.
module reducer
  import stripes_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [3:0]             tile_id,
  input  logic [DIM_W-1:0]       ox_dim,
  input  logic [DIM_W-1:0]       oy_dim,
  input  logic [4:0]             nb_out,
  input  logic [BADDR_W-1:0]     out_base,
  input  logic                   relu,
  input  logic [3:0]             out_lsb,
  input  logic [4:0]             out_prec,
  // NBout drain side
  input  logic                   ent_valid,
  output logic [$clog2(N_WLANES)-1:0] dr_col,
  input  acc_brick_t             dr_brick,    // already through the activation unit
  output logic                   ent_done,
  // NM write side
  output logic                   wr_valid,
  output logic [BADDR_W-1:0]     wr_addr,
  output brick_t                 wr_data,
  input  logic                   wr_ready,
  output logic                   busy
);

  logic [DIM_W-1:0] ox_q, oy_q;
  logic             active_q;
  logic             win_ok;
  logic             step;

  assign win_ok = (oy_q < oy_dim);
  assign busy   = active_q;

  // Conversion to the output precision.
  always_comb begin
    for (int i = 0; i < int'(BRICK); i++) begin
      logic signed [ACC_W-1:0]  v;
      logic signed [WORD_W-1:0] v16;
      logic signed [WORD_W-1:0] q;
      logic signed [WORD_W:0]   hi, lo;
      v = $signed(dr_brick[i]);
      if (v > ACC_W'(32767))       v16 = 16'sh7fff;
      else if (v < -ACC_W'(32768)) v16 = 16'sh8000;
      else                         v16 = WORD_W'(v);
      q = v16 >>> out_lsb;
      if (relu) begin
        hi = (17'sd1 <<< out_prec) - 17'sd1;
        lo = '0;
      end else begin
        hi = (17'sd1 <<< (out_prec - 5'd1)) - 17'sd1;
        lo = -(17'sd1 <<< (out_prec - 5'd1));
      end
      if ((WORD_W+1)'(q) > hi)      q = WORD_W'(hi);
      else if ((WORD_W+1)'(q) < lo) q = WORD_W'(lo);
      wr_data[i] = q <<< out_lsb;
    end
  end

  assign wr_valid = active_q && win_ok;
  assign wr_addr  = out_base
                  + BADDR_W'((BADDR_W'(oy_q) * BADDR_W'(nb_out) + BADDR_W'(tile_id)) * BADDR_W'(ox_dim))
                  + BADDR_W'(ox_q);
  assign step     = active_q && (!win_ok || wr_ready);
  assign ent_done = step && (dr_col == $clog2(N_WLANES)'(N_WLANES-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ox_q     <= '0;
      oy_q     <= '0;
      dr_col   <= '0;
      active_q <= 1'b0;
    end else if (start) begin
      ox_q     <= '0;
      oy_q     <= '0;
      dr_col   <= '0;
      active_q <= 1'b0;
    end else begin
      if (!active_q && ent_valid) begin
        active_q <= 1'b1;
        dr_col   <= '0;
      end else if (step) begin
        dr_col <= dr_col + 1'b1;
        if (ent_done) active_q <= 1'b0;
        if (win_ok) begin
          if (ox_q == ox_dim - 1'b1) begin
            ox_q <= '0;
            oy_q <= oy_q + 1'b1;
          end else begin
            ox_q <= ox_q + 1'b1;
          end
        end
      end
    end
  end

endmodule
