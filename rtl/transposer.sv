// transposer: turns a group of 16 neuron bricks (256 16-bit containers) into
// serial bit streams, one bit of every neuron per cycle.
//
// The shuffler writes a full group bit-parallel into the 256 registers
// (load/load_ready handshake). Over the next p = prec cycles the transposer
// presents one beat per cycle: bit (in_lsb + p - 1 - c) of every neuron on
// cycle c, i.e. most significant bit first, so only the p bits of the layer's
// precision window are sent. A beat waits while out_ready is low. The next
// group may be loaded in the cycle that the last bit of the current one is
// taken, so back-to-back groups stream without a gap. The beat also carries
// the phase tags of its group (synapse row, first/last phase of a window) and
// marks its first and last bit.
//
// The 256 registers with a 16-bit write port and a 1-bit read port follow the
// published dispatcher; the handshake and tag fields are this design's.
module transposer
  import stripes_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [4:0]          prec,      // 1..16
  input  logic [3:0]          in_lsb,
  // from the shuffler
  input  logic                load,
  output logic                load_ready,
  input  nm_row_t             grp,       // grp[w] = brick of window lane w
  input  logic [SBADDR_W-1:0] sb_row,
  input  logic                first_phase,
  input  logic                last_phase,
  // to the tiles
  output logic                out_valid,
  input  logic                out_ready,
  output beat_t               out_beat,
  output logic                busy
);

  nm_row_t             regs_q;
  logic [3:0]          cnt_q;      // bits still to send after this one
  logic                full_q;
  logic [SBADDR_W-1:0] row_q;
  logic                fph_q, lph_q;
  logic [3:0]          bitpos;
  logic                take;

  assign take       = full_q && out_ready;
  assign load_ready = !full_q || (take && cnt_q == 4'd0);
  assign out_valid  = full_q;
  assign busy       = full_q;
  assign bitpos     = in_lsb + cnt_q;

  always_comb begin
    out_beat             = '0;
    for (int w = 0; w < int'(N_WLANES); w++)
      for (int i = 0; i < int'(BRICK); i++)
        out_beat.bits[w][i] = regs_q[w][i][bitpos];
    out_beat.first       = (cnt_q == 4'(prec - 5'd1));
    out_beat.last        = (cnt_q == 4'd0);
    out_beat.first_phase = fph_q;
    out_beat.last_phase  = lph_q;
    out_beat.sb_row      = row_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs_q <= '0;
      cnt_q  <= '0;
      full_q <= 1'b0;
      row_q  <= '0;
      fph_q  <= 1'b0;
      lph_q  <= 1'b0;
    end else begin
      if (take) begin
        cnt_q <= cnt_q - 4'd1;
        if (cnt_q == 4'd0) full_q <= 1'b0;
      end
      if (load && load_ready) begin
        regs_q <= grp;
        cnt_q  <= 4'(prec - 5'd1);
        full_q <= 1'b1;
        row_q  <= sb_row;
        fph_q  <= first_phase;
        lph_q  <= last_phase;
      end
    end
  end

endmodule
