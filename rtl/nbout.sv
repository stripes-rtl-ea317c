// nbout: a tile's output neuron buffer. The 64 entries are distributed over
// the 16 SIP columns, 4 entries per column; an entry of column w holds the 16
// partial or final output neurons of that column's SIPs (one per filter lane),
// i.e. one output brick.
//
// Ports: all 16 columns are written together (wr_en, wr_entry, wr_data), since
// all SIPs of a tile finish a phase together. The SIP read port (rd_entry)
// returns the same entry of all columns; when it names the entry being written
// in the same cycle, the write data is forwarded, so a partial sum can be
// written and read back as the next phase's initial value in one cycle. The
// drain port (dr_entry, dr_col) returns one brick for the activation unit and
// reducer. Reads are combinational; writes take effect at the clock edge.
// The forwarding path and the use of entries (one for partial sums, two for
// finished pallets) are this design's choices.
module nbout
  import stripes_pkg::*;
#(
  parameter int unsigned COLS    = N_WLANES,
  parameter int unsigned ENTRIES = NBOUT_ENT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [$clog2(ENTRIES)-1:0]  wr_entry,
  input  acc_brick_t [COLS-1:0]       wr_data,
  input  logic [$clog2(ENTRIES)-1:0]  rd_entry,
  output acc_brick_t [COLS-1:0]       rd_data,
  output logic                        rd_fwd,    // rd_data came from the write port
  input  logic [$clog2(ENTRIES)-1:0]  dr_entry,
  input  logic [$clog2(COLS)-1:0]     dr_col,
  output acc_brick_t                  dr_data
);

  acc_brick_t mem [COLS][ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(COLS); c++)
        for (int e = 0; e < int'(ENTRIES); e++) mem[c][e] <= '0;
    end else if (wr_en) begin
      for (int c = 0; c < int'(COLS); c++) mem[c][wr_entry] <= wr_data[c];
    end
  end

  assign rd_fwd = wr_en && (wr_entry == rd_entry);

  always_comb begin
    for (int c = 0; c < int'(COLS); c++)
      rd_data[c] = rd_fwd ? wr_data[c] : mem[c][rd_entry];
  end

  assign dr_data = mem[dr_col][dr_entry];

endmodule
