// synapse_buffer: a tile's synapse buffer (SB). Each row holds one synapse
// brick for each of the 16 filter lanes, i.e. the 256 synapses a tile needs
// for one phase; a read returns a whole row, which the filter-lane buses carry
// to the SIP rows. The published buffer is 2 MB of eDRAM per tile, which gives
// the default of 4096 rows of 256 16-bit synapses; it is written here as a
// plain array with one synchronous read port and one write port used to load
// synapses before a layer runs. Read latency is one cycle (rd_data is valid
// the cycle after rd_en), a choice of this design.
module synapse_buffer
  import stripes_pkg::*;
#(
  parameter int unsigned ROWS = SB_ROWS
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  output sb_row_t                 rd_data,
  input  logic                    wr_en,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  sb_row_t                 wr_data
);

  sb_row_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
    if (rd_en) rd_data <= mem[rd_row];
  end

endmodule
