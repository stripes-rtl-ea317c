// neuron_memory: the central neuron memory (NM) shared by all tiles. It keeps
// every neuron in a 16-bit container whatever the layer's precision. A row is
// 256 neurons, i.e. 16 bricks, and the memory is organised as 16 banks, one
// per brick slot of a row, so that a whole row is read in one cycle (the
// dispatcher's port) while up to 16 bricks in different banks are written in
// the same cycle (one per bank, chosen by the write interconnect). The
// published memory is 4 MB of eDRAM, 8192 rows by default; it is written here
// as arrays. Reads are synchronous with one cycle of latency; brick address
// a lies in row a/16, bank a mod 16.
module neuron_memory
  import stripes_pkg::*;
#(
  parameter int unsigned ROWS = NM_ROWS
) (
  input  logic                              clk,
  input  logic                              rd_en,
  input  logic [$clog2(ROWS)-1:0]           rd_row,
  output nm_row_t                           rd_data,
  input  logic [BRICK-1:0]                  wr_en,
  input  logic [BRICK-1:0][$clog2(ROWS)-1:0] wr_row,
  input  brick_t [BRICK-1:0]                wr_data
);

  for (genvar b = 0; b < int'(BRICK); b++) begin : g_bank
    brick_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (wr_en[b]) mem[wr_row[b]] <= wr_data[b];
      if (rd_en)    rd_data[b] <= mem[rd_row];
    end
  end

endmodule
