// nm_write_arbiter: the write side of the interconnect between the tiles'
// reducers and the banked neuron memory. Every cycle each reducer may offer
// one brick (valid, brick address, data); a host port can also write bricks,
// for instance to load an input image. Each NM bank accepts one brick per
// cycle: the host has priority, then the lowest-numbered tile whose brick
// falls in that bank. A granted requester sees ready in the same cycle; the
// others keep their request. Because a pallet's bricks go to consecutive
// addresses and the tiles write different filter bricks, conflicts are rare.
// The bank split and the fixed priority are this design's choices; the
// published design reuses its baseline's interconnect without detailing it.
module nm_write_arbiter
  import stripes_pkg::*;
#(
  parameter int unsigned NREQ = N_TILES,
  parameter int unsigned ROWS = NM_ROWS
) (
  input  logic [NREQ-1:0]                    req_valid,
  input  logic [NREQ-1:0][BADDR_W-1:0]       req_addr,
  input  brick_t [NREQ-1:0]                  req_data,
  output logic [NREQ-1:0]                    req_ready,
  input  logic                               host_valid,
  input  logic [BADDR_W-1:0]                 host_addr,
  input  brick_t                             host_data,
  output logic [BRICK-1:0]                   wr_en,
  output logic [BRICK-1:0][$clog2(ROWS)-1:0] wr_row,
  output brick_t [BRICK-1:0]                 wr_data,
  output logic [BRICK-1:0]                   conflict   // a bank refused a request
);

  localparam int unsigned RW = $clog2(ROWS);

  always_comb begin
    req_ready = '0;
    wr_en     = '0;
    wr_row    = '0;
    wr_data   = '0;
    conflict  = '0;
    for (int b = 0; b < int'(BRICK); b++) begin
      if (host_valid && host_addr[3:0] == 4'(b)) begin
        wr_en[b]   = 1'b1;
        wr_row[b]  = RW'(host_addr >> 4);
        wr_data[b] = host_data;
      end
      for (int r = 0; r < int'(NREQ); r++) begin
        if (req_valid[r] && req_addr[r][3:0] == 4'(b)) begin
          if (!wr_en[b]) begin
            wr_en[b]     = 1'b1;
            wr_row[b]    = RW'(req_addr[r] >> 4);
            wr_data[b]   = req_data[r];
            req_ready[r] = 1'b1;
          end else begin
            conflict[b] = 1'b1;
          end
        end
      end
    end
  end

endmodule
