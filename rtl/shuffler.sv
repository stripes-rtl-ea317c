// shuffler: collects the 16 neuron bricks that the tiles need for one phase,
// one per window lane, from neuron memory rows of 16 bricks each.
//
// A request names, for each window lane w, the NM brick address addr[w] (row =
// addr/16, slot = addr mod 16) and whether the window exists (wvalid[w]).
// Every cycle the shuffler reads one NM row: the row of the lowest-numbered
// window whose brick has not been requested yet; all windows whose bricks lie
// in that row are served by that one read. The first read is issued in the
// cycle the request is accepted, with the row taken straight from the
// request. One cycle after a read, when the row arrives, each window lane's
// 16-to-1 brick multiplexer selects its slot and the brick is stored in that
// lane's 16 registers. A group spread over R rows therefore takes R reads, in
// the R cycles starting with the accept, and is offered on the cycle its last
// row arrives, R cycles after the accept (that row's bricks pass straight
// through the multiplexers). Windows that do not exist get a zero brick. A
// complete group is offered to the transposer (grp_valid/grp_take); a new
// request is accepted in the same cycle a complete group is handed over.
//
// With the transposer sending a group in p cycles, this makes the tiles wait
// only when R exceeds p, and then for R - p cycles, as the published design
// states. The per-lane 16-to-1 brick multiplexers and the collection
// registers follow the published shuffler; the choice of which row to read
// next and the one-cycle NM read latency are this design's.
module shuffler
  import stripes_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // request from the address generator
  input  logic                          req_valid,
  output logic                          req_ready,
  input  logic [N_WLANES-1:0][BADDR_W-1:0] req_addr,
  input  logic [N_WLANES-1:0]           req_wvalid,
  input  logic [SBADDR_W-1:0]           req_sb_row,
  input  logic                          req_first_phase,
  input  logic                          req_last_phase,
  // neuron memory read port (synchronous, one cycle)
  output logic                          nm_rd_en,
  output logic [BADDR_W-5:0]            nm_rd_row,
  input  nm_row_t                       nm_rd_data,
  // completed group
  output logic                          grp_valid,
  input  logic                          grp_take,
  output nm_row_t                       grp,          // valid with grp_valid
  output logic [SBADDR_W-1:0]           grp_sb_row,
  output logic                          grp_first_phase,
  output logic                          grp_last_phase,
  output logic [4:0]                    reads        // rows read for this group, valid with grp_valid
);

  logic [N_WLANES-1:0][BADDR_W-1:0] addr_q;
  logic [N_WLANES-1:0] need_q;     // brick still to be requested
  logic [N_WLANES-1:0] cap_q;      // brick arriving this cycle
  logic                busy_q;     // a group is being collected or held
  logic [4:0]          reads_q;
  logic [N_WLANES-1:0] hit;
  logic [BADDR_W-5:0]  row;
  logic                any_need;   // bricks of the held group still to request
  logic                acc;        // a request is accepted this cycle
  logic [N_WLANES-1:0][BADDR_W-1:0] eff_addr;
  logic [N_WLANES-1:0] eff_need;
  nm_row_t             grp_q;

  assign acc      = req_valid && req_ready;
  assign any_need = |need_q;
  // The addresses the read of this cycle serves: the request's own on the
  // accept cycle, else the held group's.
  assign eff_addr = acc ? req_addr : addr_q;
  assign eff_need = acc ? req_wvalid : (busy_q ? need_q : '0);

  // Row of the lowest-numbered window still to be requested.
  always_comb begin
    row = '0;
    for (int w = N_WLANES - 1; w >= 0; w--)
      if (eff_need[w]) row = eff_addr[w][BADDR_W-1:4];
    for (int w = 0; w < int'(N_WLANES); w++)
      hit[w] = eff_need[w] && (eff_addr[w][BADDR_W-1:4] == row);
  end

  assign nm_rd_en  = |eff_need;
  assign reads     = reads_q;
  assign nm_rd_row = row;
  // The group is complete once every brick has been requested; bricks still
  // arriving this cycle are passed straight through their multiplexer.
  assign grp_valid = busy_q && !any_need;
  assign req_ready = !busy_q || (grp_valid && grp_take);

  always_comb begin
    for (int w = 0; w < int'(N_WLANES); w++)
      grp[w] = cap_q[w] ? nm_rd_data[addr_q[w][3:0]] : grp_q[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q          <= '0;
      need_q          <= '0;
      cap_q           <= '0;
      busy_q          <= 1'b0;
      grp_q           <= '0;
      grp_sb_row      <= '0;
      grp_first_phase <= 1'b0;
      grp_last_phase  <= 1'b0;
      reads_q         <= '0;

    end else begin
      // capture the row read in the previous cycle
      for (int w = 0; w < int'(N_WLANES); w++)
        if (cap_q[w]) grp_q[w] <= nm_rd_data[addr_q[w][3:0]];
      cap_q <= nm_rd_en ? hit : '0;
      if (grp_valid && grp_take) begin
        busy_q     <= 1'b0;
      end
      if (acc) begin
        busy_q          <= 1'b1;
        addr_q          <= req_addr;
        need_q          <= req_wvalid & ~hit;
        reads_q         <= nm_rd_en ? 5'd1 : 5'd0;
        grp_sb_row      <= req_sb_row;
        grp_first_phase <= req_first_phase;
        grp_last_phase  <= req_last_phase;
        for (int w = 0; w < int'(N_WLANES); w++)
          if (!req_wvalid[w]) grp_q[w] <= '0;
      end else if (nm_rd_en) begin
        need_q  <= need_q & ~hit;
        reads_q <= reads_q + 5'd1;
      end
    end
  end

endmodule
