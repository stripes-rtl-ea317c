// tb_shuffler: a behavioural neuron memory (one-cycle read latency) of 64
// rows of 16 random bricks serves the shuffler. Requests use strided brick
// addresses (stride 1..4, random base, so groups straddle rows) and random
// window masks. Each completed group is compared brick by brick with the
// memory, windows outside the mask must be zero, the number of rows read
// must equal the number of distinct rows the group touches, and the group
// must be offered R cycles after the request is accepted (one cycle when
// no window is valid).
module tb_shuffler;
  import stripes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_fp = 0, req_lp = 0;
  logic [15:0][23:0] req_addr;
  logic [15:0] req_wvalid;
  logic [15:0] req_sb_row = 0;
  logic nm_rd_en;
  logic [19:0] nm_rd_row;
  nm_row_t nm_rd_data;
  logic grp_valid, grp_take = 0, grp_first_phase, grp_last_phase;
  nm_row_t grp;
  logic [15:0] grp_sb_row;
  logic [4:0] reads;
  nm_row_t mem [64];
  int checks = 0, failures = 0, multi_row = 0;

  shuffler dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_wvalid, .req_sb_row,
    .req_first_phase (req_fp), .req_last_phase (req_lp),
    .nm_rd_en, .nm_rd_row, .nm_rd_data,
    .grp_valid, .grp_take, .grp, .grp_sb_row, .grp_first_phase, .grp_last_phase, .reads
  );

  always_ff @(posedge clk) if (nm_rd_en) nm_rd_data <= mem[nm_rd_row[5:0]];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) for (int b = 0; b < 16; b++) for (int i = 0; i < 16; i++)
      mem[r][b][i] = 16'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int s, base, rows, cyc;
      bit seen [64];
      s = 1 + $urandom % 4;
      base = $urandom % 700;
      foreach (seen[i]) seen[i] = 0;
      rows = 0;
      for (int w = 0; w < 16; w++) begin
        req_addr[w] = 24'(base + w * s);
        req_wvalid[w] = (t % 3 == 0) ? ($urandom % 2) : 1'b1;
        if (req_wvalid[w] && !seen[(base + w * s) / 16]) begin
          seen[(base + w * s) / 16] = 1; rows++;
        end
      end
      @(negedge clk);
      req_valid = 1; req_sb_row = 16'(t); req_fp = t[0]; req_lp = t[1];
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      req_valid = 0;
      cyc = 1;
      #1;
      while (!grp_valid) begin @(negedge clk); cyc++; #1; end
      if (rows > 1) multi_row++;
      checks++;
      if (reads != 5'(rows) || cyc != ((rows > 0) ? rows : 1)) begin
        failures++; $display("FAIL t=%0d reads=%0d rows=%0d cyc=%0d", t, reads, rows, cyc);
      end
      for (int w = 0; w < 16; w++) begin
        brick_t e;
        e = req_wvalid[w] ? mem[req_addr[w][9:4]][req_addr[w][3:0]] : '0;
        checks++;
        if (grp[w] !== e) begin failures++; $display("FAIL brick t=%0d w=%0d", t, w); end
      end
      checks++;
      if (grp_sb_row !== 16'(t) || grp_first_phase !== t[0] || grp_last_phase !== t[1]) failures++;
      grp_take = 1;
      @(negedge clk);
      grp_take = 0;
    end
    checks++;
    if (multi_row == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
