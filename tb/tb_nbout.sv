// tb_nbout: checks the output neuron buffer: writes of whole entries across
// all columns, the SIP-side read of an entry, forwarding of the write data
// when the same entry is written and read in one cycle, and the drain port
// that returns a single column's brick.
module tb_nbout;
  import stripes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [1:0] wr_entry = 0, rd_entry = 0, dr_entry = 0;
  logic [3:0] dr_col = 0;
  acc_brick_t [15:0] wr_data, rd_data;
  acc_brick_t dr_data;
  logic rd_fwd;
  acc_brick_t [15:0] model [4];
  int checks = 0, failures = 0, fwd_seen = 0;

  nbout dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic acc_brick_t [15:0] rnd();
    acc_brick_t [15:0] r;
    for (int c = 0; c < 16; c++) for (int f = 0; f < 16; f++) r[c][f] = $urandom;
    return r;
  endfunction

  initial begin
    for (int e = 0; e < 4; e++) model[e] = '0;
    wr_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      wr_en = ($urandom % 2) == 1;
      wr_entry = 2'($urandom);
      wr_data = rnd();
      rd_entry = 2'($urandom);
      dr_entry = 2'($urandom);
      dr_col = 4'($urandom);
      #1;
      checks++;
      if (wr_en && wr_entry == rd_entry) begin
        fwd_seen++;
        if (rd_data !== wr_data || !rd_fwd) begin failures++; $display("FAIL forward"); end
      end else if (rd_data !== model[rd_entry] || rd_fwd) begin
        failures++; $display("FAIL read entry %0d", rd_entry);
      end
      checks++;
      if (dr_data !== model[dr_entry][dr_col]) begin failures++; $display("FAIL drain"); end
      @(posedge clk);
      if (wr_en) model[wr_entry] = wr_data;
    end
    checks++;
    if (fwd_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
