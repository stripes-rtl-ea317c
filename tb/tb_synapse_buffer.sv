// tb_synapse_buffer: writes random synapse rows into a small synapse buffer
// and reads them back in random order, checking the data and the one-cycle
// read latency.
module tb_synapse_buffer;
  import stripes_pkg::*;
  localparam int ROWS = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_row = 0, wr_row = 0;
  sb_row_t rd_data, wr_data;
  sb_row_t model [ROWS];
  int checks = 0, failures = 0;

  synapse_buffer #(.ROWS(ROWS)) dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sb_row_t rnd_row();
    sb_row_t r;
    for (int f = 0; f < 16; f++) for (int i = 0; i < 16; i++) r[f][i] = 16'($urandom);
    return r;
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 6'(r); wr_data = rnd_row(); model[r] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 200; k++) begin
      int r;
      r = $urandom % ROWS;
      @(negedge clk); rd_en = 1; rd_row = 6'(r);
      // overwrite another row in the same cycle
      wr_en = 1; wr_row = 6'((r + 1) % ROWS); wr_data = rnd_row();
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[r]) begin failures++; $display("FAIL row %0d", r); end
      model[(r + 1) % ROWS] = wr_data;
      rd_en = 0; wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
