// tb_neuron_memory: writes random bricks into a small banked neuron memory,
// several banks per cycle, and reads whole rows back, checking every brick
// and the one-cycle read latency.
module tb_neuron_memory;
  import stripes_pkg::*;
  localparam int ROWS = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0;
  logic [4:0] rd_row = 0;
  nm_row_t rd_data;
  logic [15:0] wr_en = 0;
  logic [15:0][4:0] wr_row;
  brick_t [15:0] wr_data;
  nm_row_t model [ROWS];
  int checks = 0, failures = 0;

  neuron_memory #(.ROWS(ROWS)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wr_en = '1;
      for (int b = 0; b < 16; b++) begin
        wr_row[b] = 5'(r);
        for (int i = 0; i < 16; i++) wr_data[b][i] = 16'($urandom);
        model[r][b] = wr_data[b];
      end
    end
    for (int k = 0; k < 300; k++) begin
      int r;
      @(negedge clk);
      // random partial writes to random rows
      wr_en = 16'($urandom);
      for (int b = 0; b < 16; b++) begin
        wr_row[b] = 5'($urandom);
        for (int i = 0; i < 16; i++) wr_data[b][i] = 16'($urandom);
      end
      r = $urandom % ROWS;
      rd_en = 1; rd_row = 5'(r);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[r]) begin failures++; $display("FAIL row %0d", r); end
      for (int b = 0; b < 16; b++) if (wr_en[b]) model[wr_row[b]][b] = wr_data[b];
      rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
