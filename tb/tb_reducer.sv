// tb_reducer: feeds the reducer two pallets of random sums (the second only
// partly inside a 5x4 output array) with a randomly stalling write port and
// checks every brick written: its address in the output layout, the
// conversion of each sum to the output precision window, that windows
// outside the output array are skipped, and that each pallet is released.
module tb_reducer;
  import stripes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, relu = 0, ent_valid = 0, ent_done, wr_valid, wr_ready = 0, busy;
  logic [3:0] tile_id = 4'd1, out_lsb = 0;
  logic [15:0] ox_dim = 5, oy_dim = 4;
  logic [4:0] nb_out = 3, out_prec = 8;
  logic [23:0] out_base = 24'd100, wr_addr;
  logic [3:0] dr_col;
  acc_brick_t dr_brick;
  brick_t wr_data;
  acc_brick_t pal [2][16];
  int pal_i = 0;
  int checks = 0, failures = 0, writes = 0, dones = 0, stalls = 0;

  reducer dut (.*);

  assign dr_brick = pal[pal_i][dr_col];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] conv(input logic signed [31:0] v, input bit r,
                                       input int lsb, input int prec);
    longint x, hi, lo;
    x = v;
    if (x > 32767) x = 32767;
    if (x < -32768) x = -32768;
    x = x >>> lsb;
    if (r) begin hi = (1 << prec) - 1; lo = 0; end
    else begin hi = (1 << (prec - 1)) - 1; lo = -(1 << (prec - 1)); end
    if (x > hi) x = hi;
    if (x < lo) x = lo;
    return 16'(x <<< lsb);
  endfunction

  initial begin
    int k;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      relu = rep[0];
      out_lsb = 4'(rep * 2);
      out_prec = 5'(6 + rep * 3);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      k = 0;
      for (int p = 0; p < 2; p++) begin
        pal_i = p;
        for (int c = 0; c < 16; c++) for (int f = 0; f < 16; f++)
          pal[p][c][f] = $signed($urandom) >>> ($urandom % 24);
        ent_valid = 1;
        while (1) begin
          @(negedge clk);
          wr_ready = ($urandom % 3) != 0;
          #1;
          if (wr_valid && !wr_ready) stalls++;
          if (wr_valid && wr_ready) begin
            int ox, oy;
            ox = k % 5; oy = k / 5;
            checks++;
            if (wr_addr !== 24'(100 + (oy * 3 + 1) * 5 + ox)) begin
              failures++; $display("FAIL addr %0d k=%0d", wr_addr, k);
            end
            if (dr_col !== 4'(k % 16)) begin failures++; $display("FAIL col"); end
            for (int f = 0; f < 16; f++) begin
              checks++;
              if (wr_data[f] !== conv(pal[p][k % 16][f], relu, out_lsb, out_prec)) begin
                failures++; $display("FAIL data k=%0d f=%0d", k, f);
              end
            end
            writes++;
            k++;
          end
          if (k >= 20 && !wr_valid) begin
            // remaining windows of the last pallet are outside the array
          end
          if (ent_done) begin
            dones++;
            @(posedge clk);
            break;
          end
          if (!wr_valid && busy) k++;  // skipped window
        end
        ent_valid = 0;
        @(negedge clk);
      end
      checks++;
      if (writes != 20 * (rep + 1)) begin failures++; $display("FAIL writes %0d", writes); end
    end
    checks++;
    if (dones != 6 || stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
