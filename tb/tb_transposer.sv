// tb_transposer: loads groups of 256 random containers with random precision
// and LSB position, takes the beats with a randomly stalling consumer, and
// checks that each group yields exactly p beats carrying bits lsb+p-1 down to
// lsb of every neuron, with first/last marks and the group's tags, and that
// a following group streams without a gap when the consumer never stalls.
module tb_transposer;
  import stripes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] prec;
  logic [3:0] in_lsb;
  logic load = 0, load_ready, first_phase = 0, last_phase = 0, out_valid, out_ready = 0, busy;
  nm_row_t grp;
  logic [15:0] sb_row = 0;
  beat_t out_beat;
  int checks = 0, failures = 0;

  transposer dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nm_row_t g;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      int p, lsb, got, gapless, cyc;
      p = 1 + $urandom % 16;
      lsb = (p == 16) ? 0 : $urandom % (17 - p);
      gapless = (t % 4 == 0);
      for (int w = 0; w < 16; w++) for (int i = 0; i < 16; i++) g[w][i] = 16'($urandom);
      @(negedge clk);
      prec = 5'(p); in_lsb = 4'(lsb);
      grp = g; load = 1; sb_row = 16'(t); first_phase = t[0]; last_phase = t[1];
      while (!load_ready) @(negedge clk);
      @(negedge clk);
      load = 0;
      got = 0; cyc = 0;
      while (got < p) begin
        out_ready = gapless ? 1'b1 : (($urandom % 2) == 1);
        #1;
        cyc++;
        if (out_valid && out_ready) begin
          int b;
          b = lsb + p - 1 - got;
          for (int w = 0; w < 16; w++) begin
            logic [15:0] e;
            for (int i = 0; i < 16; i++) e[i] = g[w][i][b];
            checks++;
            if (out_beat.bits[w] !== e) begin
              failures++; $display("FAIL bits t=%0d w=%0d: %h expected %h", t, w, out_beat.bits[w], e);
            end
          end
          checks++;
          if (out_beat.first !== (got == 0) || out_beat.last !== (got == p - 1) ||
              out_beat.sb_row !== 16'(t) || out_beat.first_phase !== t[0] ||
              out_beat.last_phase !== t[1]) begin
            failures++; $display("FAIL tags t=%0d", t);
          end
          got++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      #1;
      if (gapless) begin
        checks++;
        if (cyc != p) begin failures++; $display("FAIL gap"); end
      end
      checks++;
      if (out_valid) begin failures++; $display("FAIL extra beat t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
