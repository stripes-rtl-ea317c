// tb_dispatcher: the dispatcher reads a convolutional layer from a
// behavioural neuron memory (one-cycle read latency, random containers) and
// the testbench rebuilds every neuron from the p beats of each phase. Each
// rebuilt value must equal bits [lsb+p-1:lsb] of the container at the
// brick address of n_B(ox*S+fx, oy*S+fy, ib) of its window, windows beyond
// the output array must carry zeros, and the phase tags must follow the
// order ib, fx, fy. Three layers are run: stride 2 at precision 2, where
// groups straddle several rows and the dispatcher must stall; stride 1 at
// precision 8, which must stream one beat per cycle with no stall; and a
// layer with a randomly stalling consumer. With an always-ready consumer the
// stall count must equal the sum over all groups but the first of R - p for
// the groups spanning R > p NM rows.
module tb_dispatcher;
  import stripes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done, nm_rd_en, out_valid, out_ready = 1;
  layer_cfg_t cfg;
  logic [4:0] prec;
  logic [19:0] nm_rd_row;
  nm_row_t nm_rd_data;
  beat_t out_beat;
  logic [31:0] stall_cycles, groups_sent;
  logic [4:0] max_rows;
  logic [15:0] mem [256][16][16];   // row, slot, neuron

  dispatcher dut (.*);

  always_ff @(posedge clk)
    if (nm_rd_en)
      for (int b = 0; b < 16; b++) for (int i = 0; i < 16; i++)
        nm_rd_data[b][i] <= mem[nm_rd_row[7:0]][b][i];

  int checks = 0, failures = 0, stalls_seen = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nx, input int ny, input int ib, input int fx, input int fy,
                     input int s, input int p, input int lsb, input int base, input bit slow);
    int ox, oy, nwin, npal, nph, t0, t1, beats, exp_stall, gidx;
    ox = (nx - fx) / s + 1; oy = (ny - fy) / s + 1;
    nwin = ox * oy; npal = (nwin + 15) / 16; nph = fx * fy * ib;
    cfg = '0;
    cfg.nx = 16'(nx); cfg.ny = 16'(ny); cfg.ib = 16'(ib);
    cfg.fx_m1 = 4'(fx - 1); cfg.fy_m1 = 4'(fy - 1); cfg.stride = 4'(s);
    cfg.ox = 16'(ox); cfg.oy = 16'(oy); cfg.in_base = 24'(base); cfg.in_lsb = 4'(lsb);
    prec = 5'(p);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    beats = 0; t0 = -1; t1 = 0; exp_stall = 0; gidx = 0;
    for (int pl = 0; pl < npal; pl++)
      for (int fyi = 0; fyi < fy; fyi++)
        for (int fxi = 0; fxi < fx; fxi++)
          for (int ibi = 0; ibi < ib; ibi++) begin
            logic [15:0] v [16][16];
            int k;
            k = (fyi * fx + fxi) * ib + ibi;
            // NM rows R this group spans: every group after the first one
            // must cost max(0, R - p) stall cycles
            begin
              bit seen [int];
              for (int w = 0; w < 16; w++) begin
                int win2;
                win2 = pl * 16 + w;
                if (win2 < nwin)
                  seen[(base + (((win2 / ox) * s + fyi) * ib + ibi) * nx + (win2 % ox) * s + fxi) / 16] = 1;
              end
              if (gidx > 0 && seen.num() > p) exp_stall += seen.num() - p;
              gidx++;
            end
            for (int w = 0; w < 16; w++) for (int i = 0; i < 16; i++) v[w][i] = 0;
            for (int c = 0; c < p; c++) begin
              out_ready = slow ? ($urandom % 3 != 0) : 1'b1;
              #1;
              while (!(out_valid && out_ready)) begin
                @(negedge clk);
                out_ready = slow ? ($urandom % 3 != 0) : 1'b1;
                #1;
              end
              if (t0 < 0) t0 = $time;
              t1 = $time;
              beats++;
              checks++;
              if (out_beat.first !== (c == 0) || out_beat.last !== (c == p - 1) ||
                  out_beat.sb_row !== 16'(k) || out_beat.first_phase !== (k == 0) ||
                  out_beat.last_phase !== (k == nph - 1)) begin
                failures++; $display("FAIL tags pallet %0d phase %0d bit %0d", pl, k, c);
              end
              for (int w = 0; w < 16; w++) for (int i = 0; i < 16; i++)
                v[w][i] = (v[w][i] << 1) | 16'(out_beat.bits[w][i]);
              @(negedge clk);
            end
            for (int w = 0; w < 16; w++) begin
              int win, wx, wy, a;
              win = pl * 16 + w;
              wx = win % ox; wy = win / ox;
              a = base + ((wy * s + fyi) * ib + ibi) * nx + wx * s + fxi;
              for (int i = 0; i < 16; i++) begin
                logic [15:0] e;
                e = (win < nwin) ? ((mem[a / 16][a % 16][i] >> lsb) & 16'((1 << p) - 1)) : 16'd0;
                checks++;
                if (v[w][i] !== e) begin
                  failures++;
                  $display("FAIL neuron pallet %0d phase %0d w %0d i %0d: %h vs %h", pl, k, w, i, v[w][i], e);
                end
              end
            end
          end
    out_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (!done || groups_sent != 32'(npal * nph)) begin
      failures++; $display("FAIL done=%0d groups=%0d", done, groups_sent);
    end
    stalls_seen += int'(stall_cycles);
    $display("layer S=%0d p=%0d: %0d beats, first to last %0d cycles, stalls %0d, max rows %0d",
             s, p, beats, (t1 - t0) / 10 + 1, stall_cycles, max_rows);
    if (!slow && s == 1) begin
      checks++;
      if (stall_cycles != 0 || (t1 - t0) / 10 + 1 != beats) begin
        failures++; $display("FAIL unit-stride layer did not stream");
      end
    end
    if (s == 2 && p == 2) begin
      checks++;
      if (stall_cycles == 0 || max_rows < 2) begin failures++; $display("FAIL expected stalls"); end
    end
    if (!slow) begin
      // stall rule: R - p cycles for a group over R > p rows
      checks++;
      if (int'(stall_cycles) != exp_stall || (t1 - t0) / 10 + 1 != beats + exp_stall) begin
        failures++;
        $display("FAIL stalls %0d expected %0d, span %0d", stall_cycles, exp_stall, (t1 - t0) / 10 + 1);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 256; r++) for (int b = 0; b < 16; b++) for (int i = 0; i < 16; i++)
      mem[r][b][i] = 16'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    run(20, 9, 2, 3, 3, 2, 2, 3, 7, 0);
    run(32, 6, 1, 2, 2, 1, 8, 0, 0, 0);
    run(11, 7, 2, 3, 2, 1, 5, 4, 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
