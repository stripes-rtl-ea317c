// tb_str_tile: drives one tile (synapse buffer reduced to 16 rows) with
// beats built by the testbench: for each pallet of 16 windows and each of K
// phases, p beats carrying the bits of random neuron containers, most
// significant bit first. Random synapse rows are loaded first. Every brick
// the tile writes is checked against a reference inner product computed in
// the testbench (stripes_ref_pkg), at the address of its window, and every
// window of the 6x10 output array must be written exactly once. Four
// scenarios cover short and long precisions, signed neurons, a non-zero LSB
// position and a slow memory that makes the tile hold the dispatcher off;
// the input rate (one beat per cycle whenever a pallet takes at least the 16
// cycles the reducer needs to drain one) is checked too.
module tb_str_tile;
  import stripes_pkg::*;
  import stripes_ref_pkg::*;
  localparam int SBR = 16;
  localparam int OX = 6, OY = 10, NW = OX * OY, NPAL = (NW + 15) / 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, in_valid = 0, in_ready, sb_wr_en = 0, wr_valid, wr_ready = 1, idle;
  layer_cfg_t cfg;
  logic [4:0] prec;
  beat_t in_beat;
  logic [3:0] sb_wr_row = 0;
  sb_row_t sb_wr_data;
  logic [23:0] wr_addr;
  brick_t wr_data;
  logic [31:0] hold_cycles;

  str_tile #(.SBR(SBR)) dut (.clk, .rst_n, .tile_id(4'd1), .start, .cfg, .prec,
    .in_valid, .in_ready, .in_beat, .sb_wr_en, .sb_wr_row, .sb_wr_data,
    .wr_valid, .wr_addr, .wr_data, .wr_ready, .idle, .hold_cycles);

  int checks = 0, failures = 0, holds_total = 0;
  sb_row_t syn [SBR];
  logic [15:0] nrn [NPAL][8][16][16];   // pallet, phase, window, neuron
  brick_t expect_b [int];
  int written [int];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      int a;
      a = int'(wr_addr);
      checks++;
      if (!expect_b.exists(a)) begin
        failures++; $display("FAIL unexpected address %0d", a);
      end else begin
        if (wr_data !== expect_b[a]) begin
          failures++; $display("FAIL data at %0d", a);
          for (int f = 0; f < 16; f++) $display("  f=%0d got %h exp %h", f, wr_data[f], expect_b[a][f]);
        end
        written[a] = written[a] + 1;
      end
    end
  end

  task automatic run(input int p, input int K, input bit sgn, input int lsb, input bit relu,
                     input int out_lsb, input int out_prec, input int slow);
    int beats, acc_cycles;
    expect_b.delete(); written.delete();
    cfg = '0;
    cfg.ox = OX; cfg.oy = OY; cfg.nb_out = 5'd2; cfg.out_base = 24'd50;
    cfg.relu = relu; cfg.nsigned = sgn; cfg.in_lsb = 4'(lsb);
    cfg.out_lsb = 4'(out_lsb); cfg.out_prec = 5'(out_prec);
    prec = 5'(p);
    for (int k = 0; k < K; k++) begin
      for (int f = 0; f < 16; f++) for (int i = 0; i < 16; i++)
        syn[k][f][i] = 16'($signed(16'($urandom)) >>> ($urandom % 8));
      @(negedge clk); sb_wr_en = 1; sb_wr_row = 4'(k); sb_wr_data = syn[k];
    end
    @(negedge clk); sb_wr_en = 0;
    for (int pl = 0; pl < NPAL; pl++)
      for (int k = 0; k < K; k++)
        for (int w = 0; w < 16; w++)
          for (int i = 0; i < 16; i++) nrn[pl][k][w][i] = 16'($urandom);
    // expected outputs
    for (int win = 0; win < NW; win++) begin
      int pl, w, a;
      brick_t b;
      pl = win / 16; w = win % 16;
      for (int f = 0; f < 16; f++) begin
        longint acc, prod;
        acc = 0;
        for (int k = 0; k < K; k++) begin
          prod = 0;
          for (int i = 0; i < 16; i++)
            prod += longint'($signed(syn[k][f][i])) * nfield(nrn[pl][k][w][i], p, lsb, sgn);
          acc = phase_step(acc, prod, p, k == 0);
        end
        b[f] = finish(acc, lsb, relu, out_lsb, out_prec);
      end
      a = 50 + ((win / OX) * 2 + 1) * OX + (win % OX);
      expect_b[a] = b;
      written[a] = 0;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    beats = 0; acc_cycles = 0;
    for (int pl = 0; pl < NPAL; pl++)
      for (int k = 0; k < K; k++)
        for (int c = 0; c < p; c++) begin
          in_valid = 1;
          in_beat = '0;
          in_beat.first = (c == 0);
          in_beat.last = (c == p - 1);
          in_beat.first_phase = (k == 0);
          in_beat.last_phase = (k == K - 1);
          in_beat.sb_row = 16'(k);
          for (int w = 0; w < 16; w++) for (int i = 0; i < 16; i++)
            in_beat.bits[w][i] = nrn[pl][k][w][i][lsb + p - 1 - c];
          wr_ready = slow ? (($urandom % 8) == 0) : 1'b1;
          #1;
          acc_cycles++;
          while (!in_ready) begin
            @(negedge clk);
            wr_ready = slow ? (($urandom % 8) == 0) : 1'b1;
            #1;
            acc_cycles++;
          end
          beats++;
          @(negedge clk);
        end
    in_valid = 0;
    while (!idle) begin
      @(negedge clk);
      wr_ready = slow ? (($urandom % 8) == 0) : 1'b1;
    end
    wr_ready = 1;
    foreach (written[a]) begin
      checks++;
      if (written[a] != 1) begin failures++; $display("FAIL address %0d written %0d times", a, written[a]); end
    end
    checks++;
    if (!slow && p * K >= 16 && acc_cycles != beats) begin failures++; $display("FAIL rate %0d/%0d", beats, acc_cycles); end
    holds_total += int'(hold_cycles);
    $display("tile run p=%0d K=%0d: %0d beats in %0d cycles, held %0d", p, K, beats, acc_cycles, hold_cycles);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(3, 2, 0, 0, 1, 0, 12, 1);
    run(9, 3, 1, 3, 0, 2, 10, 0);
    run(1, 4, 0, 5, 1, 0, 16, 0);
    run(16, 2, 1, 0, 0, 0, 16, 0);
    checks++;
    if (holds_total == 0) begin failures++; $display("FAIL no hold observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
