// tb_stripes_top: end-to-end test of the accelerator, reduced to 2 tiles,
// a 64-row neuron memory and 64-row synapse buffers. A three-layer network
// is loaded through the host ports and run twice, once with each of two
// precision profiles, and every output brick of every layer is read back
// from neuron memory and compared with a reference computed in the
// testbench from the same containers and synapses:
//   layer 0  18x5x32 signed input, 3x3 filters, stride 1, 32 filters,
//            rectifier, outputs kept as 9 bits above bit 1 (LSB position 2
//            for the input neurons);
//   layer 1  16x3x32, 1x1 filters, stride 1, 32 filters: short pallets make
//            the tiles hold the dispatcher while the reducers drain, and
//            both tiles write to the same memory bank at once;
//   layer 2  16x3x32, 2x2 filters, stride 2, 16 filters (second tile idle),
//            8 windows (a partial pallet); its input does not start on a
//            row boundary, so groups straddle rows and at 1-bit precision the
//            dispatcher stalls.
// Each mechanism (dispatcher stall, tile hold, bank conflict, multi-phase
// partial sums, signed neurons, idle tile, profile switch) is counted and a
// mechanism that never happens counts as a failure.
module tb_stripes_top;
  import stripes_pkg::*;
  import stripes_ref_pkg::*;

  localparam int TILES = 2;
  localparam int NMR = 64;
  localparam int SBR = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic nm_wr_valid = 0, nm_rd_en = 0, sb_wr_en = 0, cfg_wr_en = 0, prec_wr_en = 0, run_go = 0;
  logic [23:0] nm_wr_addr = 0, nm_rd_addr = 0;
  brick_t nm_wr_data = '0, nm_rd_data;
  logic [$clog2(TILES)-1:0] sb_wr_tile = 0;
  logic [$clog2(SBR)-1:0] sb_wr_row = 0;
  sb_row_t sb_wr_data = '0;
  logic [3:0] cfg_wr_layer = 0, prec_wr_layer = 0, cur_layer;
  layer_cfg_t cfg_wr_data = '0;
  logic [1:0] prec_wr_profile = 0, run_profile = 0;
  logic [4:0] prec_wr_data = 0, run_nlayers = 0, stat_max_rows;
  logic run_busy, run_done;
  logic [31:0] stat_disp_stall, stat_tile_hold, stat_groups, stat_bank_conflicts;

  stripes_top #(.TILES(TILES), .NMR(NMR), .SBR(SBR)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- network description ----------------
  localparam int NL = 3;
  int L_NX[NL] = '{18, 16, 16};
  int L_NY[NL] = '{5, 3, 3};
  int L_IB[NL] = '{2, 2, 2};
  int L_F [NL] = '{3, 1, 2};
  int L_S [NL] = '{1, 1, 2};
  int L_NB[NL] = '{2, 2, 1};
  int L_IN[NL] = '{0, 256, 520};
  int L_OUT[NL] = '{256, 520, 768};
  int L_SBB[NL] = '{0, 18, 20};
  bit L_SGN[NL] = '{1, 0, 0};
  bit L_RELU[NL] = '{1, 1, 0};
  int L_INLSB[NL] = '{2, 1, 0};
  int L_OUTLSB[NL] = '{1, 0, 0};
  int L_OUTPREC[NL] = '{9, 12, 16};
  int PROF[2][NL] = '{'{8, 9, 12}, '{6, 2, 1}};

  brick_t mdl [int];               // reference neuron memory, brick address -> brick
  sb_row_t syn [TILES][SBR];

  function automatic int odim(input int n, input int f, input int s);
    return (n - f) / s + 1;
  endfunction

  function automatic logic [15:0] nval(input int l, input int x, input int y, input int i);
    int a;
    a = L_IN[l] + (y * L_IB[l] + i / 16) * L_NX[l] + x;
    return mdl[a][i % 16];
  endfunction

  task automatic ref_layer(input int l, input int p);
    int ox, oy;
    ox = odim(L_NX[l], L_F[l], L_S[l]);
    oy = odim(L_NY[l], L_F[l], L_S[l]);
    for (int y = 0; y < oy; y++) for (int x = 0; x < ox; x++) for (int t = 0; t < L_NB[l]; t++) begin
      int a;
      a = L_OUT[l] + (y * L_NB[l] + t) * ox + x;
      for (int f = 0; f < 16; f++) begin
        longint acc, prod;
        int k;
        acc = 0; k = 0;
        for (int fy = 0; fy < L_F[l]; fy++) for (int fx = 0; fx < L_F[l]; fx++)
          for (int ib = 0; ib < L_IB[l]; ib++) begin
            prod = 0;
            for (int i = 0; i < 16; i++)
              prod += longint'($signed(syn[t][L_SBB[l] + k][f][i])) *
                      nfield(nval(l, x * L_S[l] + fx, y * L_S[l] + fy, ib * 16 + i), p,
                             L_INLSB[l], L_SGN[l]);
            acc = phase_step(acc, prod, p, k == 0);
            k++;
          end
        mdl[a][f] = finish(acc, L_INLSB[l], L_RELU[l], L_OUTLSB[l], L_OUTPREC[l]);
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int stall_max [NL], hold_max [NL];
  always @(posedge clk) begin
    if (run_busy) begin
      if (int'(stat_disp_stall) > stall_max[cur_layer]) stall_max[cur_layer] = int'(stat_disp_stall);
      if (int'(stat_tile_hold) > hold_max[cur_layer]) hold_max[cur_layer] = int'(stat_tile_hold);
    end
  end

  task automatic host_write(input int a, input brick_t b);
    @(negedge clk);
    nm_wr_valid = 1; nm_wr_addr = 24'(a); nm_wr_data = b;
    @(negedge clk);
    nm_wr_valid = 0;
  endtask

  task automatic check_layer(input int l, input int prof);
    int ox, oy;
    ox = odim(L_NX[l], L_F[l], L_S[l]);
    oy = odim(L_NY[l], L_F[l], L_S[l]);
    for (int a = L_OUT[l]; a < L_OUT[l] + ox * oy * L_NB[l]; a++) begin
      @(negedge clk);
      nm_rd_en = 1; nm_rd_addr = 24'(a);
      @(negedge clk);
      nm_rd_en = 0;
      checks++;
      for (int f = 0; f < 16; f++)
        if (nm_rd_data[f] !== mdl[a][f]) begin
          failures++;
          $display("FAIL profile %0d layer %0d brick %0d f %0d: %h expected %h",
                   prof, l, a, f, nm_rd_data[f], mdl[a][f]);
        end
    end
  endtask

  initial begin
    int cycles [2];
    for (int l = 0; l < NL; l++) begin stall_max[l] = 0; hold_max[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // input image (layer 0 input), random signed containers
    for (int a = 0; a < L_NX[0] * L_NY[0] * L_IB[0]; a++) begin
      brick_t b;
      for (int i = 0; i < 16; i++) begin
        b[i] = 16'($signed(16'($urandom)) >>> ($urandom % 6));
        mdl[a][i] = b[i];
      end
      host_write(a, b);
    end
    // synapses
    for (int t = 0; t < TILES; t++)
      for (int r = 0; r < 28; r++) begin
        for (int f = 0; f < 16; f++) for (int i = 0; i < 16; i++)
          syn[t][r][f][i] = 16'($signed(16'($urandom)) >>> (6 + $urandom % 6));
        @(negedge clk);
        sb_wr_en = 1; sb_wr_tile = 1'(t); sb_wr_row = 6'(r); sb_wr_data = syn[t][r];
      end
    @(negedge clk); sb_wr_en = 0;
    // layer descriptors and profiles
    for (int l = 0; l < NL; l++) begin
      layer_cfg_t c;
      c = '0;
      c.nx = 16'(L_NX[l]); c.ny = 16'(L_NY[l]); c.ib = 16'(L_IB[l]);
      c.fx_m1 = 4'(L_F[l] - 1); c.fy_m1 = 4'(L_F[l] - 1); c.stride = 4'(L_S[l]);
      c.ox = 16'(odim(L_NX[l], L_F[l], L_S[l])); c.oy = 16'(odim(L_NY[l], L_F[l], L_S[l]));
      c.nb_out = 5'(L_NB[l]); c.in_base = 24'(L_IN[l]); c.out_base = 24'(L_OUT[l]);
      c.sb_base = 16'(L_SBB[l]); c.relu = L_RELU[l]; c.nsigned = L_SGN[l];
      c.in_lsb = 4'(L_INLSB[l]); c.out_lsb = 4'(L_OUTLSB[l]); c.out_prec = 5'(L_OUTPREC[l]);
      @(negedge clk); cfg_wr_en = 1; cfg_wr_layer = 4'(l); cfg_wr_data = c;
      for (int p = 0; p < 2; p++) begin
        @(negedge clk); cfg_wr_en = 0; prec_wr_en = 1;
        prec_wr_profile = 2'(p); prec_wr_layer = 4'(l); prec_wr_data = 5'(PROF[p][l]);
      end
      @(negedge clk); prec_wr_en = 0;
    end
    for (int prof = 0; prof < 2; prof++) begin
      for (int l = 0; l < NL; l++) ref_layer(l, PROF[prof][l]);
      @(negedge clk); run_go = 1; run_nlayers = 5'(NL); run_profile = 2'(prof);
      @(negedge clk); run_go = 0;
      cycles[prof] = 0;
      while (!run_done) begin @(posedge clk); cycles[prof]++; end
      $display("profile %0d: %0d cycles, bank conflicts so far %0d", prof, cycles[prof], stat_bank_conflicts);
      for (int l = 0; l < NL; l++) begin
        $display("  layer %0d: dispatcher stalls %0d, tile hold %0d", l, stall_max[l], hold_max[l]);
        check_layer(l, prof);
      end
    end
    // mechanisms
    checks++; if (stall_max[2] == 0) begin failures++; $display("FAIL no dispatcher stall"); end
    checks++; if (hold_max[1] == 0) begin failures++; $display("FAIL no tile hold"); end
    checks++; if (stat_bank_conflicts == 0) begin failures++; $display("FAIL no bank conflict"); end
    // shorter precisions must run faster
    checks++; if (cycles[1] >= cycles[0]) begin failures++; $display("FAIL profile 1 not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
