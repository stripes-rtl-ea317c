// tb_str_controller: loads four layer descriptors and two precision
// profiles, then runs three layers with each profile. A mock datapath
// reports the layer finished a random number of cycles after each start. The
// testbench checks that each layer is started once, in order, with its own
// descriptor and the selected profile's precision, that the next layer does
// not start before the previous one is done, and that run_done pulses once.
module tb_str_controller;
  import stripes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_wr_en = 0, prec_wr_en = 0, run_go = 0;
  logic [3:0] cfg_wr_layer = 0, prec_wr_layer = 0, cur_layer;
  layer_cfg_t cfg_wr_data = '0, layer_cfg;
  logic [1:0] prec_wr_profile = 0, run_profile = 0;
  logic [4:0] prec_wr_data = 0, layer_prec, run_nlayers = 0;
  logic run_busy, run_done, layer_start, disp_done = 0, tiles_idle = 1;
  layer_cfg_t cfgs [4];
  logic [4:0] precs [2][4];
  int checks = 0, failures = 0;

  str_controller dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mock datapath: busy for a random time after each start
  int busy_left = 0;
  always @(posedge clk) begin
    if (layer_start) busy_left <= 3 + $urandom % 20;
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  always_comb begin
    disp_done  = (busy_left == 0);
    tiles_idle = (busy_left == 0);
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int l = 0; l < 4; l++) begin
      cfgs[l] = '0;
      cfgs[l].nx = 16'($urandom); cfgs[l].out_base = 24'($urandom);
      cfgs[l].stride = 4'(1 + l);
      @(negedge clk); cfg_wr_en = 1; cfg_wr_layer = 4'(l); cfg_wr_data = cfgs[l];
      for (int p = 0; p < 2; p++) begin
        precs[p][l] = 5'(1 + $urandom % 16);
        @(negedge clk); cfg_wr_en = 0; prec_wr_en = 1;
        prec_wr_profile = 2'(p); prec_wr_layer = 4'(l); prec_wr_data = precs[p][l];
      end
      @(negedge clk); prec_wr_en = 0;
    end
    for (int p = 0; p < 2; p++) begin
      int started, dones;
      started = 0; dones = 0;
      @(negedge clk); run_go = 1; run_nlayers = 5'd3; run_profile = 2'(p);
      @(negedge clk); run_go = 0;
      while (dones == 0) begin
        @(posedge clk); #1;
        if (layer_start) begin
          checks++;
          if (started >= 3 || layer_cfg !== cfgs[started] || layer_prec !== precs[p][started]
              || busy_left != 0) begin
            failures++; $display("FAIL start %0d profile %0d", started, p);
          end
          started++;
        end
        if (run_done) dones++;
      end
      checks++;
      if (started != 3 || run_busy) begin failures++; $display("FAIL run %0d started %0d", p, started); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
