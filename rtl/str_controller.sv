// str_controller: holds the network's per-layer metadata and precisions and
// runs a sequence of convolutional layers.
//
// The host writes one layer descriptor per layer (dimensions, stride, NM base
// addresses, activation, precision windows of the stored neurons) and one or
// more precision profiles: profile k gives the neuron precision p of every
// layer. Several profiles may be held at once, so the accuracy / speed
// trade-off can be changed at run time simply by choosing another profile
// when a run starts (run_profile). A run (run_go) executes layers 0 ..
// run_nlayers-1 in order: for each it presents the layer's descriptor and
// precision, pulses layer_start for the dispatcher and the tiles, and waits
// until the dispatcher has sent every beat (disp_done) and all tiles are
// idle (tiles_idle), i.e. the layer's outputs are in neuron memory. It then
// moves to the next layer. run_done pulses at the end of a run.
//
// MAX_LAYERS = 16 covers the deepest convolutional stack of the evaluated
// networks; the number of profiles, the table organisation and the run
// interface are this design's choices.
//
// The precision-range assertion is disabled during reset; a lint tool may
// report rst_n as used both synchronously (by that assertion) and
// asynchronously (by the flops), which is intended.
module str_controller
  import stripes_pkg::*;
#(
  parameter int unsigned MAX_LAYERS = 16,
  parameter int unsigned PROFILES   = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // metadata loading
  input  logic                          cfg_wr_en,
  input  logic [$clog2(MAX_LAYERS)-1:0] cfg_wr_layer,
  input  layer_cfg_t                    cfg_wr_data,
  input  logic                          prec_wr_en,
  input  logic [$clog2(PROFILES)-1:0]   prec_wr_profile,
  input  logic [$clog2(MAX_LAYERS)-1:0] prec_wr_layer,
  input  logic [4:0]                    prec_wr_data,
  // run control
  input  logic                          run_go,
  input  logic [$clog2(MAX_LAYERS):0]   run_nlayers,
  input  logic [$clog2(PROFILES)-1:0]   run_profile,
  output logic                          run_busy,
  output logic                          run_done,
  output logic [$clog2(MAX_LAYERS)-1:0] cur_layer,
  // to the datapath
  output logic                          layer_start,
  output layer_cfg_t                    layer_cfg,
  output logic [4:0]                    layer_prec,
  input  logic                          disp_done,
  input  logic                          tiles_idle
);

  typedef enum logic [1:0] {C_IDLE, C_START, C_RUN} cstate_e;

  layer_cfg_t cfg_mem  [MAX_LAYERS];
  logic [4:0] prec_mem [PROFILES][MAX_LAYERS];

  cstate_e                        st_q;
  logic [$clog2(MAX_LAYERS)-1:0]  layer_q;
  logic [$clog2(MAX_LAYERS):0]    nlayers_q;
  logic [$clog2(PROFILES)-1:0]    prof_q;

  always_ff @(posedge clk) begin
    if (cfg_wr_en)  cfg_mem[cfg_wr_layer] <= cfg_wr_data;
    if (prec_wr_en) prec_mem[prec_wr_profile][prec_wr_layer] <= prec_wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= C_IDLE;
      layer_q     <= '0;
      nlayers_q   <= '0;
      prof_q      <= '0;
      layer_cfg   <= '0;
      layer_prec  <= 5'd16;
      layer_start <= 1'b0;
      run_done    <= 1'b0;
    end else begin
      layer_start <= 1'b0;
      run_done    <= 1'b0;
      unique case (st_q)
        C_IDLE: if (run_go && run_nlayers != '0) begin
          layer_q   <= '0;
          nlayers_q <= run_nlayers;
          prof_q    <= run_profile;
          st_q      <= C_START;
        end
        C_START: begin
          layer_cfg   <= cfg_mem[layer_q];
          layer_prec  <= prec_mem[prof_q][layer_q];
          layer_start <= 1'b1;
          st_q        <= C_RUN;
        end
        C_RUN: if (!layer_start && disp_done && tiles_idle) begin
          if (($clog2(MAX_LAYERS)+1)'(layer_q) + 1'b1 == nlayers_q) begin
            run_done <= 1'b1;
            st_q     <= C_IDLE;
          end else begin
            layer_q <= layer_q + 1'b1;
            st_q    <= C_START;
          end
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end

  assign run_busy  = (st_q != C_IDLE);
  assign cur_layer = layer_q;

  // A precision outside 1..16 cannot be run.
  a_prec_range: assert property (@(posedge clk) disable iff (!rst_n)
    layer_start |-> (layer_prec >= 5'd1 && layer_prec <= 5'd16))
    else $error("layer precision %0d out of range", layer_prec);

endmodule
