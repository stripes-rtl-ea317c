// sip: serial inner-product unit, one per output neuron (filter lane f,
// window lane w) of a tile.
//
// Each enabled cycle the unit receives one bit of each of 16 input neurons
// (nbit) and a brick of 16 synapses. Every neuron bit gates its synapse (the
// AND of the published datapath) into a term; on the cycle that carries the
// neurons' most significant bit the terms are negated when the neurons are two's
// complement (msb_neg), so that the sign bit is subtracted. The 16 terms are
// summed by an adder tree. Bits arrive most significant first, so the
// accumulator is shifted left by one and the tree sum added on every cycle but
// the first; on the first cycle of a phase (first) the tree sum is added to
// i_nbout, a partial sum read back from NBout, which is how inner products
// longer than 16 neurons are built up over several phases.
//
// The synapse brick is taken from syn_in on the first cycle of a phase and
// held in the synapse register (SR) for the remaining cycles.
//
// Pooling: in SIP_MAX the accumulator loads the bit-parallel neuron par_in
// (bypassing the adder tree) and the output is max(accumulator, i_nbout); in
// SIP_AVG par_in is accumulated on top of i_nbout on the first cycle and on
// top of the accumulator afterwards.
//
// The output path selects the accumulator or the max result and passes it
// through a shifter: oshift > 0 shifts left (restores the scale of neurons
// whose lowest bits were not sent), oshift < 0 shifts right arithmetically
// (aligns a partial sum with the weight of the first tree sum of the next
// phase, i.e. by p-1 for precision p). Both directions are this design's
// reading of the shifter's role; the exact shift rules are not published.
//
// Timing: the accumulator is registered; o_nbout and out reflect the register
// and the current control inputs combinationally.
module sip
  import stripes_pkg::*;
#(
  parameter int unsigned N_IN  = BRICK,
  parameter int unsigned W     = WORD_W,
  parameter int unsigned AW    = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,        // a neuron slice is present
  input  logic                 first,     // first cycle of a phase
  input  logic                 msb_neg,   // this slice is the sign bit of signed neurons
  input  sip_mode_e            mode,
  input  logic [N_IN-1:0][W-1:0] syn_in,  // synapse brick from SB (row bus)
  input  logic [N_IN-1:0]      nbit,      // one bit per neuron (column bus)
  input  logic signed [W-1:0]  par_in,    // bit-parallel neuron for pooling
  input  logic signed [AW-1:0] i_nbout,   // partial sum read back from NBout
  input  logic signed [5:0]    oshift,    // output shifter amount
  output logic signed [AW-1:0] o_nbout,   // raw accumulator
  output logic signed [AW-1:0] out       // shifted output towards NBout
);

  localparam int unsigned TW = W + 1 + $clog2(N_IN);

  logic [N_IN-1:0][W-1:0] sr_q;
  logic [N_IN-1:0][W-1:0] syn;
  logic signed [AW-1:0]   acc_q;
  logic signed [TW-1:0]   tree;
  logic signed [AW-1:0]   acc_d;
  logic signed [AW-1:0]   sel;
  logic signed [AW-1:0]   maxv;

  assign syn = first ? syn_in : sr_q;

  // AND, negation and adder tree.
  always_comb begin
    logic signed [TW-1:0] term;
    tree = '0;
    for (int i = 0; i < N_IN; i++) begin
      term = nbit[i] ? TW'($signed(syn[i])) : '0;
      if (msb_neg) term = -term;
      tree = tree + term;
    end
  end

  always_comb begin
    unique case (mode)
      SIP_MAX: acc_d = AW'(par_in);
      SIP_AVG: acc_d = (first ? i_nbout : acc_q) + AW'(par_in);
      default: acc_d = first ? (i_nbout + AW'(tree))
                             : ((acc_q <<< 1) + AW'(tree));
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      sr_q  <= '0;
    end else if (en) begin
      acc_q <= acc_d;
      if (first) sr_q <= syn_in;
    end
  end

  assign maxv    = (acc_q > i_nbout) ? acc_q : i_nbout;
  assign sel     = (mode == SIP_MAX) ? maxv : acc_q;
  assign o_nbout = acc_q;
  assign out     = (oshift >= 0) ? (sel <<< oshift) : (sel >>> (-oshift));

endmodule
