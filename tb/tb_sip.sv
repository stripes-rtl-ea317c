// tb_sip: self-checking test of the serial inner-product unit. Random
// synapse bricks and neuron values of random precision p (signed and
// unsigned) are fed most significant bit first over p cycles with a random
// initial partial sum; the accumulator must equal 2^(p-1)*init + sum(s*n)
// after exactly p enabled cycles. The output shifter is checked in both
// directions, and the max-pooling and average-pooling modes are checked
// against directly computed values.
module tb_sip;
  import stripes_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, first, msb_neg;
  sip_mode_e mode;
  logic [15:0][15:0] syn_in;
  logic [15:0] nbit;
  logic signed [15:0] par_in;
  logic signed [31:0] i_nbout, o_nbout, out;
  logic signed [5:0] oshift;

  sip dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, sgn, cycles;
    longint expv, initv;
    logic signed [15:0] s [16];
    longint n [16];
    en = 0; first = 0; msb_neg = 0; mode = SIP_CONV; syn_in = '0; nbit = '0;
    par_in = '0; i_nbout = '0; oshift = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      p   = 1 + ($urandom % 16);
      sgn = (p > 1) ? ($urandom % 2) : 0;
      initv = longint'($signed(16'($urandom)));
      expv = initv <<< (p - 1);
      for (int i = 0; i < 16; i++) begin
        s[i] = 16'($urandom);
        if (sgn) n[i] = longint'($urandom % (1 << p)) - (1 << (p - 1));
        else     n[i] = longint'($urandom % (1 << p));
        expv += longint'(s[i]) * n[i];
      end
      cycles = 0;
      for (int b = p - 1; b >= 0; b--) begin
        @(negedge clk);
        en = 1; mode = SIP_CONV;
        first = (b == p - 1);
        msb_neg = first && sgn;
        i_nbout = 32'(initv);
        for (int i = 0; i < 16; i++) begin
          nbit[i] = (n[i] >>> b) & 1;
          // synapses appear on the SB bus only on the first cycle
          syn_in[i] = first ? s[i] : 16'($urandom);
        end
        cycles++;
      end
      @(negedge clk);
      en = 0; first = 0; msb_neg = 0;
      check($sformatf("acc t=%0d p=%0d", t, p), longint'(o_nbout), longint'(32'(expv)) );
      check("cycles", cycles, p);
      oshift = 6'($signed(-($urandom % 8)));
      #1 check("shift right", longint'(out), longint'($signed(32'(expv)) >>> (-oshift)));
      oshift = 6'($urandom % 8);
      #1 check("shift left", longint'(out), longint'($signed(32'(expv) <<< oshift)));
      oshift = 0;
    end
    // max pooling: accumulator takes the bit-parallel neuron, output is the max
    for (int t = 0; t < 50; t++) begin
      logic signed [15:0] a;
      logic signed [31:0] r;
      a = 16'($urandom);
      r = $signed(32'($urandom)) >>> 12;
      @(negedge clk);
      en = 1; first = 1; mode = SIP_MAX; par_in = a;
      @(negedge clk);
      en = 0; i_nbout = r;
      #1 check("max", longint'(out), (longint'(a) > longint'(r)) ? longint'(a) : longint'(r));
    end
    // average pooling: accumulate on top of the NBout value
    for (int t = 0; t < 50; t++) begin
      longint sum;
      int k;
      k = 1 + $urandom % 9;
      sum = longint'($signed(32'($urandom)) >>> 10);
      i_nbout = 32'(sum);
      for (int j = 0; j < k; j++) begin
        @(negedge clk);
        en = 1; first = (j == 0); mode = SIP_AVG;
        par_in = 16'($urandom);
        sum += longint'(par_in);
      end
      @(negedge clk);
      en = 0;
      check("avg acc", longint'(o_nbout), sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
