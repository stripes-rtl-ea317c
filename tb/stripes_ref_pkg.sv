// stripes_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL. It gives the value a neuron contributes for a
// given precision window, the partial-sum recurrence of a window's inner
// product over its phases (the carried partial sum is right-aligned by p-1
// bits before each further phase, as the tile does), the final scaling, the
// rectifier and the conversion the reducer applies before writing to memory.
package stripes_ref_pkg;

  // Neuron value seen by the serial units: bits [lsb+p-1 : lsb] of the
  // container, two's complement if sgn.
  function automatic longint nfield(input logic [15:0] c, input int p, input int lsb,
                                    input bit sgn);
    longint v;
    v = longint'((c >> lsb) & ((1 << p) - 1));
    if (sgn && p > 0 && v[p-1]) v -= (longint'(1) << p);
    return v;
  endfunction

  function automatic longint wrap32(input longint v);
    return longint'($signed(v[31:0]));
  endfunction

  // One more phase of an inner product: acc = 2^(p-1)*(acc >>> (p-1)) + prod.
  function automatic longint phase_step(input longint acc, input longint prod,
                                        input int p, input bit first_phase);
    if (first_phase) return wrap32(prod);
    return wrap32(((acc >>> (p - 1)) <<< (p - 1)) + prod);
  endfunction

  // Final sum to 16-bit container as written to neuron memory.
  function automatic logic [15:0] finish(input longint acc, input int in_lsb, input bit relu,
                                         input int out_lsb, input int out_prec);
    longint x, hi, lo;
    x = wrap32(acc <<< in_lsb);
    if (relu && x < 0) x = 0;
    if (x > 32767) x = 32767;
    if (x < -32768) x = -32768;
    x = x >>> out_lsb;
    if (relu) begin hi = (longint'(1) << out_prec) - 1; lo = 0; end
    else begin hi = (longint'(1) << (out_prec - 1)) - 1; lo = -(longint'(1) << (out_prec - 1)); end
    if (x > hi) x = hi;
    if (x < lo) x = lo;
    return 16'(x <<< out_lsb);
  endfunction

endpackage
