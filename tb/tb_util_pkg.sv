// tb_util_pkg -- helpers shared by the node testbenches: builds the phase
// word of a given iteration cycle the way the decoder's controller is
// specified to (cycle 0: saturation, 1: check-node signs, 2..W-1: check-node
// magnitudes, 3: bit-node signs, 4..W+1: bit-node magnitudes).
package tb_util_pkg;
  import ldpc_pkg::*;

  function automatic phase_t mk_phase(input int cyc, input bit run, input bit init, input int w);
    phase_t p;
    p.cyc     = 4'(cyc);
    p.run     = run;
    p.init    = init;
    p.bn_sat  = (cyc == 0);
    p.cn_sign = (cyc == 1);
    p.cn_mag  = (cyc >= 2) && (cyc <= w - 1);
    p.bn_msb  = (cyc == 3);
    p.bn_mag  = (cyc >= 4) && (cyc <= w + 1);
    p.bn_last = (cyc == w + 1);
    return p;
  endfunction
endpackage
