// gc_ref_pkg: reference model used by the testbenches of the gain/offset
// correcting ADC bank.  It predicts ADC results in closed form instead of
// replaying the pulse generator's bus decode:
//  - offset phase: (2**K - 1) - mem[M-1:n_gc], K = M - n_gc;
//  - gain phase, comparator high for the first T gain cycles: gain line k is
//    high at cycles t = 2**(C-1-k) * odd, so within 1..T it blocks
//    floor((T + 2**(C-1-k)) / 2**(C-k)) pulses if mem[k] is set.
// It also holds an independent step function for the 9..16-bit LFSRs used by
// the counters, for decoding LFSR states into counts.
package gc_ref_pkg;

  function automatic longint exp_count(input longint mem, input int m,
                                       input int ngc, input int c,
                                       input longint tgain);
    longint cnt, tt, blk;
    int     koff;
    koff = m - ngc;
    cnt  = 0;
    if (koff > 0)
      cnt = ((longint'(1) << koff) - 1) - ((mem >> ngc) & ((longint'(1) << koff) - 1));
    tt = tgain;
    if (tt > (longint'(1) << c) - 1) tt = (longint'(1) << c) - 1;
    if (tt < 0) tt = 0;
    cnt += tt;
    for (int k = 0; k < ngc; k++)
      if (mem[k]) begin
        blk  = (tt + (longint'(1) << (c - 1 - k))) / (longint'(1) << (c - k));
        cnt -= blk;
      end
    return cnt;
  endfunction

  // x^9 + x^5 + 1 and x^11 + x^9 + 1, XNOR feedback into bit 0, shift up
  function automatic logic [15:0] lfsr_next(input logic [15:0] s, input int w);
    logic fb;
    case (w)
      9:  fb = ~(s[8] ^ s[4]);
      11: fb = ~(s[10] ^ s[8]);
      default: fb = 1'b0;
    endcase
    return ((s << 1) | 16'(fb)) & ((16'd1 << w) - 16'd1);
  endfunction

endpackage
