// gc_pkg: types and helper functions shared by the gain/offset-correcting
// slope-ADC bank.
//
// cnt_code_e selects the code of the conversion counter: a synchronous
// maximal-length LFSR (the counter type used in the fabricated imager) or a
// plain binary up-counter (needed when extra LSB flip-flops are added for
// precise gain correction, because only a binary code lets those bits be
// dropped from the output).  phase_e is the state of the bus pulse generator.
// lfsr_taps() returns an XNOR-feedback tap mask for a maximal-length LFSR of
// the given width; the polynomials are standard maximal-length ones chosen by
// this design (the published circuit does not name its polynomial).
package gc_pkg;

  typedef enum logic {
    CNT_LFSR   = 1'b0,
    CNT_BINARY = 1'b1
  } cnt_code_e;

  typedef enum logic [1:0] {
    PH_START  = 2'd0,   // one idle cycle after reset, configuration latched
    PH_OFFSET = 2'd1,   // offset-correction pulse sequence
    PH_GAIN   = 2'd2,   // A/D conversion with gain-correction sequence
    PH_DONE   = 2'd3    // conversion window over, bus released
  } phase_e;

  // Tap mask (bit i set = stage i+1 feeds the XNOR) for a Fibonacci LFSR
  // shifting towards the MSB with the feedback entering bit 0.
  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    logic [31:0] m;
    case (width)
      2:  m = 32'h0000_0003;  // 2,1
      3:  m = 32'h0000_0006;  // 3,2
      4:  m = 32'h0000_000C;  // 4,3
      5:  m = 32'h0000_0014;  // 5,3
      6:  m = 32'h0000_0030;  // 6,5
      7:  m = 32'h0000_0060;  // 7,6
      8:  m = 32'h0000_00B8;  // 8,6,5,4
      9:  m = 32'h0000_0110;  // 9,5
      10: m = 32'h0000_0240;  // 10,7
      11: m = 32'h0000_0500;  // 11,9
      12: m = 32'h0000_0829;  // 12,6,4,1
      13: m = 32'h0000_100D;  // 13,4,3,1
      14: m = 32'h0000_2015;  // 14,5,3,1
      15: m = 32'h0000_6000;  // 15,14
      16: m = 32'h0000_D008;  // 16,15,13,4
      default: m = 32'h0;
    endcase
    return m;
  endfunction

endpackage
