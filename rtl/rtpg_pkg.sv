// rtpg_pkg: constants and a helper function shared by the beat-frequency random pattern
// generator.
//
// The generator is configured through 16-bit DRP (dynamic reconfiguration
// port) words that sit in a 32-entry block RAM and are applied one at a time
// to the two clock dividers (DCM-A, divide by 2; DCM-B, divide by 3). The
// 5-bit address, 16-bit data word, 8-entry FIFO and 8-bit output follow the
// block diagram and the simulation waveform. How the bits of a DRP word are
// laid out is this design's own choice: bit 0 enables DCM-A, bit 1 enables
// DCM-B, and the other 14 bits are reserved (ignored).
package rtpg_pkg;

  localparam int unsigned ADDR_W     = 5;   // BRAM address width
  localparam int unsigned DATA_W     = 16;  // DRP word width
  localparam int unsigned FIFO_DEPTH = 8;   // DRP FIFO locations
  localparam int unsigned OUT_W      = 8;   // seed / random output width

  // DRP word layout
  localparam int unsigned DRP_A_EN_BIT = 0;  // run DCM-A (divide by 2)
  localparam int unsigned DRP_B_EN_BIT = 1;  // run DCM-B (divide by 3)

  // Feedback taps of a maximal-length Fibonacci LFSR of the given width
  // (bit k-1 set for each term x^k of the polynomial, x^0 omitted).
  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    case (width)
      4:       return 32'h0000_000C;  // x^4+x^3+1
      5:       return 32'h0000_0014;  // x^5+x^3+1
      6:       return 32'h0000_0030;  // x^6+x^5+1
      7:       return 32'h0000_0060;  // x^7+x^6+1
      8:       return 32'h0000_00B8;  // x^8+x^6+x^5+x^4+1
      12:      return 32'h0000_0E08;  // x^12+x^11+x^10+x^4+1
      16:      return 32'h0000_B400;  // x^16+x^14+x^13+x^11+1
      24:      return 32'h00E1_0000;  // x^24+x^23+x^22+x^17+1
      32:      return 32'h8020_0003;  // x^32+x^22+x^2+x^1+1
      default: return 32'h0000_00B8;
    endcase
  endfunction

endpackage
