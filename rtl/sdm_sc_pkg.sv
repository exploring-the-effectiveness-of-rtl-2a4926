// sdm_sc_pkg: constants and helper functions shared by the SDM-SC filter.
//
// The default sizes are those of the 5-tap filter of the reference design:
// a 15-bit input and coefficient resolution, a 15-bit LFSR and a 16-bit
// (m + 1) modulator register. lfsr_taps() returns the feedback tap mask of a
// maximal-length Fibonacci LFSR for widths 2 to 20 (polynomials from the
// usual maximal-length tables; each was checked to step through all
// 2^k - 1 non-zero states). Which polynomial the LFSR uses is this design's
// own choice; the reference design only names "a k-bit LFSR".
package sdm_sc_pkg;

  localparam int unsigned DEF_M_BITS = 15;  // m: input resolution
  localparam int unsigned DEF_C_BITS = 16;  // c: modulator register, m + 1
  localparam int unsigned DEF_K_BITS = 15;  // k: LFSR and coefficient resolution
  localparam int unsigned DEF_TAPS   = 5;   // M: FIR taps
  localparam int unsigned DEF_SHIFT  = 1;   // s: circular shift between SNGs

  // Feedback tap mask: bit (t-1) set for every term x^t of the polynomial.
  function automatic logic [31:0] lfsr_taps(input int unsigned k);
    case (k)
      2:  return 32'h0000_0003;  // x^2 + x + 1
      3:  return 32'h0000_0006;  // x^3 + x^2 + 1
      4:  return 32'h0000_000C;  // x^4 + x^3 + 1
      5:  return 32'h0000_0014;  // x^5 + x^3 + 1
      6:  return 32'h0000_0030;  // x^6 + x^5 + 1
      7:  return 32'h0000_0060;  // x^7 + x^6 + 1
      8:  return 32'h0000_00B8;  // x^8 + x^6 + x^5 + x^4 + 1
      9:  return 32'h0000_0110;  // x^9 + x^5 + 1
      10: return 32'h0000_0240;  // x^10 + x^7 + 1
      11: return 32'h0000_0500;  // x^11 + x^9 + 1
      12: return 32'h0000_0829;  // x^12 + x^6 + x^4 + x + 1
      13: return 32'h0000_100D;  // x^13 + x^4 + x^3 + x + 1
      14: return 32'h0000_2015;  // x^14 + x^5 + x^3 + x + 1
      15: return 32'h0000_6000;  // x^15 + x^14 + 1
      16: return 32'h0000_D008;  // x^16 + x^15 + x^13 + x^4 + 1
      17: return 32'h0001_2000;  // x^17 + x^14 + 1
      18: return 32'h0002_0400;  // x^18 + x^11 + 1
      19: return 32'h0004_0023;  // x^19 + x^6 + x^2 + x + 1
      20: return 32'h0009_0000;  // x^20 + x^17 + 1
      default: return 32'h0;
    endcase
  endfunction

endpackage
