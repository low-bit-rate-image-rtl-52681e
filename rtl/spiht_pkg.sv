// Shared types and helper functions of the DWT/SPIHT image compressor.
//
// The marker codes follow the no-list SPIHT (NLS) variant used by the encoder:
// MIP (insignificant pixel), MSP (significant pixel), MD (first child of a
// descendant set D), MG (first grandchild of a set G), MN2/MN3 (first
// descendant of the 2nd/3rd generation of an insignificant set). The skip
// tables are the encoder's skipping rules: "skip" is used in the refinement
// and insignificant-pixel passes, "isskip" in the insignificant-set pass.
// The 3-bit encoding of the markers is this design's choice.
package spiht_pkg;

  typedef enum logic [2:0] {
    M_MIP = 3'd0,
    M_MSP = 3'd1,
    M_MD  = 3'd2,
    M_MG  = 3'd3,
    M_MN2 = 3'd4,
    M_MN3 = 3'd5
  } marker_t;

  // Encoder passes.
  typedef enum logic [1:0] {
    P_RP  = 2'd0,   // refinement pass
    P_IPP = 2'd1,   // insignificant pixel pass
    P_ISP = 2'd2    // insignificant set pass
  } pass_t;

  // Skip distance in the refinement and insignificant-pixel passes.
  function automatic int unsigned skip_rp(marker_t m);
    case (m)
      M_MIP, M_MSP: return 1;
      M_MD:         return 4;
      M_MG, M_MN2:  return 16;
      default:      return 64;
    endcase
  endfunction

  // Skip distance in the insignificant-set pass.
  function automatic int unsigned skip_isp(marker_t m);
    case (m)
      M_MIP, M_MSP, M_MD: return 4;
      M_MG, M_MN2:        return 16;
      default:            return 64;
    endcase
  endfunction

endpackage
