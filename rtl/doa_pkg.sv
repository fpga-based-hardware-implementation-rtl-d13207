// doa_pkg - shared types, constants and fixed-point helpers of the DOA pipeline.
//
// All datapath values are two's-complement fixed point with WL bits of which
// IWL are integer bits (sign included) and FRAC = WL - IWL are fraction bits,
// the "word length / integer length" notation of the LabVIEW fixed-point type
// (16/8 is the main configuration). Intermediate results are formed at full
// precision in acc_t and brought back to WL bits with rnd() (round half up)
// followed by sat() (clamp to the signed range). The pipeline handles up to
// NSRC = 2 sources, which is the limit of the FPGA version of the design.
// The CORDIC angle table gives atan(2^-i) in degrees scaled by 2^16:
//   ATAN_DEG16[i] = round(atan(2^-i) * 180/pi * 65536).
package doa_pkg;

  // Maximum number of sources the FPGA pipeline resolves.
  localparam int NSRC = 2;

  // Decomposition used by stage 2.
  typedef enum logic {
    METH_LDL  = 1'b0,
    METH_CHOL = 1'b1
  } method_e;

  // Per-frame tag that travels with a frame through the pipeline.
  typedef struct packed {
    method_e method;
    logic    two_src;   // 1: two sources, 0: one source
  } frame_tag_t;

  // Wide signed container for full-precision intermediates.
  localparam int ACCW = 96;
  typedef logic signed [ACCW-1:0] acc_t;

  // Arithmetic right shift by sh with round-half-up (sh <= 0 shifts left).
  function automatic acc_t rnd(acc_t v, int sh);
    acc_t one;
    one = acc_t'(1);
    if (sh <= 0) return v <<< (-sh);
    return (v + (one <<< (sh - 1))) >>> sh;
  endfunction

  // Clamp v to the range of a w-bit signed number.
  function automatic acc_t sat(acc_t v, int w);
    acc_t maxv, minv, one;
    one  = acc_t'(1);
    maxv = (one <<< (w - 1)) - one;
    minv = -(one <<< (w - 1));
    if (v > maxv) return maxv;
    if (v < minv) return minv;
    return v;
  endfunction

  // CORDIC elementary angles, degrees * 2^16.
  localparam int CORDIC_AF = 16;
  localparam int CORDIC_MAX_ITER = 20;
  function automatic logic [31:0] atan_deg16(int i);
    case (i)
      0:  return 32'd2949120;
      1:  return 32'd1740967;
      2:  return 32'd919879;
      3:  return 32'd466945;
      4:  return 32'd234379;
      5:  return 32'd117304;
      6:  return 32'd58666;
      7:  return 32'd29335;
      8:  return 32'd14668;
      9:  return 32'd7334;
      10: return 32'd3667;
      11: return 32'd1833;
      12: return 32'd917;
      13: return 32'd458;
      14: return 32'd229;
      15: return 32'd115;
      16: return 32'd57;
      17: return 32'd29;
      18: return 32'd14;
      19: return 32'd7;
      default: return 32'd0;
    endcase
  endfunction

endpackage
