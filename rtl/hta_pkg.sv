// hta_pkg: shared constants and fixed-point types of the sine-wave histogram
// test analyzer.
//
// Every quantity measured in ADC LSBs (offset V_o, amplitude A, DNL, INL,
// offset and gain error, Error) is carried as a signed two's-complement
// fixed-point number with FRAC fractional bits ("Q16"). Angles produced by
// the CORDIC arcsine unit are in radians with ANG_FRAC fractional bits.
// These formats are a choice of this implementation; the method only fixes
// the formulas, not the number representation.
package hta_pkg;

  // Fractional bits of LSB-domain quantities (Q16).
  localparam int FRAC = 16;
  // Fractional bits of angles in radians (Q24).
  localparam int ANG_FRAC = 24;

  // 1.0 in Q16.
  localparam logic signed [31:0] ONE_Q16 = 32'sd65536;
  // pi^2 in Q16, used by the offset approximation V_o ~ pi^2/N_t^2 (...).
  localparam logic [31:0] PI2_Q16 = 32'd646814;
  // 1/pi in Q32, used to scale an angle difference into a code count.
  localparam logic [31:0] INV_PI_Q32 = 32'd1367130551;

  // Signed Q16 value in LSB units.
  typedef logic signed [31:0] lsb_t;
  // Signed Q24 angle in radians.
  typedef logic signed [31:0] ang_t;

  // Final estimates of one complete test.
  typedef struct packed {
    lsb_t offset_error;   // (1 + 2^(1-N)) * V_o, LSB
    lsb_t gain_error;     // -(2^N/(2^N-2)) * sum(DNL), LSB
    lsb_t gain;           // G = 1 - sum(DNL)/(2^N-2), unitless Q16
    lsb_t dnl_max;        // largest DNL(i), LSB
    lsb_t dnl_min;        // smallest DNL(i), LSB
    lsb_t dnl_act_max;    // largest gain-corrected DNL, G*(1+DNL)-1, LSB
    lsb_t dnl_act_min;    // smallest gain-corrected DNL, LSB
    lsb_t inl_max;        // largest INL(i), LSB
    lsb_t inl_min;        // smallest INL(i), LSB
    lsb_t err_metric;     // Error = 1 + G^2 * mean|DNL^2 + 2 DNL|, unitless Q16
  } test_result_t;

  // 2*atan(2^-i) in Q24 radians, i >= 1: the angle of one double rotation
  // of the arcsine CORDIC. Entries beyond i = 25 round to zero.
  function automatic ang_t cordic_angle(input int i);
    case (i)
      1:  return 32'sd15557432;
      2:  return 32'sd8220120;
      3:  return 32'sd4172661;
      4:  return 32'sd2094428;
      5:  return 32'sd1048235;
      6:  return 32'sd524245;
      7:  return 32'sd262139;
      8:  return 32'sd131071;
      default: return (i >= 9 && i <= 25) ? ang_t'(32'sd1 <<< (25 - i)) : '0;
    endcase
  endfunction

endpackage
