// encoder_pkg: types and constants shared by the blocks of the nonlinear
// time-base encoder.
//
// The encoder represents a sinusoidal reference of 10 V amplitude with a
// four-bit code whose least significant bit weighs 0.5 V, so the code covers
// 0.0 to 7.5 V (or -7.5 to +7.5 V with the extra sign bit). Counting from
// the positive-going zero crossing, the k-th clock pulse falls where the
// reference is 10*sin((6k-3) degrees), and the code after k pulses is that
// voltage rounded to the nearest 0.5 V step and limited to full scale:
//     code(k) = min(15, round(20 * sin((6k-3) deg))),  k = 1..9,  code(0) = 0
// This gives the ten-entry sequence 0,1,3,5,7,9,11,13,14,15. After the tenth
// state the sequence returns to 0. The sequence, the 10 V amplitude and the
// 0.5 V step follow the source design; the package form is this design's own.
package encoder_pkg;

  // Precision of the coded output and number of levels in the count sequence.
  localparam int unsigned CODE_W = 4;
  localparam int unsigned LEVELS = 10;
  localparam int unsigned STEP_W = $clog2(LEVELS);

  typedef logic [CODE_W-1:0] code_t;  // counter output, bits {A,B,C,D}, A = MSB
  typedef logic [STEP_W-1:0] step_t;  // linear pulse count 0..LEVELS-1

  // Code held after k uninhibited pulses (formula in the header above).
  function automatic code_t level_code(input step_t k);
    unique case (k)
      4'd0:    return 4'd0;   // 0.000 V -> 0.0
      4'd1:    return 4'd1;   // 0.5234  -> 0.5
      4'd2:    return 4'd3;   // 1.5643  -> 1.5
      4'd3:    return 4'd5;   // 2.5882  -> 2.5
      4'd4:    return 4'd7;   // 3.5837  -> 3.5
      4'd5:    return 4'd9;   // 4.5399  -> 4.5
      4'd6:    return 4'd11;  // 5.4464  -> 5.5
      4'd7:    return 4'd13;  // 6.2932  -> 6.5
      4'd8:    return 4'd14;  // 7.0711  -> 7.0
      4'd9:    return 4'd15;  // 7.7715  -> 7.5 (full scale)
      default: return 4'd0;   // counts 10..15 never occur
    endcase
  endfunction

endpackage
