// Digit-level helpers of the decimal units: conversions between the BCD (8-4-2-1),
// 4-2-2-1, 5-2-1-1 and 5-4-2-1 codes of a decimal digit. Each is a 4-input function. Where a
// value has more than one code, the one chosen here is the design's own; the codes
// themselves are the standard weighted decimal codes used by the multiplier.
package dec_pkg;
  typedef logic [3:0] digit_t;

  // BCD digit 0..9 to 4-2-2-1 (weights 4,2,2,1)
  function automatic digit_t bcd_to_4221(digit_t d);
    case (d)
      4'd0: return 4'b0000;  4'd1: return 4'b0001;  4'd2: return 4'b0010;
      4'd3: return 4'b0011;  4'd4: return 4'b1000;  4'd5: return 4'b1001;
      4'd6: return 4'b1010;  4'd7: return 4'b1011;  4'd8: return 4'b1110;
      default: return 4'b1111;
    endcase
  endfunction

  // value 0..9 to 5-2-1-1 (weights 5,2,1,1)
  function automatic digit_t val_to_5211(digit_t d);
    case (d)
      4'd0: return 4'b0000;  4'd1: return 4'b0001;  4'd2: return 4'b0100;
      4'd3: return 4'b0101;  4'd4: return 4'b0111;  4'd5: return 4'b1000;
      4'd6: return 4'b1001;  4'd7: return 4'b1100;  4'd8: return 4'b1101;
      default: return 4'b1111;
    endcase
  endfunction

  function automatic digit_t val_4221(digit_t d);
    return 4'(4 * d[3] + 2 * d[2] + 2 * d[1] + d[0]);
  endfunction

  function automatic digit_t val_5421(digit_t d);
    return 4'(5 * d[3] + 4 * d[2] + 2 * d[1] + d[0]);
  endfunction
endpackage
