// sine_rom -- quarter-wave sine table, 64 words of 7 bits.
//
// Holds only the first quarter of the sine period, 0 to pi/2, as unsigned
// magnitudes; sine_lookup rebuilds the other three quarters from it by
// symmetry. Entry i is the amplitude at the centre of the i-th of 64 equal
// phase steps across the quarter:
//     amp[i] = round(127 * sin((i + 0.5) * pi / 128)),   i = 0..63
// Sampling at step centres makes the table exactly mirror-symmetric, so the
// second quarter can read it at the bit-inverted address. The 6-bit address
// and 7-bit output follow the NCO design; the half-step sample points and the
// full-scale value of 127 are this design's choice. Purely combinational
// (synthesises to ROM or logic).
module sine_rom (
  input  logic [5:0] addr,
  output logic [6:0] amp
);

  always_comb begin
    case (addr)
      6'd0 : amp = 7'd2  ;  6'd1 : amp = 7'd5  ;  6'd2 : amp = 7'd8  ;  6'd3 : amp = 7'd11 ;
      6'd4 : amp = 7'd14 ;  6'd5 : amp = 7'd17 ;  6'd6 : amp = 7'd20 ;  6'd7 : amp = 7'd23 ;
      6'd8 : amp = 7'd26 ;  6'd9 : amp = 7'd29 ;  6'd10: amp = 7'd32 ;  6'd11: amp = 7'd35 ;
      6'd12: amp = 7'd38 ;  6'd13: amp = 7'd41 ;  6'd14: amp = 7'd44 ;  6'd15: amp = 7'd47 ;
      6'd16: amp = 7'd50 ;  6'd17: amp = 7'd53 ;  6'd18: amp = 7'd56 ;  6'd19: amp = 7'd58 ;
      6'd20: amp = 7'd61 ;  6'd21: amp = 7'd64 ;  6'd22: amp = 7'd67 ;  6'd23: amp = 7'd69 ;
      6'd24: amp = 7'd72 ;  6'd25: amp = 7'd74 ;  6'd26: amp = 7'd77 ;  6'd27: amp = 7'd79 ;
      6'd28: amp = 7'd82 ;  6'd29: amp = 7'd84 ;  6'd30: amp = 7'd86 ;  6'd31: amp = 7'd89 ;
      6'd32: amp = 7'd91 ;  6'd33: amp = 7'd93 ;  6'd34: amp = 7'd95 ;  6'd35: amp = 7'd97 ;
      6'd36: amp = 7'd99 ;  6'd37: amp = 7'd101;  6'd38: amp = 7'd103;  6'd39: amp = 7'd105;
      6'd40: amp = 7'd106;  6'd41: amp = 7'd108;  6'd42: amp = 7'd110;  6'd43: amp = 7'd111;
      6'd44: amp = 7'd113;  6'd45: amp = 7'd114;  6'd46: amp = 7'd115;  6'd47: amp = 7'd117;
      6'd48: amp = 7'd118;  6'd49: amp = 7'd119;  6'd50: amp = 7'd120;  6'd51: amp = 7'd121;
      6'd52: amp = 7'd122;  6'd53: amp = 7'd123;  6'd54: amp = 7'd124;  6'd55: amp = 7'd124;
      6'd56: amp = 7'd125;  6'd57: amp = 7'd125;  6'd58: amp = 7'd126;  6'd59: amp = 7'd126;
      6'd60: amp = 7'd127;  6'd61: amp = 7'd127;  6'd62: amp = 7'd127;  6'd63: amp = 7'd127;
      default: amp = 7'd0;
    endcase
  end

endmodule
