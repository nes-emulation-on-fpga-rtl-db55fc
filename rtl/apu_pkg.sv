// Shared tables of the audio processing unit: the length-counter load table
// indexed by the 5-bit value written to a channel's fourth register, and the
// noise channel's timer periods (NTSC, in CPU cycles). The values are those of
// the NES APU.
package apu_pkg;
  function automatic logic [7:0] length_table(input logic [4:0] i);
    unique case (i)
      5'd0:  return 8'd10;  5'd1:  return 8'd254; 5'd2:  return 8'd20;  5'd3:  return 8'd2;
      5'd4:  return 8'd40;  5'd5:  return 8'd4;   5'd6:  return 8'd80;  5'd7:  return 8'd6;
      5'd8:  return 8'd160; 5'd9:  return 8'd8;   5'd10: return 8'd60;  5'd11: return 8'd10;
      5'd12: return 8'd14;  5'd13: return 8'd12;  5'd14: return 8'd26;  5'd15: return 8'd14;
      5'd16: return 8'd12;  5'd17: return 8'd16;  5'd18: return 8'd24;  5'd19: return 8'd18;
      5'd20: return 8'd48;  5'd21: return 8'd20;  5'd22: return 8'd96;  5'd23: return 8'd22;
      5'd24: return 8'd192; 5'd25: return 8'd24;  5'd26: return 8'd72;  5'd27: return 8'd26;
      5'd28: return 8'd16;  5'd29: return 8'd28;  5'd30: return 8'd32;  default: return 8'd30;
    endcase
  endfunction

  function automatic logic [11:0] noise_period(input logic [3:0] i);
    unique case (i)
      4'd0:  return 12'd4;    4'd1:  return 12'd8;    4'd2:  return 12'd16;   4'd3:  return 12'd32;
      4'd4:  return 12'd64;   4'd5:  return 12'd96;   4'd6:  return 12'd128;  4'd7:  return 12'd160;
      4'd8:  return 12'd202;  4'd9:  return 12'd254;  4'd10: return 12'd380;  4'd11: return 12'd508;
      4'd12: return 12'd762;  4'd13: return 12'd1016; 4'd14: return 12'd2034; default: return 12'd4068;
    endcase
  endfunction
endpackage
