// nsr_busmon: seven-segment bus monitor.
//
// The original machine could show any inter-unit bus on four seven-segment
// digits, which together with the step gates let a frozen pipeline be read
// word by word. This module encodes a 16-bit bus as four hexadecimal digits:
// seg[3] shows bits 15:12, seg[0] bits 3:0. Each digit's segments a..g are
// bits 0..6, active high, with the usual hexadecimal glyphs (lower-case b
// and d). The segment order, polarity and static drive are this design's
// choices. Purely combinational.
module nsr_busmon (
  input  logic [15:0]       bus,
  output logic [3:0][6:0]   seg
);

  function automatic logic [6:0] hex7(input logic [3:0] d);
    //                gfedcba
    unique case (d)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      default: return 7'b1110001;  // F
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++) seg[i] = hex7(bus[4*i +: 4]);
  end

endmodule
