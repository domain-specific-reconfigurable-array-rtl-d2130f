// sbox: switch box at the crossing of a horizontal and a vertical routing
// channel.
//
// The box has four sides (0 north, 1 east, 2 south, 3 west), each with NT
// tracks of W bits. Track i leaving a side can be connected to track i of
// any one of the other three sides (flexibility Fs = 3, the "disjoint"
// pattern in which a signal keeps its track number through the box) or to
// nothing. sel[side][i] = 0 leaves the track undriven by this box (zero);
// 1, 2, 3 take side (side+1)%4, (side+2)%4, (side+3)%4. Combinational.
// Fs = 3 and the role of the box follow the published design; the disjoint pattern,
// the directional multiplexer form of the switches and the select encoding
// are this design's choices.
module sbox #(
  parameter int unsigned W  = 24,
  parameter int unsigned NT = 24
) (
  input  logic [3:0][NT-1:0][W-1:0] side_in,
  input  logic [3:0][NT-1:0][1:0]   sel,
  output logic [3:0][NT-1:0][W-1:0] side_out
);
  for (genvar s = 0; s < 4; s++) begin : g_side
    for (genvar t = 0; t < NT; t++) begin : g_trk
      always_comb begin
        case (sel[s][t])
          2'd1:    side_out[s][t] = side_in[(s + 1) % 4][t];
          2'd2:    side_out[s][t] = side_in[(s + 2) % 4][t];
          2'd3:    side_out[s][t] = side_in[(s + 3) % 4][t];
          default: side_out[s][t] = '0;
        endcase
      end
    end
  end
endmodule
