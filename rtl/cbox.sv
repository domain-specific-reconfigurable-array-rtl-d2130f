// cbox: connection box joining one cluster pin with a set of tracks.
//
// The pin takes the value of the source picked by sel, among N sources of W
// bits each; a select of N or more leaves the pin unconnected, which reads as
// zero. Combinational. The array uses this one block wherever a pin meets
// tracks: on cluster data and control inputs (sources: the tracks and the
// array inputs), on the tracks themselves (sources: cluster outputs and a
// configured constant) and on the array outputs (sources: the tracks).
// With N equal to the track count every pin reaches every track, the
// published design's connection flexibility Fc = 24 for 24 tracks. Building the
// programmable switch as a multiplexer with a select code is this design's
// choice.
module cbox #(
  parameter int unsigned W  = 24,
  parameter int unsigned N  = 24,
  parameter int unsigned SW = $clog2(N + 1)
) (
  input  logic [N-1:0][W-1:0] src,
  input  logic [SW-1:0]       sel,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < int'(N); i++)
      if (sel == SW'(i)) y = src[i];
  end
endmodule
