// Last stage of an input connection box that also receives a direct
// connection.
//
// The input pin is fed by a two-level, unbalanced multiplexer: the first
// level selects among the routing tracks, this second level chooses between
// that result and the direct connection from the neighbouring block's
// output pin. The direct path therefore passes a single multiplexer.
// Purely combinational.
//
// The two-level structure follows the published drawing of a connection
// box with a direct connection.
module direct_mux (
  input  logic from_tracks,  // output of the track multiplexer
  input  logic from_direct,  // neighbour's output pin
  input  logic use_direct,   // configuration bit
  output logic pin           // to the logic block input pin
);
  assign pin = use_direct ? from_direct : from_tracks;
endmodule
