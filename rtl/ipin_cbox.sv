// Input connection box of one logic-block input pin.
//
// A multiplexer joins the pin to exactly one of the W tracks of the channel
// on the pin's side, or to a constant 0 or 1 (an unused pin, or a tied
// carry-in / control input). Select encoding: 0 -> 0, 1 -> 1, 2+t -> track
// t. With DIRECT = 1 the code W+2 selects the direct connection, through
// the unbalanced second stage (direct_mux). Every pin reaches every track
// (flexibility Fc = 1). Codes above the last valid one give 0.
// Purely combinational.
//
// A multiplexer-based input box, Fc = 1, constant inputs and the direct
// connection stage follow the description of the architecture; the select
// encoding is this design's choice.
module ipin_cbox #(
  parameter int W      = 12,  // channel width
  parameter bit DIRECT = 0,   // pin has a direct connection
  parameter int SELW   = $clog2(W + 3)
) (
  input  logic [W-1:0]    tracks,
  input  logic            direct_in,
  input  logic [SELW-1:0] sel,
  output logic            pin
);
  logic track_val;

  always_comb begin
    if (sel == 0)                 track_val = 1'b0;
    else if (sel == 1)            track_val = 1'b1;
    else if (int'(sel) < W + 2)   track_val = tracks[int'(sel) - 2];
    else                          track_val = 1'b0;
  end

  if (DIRECT) begin : g_direct
    direct_mux u_dm (
      .from_tracks(track_val), .from_direct(direct_in),
      .use_direct(int'(sel) == W + 2), .pin(pin)
    );
  end else begin : g_plain
    assign pin = track_val;
  end
endmodule
