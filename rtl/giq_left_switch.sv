// giq_left_switch: the REMOVE switch of a GIQ bundle (switch graph
// G_n(left, S), S in {0, 1}).
//
// The bundle of N lines runs through the switch from its left side to its
// right side. With the single control bit `remove` clear, every line passes
// straight through (the port is bypassed). With it set, line 1 arriving from
// the left is delivered to the PE port and every line j+1 arriving from the
// left continues as line j on the right, so the bundle closes up behind the
// removed wire; line N on the right is then unused and driven to zero.
//
// The links of the array are bidirectional. The switch therefore carries
// two directions of every line: the forward lines (left to right, toward the
// destination PE of an edge) and the backward lines (right to left). The
// backward path mirrors the forward one: with `remove` set the PE's
// `port_in` drives backward line 1 on the left and backward line j on the
// right continues as line j+1 on the left.
//
// The forward path is built like the CMOS switch: one 2-to-1 multiplexer per
// line, all sharing the one control bit (N multiplexers, one configuration
// bit per switch). The extra multiplexers on the port and on the backward
// lines stand for the return direction of the same pass gates; a port that
// is not connected reads zero, since a digital line cannot float.
//
// Interface: lines are packed [N-1:0][W-1:0], index w-1 holds line w.
// Purely combinational: no clock, no latency.
module giq_left_switch #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 1
) (
  input  logic                 remove,
  input  logic [N-1:0][W-1:0]  fwd_l,     // forward lines entering on the left
  output logic [N-1:0][W-1:0]  fwd_r,     // forward lines leaving on the right
  input  logic [N-1:0][W-1:0]  bwd_r,     // backward lines entering on the right
  output logic [N-1:0][W-1:0]  bwd_l,     // backward lines leaving on the left
  input  logic [W-1:0]         port_in,   // data from the PE port into the bundle
  output logic [W-1:0]         port_out   // data from the bundle to the PE port
);

  for (genvar j = 0; j < N; j++) begin : g_line
    // Forward: right line j+1 takes left line j+1 (straight) or j+2 (shifted).
    giq_mux2 #(.W(W)) u_fwd (
      .a (fwd_l[j]),
      .b ((j + 1 < N) ? fwd_l[(j + 1 < N) ? j + 1 : j] : '0),
      .s (remove),
      .y (fwd_r[j])
    );
    // Backward: left line j+1 takes right line j+1 (straight) or j (shifted);
    // left line 1 takes the port when the switch is active.
    giq_mux2 #(.W(W)) u_bwd (
      .a (bwd_r[j]),
      .b ((j == 0) ? port_in : bwd_r[(j == 0) ? 0 : j - 1]),
      .s (remove),
      .y (bwd_l[j])
    );
  end

  giq_mux2 #(.W(W)) u_port (
    .a ('0),
    .b (fwd_l[0]),
    .s (remove),
    .y (port_out)
  );

endmodule
