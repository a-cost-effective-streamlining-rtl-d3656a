// giq_right_switch: the INSERT switch of a GIQ bundle (switch graph
// G_n(right, k), k in 0..N).
//
// INSERT-k places the PE's wire at position k of the bundle: forward lines
// 1..k-1 pass straight through, the PE port drives right line k, and every
// left line j (k <= j < N) continues one position higher, as right line j+1.
// Left line N is dropped; a correct configuration never inserts into a full
// bundle, so that line is idle whenever the switch is active. Setting 0
// (all control bits clear) bypasses the port.
//
// Structure of the forward path, per line w (two multiplexers per line, one
// for line 1):
//   right mux of line w, control c[w]:   0 -> straight (left line w)
//                                         1 -> output of the left mux
//   left mux of line w (w > 1), control c[w-1]:
//                                         0 -> port
//                                         1 -> slanted (left line w-1)
//   line 1 has only the right mux, whose second input is the port.
// Control bit k thus drives the right mux of line k and the left mux of line
// k+1, and INSERT-k is the thermometer code c[w] = 1 for w >= k, one
// configuration bit per line.
//
// The backward path (right to left) is the return direction of the same
// connections: left line w takes right line w when c[w] = 0 and right line
// w+1 when c[w] = 1; the port reads right line k, the lowest line whose
// control bit is set, and zero when bypassed.
//
// Interface: lines packed [N-1:0][W-1:0], index w-1 holds line w; `ctrl`
// bit w-1 is c[w]. A non-thermometer `ctrl` is illegal (the configuration
// store checks it). Purely combinational.
module giq_right_switch #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 1
) (
  input  logic [N-1:0]         ctrl,
  input  logic [N-1:0][W-1:0]  fwd_l,
  output logic [N-1:0][W-1:0]  fwd_r,
  input  logic [N-1:0][W-1:0]  bwd_r,
  output logic [N-1:0][W-1:0]  bwd_l,
  input  logic [W-1:0]         port_in,
  output logic [W-1:0]         port_out
);

  logic [N-1:0][W-1:0] inner;   // output of the left mux of each line

  for (genvar j = 0; j < N; j++) begin : g_line
    if (j == 0) begin : g_low
      assign inner[j] = port_in;
    end else begin : g_high
      giq_mux2 #(.W(W)) u_left (
        .a (port_in),
        .b (fwd_l[j - 1]),
        .s (ctrl[j - 1]),
        .y (inner[j])
      );
    end
    giq_mux2 #(.W(W)) u_right (
      .a (fwd_l[j]),
      .b (inner[j]),
      .s (ctrl[j]),
      .y (fwd_r[j])
    );
    // Return direction of the same connections.
    giq_mux2 #(.W(W)) u_bwd (
      .a (bwd_r[j]),
      .b ((j + 1 < N) ? bwd_r[(j + 1 < N) ? j + 1 : j] : '0),
      .s (ctrl[j]),
      .y (bwd_l[j])
    );
  end

  // The port line is the one whose own bit is set and whose lower bit is not.
  always_comb begin
    port_out = '0;
    for (int unsigned w = 0; w < N; w++)
      if (ctrl[w] && (w == 0 || !ctrl[(w == 0) ? 0 : w - 1]))
        port_out = bwd_r[w];
  end

endmodule
