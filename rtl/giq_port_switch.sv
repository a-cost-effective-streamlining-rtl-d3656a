// giq_port_switch: connects one PE port to the GIQ bundle.
//
// Each port of the reconfigurable array may be the source end of an edge in
// one topology and the destination end in the next, so its switch must be
// able to REMOVE, to INSERT at any position, or to stay out of the way. This
// design builds it as a REMOVE switch followed, along the bundle, by an
// INSERT switch; the configuration word enables at most one of them:
//   cfg[N]      remove enable (switch graph G_n(left, 1))
//   cfg[N-1:0]  insert thermometer (switch graph G_n(right, k)); all zero
//               with cfg[N] clear bypasses the port (setting 0).
// The port reads from whichever of the two switches is active; when the port
// is bypassed it reads zero. Composing the port switch from the two switch
// types is this design's choice; the two switches themselves follow the
// published multiplexer structures.
//
// Interface: lines packed [N-1:0][W-1:0], index w-1 = line w. Combinational.
module giq_port_switch #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 1
) (
  input  logic [N:0]           cfg,
  input  logic [N-1:0][W-1:0]  fwd_l,
  output logic [N-1:0][W-1:0]  fwd_r,
  input  logic [N-1:0][W-1:0]  bwd_r,
  output logic [N-1:0][W-1:0]  bwd_l,
  input  logic [W-1:0]         port_in,
  output logic [W-1:0]         port_out
);

  logic [N-1:0][W-1:0] fwd_mid, bwd_mid;
  logic [W-1:0]        rm_out, ins_out;

  giq_left_switch #(.N(N), .W(W)) u_remove (
    .remove   (cfg[N]),
    .fwd_l    (fwd_l),
    .fwd_r    (fwd_mid),
    .bwd_r    (bwd_mid),
    .bwd_l    (bwd_l),
    .port_in  (port_in),
    .port_out (rm_out)
  );

  giq_right_switch #(.N(N), .W(W)) u_insert (
    .ctrl     (cfg[N-1:0]),
    .fwd_l    (fwd_mid),
    .fwd_r    (fwd_r),
    .bwd_r    (bwd_r),
    .bwd_l    (bwd_mid),
    .port_in  (port_in),
    .port_out (ins_out)
  );

  // Only one of the two is active in a legal configuration; the inactive
  // one reads zero, so OR-ing them selects the active one.
  assign port_out = rm_out | ins_out;

endmodule
