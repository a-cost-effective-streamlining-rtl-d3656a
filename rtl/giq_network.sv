// giq_network: the single bundle of a GIQ-DIOGENES array.
//
// K port switches sit in a line, in the order of the linearization of the
// PEs' ports; the right lines of switch i are joined to the left lines of
// switch i+1. Every edge of the realized topology is a wire that its source
// port INSERTs into the bundle at the position given by the edge's crossing
// number plus one, and that its destination port REMOVEs from position 1.
// Because every insertion position can be chosen, one bundle of N lines
// realizes any linearization whose cutwidth is at most N.
//
// Forward lines carry data from the source port of each edge to its
// destination port; backward lines carry the other direction of the same
// link. The bundle ends are brought out: fwd_in/bwd_out at the left end,
// fwd_out/bwd_in at the right end. In a correct configuration nothing is in
// the bundle at either end.
//
// Interface: cfg[i] is switch i's word (see giq_port_switch); port_in[i] /
// port_out[i] are the PE side of switch i. Purely combinational: a signal
// crosses up to K switches in one path.
module giq_network #(
  parameter int unsigned K = 192,
  parameter int unsigned N = 8,
  parameter int unsigned W = 1
) (
  input  logic [K-1:0][N:0]           cfg,
  input  logic [K-1:0][W-1:0]         port_in,
  output logic [K-1:0][W-1:0]         port_out,
  input  logic [N-1:0][W-1:0]         fwd_in,
  output logic [N-1:0][W-1:0]         fwd_out,
  input  logic [N-1:0][W-1:0]         bwd_in,
  output logic [N-1:0][W-1:0]         bwd_out
);

  for (genvar i = 0; i < K; i++) begin : g_sw
    logic [N-1:0][W-1:0] fl, fr, bl, br;
    if (i == 0) begin : g_first
      assign fl = fwd_in;
    end else begin : g_link
      assign fl = g_sw[i - 1].fr;
    end
    if (i == K - 1) begin : g_last
      assign br = bwd_in;
    end else begin : g_rlink
      assign br = g_sw[i + 1].bl;
    end
    giq_port_switch #(.N(N), .W(W)) u_sw (
      .cfg      (cfg[i]),
      .fwd_l    (fl),
      .fwd_r    (fr),
      .bwd_r    (br),
      .bwd_l    (bl),
      .port_in  (port_in[i]),
      .port_out (port_out[i])
    );
  end

  assign fwd_out = g_sw[K - 1].fr;
  assign bwd_out = g_sw[0].bl;

endmodule
