// giq_mux2: the 2-to-1 multiplexer from which every GIQ switch is built.
//
// In the CMOS original this is a pair of complementary pass-gate switches
// driven by a control line and its complement, so the connection it makes
// is bidirectional. Here it is the digital abstraction of one direction of
// that connection: the output follows input A or input B.
//
// Interface: a, b (W bits), s (control), y (W bits). Purely combinational.
// Which control value selects which input is this design's choice:
// s = 0 selects A, s = 1 selects B. The switches use this as "control bit 0
// means the straight (or port) connection", as the design prescribes.
module giq_mux2 #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         s,
  output logic [W-1:0] y
);

  always_comb y = s ? b : a;

endmodule
