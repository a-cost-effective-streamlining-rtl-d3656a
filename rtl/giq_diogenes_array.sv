// giq_diogenes_array: a reconfigurable array interconnect built on one
// generalized insertion queue (GIQ) bundle.
//
// NUM_PES processing elements lie in a logical line; each is attached to the
// bundle through PORTS port switches, so the bundle passes K = NUM_PES*PORTS
// switches, PE p's ports at positions p*PORTS .. p*PORTS+PORTS-1. The bundle
// has LINES data lines of W bits. The configuration store holds several
// precomputed topologies and loads one of them into the switches; the
// defaults (32 PEs, 6 ports, 8 lines, 1-bit lines) are those of the
// published proof-of-concept array, the number of stored topologies (4) is
// this design's choice.
//
// The processing elements themselves are outside this block: every port
// switch's PE side is a top-level port. pe_tx[i] is what the PE drives into
// port switch i; pe_rx[i] is what port switch i delivers to the PE. For an
// edge (u, v) of the loaded topology, u's port that INSERTs the edge
// receives v's pe_tx and v's port that REMOVEs it receives u's pe_tx, through
// purely combinational paths. Ports not used by the topology receive zero.
// The bundle ends are tied to zero on the way in; the lines leaving each end
// are brought out (all zero under a correct configuration).
//
// Timing: the network is combinational; configuration changes take K+1
// cycles from `apply` to the end of `busy` (see giq_config_store).
module giq_diogenes_array
  import giq_pkg::*;
#(
  parameter int unsigned NUM_PES = DEF_NUM_PES,
  parameter int unsigned PORTS   = DEF_PORTS,
  parameter int unsigned LINES   = DEF_LINES,
  parameter int unsigned W       = DEF_WIDTH,
  parameter int unsigned NUM_CFG = DEF_NUM_CFG,
  localparam int unsigned K      = NUM_PES * PORTS,
  localparam int unsigned SW     = (NUM_CFG > 1) ? $clog2(NUM_CFG) : 1,
  localparam int unsigned IW     = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  logic                     cfg_wr_en,
  input  logic [SW-1:0]            cfg_wr_set,
  input  logic [IW-1:0]            cfg_wr_idx,
  input  logic [LINES:0]           cfg_wr_data,
  input  logic                     cfg_apply,
  input  logic [SW-1:0]            cfg_apply_set,
  output logic                     cfg_busy,
  output logic [SW-1:0]            cfg_active_set,
  // PE ports
  input  logic [K-1:0][W-1:0]      pe_tx,
  output logic [K-1:0][W-1:0]      pe_rx,
  // lines leaving the two ends of the bundle
  output logic [LINES-1:0][W-1:0]  bundle_right_out,
  output logic [LINES-1:0][W-1:0]  bundle_left_out
);

  logic [K-1:0][LINES:0] cfg;

  giq_config_store #(.K(K), .N(LINES), .NUM_CFG(NUM_CFG)) u_cfg (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (cfg_wr_en),
    .wr_set     (cfg_wr_set),
    .wr_idx     (cfg_wr_idx),
    .wr_data    (cfg_wr_data),
    .apply      (cfg_apply),
    .apply_set  (cfg_apply_set),
    .busy       (cfg_busy),
    .active_set (cfg_active_set),
    .cfg        (cfg)
  );

  giq_network #(.K(K), .N(LINES), .W(W)) u_net (
    .cfg      (cfg),
    .port_in  (pe_tx),
    .port_out (pe_rx),
    .fwd_in   ('0),
    .fwd_out  (bundle_right_out),
    .bwd_in   ('0),
    .bwd_out  (bundle_left_out)
  );

endmodule
