// giq_config_store: the configuration hardware of a GIQ-DIOGENES array.
//
// The array can take any of several precomputed topologies; switching
// topology means loading another set of switch settings. This block keeps
// NUM_CFG such sets in a memory of NUM_CFG*K words (one (N+1)-bit word per
// port switch, laid out as in giq_port_switch) and drives the active
// configuration registers of the K switches.
//
// Writing a set: wr_en with wr_set, wr_idx and wr_data stores one word per
// cycle. Applying a set: a one-cycle `apply` pulse with `apply_set` starts a
// copy of that set into the active registers, one switch per cycle from
// switch 0 upward, like a read of one SRAM word per cycle. `busy` is high for
// exactly K cycles, starting the cycle after `apply`; the new topology is
// complete in the active registers when `busy` falls, and `active_set` then
// names it. An `apply` while busy is ignored. Reset (synchronous, active
// low) clears every active register, which bypasses every port.
//
// The number of stored sets (4), the write port and the one-word-per-cycle
// reload are this design's choices: the published design says only that the
// settings of a selection of topologies are computed off-line and loaded.
// Assertions check that every word written is legal (a thermometer insert
// code, never remove and insert together).
module giq_config_store
  import giq_pkg::*;
#(
  parameter int unsigned K       = 192,
  parameter int unsigned N       = 8,
  parameter int unsigned NUM_CFG = 4,
  localparam int unsigned SW     = (NUM_CFG > 1) ? $clog2(NUM_CFG) : 1,
  localparam int unsigned IW     = (K > 1) ? $clog2(K) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [SW-1:0]       wr_set,
  input  logic [IW-1:0]       wr_idx,
  input  logic [N:0]          wr_data,
  input  logic                apply,
  input  logic [SW-1:0]       apply_set,
  output logic                busy,
  output logic [SW-1:0]       active_set,
  output logic [K-1:0][N:0]   cfg
);

  logic [N:0]    mem [NUM_CFG * K];
  logic [IW-1:0] ptr;
  logic [SW-1:0] load_set;

  always_ff @(posedge clk)
    if (wr_en) mem[int'(wr_set) * K + int'(wr_idx)] <= wr_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      ptr        <= '0;
      load_set   <= '0;
      active_set <= '0;
      cfg        <= '0;
    end else if (!busy) begin
      if (apply) begin
        busy     <= 1'b1;
        ptr      <= '0;
        load_set <= apply_set;
      end
    end else begin
      cfg[ptr] <= mem[int'(load_set) * K + int'(ptr)];
      if (int'(ptr) == K - 1) begin
        busy       <= 1'b0;
        active_set <= load_set;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  // Every stored word must be a legal switch setting.
  a_word_legal: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (insert_code_ok(MAX_LINES'(wr_data[N-1:0]), N)
               && !(wr_data[N] && |wr_data[N-1:0])));
  a_set_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (int'(wr_set) < NUM_CFG && int'(wr_idx) < K));

endmodule
