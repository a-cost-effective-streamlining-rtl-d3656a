// tb_giq_workloads_32pe: the four 32-PE topologies named as targets for the
// array (hypercube, butterfly, three-dimensional mesh, de Bruijn graph),
// routed end to end on an array widened to 24 lines (the default 8 lines do
// not hold them: the 5-cube alone has cutwidth 21).
//
// Graphs, generated here:
//   5-cube            nodes 0..31, edges a -- a^(1<<d), natural order
//   butterfly         8 rows x 4 levels, node l*8+r, edges (l,r)--(l+1,r) and
//                     (l,r)--(l+1, r ^ (1<<l))
//   3-D mesh 4x4x2    node x + 4y + 16z
//   de Bruijn B(2,5)  undirected edges a -- 2a mod 32, a -- 2a+1 mod 32,
//                     self-loops and duplicates dropped
// The line orders of the last three were found by a local search that
// minimizes cutwidth; they are listed below as permutations.
// Checks: the layout fits the widened array (degree <= 6, cutwidth <= 24),
// the 5-cube's natural order has cutwidth 21, each reload takes K cycles,
// and every edge carries random data both ways, unused ports read zero.
module tb_giq_workloads_32pe;
  import giq_tb_pkg::*;
  localparam int PES = 32, PORTS = 6, LINES = 24, W = 1, NC = 4;
  localparam int K = PES * PORTS;
  localparam int SW = $clog2(NC), IW = $clog2(K);

  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_wr_en = 0, cfg_apply = 0, cfg_busy;
  logic [SW-1:0] cfg_wr_set = '0, cfg_apply_set = '0, cfg_active_set;
  logic [IW-1:0] cfg_wr_idx = '0;
  logic [LINES:0] cfg_wr_data = '0;
  logic [K-1:0][W-1:0] pe_tx = '0, pe_rx;
  logic [LINES-1:0][W-1:0] bundle_right_out, bundle_left_out;

  layout_t lay [NC];
  int ord [3][32] = '{
    '{2,18,26,10,3,0,11,8,16,17,9,28,1,24,30,19,25,29,20,5,22,21,12,13,27,15,4,14,7,23,6,31},
    '{18,2,7,3,22,6,23,19,21,1,17,5,0,16,4,11,10,20,27,8,9,25,26,24,29,28,30,31,15,13,12,14},
    '{31,30,14,23,29,27,13,15,7,26,21,11,19,22,28,25,12,24,3,6,16,5,10,1,17,8,2,0,9,4,18,20}};

  giq_diogenes_array #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Add edge (a, b) of graph nodes, placed by the permutation `o`
  // (o[i] = graph node at line position i); duplicates are dropped.
  task automatic add_edge(input int a, input int b, input int o[32], input bit use_ord,
                          inout int ne, inout int eu[MAXS], inout int ev[MAXS]);
    int pa, pb, t;
    pa = a; pb = b;
    if (use_ord)
      for (int i = 0; i < 32; i++) begin
        if (o[i] == a) pa = i;
        if (o[i] == b) pb = i;
      end
    if (pa == pb) return;
    if (pa > pb) begin t = pa; pa = pb; pb = t; end
    for (int e = 0; e < ne; e++) if (eu[e] == pa && ev[e] == pb) return;
    eu[ne] = pa; ev[ne] = pb; ne++;
  endtask

  task automatic apply_and_check(input int s);
    int bc;
    logic [K-1:0] used;
    @(negedge clk);
    cfg_apply = 1; cfg_apply_set = SW'(s);
    @(negedge clk);
    cfg_apply = 0;
    bc = 0;
    while (cfg_busy && bc < K + 10) begin @(negedge clk); bc++; end
    checks++;
    if (bc != K) begin failures++; $display("reload of set %0d took %0d cycles", s, bc); end
    for (int pat = 0; pat < 8; pat++) begin
      for (int i = 0; i < K; i++) pe_tx[i] = W'($urandom);
      #1;
      used = '0;
      for (int e = 0; e < lay[s].nedges; e++) begin
        int a, b;
        a = lay[s].esrc[e]; b = lay[s].edst[e];
        used[a] = 1; used[b] = 1;
        checks += 2;
        if (pe_rx[b] !== pe_tx[a]) begin failures++; $display("set %0d edge %0d forward wrong", s, e); end
        if (pe_rx[a] !== pe_tx[b]) begin failures++; $display("set %0d edge %0d backward wrong", s, e); end
      end
      for (int i = 0; i < K; i++) if (!used[i]) begin
        checks++;
        if (pe_rx[i] !== '0) begin failures++; $display("set %0d: unused port %0d reads %h", s, i, pe_rx[i]); end
      end
      checks++;
      if (bundle_right_out !== '0 || bundle_left_out !== '0) begin failures++; $display("set %0d: bundle ends not empty", s); end
      @(negedge clk);
    end
  endtask

  initial begin
    int eu [MAXS], ev [MAXS];
    int ne;
    string names [NC] = '{"5-cube", "butterfly", "3-D mesh 4x4x2", "de Bruijn B(2,5)"};
    // 5-cube, natural order
    ne = 0;
    for (int a = 0; a < 32; a++)
      for (int d = 0; d < 5; d++) add_edge(a, a ^ (1 << d), ord[0], 1'b0, ne, eu, ev);
    layout(PES, ne, eu, ev, PORTS, LINES, lay[0]);
    // butterfly
    ne = 0;
    for (int l = 0; l < 3; l++)
      for (int r = 0; r < 8; r++) begin
        add_edge(l * 8 + r, (l + 1) * 8 + r, ord[0], 1'b1, ne, eu, ev);
        add_edge(l * 8 + r, (l + 1) * 8 + (r ^ (1 << l)), ord[0], 1'b1, ne, eu, ev);
      end
    layout(PES, ne, eu, ev, PORTS, LINES, lay[1]);
    // 3-D mesh
    ne = 0;
    for (int z = 0; z < 2; z++)
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          int n;
          n = x + 4 * y + 16 * z;
          if (x < 3) add_edge(n, n + 1, ord[1], 1'b1, ne, eu, ev);
          if (y < 3) add_edge(n, n + 4, ord[1], 1'b1, ne, eu, ev);
          if (z < 1) add_edge(n, n + 16, ord[1], 1'b1, ne, eu, ev);
        end
    layout(PES, ne, eu, ev, PORTS, LINES, lay[2]);
    // de Bruijn
    ne = 0;
    for (int a = 0; a < 32; a++) begin
      add_edge(a, (2 * a) % 32, ord[2], 1'b1, ne, eu, ev);
      add_edge(a, (2 * a + 1) % 32, ord[2], 1'b1, ne, eu, ev);
    end
    layout(PES, ne, eu, ev, PORTS, LINES, lay[3]);

    for (int s = 0; s < NC; s++) begin
      checks++;
      if (!lay[s].ok) begin failures++; $display("%s does not fit", names[s]); end
      $display("%s: %0d edges, cutwidth %0d (%s the default 8 lines)", names[s],
               lay[s].nedges, lay[s].cutwidth, (lay[s].cutwidth <= 8) ? "fits" : "exceeds");
    end
    checks += 2;
    if (lay[0].cutwidth != 21) begin failures++; $display("5-cube cutwidth %0d, expected 21", lay[0].cutwidth); end
    if (lay[0].nedges != 80) begin failures++; $display("5-cube edges %0d, expected 80", lay[0].nedges); end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < NC; s++)
      for (int i = 0; i < K; i++) begin
        cfg_wr_en = 1; cfg_wr_set = SW'(s); cfg_wr_idx = IW'(i);
        cfg_wr_data = (LINES+1)'(cfg_word(lay[s].remove[i], lay[s].setting[i], LINES));
        @(negedge clk);
      end
    cfg_wr_en = 0;
    for (int s = 0; s < NC; s++) apply_and_check(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
