// tb_giq_diogenes_array: the whole array at its default size (32 PEs,
// 6 ports each, 8 lines, 4 stored topologies), end to end.
//
// Four topologies are laid out with the off-line layout procedure
// (giq_tb_pkg::layout) and written into the configuration store:
//   0  a 4-wide, 8-deep mesh in row-major order (cutwidth 5)
//   1  a 4-wide, 5-deep mesh in row-major order on PEs 0..19 (row edges of
//      length 1, column edges of length 4) next to the 6-node example graph
//      on PEs 20..25
//   2  a random linearized graph with degree <= 6 that fills all 8 lines
//   3  a 4-wide, 6-deep mesh placed on the 24 working PEs when 8 PEs,
//      chosen at random, are treated as faulty: the faulty PEs' ports are
//      all bypassed and their pe_tx is driven but must reach no one
// The testbench then switches between them. After each `cfg_apply` it
// checks that the reload takes exactly K = 192 busy cycles, and then, for
// several random data patterns, that every edge carries data both ways
// between its two PE ports, that ports unused by the topology read zero and
// that no line leaves either end of the bundle.
//
// Mechanisms counted (each must occur): reconfiguration, stack-like insert
// (INSERT-1 onto a non-empty bundle), queue-like insert (at the tail of a
// non-empty bundle), insert in the middle, remove, bypassed port, bundle
// full (all lines in use), a port whose direction changes between two
// topologies, and a faulty PE routed around.
module tb_giq_diogenes_array;
  import giq_tb_pkg::*;
  import giq_pkg::*;
  localparam int PES = DEF_NUM_PES, PORTS = DEF_PORTS, LINES = DEF_LINES, W = DEF_WIDTH;
  localparam int NC = DEF_NUM_CFG;
  localparam int K = PES * PORTS;
  localparam int SW = $clog2(NC), IW = $clog2(K);

  int checks = 0, failures = 0, cycles = 0;
  int n_reconf = 0, n_stack = 0, n_queue = 0, n_mid = 0, n_remove = 0, n_bypass = 0;
  int n_full = 0, n_dir_change = 0, n_faulty_bypassed = 0;
  bit faulty [PES];

  logic clk = 0, rst_n = 0;
  logic cfg_wr_en = 0, cfg_apply = 0, cfg_busy;
  logic [SW-1:0] cfg_wr_set = '0, cfg_apply_set = '0, cfg_active_set;
  logic [IW-1:0] cfg_wr_idx = '0;
  logic [LINES:0] cfg_wr_data = '0;
  logic [K-1:0][W-1:0] pe_tx = '0, pe_rx;
  logic [LINES-1:0][W-1:0] bundle_right_out, bundle_left_out;

  layout_t lay [NC];

  giq_diogenes_array dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic mesh(input int base, input int cols, input int rows,
                      inout int ne, inout int eu[MAXS], inout int ev[MAXS]);
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int n;
        n = base + r * cols + c;
        if (c + 1 < cols) begin eu[ne] = n; ev[ne] = n + 1; ne++; end
        if (r + 1 < rows) begin eu[ne] = n; ev[ne] = n + cols; ne++; end
      end
  endtask

  task automatic count_kinds(input layout_t L);
    int pop;
    pop = 0;
    for (int s = 0; s < L.nsub; s++) begin
      int sl;
      sl = L.sub_slot[s];
      if (L.remove[sl]) begin n_remove++; pop--; end
      else begin
        if (pop > 0 && L.setting[sl] == 1) n_stack++;
        else if (pop > 0 && L.setting[sl] == pop + 1) n_queue++;
        else if (pop > 0) n_mid++;
        pop++;
        if (pop == LINES) n_full++;
      end
    end
    for (int i = 0; i < K; i++) if (!L.remove[i] && L.setting[i] == 0) n_bypass++;
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
    n_reconf++;
    checks += 2;
    if (bc != K) begin failures++; $display("reload of set %0d took %0d cycles, expected %0d", s, bc, K); end
    if (cfg_active_set !== SW'(s)) begin failures++; $display("active set %0d, expected %0d", cfg_active_set, s); end
    for (int pat = 0; pat < 8; pat++) begin
      for (int i = 0; i < K; i++) pe_tx[i] = W'($urandom);
      #1;
      used = '0;
      for (int e = 0; e < lay[s].nedges; e++) begin
        int a, b;
        a = lay[s].esrc[e]; b = lay[s].edst[e];
        used[a] = 1; used[b] = 1;
        checks += 2;
        if (pe_rx[b] !== pe_tx[a]) begin failures++; $display("set %0d edge %0d: port %0d -> %0d wrong", s, e, a, b); end
        if (pe_rx[a] !== pe_tx[b]) begin failures++; $display("set %0d edge %0d: port %0d -> %0d wrong", s, e, b, a); end
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
    // topology 0: 4 x 8 mesh, row-major
    ne = 0;
    mesh(0, 4, 8, ne, eu, ev);
    layout(PES, ne, eu, ev, PORTS, LINES, lay[0]);
    // topology 1: 4 x 5 mesh on PEs 0..19, example graph on PEs 20..25
    ne = 0;
    mesh(0, 4, 5, ne, eu, ev);
    begin
      int xu [9] = '{0, 0, 0, 1, 1, 2, 2, 3, 4};
      int xv [9] = '{1, 3, 4, 2, 4, 4, 5, 4, 5};
      for (int e = 0; e < 9; e++) begin eu[ne] = 20 + xu[e]; ev[ne] = 20 + xv[e]; ne++; end
    end
    layout(PES, ne, eu, ev, PORTS, LINES, lay[1]);
    // topology 2: random graph, retried until it fills the bundle
    for (int t = 0; t < 50; t++) begin
      random_graph(PES, PORTS, LINES, 2000, ne, eu, ev);
      layout(PES, ne, eu, ev, PORTS, LINES, lay[2]);
      if (lay[2].cutwidth == LINES) break;
    end
    // topology 3: 4 x 6 mesh on the working PEs, 8 faulty PEs skipped
    begin
      int good [PES];
      int ng, nf;
      for (int p = 0; p < PES; p++) faulty[p] = 0;
      nf = 0;
      while (nf < PES - 24) begin
        int p;
        p = $urandom_range(PES - 1, 0);
        if (!faulty[p]) begin faulty[p] = 1; nf++; end
      end
      ng = 0;
      for (int p = 0; p < PES; p++) if (!faulty[p]) good[ng++] = p;
      ne = 0;
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 4; c++) begin
          int n;
          n = r * 4 + c;
          if (c < 3) begin eu[ne] = good[n]; ev[ne] = good[n + 1]; ne++; end
          if (r < 5) begin eu[ne] = good[n]; ev[ne] = good[n + 4]; ne++; end
        end
      layout(PES, ne, eu, ev, PORTS, LINES, lay[3]);
      for (int p = 0; p < PES; p++)
        if (faulty[p]) begin
          bit all_bypassed;
          all_bypassed = 1;
          for (int j = 0; j < PORTS; j++)
            if (lay[3].remove[p * PORTS + j] || lay[3].setting[p * PORTS + j] != 0) all_bypassed = 0;
          checks++;
          if (!all_bypassed) begin failures++; $display("faulty PE %0d not bypassed", p); end
          else n_faulty_bypassed++;
        end
    end

    for (int s = 0; s < NC; s++) begin
      checks++;
      if (!lay[s].ok) begin failures++; $display("topology %0d does not fit", s); end
      $display("topology %0d: %0d edges, cutwidth %0d", s, lay[s].nedges, lay[s].cutwidth);
      count_kinds(lay[s]);
    end
    for (int i = 0; i < K; i++)
      for (int s = 1; s < NC; s++)
        if ((lay[s].remove[i] && lay[s-1].setting[i] != 0) || (lay[s].setting[i] != 0 && lay[s-1].remove[i]))
          n_dir_change++;

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

    apply_and_check(0);
    apply_and_check(1);
    apply_and_check(2);
    apply_and_check(3);
    apply_and_check(1);
    apply_and_check(0);

    $display("reconfigurations %0d, stack-like inserts %0d, queue-like inserts %0d, middle inserts %0d",
             n_reconf, n_stack, n_queue, n_mid);
    $display("removes %0d, bypassed ports %0d, bundle full %0d, port direction changes %0d, faulty PEs routed around %0d",
             n_remove, n_bypass, n_full, n_dir_change, n_faulty_bypassed);
    checks += 9;
    if (n_faulty_bypassed == 0) begin failures++; $display("no faulty PE routed around"); end
    if (n_reconf == 0) begin failures++; $display("no reconfiguration"); end
    if (n_stack == 0) begin failures++; $display("no stack-like insert"); end
    if (n_queue == 0) begin failures++; $display("no queue-like insert"); end
    if (n_mid == 0) begin failures++; $display("no middle insert"); end
    if (n_remove == 0) begin failures++; $display("no remove"); end
    if (n_bypass == 0) begin failures++; $display("no bypassed port"); end
    if (n_full == 0) begin failures++; $display("bundle never full"); end
    if (n_dir_change == 0) begin failures++; $display("no port changed direction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
