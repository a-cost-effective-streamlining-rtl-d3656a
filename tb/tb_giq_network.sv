// tb_giq_network: end-to-end routing through a line of port switches.
//
// Settings come from the layout procedure in giq_tb_pkg. Cases:
//   1. the published 6-node example in linearization (a,b,c,d,e,f), one
//      switch per subnode (18 switches, 5 lines): the computed settings must
//      be INSERT-1,2,3, REMOVE, INSERT-1,4, REMOVE, INSERT-4,5, REMOVE,
//      INSERT-4, REMOVE x4, INSERT-2, REMOVE x2, and the cutwidth five;
//   2. the same graph in the queue linearization (d,a,e,b,f,c): every
//      insertion must land at the tail, as in a queue;
//   3. the stack example (d,e,f,a,b,c) of the figure-1 labelling;
//   4. random linearized graphs on 8 PEs x 6 ports, 8 lines.
// For every case each edge must carry its source's data to its destination
// (forward lines) and back (backward lines), unused ports must read zero
// and nothing may leave either end of the bundle.
module tb_giq_network;
  import giq_tb_pkg::*;
  localparam int W = 8;
  localparam int KA = 18, NA = 5;
  localparam int PES = 8, PORTS = 6, KB = PES * PORTS, NB = 8;
  int checks = 0, failures = 0, cycles = 0;
  int n_stack_push = 0, n_queue_tail = 0, n_mid_insert = 0, n_remove = 0;
  logic clk = 0;

  logic [KA-1:0][NA:0]    cfga;
  logic [KA-1:0][W-1:0]   txa, rxa;
  logic [NA-1:0][W-1:0]   fouta, bouta;
  logic [KB-1:0][NB:0]    cfgb;
  logic [KB-1:0][W-1:0]   txb, rxb;
  logic [NB-1:0][W-1:0]   foutb, boutb;

  giq_network #(.K(KA), .N(NA), .W(W)) dut_a (.cfg(cfga), .port_in(txa), .port_out(rxa),
      .fwd_in('0), .fwd_out(fouta), .bwd_in('0), .bwd_out(bouta));
  giq_network #(.K(KB), .N(NB), .W(W)) dut_b (.cfg(cfgb), .port_in(txb), .port_out(rxb),
      .fwd_in('0), .fwd_out(foutb), .bwd_in('0), .bwd_out(boutb));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Count which discipline each insertion follows (population before it).
  task automatic count_kinds(input layout_t L);
    int pop;
    pop = 0;
    for (int s = 0; s < L.nsub; s++) begin
      int sl;
      sl = L.sub_slot[s];
      if (L.remove[sl]) begin n_remove++; pop--; end
      else begin
        if (L.setting[sl] == 1) n_stack_push++;
        else if (L.setting[sl] == pop + 1) n_queue_tail++;
        else n_mid_insert++;
        pop++;
      end
    end
  endtask

  task automatic run_a(input layout_t L, input int seed);
    logic [KA-1:0] used;
    used = '0;
    for (int i = 0; i < KA; i++) begin
      cfga[i] = (NA+1)'(cfg_word(L.remove[i], L.setting[i], NA));
      txa[i]  = W'((i * 37 + seed) % 255 + 1);
    end
    #1;
    for (int e = 0; e < L.nedges; e++) begin
      checks += 2;
      used[L.esrc[e]] = 1; used[L.edst[e]] = 1;
      if (rxa[L.edst[e]] !== txa[L.esrc[e]]) begin failures++; $display("A edge %0d fwd: %h exp %h", e, rxa[L.edst[e]], txa[L.esrc[e]]); end
      if (rxa[L.esrc[e]] !== txa[L.edst[e]]) begin failures++; $display("A edge %0d bwd: %h exp %h", e, rxa[L.esrc[e]], txa[L.edst[e]]); end
    end
    for (int i = 0; i < KA; i++) if (!used[i]) begin
      checks++;
      if (rxa[i] !== '0) begin failures++; $display("A unused port %0d reads %h", i, rxa[i]); end
    end
    checks++;
    if (fouta !== '0 || bouta !== '0) begin failures++; $display("A bundle ends not empty"); end
    count_kinds(L);
  endtask

  initial begin
    int eu [MAXS], ev [MAXS];
    layout_t L;
    int exp_set [18] = '{1, 2, 3, -1, 1, 4, -1, 4, 5, -1, 4, -1, -1, -1, -1, 2, -1, -1};
    @(negedge clk);
    // 1. example graph, nodes a..f = 0..5 in the order (a,b,c,d,e,f)
    eu = '{default: 0}; ev = '{default: 0};
    eu[0:8] = '{0, 0, 0, 1, 1, 2, 2, 3, 4};
    ev[0:8] = '{1, 3, 4, 2, 4, 4, 5, 4, 5};
    layout(6, 9, eu, ev, 0, NA, L);
    checks += 2;
    if (!L.ok) begin failures++; $display("example layout not ok"); end
    if (L.cutwidth != 5) begin failures++; $display("example cutwidth %0d", L.cutwidth); end
    for (int s = 0; s < 18; s++) begin
      checks++;
      if ((exp_set[s] < 0) ? !L.remove[s] : (L.setting[s] != exp_set[s])) begin
        failures++; $display("subnode %0d setting %0d remove %0d", s + 1, L.setting[s], L.remove[s]);
      end
    end
    run_a(L, 3);
    // 2. queue linearization (d,a,e,b,f,c): d=0 a=1 e=2 b=3 f=4 c=5
    eu[0:8] = '{0, 0, 1, 1, 2, 2, 2, 3, 4};
    ev[0:8] = '{1, 2, 2, 3, 3, 4, 5, 5, 5};
    layout(6, 9, eu, ev, 0, NA, L);
    begin
      int pop;
      pop = 0;
      for (int s = 0; s < L.nsub; s++) begin
        if (L.remove[s]) pop--;
        else begin
          checks++;
          if (L.setting[s] != pop + 1) begin failures++; $display("queue layout: subnode %0d inserted at %0d, population %0d", s + 1, L.setting[s], pop); end
          pop++;
        end
      end
    end
    run_a(L, 11);
    // 3. stack linearization (d,e,f,a,b,c) of the figure-1 graph: d=0 e=1 f=2 a=3 b=4 c=5
    eu[0:8] = '{0, 0, 1, 1, 1, 1, 2, 3, 4};
    ev[0:8] = '{5, 1, 5, 4, 3, 2, 3, 4, 5};
    layout(6, 9, eu, ev, 0, NA, L);
    checks++;
    if (!L.ok) begin failures++; $display("stack layout not ok"); end
    run_a(L, 29);
    // 4. random graphs on the 8-PE, 6-port, 8-line network
    for (int g = 0; g < 40; g++) begin
      int ne;
      logic [KB-1:0] used;
      @(negedge clk);
      random_graph(PES, PORTS, NB, 60, ne, eu, ev);
      layout(PES, ne, eu, ev, PORTS, NB, L);
      checks++;
      if (!L.ok) begin failures++; $display("random layout %0d not ok", g); end
      used = '0;
      for (int i = 0; i < KB; i++) begin
        cfgb[i] = (NB+1)'(cfg_word(L.remove[i], L.setting[i], NB));
        txb[i]  = W'((i * 37 + g) % 255 + 1);
      end
      #1;
      for (int e = 0; e < L.nedges; e++) begin
        checks += 2;
        used[L.esrc[e]] = 1; used[L.edst[e]] = 1;
        if (rxb[L.edst[e]] !== txb[L.esrc[e]]) begin failures++; $display("B g%0d edge %0d fwd mismatch", g, e); end
        if (rxb[L.esrc[e]] !== txb[L.edst[e]]) begin failures++; $display("B g%0d edge %0d bwd mismatch", g, e); end
      end
      for (int i = 0; i < KB; i++) if (!used[i]) begin
        checks++;
        if (rxb[i] !== '0) begin failures++; $display("B unused port %0d reads %h", i, rxb[i]); end
      end
      checks++;
      if (foutb !== '0 || boutb !== '0) begin failures++; $display("B bundle ends not empty"); end
      count_kinds(L);
    end
    $display("insertions: stack-like %0d, queue-like %0d, middle %0d; removals %0d",
             n_stack_push, n_queue_tail, n_mid_insert, n_remove);
    checks++;
    if (n_stack_push == 0 || n_queue_tail == 0 || n_mid_insert == 0 || n_remove == 0) begin
      failures++; $display("an insertion kind never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
