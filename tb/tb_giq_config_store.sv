// tb_giq_config_store: fills every stored configuration set with random
// legal switch words, then applies sets in turn and checks
//   - reset clears every active register (all ports bypassed);
//   - busy rises the cycle after apply and stays high exactly K cycles;
//   - during the reload, switch i takes its new word on the i-th busy cycle
//     and the switches above keep their old words;
//   - after the reload, every active word equals the stored set and
//     active_set names it;
//   - an apply while busy is ignored.
module tb_giq_config_store;
  import giq_tb_pkg::*;
  localparam int K = 192, N = 8, NC = 4;
  localparam int SW = $clog2(NC), IW = $clog2(K);
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, apply = 0, busy;
  logic [SW-1:0] wr_set = '0, apply_set = '0, active_set;
  logic [IW-1:0] wr_idx = '0;
  logic [N:0]    wr_data = '0;
  logic [K-1:0][N:0] cfg;
  logic [N:0] ref_mem [NC][K];
  logic [K-1:0][N:0] prev;

  giq_config_store #(.K(K), .N(N), .NUM_CFG(NC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [N:0] rand_word();
    int m;
    m = $urandom_range(N + 1, 0);    // 0 bypass, 1 remove, 2.. insert-(m-1)
    return (N+1)'(cfg_word(m == 1, (m >= 2) ? m - 1 : 0, N));
  endfunction

  task automatic do_apply(input int s, input bit extra_apply);
    int bc;
    prev = cfg;
    @(negedge clk);
    apply = 1; apply_set = SW'(s);
    @(negedge clk);
    apply = 0;
    checks++;
    if (!busy) begin failures++; $display("busy not raised"); end
    bc = 0;
    while (busy) begin
      // after bc busy cycles so far, switches 0..bc-1 hold new words
      checks++;
      if (bc > 0 && cfg[bc-1] !== ref_mem[s][bc-1]) begin failures++; $display("switch %0d not loaded in order", bc-1); end
      if (bc < K && cfg[bc] !== prev[bc]) begin failures++; $display("switch %0d loaded early", bc); end
      if (extra_apply && bc == 5) begin apply = 1; apply_set = SW'((s + 1) % NC); end
      else apply = 0;
      @(negedge clk);
      bc++;
      if (bc > K + 5) break;
    end
    apply = 0;
    checks++;
    if (bc != K) begin failures++; $display("busy lasted %0d cycles, expected %0d", bc, K); end
    checks++;
    if (active_set !== SW'(s)) begin failures++; $display("active_set %0d exp %0d", active_set, s); end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (cfg[i] !== ref_mem[s][i]) begin failures++; $display("set %0d switch %0d: %h exp %h", s, i, cfg[i], ref_mem[s][i]); end
    end
    // a stray apply during the reload must not have started another one
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("apply during busy was not ignored"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < K; i++) begin
      checks++;
      if (cfg[i] !== '0) begin failures++; $display("switch %0d not bypassed after reset", i); end
    end
    for (int s = 0; s < NC; s++)
      for (int i = 0; i < K; i++) begin
        ref_mem[s][i] = rand_word();
        wr_en = 1; wr_set = SW'(s); wr_idx = IW'(i); wr_data = ref_mem[s][i];
        @(negedge clk);
      end
    wr_en = 0;
    do_apply(2, 1'b0);
    do_apply(0, 1'b1);
    do_apply(3, 1'b0);
    do_apply(1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
