// tb_giq_port_switch: checks the combined port switch in its three roles:
// bypass (G_n(*, 0)), REMOVE (G_n(left, 1)) and INSERT-k (G_n(right, k))
// for every k, with random data on every line and the port, against the
// switch-graph definition.
module tb_giq_port_switch;
  import giq_tb_pkg::*;
  localparam int N = 8;
  localparam int W = 8;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0;

  logic [N:0]        cfg;
  logic [N-1:0][W-1:0] fl8, fr8, br8, bl8;
  logic [W-1:0] pin, pout;

  giq_port_switch #(.N(N), .W(W)) dut (.cfg, .fwd_l(fl8), .fwd_r(fr8), .bwd_r(br8),
                                       .bwd_l(bl8), .port_in(pin), .port_out(pout));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      lines_t fl, br, fr, bl;
      int po, mode, k;
      bit dir_right;
      mode = i % 10;             // 0: bypass, 1: remove, 2..9: insert-1..8
      @(negedge clk);
      for (int j = 0; j < MAXL; j++) begin fl[j] = 0; br[j] = 0; end
      for (int j = 0; j < N; j++) begin
        fl8[j] = W'($urandom); br8[j] = W'($urandom);
        fl[j] = int'(fl8[j]); br[j] = int'(br8[j]);
      end
      pin = W'($urandom);
      dir_right = mode >= 2;
      k = (mode == 0) ? 0 : (mode == 1) ? 1 : mode - 1;
      cfg = (N+1)'(cfg_word(mode == 1, dir_right ? k : 0, N));
      #1;
      sg_eval(N, dir_right, k, fl, br, int'(pin), fr, bl, po);
      for (int j = 0; j < N; j++) begin
        checks += 2;
        if (int'(fr8[j]) != fr[j]) begin failures++; $display("mode %0d fwd line %0d: %h exp %h", mode, j+1, fr8[j], fr[j]); end
        if (int'(bl8[j]) != bl[j]) begin failures++; $display("mode %0d bwd line %0d: %h exp %h", mode, j+1, bl8[j], bl[j]); end
      end
      checks++;
      if (int'(pout) != po) begin failures++; $display("mode %0d port %h exp %h", mode, pout, po); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
