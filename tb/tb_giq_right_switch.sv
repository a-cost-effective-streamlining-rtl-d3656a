// tb_giq_right_switch: drives the INSERT switch with every setting k = 0..N
// (thermometer control word) and random data on every line and the port,
// and compares all outputs with the switch graph G_n(right, k) evaluated
// from its definition. A 4-line instance is also checked with the control
// bits 0,1,1,1 (lines 1..4), which must act as INSERT-2.
module tb_giq_right_switch;
  import giq_tb_pkg::*;
  localparam int W = 8;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0;

  logic [7:0]        c8;
  logic [3:0]        c4;
  logic [7:0][W-1:0] fl8, fr8, br8, bl8;
  logic [3:0][W-1:0] fl4, fr4, br4, bl4;
  logic [W-1:0] pin8, pout8, pin4, pout4;

  giq_right_switch #(.N(8), .W(W)) dut8 (.ctrl(c8), .fwd_l(fl8), .fwd_r(fr8), .bwd_r(br8),
                                         .bwd_l(bl8), .port_in(pin8), .port_out(pout8));
  giq_right_switch #(.N(4), .W(W)) dut4 (.ctrl(c4), .fwd_l(fl4), .fwd_r(fr4), .bwd_r(br4),
                                         .bwd_l(bl4), .port_in(pin4), .port_out(pout4));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check8(input int k);
    lines_t fl, br, fr, bl;
    int po;
    for (int j = 0; j < MAXL; j++) begin fl[j] = 0; br[j] = 0; end
    for (int j = 0; j < 8; j++) begin fl[j] = int'(fl8[j]); br[j] = int'(br8[j]); end
    sg_eval(8, 1'b1, k, fl, br, int'(pin8), fr, bl, po);
    for (int j = 0; j < 8; j++) begin
      checks += 2;
      if (int'(fr8[j]) != fr[j]) begin failures++; $display("k=%0d fwd line %0d: %h exp %h", k, j+1, fr8[j], fr[j]); end
      if (int'(bl8[j]) != bl[j]) begin failures++; $display("k=%0d bwd line %0d: %h exp %h", k, j+1, bl8[j], bl[j]); end
    end
    checks++;
    if (int'(pout8) != po) begin failures++; $display("k=%0d port %h exp %h", k, pout8, po); end
  endtask

  initial begin
    for (int i = 0; i < 180; i++) begin
      int k;
      k = i % 9;
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin fl8[j] = W'($urandom); br8[j] = W'($urandom); end
      pin8 = W'($urandom);
      c8 = 8'(giq_pkg::insert_code(k, 8));
      #1;
      check8(k);
    end
    // 4-line instance, control bits (line 4..1) = 1,1,1,0
    for (int i = 0; i < 20; i++) begin
      lines_t fl, br, fr, bl;
      int po;
      @(negedge clk);
      for (int j = 0; j < MAXL; j++) begin fl[j] = 0; br[j] = 0; end
      for (int j = 0; j < 4; j++) begin
        fl4[j] = W'($urandom); br4[j] = W'($urandom);
        fl[j] = int'(fl4[j]); br[j] = int'(br4[j]);
      end
      pin4 = W'($urandom);
      c4 = 4'b1110;
      #1;
      sg_eval(4, 1'b1, 2, fl, br, int'(pin4), fr, bl, po);
      for (int j = 0; j < 4; j++) begin
        checks += 2;
        if (int'(fr4[j]) != fr[j]) begin failures++; $display("N4 fwd line %0d mismatch", j+1); end
        if (int'(bl4[j]) != bl[j]) begin failures++; $display("N4 bwd line %0d mismatch", j+1); end
      end
      checks++;
      if (int'(pout4) != po) begin failures++; $display("N4 port mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
