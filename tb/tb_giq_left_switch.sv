// tb_giq_left_switch: drives the REMOVE switch with random data on every
// forward line, backward line and the port, bypassed and active, and
// compares all outputs with the switch graph G_n(left, S), S in {0, 1},
// evaluated from its definition. Also a 4-line instance (the published
// 4-line example) is checked the same way.
module tb_giq_left_switch;
  import giq_tb_pkg::*;
  localparam int W = 8;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0;

  logic        rm8, rm4;
  logic [7:0][W-1:0] fl8, fr8, br8, bl8;
  logic [3:0][W-1:0] fl4, fr4, br4, bl4;
  logic [W-1:0] pin8, pout8, pin4, pout4;

  giq_left_switch #(.N(8), .W(W)) dut8 (.remove(rm8), .fwd_l(fl8), .fwd_r(fr8), .bwd_r(br8),
                                        .bwd_l(bl8), .port_in(pin8), .port_out(pout8));
  giq_left_switch #(.N(4), .W(W)) dut4 (.remove(rm4), .fwd_l(fl4), .fwd_r(fr4), .bwd_r(br4),
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

  task automatic check8();
    lines_t fl, br, fr, bl;
    int po;
    for (int j = 0; j < MAXL; j++) begin fl[j] = 0; br[j] = 0; end
    for (int j = 0; j < 8; j++) begin fl[j] = int'(fl8[j]); br[j] = int'(br8[j]); end
    sg_eval(8, 1'b0, rm8 ? 1 : 0, fl, br, int'(pin8), fr, bl, po);
    for (int j = 0; j < 8; j++) begin
      checks += 2;
      if (int'(fr8[j]) != fr[j]) begin failures++; $display("N8 rm=%b fwd line %0d: %h exp %h", rm8, j+1, fr8[j], fr[j]); end
      if (int'(bl8[j]) != bl[j]) begin failures++; $display("N8 rm=%b bwd line %0d: %h exp %h", rm8, j+1, bl8[j], bl[j]); end
    end
    checks++;
    if (int'(pout8) != po) begin failures++; $display("N8 rm=%b port %h exp %h", rm8, pout8, po); end
  endtask

  task automatic check4();
    lines_t fl, br, fr, bl;
    int po;
    for (int j = 0; j < MAXL; j++) begin fl[j] = 0; br[j] = 0; end
    for (int j = 0; j < 4; j++) begin fl[j] = int'(fl4[j]); br[j] = int'(br4[j]); end
    sg_eval(4, 1'b0, rm4 ? 1 : 0, fl, br, int'(pin4), fr, bl, po);
    for (int j = 0; j < 4; j++) begin
      checks += 2;
      if (int'(fr4[j]) != fr[j]) begin failures++; $display("N4 fwd line %0d mismatch", j+1); end
      if (int'(bl4[j]) != bl[j]) begin failures++; $display("N4 bwd line %0d mismatch", j+1); end
    end
    checks++;
    if (int'(pout4) != po) begin failures++; $display("N4 port mismatch"); end
  endtask

  initial begin
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin fl8[j] = W'($urandom); br8[j] = W'($urandom); end
      for (int j = 0; j < 4; j++) begin fl4[j] = W'($urandom); br4[j] = W'($urandom); end
      pin8 = W'($urandom); pin4 = W'($urandom);
      rm8 = i[0]; rm4 = i[1];
      #1;
      check8();
      check4();
    end
    // Directed: active switch hands line 1 to the port and shifts line 3 down.
    @(negedge clk);
    for (int j = 0; j < 8; j++) fl8[j] = W'(8'h10 + j);
    rm8 = 1'b1;
    #1;
    checks += 2;
    if (pout8 !== W'(8'h10)) begin failures++; $display("directed: port %h", pout8); end
    if (fr8[1] !== W'(8'h12)) begin failures++; $display("directed: line 2 %h", fr8[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
