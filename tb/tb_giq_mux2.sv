// tb_giq_mux2: checks the 2-to-1 multiplexer over random inputs on both
// control values: s = 0 must give A, s = 1 must give B.
module tb_giq_mux2;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic s;
  logic clk = 0;
  int checks = 0, failures = 0, cycles = 0;

  giq_mux2 #(.W(W)) dut (.a, .b, .s, .y);

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
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a = W'($urandom); b = W'($urandom); s = i[0];
      #1;
      checks++;
      if (y !== (s ? b : a)) begin
        failures++;
        $display("mux2 mismatch a=%h b=%h s=%b y=%h", a, b, s, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
