// tb_fsm_memory: checks the state register. After a synchronous reset the
// register must hold the reset code; afterwards it must present, after each
// rising edge, exactly the code applied before that edge (one-cycle
// latency), for random codes and with reset pulses mixed in.
module tb_fsm_memory;
  localparam int unsigned R = 4;

  logic         clk;
  logic         rst;
  logic [R-1:0] d, t;
  logic [R-1:0] expect_t;
  int checks = 0, failures = 0;

  fsm_memory #(.R(R)) dut (.clk, .rst, .d, .t);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = 4'b1011;
    @(posedge clk); #1;
    checks++; if (t != '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      d   = R'($urandom);
      rst = ($urandom_range(0, 15) == 0);
      expect_t = rst ? '0 : d;
      @(posedge clk); #1;
      checks++;
      if (t != expect_t) begin
        failures++;
        $display("FAIL cycle %0d: t=%b expected %b", i, t, expect_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
