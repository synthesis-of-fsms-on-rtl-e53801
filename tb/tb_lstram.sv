// tb_lstram: checks the local transition RAM at its default size (R=4, G=2,
// r=2). Words are written through the reload port at address
// {state code, p_1, p_2} and read through the FSM port by driving the state
// code and p separately, so a wrong order of the address fields is caught.
// Random rewrites follow; a scoreboard is the reference.
module tb_lstram;
  localparam int unsigned R = 4, G = 2, RL = 2;

  logic           clk;
  logic [R-1:0]   t;
  logic [G-1:0]   p;
  logic [RL-1:0]  d_loc;
  logic           wr_en;
  logic [R+G-1:0] wr_addr;
  logic [RL-1:0]  wr_data;
  logic [RL-1:0]  ref_mem [2**R][2**G];
  int checks = 0, failures = 0;

  lstram #(.R(R), .G(G), .RL(RL)) dut (.clk, .t, .p, .d_loc, .wr_en, .wr_addr, .wr_data);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int s = 0; s < 2**R; s++)
      for (int q = 0; q < 2**G; q++) begin
        t = R'(s); p = G'(q); #1;
        checks++;
        if (d_loc != ref_mem[s][q]) begin
          failures++;
          $display("FAIL state %0d p %b: %b expected %b", s, p, d_loc, ref_mem[s][q]);
        end
      end
  endtask

  initial begin
    wr_en = 1'b0; t = '0; p = '0; wr_addr = '0; wr_data = '0;
    for (int s = 0; s < 2**R; s++)
      for (int q = 0; q < 2**G; q++) begin
        wr_en = 1'b1; wr_addr = (R+G)'(s * (2**G) + q); wr_data = RL'($urandom);
        ref_mem[s][q] = wr_data;
        @(posedge clk); #1;
      end
    wr_en = 1'b0;
    check_all();
    for (int i = 0; i < 500; i++) begin
      int s, q;
      s = $urandom_range(0, 2**R - 1); q = $urandom_range(0, 2**G - 1);
      wr_en = 1'b1; wr_addr = (R+G)'(s * (2**G) + q); wr_data = RL'($urandom);
      @(posedge clk); #1;
      ref_mem[s][q] = wr_data;
      t = R'(s); p = G'(q); #1;
      checks++;
      if (d_loc != wr_data) failures++;
    end
    wr_en = 1'b0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
