// tb_oram: checks the output RAM at its default size (R=4, N=10). It is
// loaded with the outputs of the worked example, given here as the sets of
// raised variables of each state (y_j on bit N-j), read on every state
// code through the asynchronous FSM port, then rewritten at random against a
// scoreboard.
module tb_oram;
  localparam int unsigned R = 4, N = 10;

  logic         clk;
  logic [R-1:0] t;
  logic [N-1:0] y;
  logic         wr_en;
  logic [R-1:0] wr_addr;
  logic [N-1:0] wr_data;
  logic [N-1:0] ref_mem [2**R];
  int checks = 0, failures = 0;

  oram #(.R(R), .N(N)) dut (.clk, .t, .y, .wr_en, .wr_addr, .wr_data);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic [N-1:0] ys(int unsigned mask_1_to_n);
    // bit j-1 of the argument set means y_j is raised
    logic [N-1:0] v = '0;
    for (int j = 1; j <= N; j++) if (mask_1_to_n[j-1]) v[N-j] = 1'b1;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 2**R; a++) begin
      t = R'(a); #1;
      checks++;
      if (y != ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: %b expected %b", a, y, ref_mem[a]);
      end
    end
  endtask

  initial begin
    // codes: a0 0000; a1 0001,0010; a5 0011; a2 0100,0101; a6 0110,0111;
    // a8 1000,1011; a4 1001,1010; a3 1101; a9 1110; a7 1111
    ref_mem[0]  = '0;                                     // a0
    ref_mem[1]  = ys((1<<0)|(1<<2));                      // a1: y1 y3
    ref_mem[2]  = ref_mem[1];
    ref_mem[3]  = ys((1<<6)|(1<<7));                      // a5: y7 y8
    ref_mem[4]  = ys((1<<1)|(1<<2)|(1<<3)|(1<<4));        // a2: y2..y5
    ref_mem[5]  = ref_mem[4];
    ref_mem[6]  = ys((1<<5)|(1<<7));                      // a6: y6 y8
    ref_mem[7]  = ref_mem[6];
    ref_mem[8]  = ys(1<<1);                               // a8: y2
    ref_mem[9]  = ys(1<<5);                               // a4: y6
    ref_mem[10] = ref_mem[9];
    ref_mem[11] = ref_mem[8];
    ref_mem[12] = '0;                                     // unused
    ref_mem[13] = ys((1<<1)|(1<<3)|(1<<5));               // a3: y2 y4 y6
    ref_mem[14] = ys(1<<6);                               // a9: y7
    ref_mem[15] = ys(1<<3);                               // a7: y4
    wr_en = 1'b0; t = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < 2**R; a++) begin
      wr_en = 1'b1; wr_addr = R'(a); wr_data = ref_mem[a];
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    check_all();
    for (int i = 0; i < 500; i++) begin
      wr_en = 1'b1; wr_addr = R'($urandom); wr_data = N'($urandom);
      t = R'($urandom);
      @(posedge clk); #1;
      ref_mem[wr_addr] = wr_data;
      checks++;
      if (y != ref_mem[t]) failures++;
    end
    wr_en = 1'b0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
