// tb_mram: checks the multiplexer-control RAM. Every word is written through
// the reload port, then every address is read back through the FSM read
// port (asynchronous: the word must be visible without a further clock
// edge). Random rewrites follow, and a word written at an edge must be read
// from just after that edge. A scoreboard array is the reference.
module tb_mram;
  localparam int unsigned R = 4, L = 16, SW = 4;

  logic          clk;
  logic [R-1:0]  t;
  logic [SW-1:0] sel;
  logic          wr_en;
  logic [R-1:0]  wr_addr;
  logic [SW-1:0] wr_data;
  logic [SW-1:0] ref_mem [2**R];
  int checks = 0, failures = 0;

  mram #(.R(R), .L(L)) dut (.clk, .t, .sel, .wr_en, .wr_addr, .wr_data);

  initial clk = 1'b0;
  always #5 clk = ~clk;

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
      if (sel != ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: %b expected %b", a, sel, ref_mem[a]);
      end
    end
  endtask

  initial begin
    wr_en = 1'b0; t = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < 2**R; a++) begin
      wr_en = 1'b1; wr_addr = R'(a); wr_data = SW'($urandom);
      ref_mem[a] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    check_all();
    for (int i = 0; i < 500; i++) begin
      wr_en = 1'b1; wr_addr = R'($urandom); wr_data = SW'($urandom);
      t = wr_addr;
      @(posedge clk); #1;
      ref_mem[wr_addr] = wr_data;
      checks++;
      if (sel != wr_data) failures++;
    end
    wr_en = 1'b0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
