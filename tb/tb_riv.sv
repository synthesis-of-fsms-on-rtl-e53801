// tb_riv: checks the input-replacement block at its default size (R=4,
// L=16, G=2). The two MRAMs are loaded with random select codes, then for
// random state codes and random inputs each p_g must equal the input x_i
// whose index the reference copy of MRAM g holds for that state (p_1 on the
// most significant bit of p). Rewrites of single MRAM words while inputs
// keep changing follow.
module tb_riv;
  localparam int unsigned R = 4, L = 16, G = 2, SW = 4;

  logic          clk;
  logic [R-1:0]  t;
  logic [L-1:0]  x;
  logic [G-1:0]  p;
  logic          wr_en;
  logic [0:0]    wr_idx;
  logic [R-1:0]  wr_addr;
  logic [SW-1:0] wr_data;
  logic [SW-1:0] ref_sel [G][2**R];
  int checks = 0, failures = 0;

  riv #(.R(R), .L(L), .G(G)) dut (.clk, .t, .x, .p, .wr_en, .wr_idx, .wr_addr, .wr_data);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_p();
    logic [G-1:0] e;
    for (int g = 0; g < G; g++) e[G-1-g] = x[ref_sel[g][t]];
    checks++;
    if (p != e) begin
      failures++;
      $display("FAIL t=%0d x=%h: p=%b expected %b", t, x, p, e);
    end
  endtask

  initial begin
    wr_en = 1'b0; t = '0; x = '0; wr_idx = '0; wr_addr = '0; wr_data = '0;
    for (int g = 0; g < G; g++)
      for (int a = 0; a < 2**R; a++) begin
        wr_en = 1'b1; wr_idx = 1'(g); wr_addr = R'(a); wr_data = SW'($urandom);
        ref_sel[g][a] = wr_data;
        @(posedge clk); #1;
      end
    wr_en = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      t = R'($urandom); x = L'($urandom); #1;
      check_p();
    end
    // one-hot inputs: p_g must follow exactly the selected input
    for (int a = 0; a < 2**R; a++)
      for (int i = 0; i < L; i++) begin
        t = R'(a); x = L'(1) << i; #1;
        check_p();
      end
    for (int i = 0; i < 300; i++) begin
      wr_en = 1'b1; wr_idx = 1'($urandom); wr_addr = R'($urandom); wr_data = SW'($urandom);
      @(posedge clk); #1;
      ref_sel[wr_idx][wr_addr] = wr_data;
      wr_en = 1'b0;
      t = wr_addr; x = L'($urandom); #1;
      check_p();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
