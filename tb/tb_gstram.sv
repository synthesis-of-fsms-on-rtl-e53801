// tb_gstram: checks the group transition RAM with its default size (R=4,
// r=2). It is loaded with the group part D3 D4 of the worked example, read
// back on every state code through the asynchronous FSM port and compared
// with the group bits of the successor codes, then rewritten at random
// against a scoreboard.
module tb_gstram;
  localparam int unsigned R = 4, RL = 2;

  logic            clk;
  logic [R-1:0]    t;
  logic [R-RL-1:0] d_grp;
  logic            wr_en;
  logic [R-1:0]    wr_addr;
  logic [R-RL-1:0] wr_data;
  logic [R-RL-1:0] ref_mem [2**R];
  int checks = 0, failures = 0;

  // Group of the successors of each state code of the example: the last
  // two bits shared by every successor code (code 1100 unused, 00).
  localparam logic [1:0] GROUP [16] = '{
    2'b01, 2'b01, 2'b01, 2'b10, 2'b11, 2'b11, 2'b00, 2'b00,
    2'b10, 2'b00, 2'b00, 2'b10, 2'b00, 2'b01, 2'b00, 2'b10};

  gstram #(.R(R), .RL(RL)) dut (.clk, .t, .d_grp, .wr_en, .wr_addr, .wr_data);

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
      if (d_grp != ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: %b expected %b", a, d_grp, ref_mem[a]);
      end
    end
  endtask

  initial begin
    wr_en = 1'b0; t = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < 2**R; a++) begin
      wr_en = 1'b1; wr_addr = R'(a); wr_data = GROUP[a];
      ref_mem[a] = GROUP[a];
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    check_all();
    for (int i = 0; i < 500; i++) begin
      wr_en = 1'b1; wr_addr = R'($urandom); wr_data = (R-RL)'($urandom);
      t = R'($urandom);
      @(posedge clk); #1;
      ref_mem[wr_addr] = wr_data;
      checks++;
      if (d_grp != ref_mem[t]) failures++;
    end
    wr_en = 1'b0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
