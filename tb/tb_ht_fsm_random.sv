// tb_ht_fsm_random: reuse of one template for different machines, at a
// non-default size (L=12, N=6, R=5, G=3, r=3).
//
// Two random machines are generated, one after the other, and each is
// loaded through the configuration port and run on random inputs. A machine
// is described abstractly: for every one of the 32 states its group (the
// 2-bit column shared by all its successors), the indices of the three
// inputs it tests, the successor row for each of the 8 combinations of
// those inputs, and its 6 outputs. The model computes the next state from
// that description; the loader turns the same description into RAM words.
// Some tested-input indices are 12..15, past the last input: the template
// must then see that selected variable as 0.
module tb_ht_fsm_random;
  import ht_pkg::*;

  localparam int unsigned L = 12, N = 6, R = 5, G = 3, RL = 3;
  localparam int unsigned S = 2**R, Q = 2**G;

  logic           clk;
  logic           rst;
  logic [L-1:0]   x;
  logic [N-1:0]   y;
  logic [R-1:0]   state;
  logic           cfg_we;
  ram_sel_e       cfg_sel;
  logic [1:0]     cfg_idx;
  logic [R+G-1:0] cfg_addr;
  logic [5:0]     cfg_data;

  ht_fsm #(.L(L), .N(N), .R(R), .G(G), .RL(RL)) dut (
    .clk, .rst, .x, .y, .state,
    .cfg_we, .cfg_sel, .cfg_idx, .cfg_addr, .cfg_data);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // abstract machine
  int unsigned    grp  [S];
  int unsigned    vidx [S][G];
  int unsigned    row  [S][Q];
  logic [N-1:0]   outs [S];

  int unsigned ms;
  int n_oob = 0, n_cycles = 0, n_machines = 0;
  bit visited [S];

  function automatic int unsigned model_next(int unsigned s, logic [L-1:0] xx);
    int unsigned q = 0;
    for (int g = 0; g < G; g++) begin
      bit b = (vidx[s][g] < L) ? xx[vidx[s][g]] : 1'b0;
      q = q * 2 + b;           // first tested input is the high bit
    end
    return row[s][q] * 2**(R-RL) + grp[s];
  endfunction

  task automatic cfg_write(ram_sel_e sel, int idx, int addr, int data);
    cfg_we = 1'b1; cfg_sel = sel; cfg_idx = 2'(idx);
    cfg_addr = (R+G)'(addr); cfg_data = 6'(data);
    @(posedge clk); #1;
    cfg_we = 1'b0;
  endtask

  task automatic make_and_load();
    for (int s = 0; s < S; s++) begin
      grp[s]  = $urandom_range(0, 2**(R-RL) - 1);
      for (int g = 0; g < G; g++) vidx[s][g] = $urandom_range(0, 15);
      for (int q = 0; q < Q; q++) row[s][q] = $urandom_range(0, 2**RL - 1);
      outs[s] = N'($urandom);
    end
    for (int g = 0; g < G; g++)
      for (int s = 0; s < S; s++) cfg_write(SEL_MRAM, g, s, vidx[s][g]);
    for (int s = 0; s < S; s++) cfg_write(SEL_GSTRAM, 0, s, grp[s]);
    for (int s = 0; s < S; s++)
      for (int q = 0; q < Q; q++) cfg_write(SEL_LSTRAM, 0, s * Q + q, row[s][q]);
    for (int s = 0; s < S; s++) cfg_write(SEL_ORAM, 0, s, outs[s]);
    n_machines++;
  endtask

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) begin
      int unsigned nx;
      x = L'($urandom);
      @(negedge clk);
      checks++;
      if (32'(state) != ms || y != outs[ms]) begin
        failures++;
        if (failures < 20)
          $display("FAIL at %0t: state=%0d y=%b, model state=%0d y=%b", $time, state, y, ms, outs[ms]);
      end
      visited[ms] = 1'b1;
      for (int g = 0; g < G; g++) if (vidx[ms][g] >= L) n_oob++;
      nx = model_next(ms, x);
      @(posedge clk); #1;
      ms = nx;
      n_cycles++;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nvis;
    rst = 1'b1; x = '0; cfg_we = 1'b0; cfg_sel = SEL_MRAM; cfg_idx = '0;
    cfg_addr = '0; cfg_data = '0;
    foreach (visited[i]) visited[i] = 1'b0;
    @(posedge clk); #1;
    for (int m = 0; m < 2; m++) begin
      rst = 1'b1;
      make_and_load();
      @(posedge clk); #1;
      rst = 1'b0; ms = 0;
      run(4000);
    end
    nvis = 0;
    foreach (visited[i]) if (visited[i]) nvis++;
    $display("machines=%0d cycles=%0d states_visited=%0d out_of_range_selects=%0d",
             n_machines, n_cycles, nvis, n_oob);
    checks++; if (n_machines != 2) failures++;
    checks++; if (nvis < S / 2) failures++;
    checks++; if (n_oob == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
