// tb_ht_fsm: end-to-end test of the FSM hardware template at its default
// size (L=16, N=10, R=4, G=2, r=2).
//
// The template is programmed, through the configuration port, with the
// worked-example machine of ten states a0..a9: the two MRAM contents, the
// group and local transition RAM contents and the output RAM contents below.
// It is then run on random inputs and compared, every cycle, with a
// behavioural model written at the level of state names: the model knows
// which states follow which under which input values and which outputs each
// state raises, but not how states are coded or how the RAMs are laid out.
// The state code the template holds is mapped back to a name through the
// state-assignment table (two codes for a1, a2, a4, a6 and a8; code 1100
// unused).
//
// Mechanisms made to happen and counted: loading while held in reset,
// conditional transitions on one and on two selected variables,
// unconditional transitions, entering a state under its second code, a
// transition every single cycle, run-time rewriting of an MRAM word, an
// output RAM word and local transition RAM words, and a reset mid-run.
// Input x_k of the example is driven on x[k-1].
module tb_ht_fsm;
  import ht_pkg::*;

  localparam int unsigned L = HT_L, N = HT_N, R = HT_R, G = HT_G, RL = HT_RL;

  // ---------------- example contents ----------------
  // MRAM of p_1 and of p_2: select code i passes x_{i+1} of the example.
  localparam logic [3:0] MRAM1_BS [16] = '{
    4'b0000, 4'b0010, 4'b0010, 4'b0110, 4'b0100, 4'b0100, 4'b0111, 4'b0111,
    4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b1000};
  localparam logic [3:0] MRAM2_BS [16] = '{
    4'b0001, 4'b0011, 4'b0011, 4'b0000, 4'b0101, 4'b0101, 4'b0000, 4'b0000,
    4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0000};
  // Group RAM: D3 D4 (address 12 unused, written 00).
  localparam logic [1:0] GST_BS [16] = '{
    2'b01, 2'b01, 2'b01, 2'b10, 2'b11, 2'b11, 2'b00, 2'b00,
    2'b10, 2'b00, 2'b00, 2'b10, 2'b00, 2'b01, 2'b00, 2'b10};
  // Local RAM: D1 D2 at address {T1..T4, p1, p2} (48-51 unused, written 00).
  localparam logic [1:0] LST_BS [64] = '{
    2'b11, 2'b01, 2'b00, 2'b00,   2'b11, 2'b10, 2'b00, 2'b00,
    2'b11, 2'b10, 2'b00, 2'b00,   2'b01, 2'b01, 2'b10, 2'b10,
    2'b01, 2'b00, 2'b11, 2'b10,   2'b01, 2'b00, 2'b11, 2'b10,
    2'b01, 2'b01, 2'b10, 2'b10,   2'b01, 2'b01, 2'b10, 2'b10,
    2'b11, 2'b11, 2'b11, 2'b11,   2'b01, 2'b01, 2'b01, 2'b01,
    2'b01, 2'b01, 2'b01, 2'b01,   2'b11, 2'b11, 2'b11, 2'b11,
    2'b00, 2'b00, 2'b00, 2'b00,   2'b10, 2'b10, 2'b10, 2'b10,
    2'b00, 2'b00, 2'b00, 2'b00,   2'b11, 2'b11, 2'b00, 2'b00};
  // Output RAM: y1..y8 (y1 leftmost); y9, y10 unused by the example.
  localparam logic [7:0] ORAM_BS [16] = '{
    8'b00000000, 8'b10100000, 8'b10100000, 8'b00000011,
    8'b01111000, 8'b01111000, 8'b00000101, 8'b00000101,
    8'b01000000, 8'b00000100, 8'b00000100, 8'b01000000,
    8'b00000000, 8'b01010100, 8'b00000010, 8'b00010000};

  // ---------------- DUT ----------------
  logic           clk;
  logic           rst;
  logic [L-1:0]   x;
  logic [N-1:0]   y;
  logic [R-1:0]   state;
  logic           cfg_we;
  ram_sel_e       cfg_sel;
  logic [0:0]     cfg_idx;
  logic [R+G-1:0] cfg_addr;
  logic [N-1:0]   cfg_data;

  ht_fsm dut (
    .clk, .rst, .x, .y, .state,
    .cfg_we, .cfg_sel, .cfg_idx, .cfg_addr, .cfg_data);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  typedef enum int {A0, A1, A2, A3, A4, A5, A6, A7, A8, A9, NONE} st_e;

  // Example variable x_k.
  function automatic logic xv(logic [L-1:0] xx, int k);
    return xx[k-1];
  endfunction

  // Run-time modifications, each switched on at the edge of its write.
  logic mod_var = 1'b0;   // a5 tests x10 instead of x7
  logic mod_out = 1'b0;   // a3 raises y9, y10 instead of y2, y4, y6
  logic mod_a9  = 1'b0;   // a9 -> a2 instead of a9 -> a0

  function automatic st_e model_next(st_e s, logic [L-1:0] xx);
    case (s)
      A0: return xv(xx,1) ? A1 : (xv(xx,2) ? A2 : A3);
      A1: return xv(xx,3) ? A1 : (xv(xx,4) ? A4 : A3);
      A2: case ({xv(xx,5), xv(xx,6)})
            2'b00: return A6;
            2'b01: return A5;
            2'b10: return A7;
            default: return A8;
          endcase
      A3: return A4;
      A4: return A2;
      A5: return (mod_var ? xv(xx,10) : xv(xx,7)) ? A4 : A6;
      A6: return xv(xx,8) ? A8 : A2;
      A7: return xv(xx,9) ? A1 : A9;
      A8: return A9;
      A9: return mod_a9 ? A2 : A0;
      default: return NONE;
    endcase
  endfunction

  // Outputs as sets of raised y_j (y_j on bit N-j).
  function automatic logic [N-1:0] yset(int a, int b = 0, int c = 0, int d = 0);
    logic [N-1:0] v = '0;
    if (a != 0) v[N-a] = 1'b1;
    if (b != 0) v[N-b] = 1'b1;
    if (c != 0) v[N-c] = 1'b1;
    if (d != 0) v[N-d] = 1'b1;
    return v;
  endfunction

  function automatic logic [N-1:0] model_y(st_e s);
    case (s)
      A0: return '0;
      A1: return yset(1, 3);
      A2: return yset(2, 3, 4, 5);
      A3: return mod_out ? yset(9, 10) : yset(2, 4, 6);
      A4: return yset(6);
      A5: return yset(7, 8);
      A6: return yset(6, 8);
      A7: return yset(4);
      A8: return yset(2);
      A9: return yset(7);
      default: return '0;
    endcase
  endfunction

  // State assignment table: code -> state; second codes flagged.
  function automatic st_e code2st(logic [3:0] c);
    case (c)
      4'b0000: return A0;
      4'b0001, 4'b0010: return A1;
      4'b0100, 4'b0101: return A2;
      4'b1101: return A3;
      4'b1001, 4'b1010: return A4;
      4'b0011: return A5;
      4'b0110, 4'b0111: return A6;
      4'b1111: return A7;
      4'b1000, 4'b1011: return A8;
      4'b1110: return A9;
      default: return NONE;
    endcase
  endfunction

  function automatic bit second_code(logic [3:0] c);
    return c inside {4'b0010, 4'b0101, 4'b1010, 4'b0110, 4'b1011};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_loaded = 0, n_cond1 = 0, n_cond2 = 0, n_uncond = 0, n_second = 0;
  int n_trans = 0, n_rt_writes = 0, n_mod_var_used = 0, n_mod_out_seen = 0;
  int n_mod_a9_used = 0, n_reset = 0;
  int visits [11];

  st_e   ms;           // model state
  st_e   ms_next;
  logic  pending_var, pending_out, pending_a9;

  task automatic cfg_write(ram_sel_e sel, int idx, int addr, logic [N-1:0] data);
    cfg_we   = 1'b1;
    cfg_sel  = sel;
    cfg_idx  = 1'(idx);
    cfg_addr = (R+G)'(addr);
    cfg_data = data;
    @(posedge clk); #1;
    cfg_we   = 1'b0;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: state=%b y=%b model=%s", what, $time, state, y, ms.name());
    end
  endtask

  // One clock cycle of free running: check, advance model, new input.
  // x_hold_mask bits are forced to 0 in the random input.
  task automatic run_cycle(logic [L-1:0] x_zero_mask = '0);
    st_e cur;
    @(negedge clk);
    cur = code2st(state);
    check(cur == ms, "state");
    check(y == model_y(ms), "outputs");
    visits[ms]++;
    ms_next = model_next(ms, x);
    // classify the transition being taken
    case (ms)
      A0, A1, A2:     n_cond2++;
      A5, A6, A7:     n_cond1++;
      default:        n_uncond++;
    endcase
    if (ms == A5 && mod_var) n_mod_var_used++;
    if (ms == A3 && mod_out) n_mod_out_seen++;
    if (ms == A9 && mod_a9)  n_mod_a9_used++;
    @(posedge clk);
    ms = ms_next;
    n_trans++;
    if (pending_var) begin mod_var = 1'b1; pending_var = 1'b0; end
    if (pending_out) begin mod_out = 1'b1; pending_out = 1'b0; end
    if (pending_a9)  begin mod_a9  = 1'b1; pending_a9  = 1'b0; end
    #1;
    if (second_code(state)) n_second++;
    x = L'($urandom) & ~x_zero_mask;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pending_var = 0; pending_out = 0; pending_a9 = 0;
    foreach (visits[i]) visits[i] = 0;
    rst = 1'b1; x = '0; cfg_we = 1'b0; cfg_sel = SEL_MRAM; cfg_idx = '0;
    cfg_addr = '0; cfg_data = '0;
    @(posedge clk); #1;

    // ---- load the example through the second port, held in reset ----
    for (int a = 0; a < 16; a++) cfg_write(SEL_MRAM, 0, a, N'(MRAM1_BS[a]));
    for (int a = 0; a < 16; a++) cfg_write(SEL_MRAM, 1, a, N'(MRAM2_BS[a]));
    for (int a = 0; a < 16; a++) cfg_write(SEL_GSTRAM, 0, a, N'(GST_BS[a]));
    for (int a = 0; a < 64; a++) cfg_write(SEL_LSTRAM, 0, a, N'(LST_BS[a]));
    for (int a = 0; a < 16; a++) cfg_write(SEL_ORAM, 0, a, {ORAM_BS[a], 2'b00});
    n_loaded = 1;
    check(state == 4'b0000, "reset state");

    @(posedge clk); #1;
    rst = 1'b0;
    ms = A0;
    x = L'($urandom);

    // ---- free run with the example ----
    repeat (3000) run_cycle();

    // ---- reset in the middle of operation ----
    @(negedge clk); rst = 1'b1;
    @(posedge clk); #1; rst = 1'b0; ms = A0; n_reset++;
    x = L'($urandom);
    repeat (50) run_cycle();

    // ---- run-time modification: one word per cycle while running ----
    // a5 now tests x10 (MRAM of p_1, address 3 = select 1001).
    cfg_we = 1'b1; cfg_sel = SEL_MRAM; cfg_idx = 1'b0; cfg_addr = 6'd3;
    cfg_data = N'(4'b1001); pending_var = 1'b1; n_rt_writes++;
    run_cycle();
    // a3 now raises y9 and y10 (output RAM, address 13).
    cfg_sel = SEL_ORAM; cfg_addr = 6'd13; cfg_data = 10'b0000000011;
    pending_out = 1'b1; n_rt_writes++;
    run_cycle();
    // a9 now goes to a2 (code 0100): local RAM words 56..59 become 01.
    // x1 (which feeds both p variables in a9) is held at 0 so that only
    // word 56 is read until all four are rewritten.
    cfg_sel = SEL_LSTRAM; cfg_addr = 6'd56; cfg_data = N'(2'b01);
    pending_a9 = 1'b1; n_rt_writes++;
    run_cycle(L'(1));
    for (int a = 57; a < 60; a++) begin
      cfg_addr = 6'(a); n_rt_writes++;
      run_cycle(L'(1));
    end
    cfg_we = 1'b0;
    repeat (3000) run_cycle();

    // ---- mechanism report ----
    $display("loads=%0d cond1=%0d cond2=%0d uncond=%0d second_code=%0d cycles=%0d",
             n_loaded, n_cond1, n_cond2, n_uncond, n_second, n_trans);
    $display("runtime_writes=%0d mod_var_used=%0d mod_out_seen=%0d mod_a9_used=%0d resets=%0d",
             n_rt_writes, n_mod_var_used, n_mod_out_seen, n_mod_a9_used, n_reset);
    check(n_loaded > 0, "load happened");
    check(n_cond1 > 0, "single-variable conditional transitions");
    check(n_cond2 > 0, "two-variable conditional transitions");
    check(n_uncond > 0, "unconditional transitions");
    check(n_second > 0, "states entered under second code");
    check(n_rt_writes > 0 && n_mod_var_used > 0 && n_mod_out_seen > 0 && n_mod_a9_used > 0,
          "run-time modifications exercised");
    check(n_reset > 0, "mid-run reset");
    for (int s = 0; s < 10; s++) check(visits[s] > 0, "every state visited");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
