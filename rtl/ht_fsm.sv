// ht_fsm: reusable hardware template for Moore FSMs with split transition RAM.
//
// The circuit has a fixed structure and gets its behaviour only from the
// contents of its RAMs, so one piece of hardware can run any FSM that fits
// its limits (L inputs, N outputs, R-bit state codes, G selected variables
// per state):
//
//   x --> riv (G MRAMs + G L:1 muxes) --p--+
//                 ^                        v
//   state t ------+----> gstram --> D[R-RL-1:0]  (group part of next code)
//           |    +-----> lstram --> D[R-1:R-RL]  (local part, address {t,p})
//           |    +-----> oram   --> y            (Moore outputs)
//           +-- fsm_memory <-- D
//
// The group RAM gives the bits of the next state code that depend on the
// current state only; the local RAM, addressed by the state and the selected
// variables p, gives the remaining RL bits. All read paths are asynchronous,
// so every transition, conditional or not, completes in one clock cycle.
//
// Interface: x[i] is input x_i; y[N-1] is y_1; state[R-1] is T_1. The
// configuration port is the second port of every RAM: when cfg_we is high
// at a rising edge, cfg_data (right-aligned, width of the target RAM) is
// written at cfg_addr into the RAM named by cfg_sel; for SEL_MRAM, cfg_idx
// picks the MRAM (0 feeds p_1). cfg_addr is R+G bits wide for the local RAM
// and uses its low R bits for the others. Writes may happen while the FSM
// runs; a written word is read by the FSM from the next cycle on. rst is
// synchronous and loads the all-zero state code; RAM contents are not reset.
// The split into group and local RAMs, the multiplexer RAMs and the dual-port
// reload follow the method; the configuration-port format and reset are this
// design's own choices.
module ht_fsm
  import ht_pkg::*;
#(
  parameter int unsigned L  = HT_L,
  parameter int unsigned N  = HT_N,
  parameter int unsigned R  = HT_R,
  parameter int unsigned G  = HT_G,
  parameter int unsigned RL = HT_RL,
  localparam int unsigned SW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned CW0 = (N > SW) ? N : SW,
  localparam int unsigned CW1 = (RL > (R - RL)) ? RL : (R - RL),
  localparam int unsigned CW  = (CW0 > CW1) ? CW0 : CW1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [L-1:0]   x,
  output logic [N-1:0]   y,
  output logic [R-1:0]   state,
  // configuration (second RAM port)
  input  logic           cfg_we,
  input  ram_sel_e       cfg_sel,
  input  logic [GW-1:0]  cfg_idx,
  input  logic [R+G-1:0] cfg_addr,
  input  logic [CW-1:0]  cfg_data
);

  logic [R-1:0]    t;
  logic [R-1:0]    d;
  logic [G-1:0]    p;
  logic [R-RL-1:0] d_grp;
  logic [RL-1:0]   d_loc;

  fsm_memory #(.R(R)) u_fsm_memory (
    .clk (clk),
    .rst (rst),
    .d   (d),
    .t   (t)
  );

  riv #(.R(R), .L(L), .G(G)) u_riv (
    .clk     (clk),
    .t       (t),
    .x       (x),
    .p       (p),
    .wr_en   (cfg_we && cfg_sel == SEL_MRAM),
    .wr_idx  (cfg_idx),
    .wr_addr (cfg_addr[R-1:0]),
    .wr_data (cfg_data[SW-1:0])
  );

  gstram #(.R(R), .RL(RL)) u_gstram (
    .clk     (clk),
    .t       (t),
    .d_grp   (d_grp),
    .wr_en   (cfg_we && cfg_sel == SEL_GSTRAM),
    .wr_addr (cfg_addr[R-1:0]),
    .wr_data (cfg_data[R-RL-1:0])
  );

  lstram #(.R(R), .G(G), .RL(RL)) u_lstram (
    .clk     (clk),
    .t       (t),
    .p       (p),
    .d_loc   (d_loc),
    .wr_en   (cfg_we && cfg_sel == SEL_LSTRAM),
    .wr_addr (cfg_addr),
    .wr_data (cfg_data[RL-1:0])
  );

  oram #(.R(R), .N(N)) u_oram (
    .clk     (clk),
    .t       (t),
    .y       (y),
    .wr_en   (cfg_we && cfg_sel == SEL_ORAM),
    .wr_addr (cfg_addr[R-1:0]),
    .wr_data (cfg_data[N-1:0])
  );

  // D_1..D_r from the local RAM, D_{r+1}..D_R from the group RAM.
  assign d     = {d_loc, d_grp};
  assign state = t;

  // Configuration writes to the R-bit-addressed RAMs must leave the p part
  // of the address clear, and an MRAM index must name an existing MRAM.
  a_cfg_addr : assert property (@(posedge clk)
    cfg_we && cfg_sel != SEL_LSTRAM |-> cfg_addr[R+G-1:R] == '0);
  a_cfg_idx : assert property (@(posedge clk)
    cfg_we && cfg_sel == SEL_MRAM |-> 32'(cfg_idx) < G);

endmodule
