// ht_pkg: shared constants and types of the RAM-based FSM hardware template.
//
// The template is sized by five numbers: L input variables x_0..x_{L-1},
// N output variables y_1..y_N, R state-code bits, G selected variables
// p_1..p_G and RL ("r" in the usual notation) state-code bits produced by the
// local transition RAM. The defaults below are the example template
// (L=16, N=10, R=4, G=2, r=2) that the method is demonstrated on.
//
// ram_sel_e names the RAM a configuration (second-port) write goes to. The
// encoding is this design's own choice.
package ht_pkg;

  localparam int unsigned HT_L  = 16;
  localparam int unsigned HT_N  = 10;
  localparam int unsigned HT_R  = 4;
  localparam int unsigned HT_G  = 2;
  localparam int unsigned HT_RL = 2;

  typedef enum logic [1:0] {
    SEL_MRAM   = 2'd0,   // one of the G MRAMs, chosen by a separate index
    SEL_GSTRAM = 2'd1,
    SEL_LSTRAM = 2'd2,
    SEL_ORAM   = 2'd3
  } ram_sel_e;

endpackage
