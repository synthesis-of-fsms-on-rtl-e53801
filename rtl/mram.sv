// mram: multiplexer-control RAM of the input-replacement block.
//
// 2^R words of SW = log2(L) bits. The word at address K (the current state
// code T_1..T_R) is the index i of the input x_i that the associated L:1
// multiplexer passes on as its p variable while the FSM is in the state coded
// K. Port A is the read port used by the running FSM; it is asynchronous, so
// the select follows the state register within the same cycle. Port B is the
// second port of a dual-port RAM: a synchronous write used to load or reload
// the contents, also while the FSM runs. A word written at an edge is seen by
// port A right after that edge. Contents are undefined until written.
module mram #(
  parameter int unsigned R  = ht_pkg::HT_R,
  parameter int unsigned L  = ht_pkg::HT_L,
  localparam int unsigned SW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  // port A: FSM read
  input  logic [R-1:0]  t,
  output logic [SW-1:0] sel,
  // port B: reload
  input  logic          wr_en,
  input  logic [R-1:0]  wr_addr,
  input  logic [SW-1:0] wr_data
);

  logic [SW-1:0] mem [2**R];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign sel = mem[t];

endmodule
