// fsm_memory: the state register of the template ("FSM memory").
//
// R D flip-flops. On each rising clock edge the register takes the next
// state code D_1..D_R and presents it as T_1..T_R, so every state transition
// takes exactly one clock cycle. Bit R-1 of the vectors is D_1 / T_1 (the
// leftmost bit of a written state code), bit 0 is D_R / T_R.
//
// Reset is synchronous, active high, and loads RESET_CODE; the code 0...0
// (state a_0 in the worked example) is this design's choice, as the method
// itself does not say how the machine is started.
module fsm_memory #(
  parameter int unsigned   R          = ht_pkg::HT_R,
  parameter logic [R-1:0]  RESET_CODE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [R-1:0] d,   // next state code D_1..D_R
  output logic [R-1:0] t    // current state code T_1..T_R
);

  always_ff @(posedge clk) begin
    if (rst) t <= RESET_CODE;
    else     t <= d;
  end

endmodule
