// gstram: group state transition RAM.
//
// 2^R words of R-RL bits, addressed by the current state code T_1..T_R. The
// word is D_{r+1}..D_R, the part of the next state code that names the group
// A(a_from) of successor states. With a suitable state assignment these bits
// depend on the current state only, never on the inputs, which is what lets
// the transition memory be split into a small group RAM and a local RAM.
// Bit R-RL-1 of the word is D_{r+1}, bit 0 is D_R.
//
// Port A (FSM read) is asynchronous so the next-state code is ready in the
// same cycle. Port B is a synchronous write for loading or reloading the
// contents at run time (the second port of a dual-port RAM).
module gstram #(
  parameter int unsigned R  = ht_pkg::HT_R,
  parameter int unsigned RL = ht_pkg::HT_RL
) (
  input  logic            clk,
  // port A: FSM read
  input  logic [R-1:0]    t,
  output logic [R-RL-1:0] d_grp,
  // port B: reload
  input  logic            wr_en,
  input  logic [R-1:0]    wr_addr,
  input  logic [R-RL-1:0] wr_data
);

  logic [R-RL-1:0] mem [2**R];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign d_grp = mem[t];

endmodule
