// lstram: local state transition RAM.
//
// 2^(R+G) words of RL bits. The address is the current state code followed by
// the selected variables, {T_1..T_R, p_1..p_G}, with p_G the least
// significant bit, so the state code 0001 with p_1=1, p_2=0 reads address 6.
// The word is D_1..D_r, the part of the next state code that picks one state
// inside the group chosen by the group RAM. Bit RL-1 of the word is D_1.
//
// Port A (FSM read) is asynchronous; port B is a synchronous write, addressed
// with the same R+G-bit address, for loading or reloading at run time.
module lstram #(
  parameter int unsigned R  = ht_pkg::HT_R,
  parameter int unsigned G  = ht_pkg::HT_G,
  parameter int unsigned RL = ht_pkg::HT_RL
) (
  input  logic            clk,
  // port A: FSM read
  input  logic [R-1:0]    t,
  input  logic [G-1:0]    p,       // p[G-1] is p_1
  output logic [RL-1:0]   d_loc,
  // port B: reload
  input  logic            wr_en,
  input  logic [R+G-1:0]  wr_addr,
  input  logic [RL-1:0]   wr_data
);

  logic [RL-1:0] mem [2**(R+G)];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign d_loc = mem[{t, p}];

endmodule
