// oram: output RAM.
//
// 2^R words of N bits addressed by the current state code. Because the
// machine is a Moore FSM, the outputs depend on the state only and the word
// at address K is the output vector of the state coded K. Bit N-1 of the word
// is y_1 (the leftmost bit of a written output vector), bit 0 is y_N.
//
// Port A (FSM read) is asynchronous, so the outputs change in the cycle the
// state register changes. Port B is a synchronous write for loading or
// reloading at run time.
module oram #(
  parameter int unsigned R = ht_pkg::HT_R,
  parameter int unsigned N = ht_pkg::HT_N
) (
  input  logic         clk,
  // port A: FSM read
  input  logic [R-1:0] t,
  output logic [N-1:0] y,
  // port B: reload
  input  logic         wr_en,
  input  logic [R-1:0] wr_addr,
  input  logic [N-1:0] wr_data
);

  logic [N-1:0] mem [2**R];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign y = mem[t];

endmodule
