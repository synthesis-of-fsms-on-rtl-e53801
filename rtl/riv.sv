// riv: replacement of input variables.
//
// G L:1 multiplexers, each with its own MRAM. For the current state code the
// MRAM of multiplexer g holds the index of the input x_i that becomes p_g, so
// a transition condition over x_0..x_{L-1} is re-expressed over at most G
// variables p_1..p_G. p is packed with p_1 in bit G-1 and p_G in bit 0, so
// that p_1 is the more significant of the LSTRAM address bits that follow
// the state code. An MRAM select code i picks x[i]; a select code past L-1
// (possible only when L is not a power of two) gives 0, a choice of this
// design.
//
// The path t -> MRAM -> multiplexer -> p is combinational. The MRAMs are
// loaded through one shared write port: wr_idx says which of the G MRAMs
// takes the word (0 for p_1).
module riv #(
  parameter int unsigned R  = ht_pkg::HT_R,
  parameter int unsigned L  = ht_pkg::HT_L,
  parameter int unsigned G  = ht_pkg::HT_G,
  localparam int unsigned SW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1
) (
  input  logic          clk,
  input  logic [R-1:0]  t,        // current state code
  input  logic [L-1:0]  x,        // x[i] is input variable x_i
  output logic [G-1:0]  p,        // p[G-1] is p_1, p[0] is p_G
  // reload port for the G MRAMs
  input  logic          wr_en,
  input  logic [GW-1:0] wr_idx,
  input  logic [R-1:0]  wr_addr,
  input  logic [SW-1:0] wr_data
);

  logic [SW-1:0] sel [G];

  for (genvar g = 0; g < G; g++) begin : g_mux
    mram #(.R(R), .L(L)) u_mram (
      .clk     (clk),
      .t       (t),
      .sel     (sel[g]),
      .wr_en   (wr_en && (wr_idx == GW'(g))),
      .wr_addr (wr_addr),
      .wr_data (wr_data)
    );

    always_comb begin
      if (32'(sel[g]) < L) p[G-1-g] = x[sel[g]];
      else                 p[G-1-g] = 1'b0;
    end
  end

endmodule
