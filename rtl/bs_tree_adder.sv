// bs_tree_adder: bit-serial multi-input adder (a Sigma operator).
//
// Adds NIN LSB-first bit streams with NIN-1 bit-serial adders (one full
// adder and one carry register each), arranged as a tree. Node n >= NIN
// adds nodes 2(n-NIN) and 2(n-NIN)+1, where nodes 0..NIN-1 are the inputs.
// Six inputs thus take three levels ((x0+x1)+(x2+x3))+(x4+x5), and five
// inputs ((x0+x1)+(x2+x3))+... also three. The full adders pass their sums
// on combinationally within a cycle; only the carries are latched. The
// result bit is registered, so the sum bit k of the inputs presented in
// cycle t appears on s in cycle t+1.
// The result has as many bits as cycles are run; it is exact as long as the
// inputs are zero-padded (or sign-extended) for those cycles.
// The five-adder tree for six inputs follows the original design; the
// pairing order for other input counts is this implementation's own.
module bs_tree_adder #(
  parameter int unsigned NIN = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           start,
  input  logic [NIN-1:0] x,
  output logic           s
);
  localparam int unsigned NN = 2 * NIN - 1;   // inputs plus adder nodes

  logic [NN-1:0] node;

  assign node[NIN-1:0] = x;
  for (genvar n = NIN; n < NN; n++) begin : g_add
    bs_adder #(.SUB(1'b0)) u_add (
      .clk, .rst_n, .en, .start,
      .a(node[2*(n-NIN)]), .b(node[2*(n-NIN)+1]), .s(node[n])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= 1'b0;
    else if (en) s <= node[NN-1];
  end
endmodule
