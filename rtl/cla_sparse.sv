// cla_sparse: sparse radix-4 carry-lookahead adder, s = a + b + cin.
//
// The critical path computes only every fourth carry. Per bit, the
// generate is a AND b and the carry-path propagate is a OR b. Using an OR
// instead of an XOR keeps the XOR off the critical path; the sum XOR is
// rebuilt on the side. Two carry-merge levels follow:
//   1. each 4-bit group's generate/propagate is one radix-4 merge of its bit
//      terms;
//   2. the carry into group k merges the group terms below it together with
//      the carry-in, each sparse carry independently, so cin is only merged
//      at this second level.
// These give the carries into bits 4, 8, 12, ... .
// Inside each lower group, a full 4-bit lookahead from its sparse carry
// produces the other carries and the sums. The top group is a carry-select
// block: its sums and carry-out are formed for both values of its carry-in
// ahead of time, and the sparse carry only drives a multiplexer. The MSB,
// which steers the square root, is therefore one multiplexer behind the
// last sparse carry.
//
// Purely combinational; W need not be a multiple of four (the top group
// then has fewer bits: three for the 15-bit adder of the square root).
// The sparse radix-4 structure, the OR propagate and the carry-select top
// group follow the original design. The exact merge-tree wiring is this
// implementation's own.
module cla_sparse #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = (W + 3) / 4;        // 4-bit groups
  localparam int unsigned LO = 4 * (NG - 1);       // first bit of top group
  localparam int unsigned NT = W - LO;             // bits in top group

  logic [4*NG-1:0] g, p;             // padded bit generate/propagate
  logic [W-1:0]    x;                // bit xor, for the sums
  logic [NG-1:0]   gg, gp;           // group generate/propagate
  logic [NG-1:0]   gc;               // sparse carry into each group
  logic [W-1:0]    c;                // carry into each bit

  // generate/propagate of bits j-1..0 of a run starting at bit lo, merged
  // with a carry-in: the carry into bit lo+j
  function automatic logic run_carry(input logic [4*NG-1:0] gv, input logic [4*NG-1:0] pv,
                                     input int lo, input int j, input logic ci);
    logic cr;
    cr = ci;
    for (int i = 0; i < j; i++) cr = gv[lo+i] | (pv[lo+i] & cr);
    return cr;
  endfunction

  // carry into group k as one sum of products: some group j below k
  // generates and every group between propagates, or all propagate cin
  function automatic logic group_carry(input logic [NG-1:0] ggv, input logic [NG-1:0] gpv,
                                       input int k, input logic ci);
    logic any, all;
    any = 1'b0;
    for (int j = 0; j < k; j++) begin
      all = ggv[j];
      for (int i = j + 1; i < k; i++) all = all & gpv[i];
      any = any | all;
    end
    all = ci;
    for (int i = 0; i < k; i++) all = all & gpv[i];
    return any | all;
  endfunction

  always_comb begin
    g = '0; p = '0; x = '0;
    for (int i = 0; i < int'(W); i++) begin
      g[i] = a[i] & b[i];
      p[i] = a[i] | b[i];
      x[i] = a[i] ^ b[i];
    end
  end

  // level 1: group PG, one radix-4 merge per group
  for (genvar k = 0; k < NG; k++) begin : g_pg
    assign gg[k] = g[4*k+3] | (p[4*k+3] & (g[4*k+2] | (p[4*k+2] & (g[4*k+1] | (p[4*k+1] & g[4*k])))));
    assign gp[k] = p[4*k+3] & p[4*k+2] & p[4*k+1] & p[4*k];
  end

  // level 2: each sparse carry merges the groups below it with cin
  for (genvar k = 0; k < NG; k++) begin : g_gc
    if (k == 0) begin : g_c0
      assign gc[k] = cin;
    end else begin : g_ck
      assign gc[k] = group_carry(gg, gp, k, cin);
    end
  end

  // lower groups: full 4-bit lookahead from the sparse carry
  for (genvar k = 0; k < NG - 1; k++) begin : g_grp
    for (genvar j = 0; j < 4; j++) begin : g_bit
      assign c[4*k+j] = run_carry(g, p, 4 * k, j, gc[k]);
    end
  end

  // top group: carry select
  logic [NT:0] c0, c1;
  for (genvar j = 0; j <= NT; j++) begin : g_top
    assign c0[j] = run_carry(g, p, LO, j, 1'b0);
    assign c1[j] = run_carry(g, p, LO, j, 1'b1);
  end
  for (genvar j = 0; j < NT; j++) begin : g_topc
    assign c[LO+j] = gc[NG-1] ? c1[j] : c0[j];
  end

  assign s    = x ^ c;
  assign cout = gc[NG-1] ? c1[NT] : c0[NT];
endmodule
