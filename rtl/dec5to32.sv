// dec5to32: 5-to-32 one-hot column decoder with predecoding.
//
// The five address bits are split into groups of 2, 2 and 1 bits and each
// group is decoded first, giving 4 + 4 + 2 = 10 predecoded lines. Each of
// the 32 outputs is then a 3-input AND of one line from each group, instead
// of a 5-input gate per output. The extra output r is high for addresses
// 0..4: in the first five column reads of a scan nothing leaves the window
// yet, so r forces the SUB read bus to zero. Purely combinational.
module dec5to32 (
  input  logic [4:0]  a,
  output logic [31:0] y,
  output logic        r
);
  logic [3:0] pa, pb;
  logic [1:0] pc;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      pa[i] = (a[1:0] == 2'(i));
      pb[i] = (a[3:2] == 2'(i));
    end
    pc[0] = ~a[4];
    pc[1] =  a[4];
    for (int n = 0; n < 32; n++) y[n] = pa[n % 4] & pb[(n / 4) % 4] & pc[n / 16];
  end

  assign r = |y[4:0];
endmodule
