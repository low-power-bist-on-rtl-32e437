// mult4 - 4-bit by 4-bit unsigned array multiplier, the circuit under test
// of the multiplier BISTs.
//
// The product is the sum of the four partial products a & {4{b[i]}} shifted
// by i, added row by row as in a carry-propagate array multiplier. The
// structure is this design's own choice; only a 4-bit multiplier is asked for.
//
// Interface: a[3:0], b[3:0] in, p[7:0] = a * b out. Purely combinational.
module mult4 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  always_comb begin
    p = '0;
    for (int i = 0; i < N; i++) begin
      p = p + ((2*N)'(a & {N{b[i]}}) << i);
    end
  end

endmodule
