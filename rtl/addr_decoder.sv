// addr_decoder - binary to one-hot decoder, used as the row and the column
// decoder of the RAM. sel[i] is 1 exactly when addr == i. Combinational.
module addr_decoder #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]      addr,
  output logic [(1<<N)-1:0] sel
);

  always_comb begin
    sel = '0;
    sel[addr] = 1'b1;
  end

endmodule
