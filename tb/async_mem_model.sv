// async_mem_model - behavioural model of a 64 x 8 asynchronous memory with
// active-low write enable and output enable, for testing the read/write
// controller. While oe_n = 0 the addressed word is on dout (otherwise
// dout is 0). A write takes the data bus on the clock edge at which
// we_n = 0; it also checks that the controller drives the bus (tri_n = 0)
// whenever we_n is low and counts any violation. Reset clears the words.
module async_mem_model (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] ad,
  input  logic       we_n,
  input  logic       oe_n,
  input  logic       tri_n,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output int         n_writes,
  output int         n_violations
);

  logic [7:0] words [64];

  always_ff @(posedge clk) begin
    if (rst) begin
      foreach (words[i]) words[i] <= 8'h00;
      n_writes     <= 0;
      n_violations <= 0;
    end else begin
      if (!we_n) begin
        words[ad] <= din;
        n_writes  <= n_writes + 1;
      end
      if (!we_n && tri_n)  n_violations <= n_violations + 1;
      if (!we_n && !oe_n)  n_violations <= n_violations + 1;
    end
  end

  assign dout = oe_n ? 8'h00 : words[ad];

endmodule
