// mem_subarray - 64 x 8 memory sub-array with separate write and read
// enables, able to write and read in the same clock.
//
// A write (we = 1) stores din at addr. A read (re = 1) loads dout with the
// word at addr. When both are 1 in the same cycle, dout takes din: the
// write drivers overpower the cell, so the bitlines, and with them the
// sense path, carry the write data. This write-through is what lets the
// interface logic in front of the array be tested with single-cycle
// patterns. The cells are not reset, like a real array; dout is.
//
// Interface: clk, rst (synchronous, active high, clears dout), we, re,
// addr[5:0], din[7:0], dout[7:0]. Timing: one access per clock, read data
// in the cycle after the read.
module mem_subarray
  import bist_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned W  = DATA_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [1<<AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst)     dout <= '0;
    else if (re) dout <= we ? din : mem[addr];
  end

endmodule
