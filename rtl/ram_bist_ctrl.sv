// ram_bist_ctrl - address generator and read/write sequencer of the RAM
// BISTs.
//
// After reset it runs a write pass (addresses 0 to 63 written in order, one
// per clock) and then a read pass over the same addresses, and repeats the
// two passes for as long as reset stays low. Because every word is written
// before it is read, the read data are always defined. cmp_valid marks the
// cycles in which the RAM output holds a word read in the previous cycle;
// it is the qualifier for the comparator. The memory's "address generator"
// is named in the description; the march order and the pass structure are
// this design's choice.
//
// Interface: clk, rst (synchronous, active high), en, rw (1 = read,
// 0 = write), addr[5:0], cmp_valid, read_pass (1 during the read pass).
// Timing: write pass in cycles 0..63 after reset, read pass in 64..127,
// cmp_valid in 65..128, and so on every 128 cycles.
module ram_bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  output logic          en,
  output logic          rw,
  output logic [AW-1:0] addr,
  output logic          cmp_valid,
  output logic          read_pass
);

  logic [AW-1:0] addr_cnt;
  logic          reading;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_cnt  <= '0;
      reading   <= 1'b0;
      cmp_valid <= 1'b0;
    end else begin
      addr_cnt  <= addr_cnt + 1'b1;
      if (addr_cnt == '1) reading <= ~reading;
      cmp_valid <= reading;
    end
  end

  assign en        = ~rst;
  assign rw        = reading;
  assign addr      = addr_cnt;
  assign read_pass = reading;

  // A comparison is only flagged in the cycle after a read.
  a_valid_after_read: assert property (@(posedge clk) disable iff (rst) cmp_valid |-> $past(rw));

endmodule
