// mem_rw_fsm - read/write controller between a user port and an
// asynchronous memory with active-low output-enable and write-enable.
//
// The controller waits in idle with ready = 1. When mem = 1 it registers the
// address; rw = 1 starts a read, rw = 0 a write (the write data are
// registered as well). A read spends two cycles, r1 and r2, with oe_n = 0,
// and captures the memory data bus at the end of r2 into data_s2f_r. A write
// spends w1 with we_n = 0 and tri_n = 0 (the controller drives the data
// bus) and w2 with only tri_n = 0, so the data stay on the bus one cycle
// after the write strobe ends. Both then return to idle. States, register
// transfers and strobes are those of the read/write flow chart; the widths,
// the inactive (high) strobe levels outside their states and the split of
// the bidirectional data bus into dio_in and dio_out are this design's
// choices.
//
// Interface: user side clk, rst (synchronous, active high), mem, rw,
// addr[5:0], data_f2s[7:0] in; ready, data_s2f_r[7:0] out. Memory side
// ad[5:0], we_n, oe_n, tri_n, dio_out[7:0] out (driven on the bus while
// tri_n = 0) and dio_in[7:0] in.
// Assertions check the bus rules (no write strobe together with output
// enable, bus driven during the write strobe, one-cycle write strobe).
// Timing: a read takes 3 cycles from the request in idle to ready again, and
// data_s2f_r holds the word from the cycle ready returns; a write takes 3.
module mem_rw_fsm
  import bist_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          mem,
  input  logic          rw,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] data_f2s,
  output logic          ready,
  output logic [DW-1:0] data_s2f_r,
  output logic [AW-1:0] ad,
  output logic          we_n,
  output logic          oe_n,
  output logic          tri_n,
  output logic [DW-1:0] dio_out,
  input  logic [DW-1:0] dio_in
);

  rw_state_e     state, state_next;
  logic [AW-1:0] addr_reg;
  logic [DW-1:0] data_f2s_reg, data_s2f_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= RW_IDLE;
      addr_reg     <= '0;
      data_f2s_reg <= '0;
      data_s2f_reg <= '0;
    end else begin
      state <= state_next;
      if (state == RW_IDLE && mem) begin
        addr_reg <= addr;
        if (!rw) data_f2s_reg <= data_f2s;
      end
      if (state == RW_R2) data_s2f_reg <= dio_in;
    end
  end

  always_comb begin
    state_next = state;
    unique case (state)
      RW_IDLE: if (mem) state_next = rw ? RW_R1 : RW_W1;
      RW_R1:   state_next = RW_R2;
      RW_R2:   state_next = RW_IDLE;
      RW_W1:   state_next = RW_W2;
      RW_W2:   state_next = RW_IDLE;
      default: state_next = RW_IDLE;
    endcase
  end

  assign ready      = (state == RW_IDLE);
  assign oe_n       = !(state == RW_R1 || state == RW_R2);
  assign we_n       = !(state == RW_W1);
  assign tri_n      = !(state == RW_W1 || state == RW_W2);
  assign ad         = addr_reg;
  assign dio_out    = data_f2s_reg;
  assign data_s2f_r = data_s2f_reg;

  // Bus rules: never write and read the memory at once, and drive the data
  // bus whenever the write strobe is active.
  a_no_we_with_oe: assert property (@(posedge clk) disable iff (rst) !(!we_n && !oe_n));
  a_we_drives_bus: assert property (@(posedge clk) disable iff (rst) !we_n |-> !tri_n);
  // A write strobe lasts exactly one cycle.
  a_we_one_cycle:  assert property (@(posedge clk) disable iff (rst) !we_n |=> we_n);

endmodule
