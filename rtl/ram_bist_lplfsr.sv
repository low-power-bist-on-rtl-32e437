// ram_bist_lplfsr - BIST of a 64 x 8 RAM with the low-power LFSR as data
// source.
//
// Two copies of the RAM receive the same address, control and data: the
// sequencer writes the running LP-LFSR pattern into every address and then
// reads all addresses back. The comparator checks the two read words and
// gives test_pass when they agree and test_fail when they differ. The
// generator / two RAMs / comparator structure is that of the RAM BIST; the
// sequencing is this design's choice (see ram_bist_ctrl).
//
// Interface: seed[7:0] (loaded into the generator during reset), clk,
// rst (synchronous, active high), test_pass, test_fail.
// Timing: per 128-cycle round, 64 write cycles and 64 read cycles; the
// flags for the word read in cycle t (t = 64..127 of the round) appear in
// cycle t+2, and both flags are 0 outside those cycles.
module ram_bist_lplfsr
  import bist_pkg::*;
(
  input  logic [DATA_W-1:0] seed,
  input  logic clk,
  input  logic rst,
  output logic test_pass,
  output logic test_fail
);

  logic [DATA_W-1:0] pattern;
  logic [DATA_W-1:0] dout_1, dout_2;
  logic [ADDR_W-1:0] addr;
  logic              en, rw, cmp_valid, read_pass;

  logic [DATA_W-1:0] lfsr_state;

  lp_lfsr u_lplfsr (
    .clk        (clk),
    .rst        (rst),
    .seed       (seed),
    .pattern    (pattern),
    .lfsr_state (lfsr_state)
  );

  ram_bist_ctrl u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .en        (en),
    .rw        (rw),
    .addr      (addr),
    .cmp_valid (cmp_valid),
    .read_pass (read_pass)
  );

  ram64x8 u_ram1 (.clk(clk), .rst(rst), .en(en), .rw(rw), .addr(addr), .din(pattern), .dout(dout_1));
  ram64x8 u_ram2 (.clk(clk), .rst(rst), .en(en), .rw(rw), .addr(addr), .din(pattern), .dout(dout_2));

  bist_comparator #(.W(DATA_W)) u_ora (
    .clk       (clk),
    .rst       (rst),
    .valid     (cmp_valid),
    .resp_a    (dout_1),
    .resp_b    (dout_2),
    .test_pass (test_pass),
    .test_fail (test_fail)
  );

endmodule
