// lp_bist_top - all the low-power BIST hardware side by side on one clock
// and one reset.
//
// Main design: mem_if_bist, the memory and interface-logic BIST with an
// embedded low-power LFSR (USE_LP = 1; 0 selects the plain LFSR). Next to it
// stand the experiments that compare the two pattern generators: multiplier
// BISTs driven by the LFSR and by the LP-LFSR, and RAM BISTs driven by each.
// Then the memory read/write controller, whose memory side is brought out to
// pins for an external asynchronous memory, and the string-matching
// automaton. The blocks share no signals besides clk and rst.
//
// Interface: clk, rst (synchronous, active high) and, per block, its own
// ports with a block prefix (mif_, mbl_, mbp_, rbl_, rbp_, rwc_, dfa_).
// Timing: that of each block.
module lp_bist_top
  import bist_pkg::*;
#(
  parameter bit USE_LP = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  // Memory interface BIST
  input  logic [ADDR_W-1:0] mif_addr,
  input  logic              mif_read,
  input  logic              mif_write,
  input  logic              mif_shift,
  input  logic              mif_sin,
  input  logic              mif_bist_mode,
  output logic [DATA_W-1:0] mif_data_out,
  output logic              mif_sout,
  // Multiplier BIST with LFSR
  output logic              mbl_test_pass,
  output logic              mbl_test_fail,
  // Multiplier BIST with LP-LFSR
  input  logic [DATA_W-1:0] mbp_seed,
  output logic              mbp_test_pass,
  output logic              mbp_test_fail,
  // RAM BIST with LFSR
  output logic              rbl_test_pass,
  output logic              rbl_test_fail,
  // RAM BIST with LP-LFSR
  input  logic [DATA_W-1:0] rbp_seed,
  output logic              rbp_test_pass,
  output logic              rbp_test_fail,
  // Memory read/write controller
  input  logic              rwc_mem,
  input  logic              rwc_rw,
  input  logic [ADDR_W-1:0] rwc_addr,
  input  logic [DATA_W-1:0] rwc_data_f2s,
  output logic              rwc_ready,
  output logic [DATA_W-1:0] rwc_data_s2f_r,
  output logic [ADDR_W-1:0] rwc_ad,
  output logic              rwc_we_n,
  output logic              rwc_oe_n,
  output logic              rwc_tri_n,
  output logic [DATA_W-1:0] rwc_dio_out,
  input  logic [DATA_W-1:0] rwc_dio_in,
  // String-matching automaton
  input  logic              dfa_ch_valid,
  input  logic [7:0]        dfa_ch,
  output dfa_state_e        dfa_state,
  output logic              dfa_match,
  output match_e            dfa_match_id
);

  mem_if_bist #(.USE_LP(USE_LP)) u_mem_if_bist (
    .clk       (clk),
    .rst       (rst),
    .addr      (mif_addr),
    .read      (mif_read),
    .write     (mif_write),
    .shift     (mif_shift),
    .sin       (mif_sin),
    .bist_mode (mif_bist_mode),
    .data_out  (mif_data_out),
    .sout      (mif_sout)
  );

  lfsr_bist u_lfsr_bist (
    .clk       (clk),
    .rst       (rst),
    .test_pass (mbl_test_pass),
    .test_fail (mbl_test_fail)
  );

  lplfsr_bist u_lplfsr_bist (
    .seed      (mbp_seed),
    .clk       (clk),
    .rst       (rst),
    .test_pass (mbp_test_pass),
    .test_fail (mbp_test_fail)
  );

  ram_bist_lfsr u_ram_bist_lfsr (
    .clk       (clk),
    .rst       (rst),
    .test_pass (rbl_test_pass),
    .test_fail (rbl_test_fail)
  );

  ram_bist_lplfsr u_ram_bist_lplfsr (
    .seed      (rbp_seed),
    .clk       (clk),
    .rst       (rst),
    .test_pass (rbp_test_pass),
    .test_fail (rbp_test_fail)
  );

  mem_rw_fsm u_mem_rw_fsm (
    .clk        (clk),
    .rst        (rst),
    .mem        (rwc_mem),
    .rw         (rwc_rw),
    .addr       (rwc_addr),
    .data_f2s   (rwc_data_f2s),
    .ready      (rwc_ready),
    .data_s2f_r (rwc_data_s2f_r),
    .ad         (rwc_ad),
    .we_n       (rwc_we_n),
    .oe_n       (rwc_oe_n),
    .tri_n      (rwc_tri_n),
    .dio_out    (rwc_dio_out),
    .dio_in     (rwc_dio_in)
  );

  dfa_matcher u_dfa (
    .clk      (clk),
    .rst      (rst),
    .ch_valid (dfa_ch_valid),
    .ch       (dfa_ch),
    .state    (dfa_state),
    .match    (dfa_match),
    .match_id (dfa_match_id)
  );

endmodule
