// mem_if_bist - BIST of a memory and the interface logic around it, with an
// embedded LFSR or low-power LFSR as pattern source.
//
// Inputs Write, Read and Addr are registered first (the Wr_en, Rd_en and
// address registers of the interface), and those registers address and
// control the 64 x 8 sub-array. The write data come from the input shifter:
// with shift = 0 it captures the pattern generator each clock, with
// shift = 1 it shifts sin in serially. The sub-array output is captured by
// the output shifter, which gives data_out in parallel. With shift = 1 the
// two shifters form one 16-bit scan chain, sin -> input shifter -> output
// shifter -> sout, through which the patterns and responses can be moved in
// and out serially.
//
// BIST mode (bist_mode = 1): every write also enables a read of the
// sub-array, so write and read happen in the same cycle and the write data
// pass straight through to the output. A single-cycle pattern thus
// propagates through the address, enable and data registers into the
// output register without a prior write to make the read data defined. In
// functional mode read and write are independent. The structure (registered
// enables and address, generator, two shifters, sub-array, read activated by
// write only in BIST mode) follows the proposed interface scheme; the
// registered bist_mode input, the scan order and USE_LP selecting the
// generator are this design's choices.
//
// Interface: clk, rst (synchronous, active high), addr[5:0], read, write,
// shift, sin, bist_mode in; data_out[7:0], sout out.
// Timing: controls presented in cycle t are registered at the end of t and
// act on the sub-array in t+1; read data reach the output shifter at the
// end of t+2, so data_out shows them in cycle t+3 (with shift = 0).
module mem_if_bist
  import bist_pkg::*;
#(
  parameter bit                USE_LP = 1'b1,
  parameter logic [DATA_W-1:0] SEED   = LFSR_SEED
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] addr,
  input  logic              read,
  input  logic              write,
  input  logic              shift,
  input  logic              sin,
  input  logic              bist_mode,
  output logic [DATA_W-1:0] data_out,
  output logic              sout
);

  logic              wr_en_q, rd_en_q, bist_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] pattern;
  logic [DATA_W-1:0] wdata;
  logic              scan_mid;
  logic [DATA_W-1:0] rdata;
  logic              we, re;

  // Interface registers: write enable, read enable, address, mode.
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_en_q <= 1'b0;
      rd_en_q <= 1'b0;
      bist_q  <= 1'b0;
      addr_q  <= '0;
    end else begin
      wr_en_q <= write;
      rd_en_q <= read;
      bist_q  <= bist_mode;
      addr_q  <= addr;
    end
  end

  // Embedded pattern generator.
  if (USE_LP) begin : g_lplfsr
    logic [DATA_W-1:0] lfsr_state;
    lp_lfsr u_gen (
      .clk        (clk),
      .rst        (rst),
      .seed       (SEED),
      .pattern    (pattern),
      .lfsr_state (lfsr_state)
    );
  end else begin : g_lfsr
    lfsr #(.SEED(SEED)) u_gen (
      .clk  (clk),
      .rst  (rst),
      .temp (pattern)
    );
  end

  shifter #(.W(DATA_W)) u_in_shift (
    .clk   (clk),
    .rst   (rst),
    .shift (shift),
    .si    (sin),
    .d     (pattern),
    .q     (wdata),
    .so    (scan_mid)
  );

  // Read is activated by write only in BIST mode.
  assign we = wr_en_q;
  assign re = rd_en_q | (bist_q & wr_en_q);

  mem_subarray u_array (
    .clk  (clk),
    .rst  (rst),
    .we   (we),
    .re   (re),
    .addr (addr_q),
    .din  (wdata),
    .dout (rdata)
  );

  shifter #(.W(DATA_W)) u_out_shift (
    .clk   (clk),
    .rst   (rst),
    .shift (shift),
    .si    (scan_mid),
    .d     (rdata),
    .q     (data_out),
    .so    (sout)
  );

endmodule
