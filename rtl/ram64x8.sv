// ram64x8 - single-port RAM of 64 words of 8 bits.
//
// The cells form an 8 x 8 grid of words. The upper three address bits drive
// a row decoder and the lower three a column decoder; the word at the
// selected row and column is written or read. One access per clock: with
// en = 1, rw = 1 reads and rw = 0 writes (the same polarity as the memory
// read/write controller). Reads are synchronous: dout shows the word read in
// the cycle after the read and holds it until the next read. Reset clears
// every word_q and dout, so a read never returns an undefined word. The size
// and the single port follow the description; the grid split of the
// address, the rw polarity, the enable and the reset of the cells are this
// design's choices.
//
// Interface: clk, rst (synchronous, active high), en, rw, addr[5:0],
// din[7:0], dout[7:0].
module ram64x8
  import bist_pkg::*;
#(
  parameter int unsigned ROW_W = 3,
  parameter int unsigned COL_W = 3,
  parameter int unsigned W     = DATA_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic                   rw,
  input  logic [ROW_W+COL_W-1:0] addr,
  input  logic [W-1:0]           din,
  output logic [W-1:0]           dout
);

  localparam int unsigned ROWS = 1 << ROW_W;
  localparam int unsigned COLS = 1 << COL_W;

  logic [W-1:0]    word_q [ROWS][COLS];
  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;
  logic [W-1:0]    read_word;

  addr_decoder #(.N(ROW_W)) u_row_dec (.addr(addr[ROW_W+COL_W-1:COL_W]), .sel(row_sel));
  addr_decoder #(.N(COL_W)) u_col_dec (.addr(addr[COL_W-1:0]),           .sel(col_sel));

  // Read bitlines: the selected word is the only one gated onto the OR tree.
  always_comb begin
    read_word = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (row_sel[r] && col_sel[c]) read_word = read_word | word_q[r][c];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          word_q[r][c] <= '0;
    end else if (en) begin
      if (rw) begin
        dout <= read_word;
      end else begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            if (row_sel[r] && col_sel[c]) word_q[r][c] <= din;
      end
    end
  end

endmodule
