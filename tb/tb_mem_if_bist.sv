// tb_mem_if_bist - self-checking test of the memory interface BIST, built
// once with the low-power LFSR (the default) and once with the plain LFSR.
//
// A cycle model written here from the description of the scheme (input
// registers, pattern generator, input shifter, sub-array with write-through
// in BIST mode, output shifter) predicts data_out and sout every clock for
// both builds. The stimulus mixes functional writes and reads, BIST-mode
// writes (which must read in the same cycle), scan shifting and idle
// cycles; reads only go to addresses written before. Directed checks
// follow that do not use the model: a byte scanned into the input shifter
// and written in BIST mode must appear on data_out three cycles after the
// write request, and again after a later functional read of the same
// address; 16 bits shifted in at sin must leave at sout 16 cycles later.
module tb_mem_if_bist;
  logic       clk = 1'b0;
  logic       rst, read, write, shift, sin, bist_mode;
  logic [5:0] addr;
  logic [7:0] data_out_lp, data_out_pl;
  logic       sout_lp, sout_pl;
  int checks = 0, failures = 0;
  int n_through = 0, n_fread = 0, n_shift = 0;

  mem_if_bist dut_lp (
    .clk(clk), .rst(rst), .addr(addr), .read(read), .write(write), .shift(shift),
    .sin(sin), .bist_mode(bist_mode), .data_out(data_out_lp), .sout(sout_lp)
  );

  mem_if_bist #(.USE_LP(1'b0)) dut_pl (
    .clk(clk), .rst(rst), .addr(addr), .read(read), .write(write), .shift(shift),
    .sin(sin), .bist_mode(bist_mode), .data_out(data_out_pl), .sout(sout_pl)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- model
  typedef struct {
    logic [7:0] gen;              // LFSR state
    logic [7:0] in_q, out_q, dout;
    logic       wr, rd, bist;
    logic [5:0] a;
    logic [7:0] mem [64];
  } model_t;

  model_t m_lp, m_pl;

  function automatic logic [7:0] lp_swap(input logic [7:0] s);
    return s[7] ? {s[7], s[5], s[6], s[3], s[4], s[1], s[2], s[0]} : s;
  endfunction

  function automatic void model_reset(ref model_t m);
    m.gen = 8'h01; m.in_q = '0; m.out_q = '0; m.dout = '0;
    m.wr = 1'b0; m.rd = 1'b0; m.bist = 1'b0; m.a = '0;
  endfunction

  function automatic void model_step(ref model_t m, input bit lp);
    logic [7:0] pat, in_n, out_n, dout_n;
    logic       re;
    pat   = lp ? lp_swap(m.gen) : m.gen;
    re    = m.rd | (m.bist & m.wr);
    dout_n = re ? (m.wr ? m.in_q : m.mem[m.a]) : m.dout;
    if (m.wr) m.mem[m.a] = m.in_q;
    in_n  = shift ? {m.in_q[6:0], sin} : pat;
    out_n = shift ? {m.out_q[6:0], m.in_q[7]} : m.dout;
    m.gen = {m.gen[6:0], m.gen[0] ^ m.gen[7]};
    m.in_q = in_n; m.out_q = out_n; m.dout = dout_n;
    m.wr = write; m.rd = read; m.bist = bist_mode; m.a = addr;
  endfunction

  bit model_on = 1'b0;
  always @(posedge clk) begin
    if (rst) begin
      model_reset(m_lp);
      model_reset(m_pl);
    end else begin
      model_step(m_lp, 1'b1);
      model_step(m_pl, 1'b0);
    end
  end

  always @(negedge clk) begin
    if (model_on) begin
      check(data_out_lp == m_lp.out_q && sout_lp == m_lp.out_q[7],
            $sformatf("LP build data_out %02h want %02h", data_out_lp, m_lp.out_q));
      check(data_out_pl == m_pl.out_q && sout_pl == m_pl.out_q[7],
            $sformatf("plain build data_out %02h want %02h", data_out_pl, m_pl.out_q));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    read = 1'b0; write = 1'b0; shift = 1'b0; sin = 1'b0; bist_mode = 1'b0;
  endtask

  initial begin
    bit written [64];
    logic [7:0]  byte_in;
    logic [15:0] bits;
    int k;
    foreach (written[i]) written[i] = 1'b0;
    idle(); addr = '0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    model_on = 1'b1;
    // Random mixed traffic against the model.
    for (int i = 0; i < 3000; i++) begin
      idle();
      addr = 6'($urandom);
      case ($urandom_range(0, 5))
        0, 1: begin write = 1'b1; bist_mode = 1'($urandom); written[addr] = 1'b1;
                    if (bist_mode) n_through++; end
        2:    if (written[addr]) begin read = 1'b1; n_fread++; end
        3:    begin shift = 1'b1; sin = 1'($urandom); n_shift++; end
        4:    begin write = 1'b1; bist_mode = 1'b1; shift = 1'($urandom); sin = 1'($urandom);
                    written[addr] = 1'b1; n_through++; end
        default: ;
      endcase
      @(negedge clk);
    end
    idle();
    repeat (4) @(negedge clk);
    model_on = 1'b0;

    // Directed: scan a byte into the input shifter, write it in BIST mode.
    byte_in = 8'hC6;
    for (int b = 7; b >= 0; b--) begin
      idle(); shift = 1'b1; sin = byte_in[b];
      if (b == 0) begin write = 1'b1; bist_mode = 1'b1; addr = 6'd42; end
      @(negedge clk);
    end
    idle();                       // cycle t+1: the write happens
    @(negedge clk);               // cycle t+2: output shifter captures
    @(negedge clk);               // cycle t+3
    check(data_out_lp == byte_in && data_out_pl == byte_in,
          $sformatf("write-through: %02h / %02h want %02h", data_out_lp, data_out_pl, byte_in));
    repeat (3) @(negedge clk);
    // Functional read of the same address returns the byte three cycles on.
    idle(); read = 1'b1; addr = 6'd42;
    @(negedge clk);
    idle();
    repeat (2) @(negedge clk);
    check(data_out_lp == byte_in && data_out_pl == byte_in,
          $sformatf("read-back: %02h / %02h want %02h", data_out_lp, data_out_pl, byte_in));
    // Directed: 16-bit scan chain from sin to sout.
    bits = 16'hB38D;
    k = 0;
    for (int c = 0; c < 32; c++) begin
      idle(); shift = 1'b1; sin = (c < 16) ? bits[15 - c] : 1'b0;
      @(negedge clk);
      // After c+1 shifts, the bit shifted in at step c-15 is at sout.
      if (c >= 15) begin
        check(sout_lp == bits[15 - (c - 15)] && sout_pl == bits[15 - (c - 15)],
              $sformatf("scan bit %0d", c - 15));
        k++;
      end
      if (c == 30) break;
    end
    check(k == 16, "scan bit count");
    check(n_through > 0 && n_fread > 0 && n_shift > 0, "every kind of traffic ran");
    $display("bist writes=%0d functional reads=%0d shifts=%0d", n_through, n_fread, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
