// tb_lp_bist_top - end-to-end test of the whole design at its default
// parameters.
//
// After one reset, all blocks run at once for 420 cycles:
//  - memory interface BIST: a byte is scanned into the input shifter and
//    written in BIST mode; it must come out of data_out three cycles after
//    the request (write-through), and again after a functional read of the
//    same address. Then a 16-bit word goes through the scan chain from
//    mif_sin to mif_sout.
//  - multiplier BISTs (LFSR and LP-LFSR): test_pass every cycle after
//    reset, test_fail never.
//  - RAM BISTs (LFSR and LP-LFSR): three write passes and three read
//    passes, test_pass in exactly the 64 compare cycles of each read pass,
//    test_fail never.
//  - read/write controller with a behavioural asynchronous memory on its
//    pins: 20 writes then 20 reads, the reads returning what was written.
//  - string automaton: the text "SHERSXHISHE" must report SHE, HERS, HIS
//    and SHE again, using forward and failure edges.
// Each mechanism is counted and a count of zero is a failure.
module tb_lp_bist_top;
  import bist_pkg::*;
  logic clk = 1'b0;
  logic rst;

  logic [5:0] mif_addr;
  logic       mif_read, mif_write, mif_shift, mif_sin, mif_bist_mode;
  logic [7:0] mif_data_out;
  logic       mif_sout;
  logic       mbl_test_pass, mbl_test_fail, mbp_test_pass, mbp_test_fail;
  logic       rbl_test_pass, rbl_test_fail, rbp_test_pass, rbp_test_fail;
  logic [7:0] mbp_seed, rbp_seed;
  logic       rwc_mem, rwc_rw, rwc_ready, rwc_we_n, rwc_oe_n, rwc_tri_n;
  logic [5:0] rwc_addr, rwc_ad;
  logic [7:0] rwc_data_f2s, rwc_data_s2f_r, rwc_dio_out, rwc_dio_in;
  logic       dfa_ch_valid, dfa_match;
  logic [7:0] dfa_ch;
  dfa_state_e dfa_state;
  match_e     dfa_match_id;
  int         mem_writes, mem_violations;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_write_through = 0, n_func_read = 0, n_scan = 0;
  int n_mbl_pass = 0, n_mbp_pass = 0, n_rbl_pass = 0, n_rbp_pass = 0;
  int n_rwc_write = 0, n_rwc_read = 0;
  int n_she = 0, n_hers = 0, n_his = 0, n_fail_edge = 0;
  int cycle = 0;
  bit running = 1'b0;

  lp_bist_top dut (.*);

  async_mem_model u_ext_mem (
    .clk(clk), .rst(rst), .ad(rwc_ad), .we_n(rwc_we_n), .oe_n(rwc_oe_n), .tri_n(rwc_tri_n),
    .din(rwc_dio_out), .dout(rwc_dio_in), .n_writes(mem_writes), .n_violations(mem_violations)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BIST flag monitors, sampled mid-cycle. cycle counts clocks after reset.
  always @(posedge clk) if (!rst && running) cycle++;

  always @(negedge clk) begin
    if (running && cycle > 0) begin
      bit ram_exp;
      ram_exp = (cycle >= 66) && (((cycle - 2) % 128) >= 64);
      check(mbl_test_pass && !mbl_test_fail, $sformatf("multiplier BIST (LFSR) cycle %0d", cycle));
      check(mbp_test_pass && !mbp_test_fail, $sformatf("multiplier BIST (LP-LFSR) cycle %0d", cycle));
      check(rbl_test_pass == ram_exp && !rbl_test_fail, $sformatf("RAM BIST (LFSR) cycle %0d", cycle));
      check(rbp_test_pass == ram_exp && !rbp_test_fail, $sformatf("RAM BIST (LP-LFSR) cycle %0d", cycle));
      n_mbl_pass += int'(mbl_test_pass);
      n_mbp_pass += int'(mbp_test_pass);
      n_rbl_pass += int'(rbl_test_pass);
      n_rbp_pass += int'(rbp_test_pass);
    end
  end

  task automatic mif_idle();
    mif_read = 1'b0; mif_write = 1'b0; mif_shift = 1'b0; mif_sin = 1'b0; mif_bist_mode = 1'b0;
  endtask

  task automatic run_mem_if();
    logic [7:0]  byte_in;
    logic [15:0] bits;
    for (int w = 0; w < 4; w++) begin
      byte_in = 8'(8'h3A + 8'(w * 71));
      for (int b = 7; b >= 0; b--) begin
        mif_idle(); mif_shift = 1'b1; mif_sin = byte_in[b];
        if (b == 0) begin mif_write = 1'b1; mif_bist_mode = 1'b1; mif_addr = 6'(10 + w); end
        @(negedge clk);
      end
      mif_idle();
      repeat (2) @(negedge clk);
      check(mif_data_out == byte_in, $sformatf("write-through %02h want %02h", mif_data_out, byte_in));
      n_write_through += int'(mif_data_out == byte_in);
    end
    for (int w = 0; w < 4; w++) begin
      byte_in = 8'(8'h3A + 8'(w * 71));
      mif_idle(); mif_read = 1'b1; mif_addr = 6'(10 + w);
      @(negedge clk);
      mif_idle();
      repeat (2) @(negedge clk);
      check(mif_data_out == byte_in, $sformatf("functional read %02h want %02h", mif_data_out, byte_in));
      n_func_read += int'(mif_data_out == byte_in);
    end
    bits = 16'h5A3C;
    for (int c = 0; c < 31; c++) begin
      mif_idle(); mif_shift = 1'b1; mif_sin = (c < 16) ? bits[15 - c] : 1'b0;
      @(negedge clk);
      if (c >= 15) begin
        check(mif_sout == bits[30 - c], $sformatf("scan bit %0d", c - 15));
        n_scan += int'(mif_sout == bits[30 - c]);
      end
    end
    mif_idle();
  endtask

  task automatic run_rw_ctrl();
    logic [7:0] ref_mem [20];
    for (int i = 0; i < 40; i++) begin
      bit rd = (i >= 20);
      int a = i % 20;
      rwc_mem = 1'b1; rwc_rw = rd; rwc_addr = 6'(a);
      rwc_data_f2s = 8'(a * 13 + 5);
      if (!rd) ref_mem[a] = rwc_data_f2s;
      @(negedge clk);
      rwc_mem = 1'b0;
      while (!rwc_ready) @(negedge clk);
      if (rd) begin
        check(rwc_data_s2f_r == ref_mem[a], $sformatf("controller read %0d", a));
        n_rwc_read += int'(rwc_data_s2f_r == ref_mem[a]);
      end else begin
        n_rwc_write++;
      end
    end
    check(mem_writes == 20 && mem_violations == 0, "external memory bus activity");
  endtask

  task automatic run_dfa();
    string text = "SHERSXHISHE";
    for (int i = 0; i < text.len(); i++) begin
      dfa_state_e prev_state;
      prev_state = dfa_state;
      dfa_ch_valid = 1'b1; dfa_ch = text[i];
      @(negedge clk);
      // "SH" + 'E' is forward; "SHE" + 'R' -> HER, "HIS" + 'H' -> SH, HERS+'X' are failure edges.
      if ((prev_state == DFA_S3 && dfa_state == DFA_S6) || (prev_state == DFA_S9 && dfa_state == DFA_S2))
        n_fail_edge++;
      case (dfa_match_id)
        MATCH_SHE:  n_she++;
        MATCH_HERS: n_hers++;
        MATCH_HIS:  n_his++;
        default: ;
      endcase
    end
    dfa_ch_valid = 1'b0;
    check(n_she == 2 && n_hers == 1 && n_his == 1, "string matches");
  endtask

  initial begin
    rst = 1'b1;
    mif_idle(); mif_addr = '0;
    mbp_seed = 8'h9D; rbp_seed = 8'h27;
    rwc_mem = 1'b0; rwc_rw = 1'b0; rwc_addr = '0; rwc_data_f2s = '0;
    dfa_ch_valid = 1'b0; dfa_ch = 8'h00;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    running = 1'b1;  // cycle counts clock edges from here
    fork
      run_mem_if();
      run_rw_ctrl();
      run_dfa();
    join
    while (cycle < 3 * 128 + 2) @(negedge clk);
    running = 1'b0;
    check(n_write_through == 4, "write-through count");
    check(n_func_read == 4, "functional read count");
    check(n_scan == 16, "scan chain count");
    check(n_mbl_pass > 0 && n_mbp_pass > 0, "multiplier BIST passes");
    check(n_rbl_pass == 3 * 64 && n_rbp_pass == 3 * 64, "RAM BIST compare count");
    check(n_rwc_write == 20 && n_rwc_read == 20, "controller accesses");
    check(n_fail_edge >= 2, "DFA failure edges");
    $display("write-through=%0d func-read=%0d scan=%0d mbl=%0d mbp=%0d rbl=%0d rbp=%0d rwc-w=%0d rwc-r=%0d she=%0d hers=%0d his=%0d fail-edges=%0d",
             n_write_through, n_func_read, n_scan, n_mbl_pass, n_mbp_pass, n_rbl_pass, n_rbp_pass,
             n_rwc_write, n_rwc_read, n_she, n_hers, n_his, n_fail_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
