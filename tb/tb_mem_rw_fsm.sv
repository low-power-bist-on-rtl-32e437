// tb_mem_rw_fsm - self-checking test of the memory read/write controller
// against a behavioural asynchronous memory.
//
// Random reads and writes are issued whenever ready is 1 (with random idle
// cycles). Each access must take exactly three cycles from the request to
// ready again; a write must show we_n low for one cycle and tri_n low for
// two; a read must show oe_n low for two cycles and return the word last
// written to that address (a reference array predicts it).
module tb_mem_rw_fsm;
  logic       clk = 1'b0;
  logic       rst, mem, rw;
  logic [5:0] addr, ad;
  logic [7:0] data_f2s, data_s2f_r, dio_out, dio_in;
  logic       ready, we_n, oe_n, tri_n;
  int         n_writes, n_violations;
  int checks = 0, failures = 0, n_rd = 0, n_wr = 0;

  mem_rw_fsm dut (
    .clk(clk), .rst(rst), .mem(mem), .rw(rw), .addr(addr), .data_f2s(data_f2s),
    .ready(ready), .data_s2f_r(data_s2f_r), .ad(ad), .we_n(we_n), .oe_n(oe_n),
    .tri_n(tri_n), .dio_out(dio_out), .dio_in(dio_in)
  );

  async_mem_model u_mem (
    .clk(clk), .rst(rst), .ad(ad), .we_n(we_n), .oe_n(oe_n), .tri_n(tri_n),
    .din(dio_out), .dout(dio_in), .n_writes(n_writes), .n_violations(n_violations)
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref_mem [64];
    int busy, n_we, n_oe, n_tri;
    bit is_read;
    logic [5:0] a;
    foreach (ref_mem[i]) ref_mem[i] = 8'h00;
    rst = 1'b1; mem = 1'b0; rw = 1'b0; addr = '0; data_f2s = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(ready && we_n && oe_n && tri_n, "idle outputs after reset");
    for (int i = 0; i < 600; i++) begin
      // Idle cycles, strobes must stay inactive.
      repeat ($urandom_range(0, 2)) begin
        mem = 1'b0; rw = 1'($urandom); addr = 6'($urandom);
        @(negedge clk);
        check(ready && we_n && oe_n && tri_n, "idle strobes");
      end
      is_read  = (i > 20) && ($urandom_range(0, 1) == 1);
      a        = 6'($urandom_range(0, 15));
      mem      = 1'b1;
      rw       = is_read;
      addr     = a;
      data_f2s = 8'($urandom);
      if (!is_read) ref_mem[a] = data_f2s;
      @(negedge clk);
      mem = 1'b0; addr = ~a; data_f2s = ~data_f2s;   // must have been registered
      busy = 0; n_we = 0; n_oe = 0; n_tri = 0;
      while (!ready && busy < 10) begin
        busy++;
        check(ad == a, "address register");
        n_we  += int'(!we_n);
        n_oe  += int'(!oe_n);
        n_tri += int'(!tri_n);
        @(negedge clk);
      end
      check(busy == 2, $sformatf("access %0d busy %0d cycles, want 2", i, busy));
      if (is_read) begin
        n_rd++;
        check(n_oe == 2 && n_we == 0 && n_tri == 0, "read strobes");
        check(data_s2f_r == ref_mem[a], $sformatf("read addr %0d got %02h want %02h", a, data_s2f_r, ref_mem[a]));
      end else begin
        n_wr++;
        check(n_we == 1 && n_tri == 2 && n_oe == 0, "write strobes");
      end
    end
    check(n_violations == 0, "bus violations seen by the memory");
    check(n_writes == n_wr, "memory write count");
    check(n_rd > 0 && n_wr > 0, "both kinds of access");
    $display("reads=%0d writes=%0d", n_rd, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
