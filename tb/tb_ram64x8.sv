// tb_ram64x8 - self-checking test of the single-port 64 x 8 RAM.
//
// After reset every word must read 0. Then random reads and writes (with
// idle cycles) are checked against a reference array, including one write
// to every address, so that every row and column line of the decoders is
// used. Read data appear in the cycle after the read and hold otherwise.
module tb_ram64x8;
  logic       clk = 1'b0;
  logic       rst, en, rw;
  logic [5:0] addr;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  ram64x8 dut (.clk(clk), .rst(rst), .en(en), .rw(rw), .addr(addr), .din(din), .dout(dout));

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
    logic [7:0] ref_out;
    rst = 1'b1; en = 1'b0; rw = 1'b1; addr = '0; din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (ref_mem[a]) ref_mem[a] = 8'h00;
    ref_out = 8'h00;
    // Read-after-reset: all cells cleared.
    for (int a = 0; a < 64; a++) begin
      en = 1'b1; rw = 1'b1; addr = 6'(a);
      @(negedge clk);
      check(dout == 8'h00, $sformatf("addr %0d not cleared: %02h", a, dout));
    end
    // Write every address with a distinct value, then read them back.
    for (int a = 0; a < 64; a++) begin
      en = 1'b1; rw = 1'b0; addr = 6'(a); din = 8'(a * 37 + 11);
      ref_mem[a] = din;
      @(negedge clk);
      check(dout == 8'h00, "dout changed on write");
    end
    for (int a = 63; a >= 0; a--) begin
      en = 1'b1; rw = 1'b1; addr = 6'(a);
      @(negedge clk);
      check(dout == ref_mem[a], $sformatf("addr %0d read %02h want %02h", a, dout, ref_mem[a]));
    end
    ref_out = ref_mem[0];
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 4) != 0); rw = 1'($urandom); addr = 6'($urandom); din = 8'($urandom);
      if (en && rw)  ref_out = ref_mem[addr];
      if (en && !rw) ref_mem[addr] = din;
      @(negedge clk);
      check(dout == ref_out, $sformatf("step %0d dout %02h want %02h", i, dout, ref_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
