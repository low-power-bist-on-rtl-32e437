// tb_mem_subarray - self-checking test of the sub-array: all addresses are
// written first, then random writes, reads and same-cycle write+read are
// checked against a reference array; a same-cycle access must return the
// write data.
module tb_mem_subarray;
  logic       clk = 1'b0;
  logic       rst, we, re;
  logic [5:0] addr;
  logic [7:0] din, dout;
  int checks = 0, failures = 0, n_through = 0;

  mem_subarray dut (.clk(clk), .rst(rst), .we(we), .re(re), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref_mem [64];
    logic [7:0] ref_out;
    rst = 1'b1; we = 1'b0; re = 1'b0; addr = '0; din = '0;
    @(negedge clk);
    rst = 1'b0;
    ref_out = 8'h00;
    checks++;
    if (dout != 8'h00) begin failures++; $display("FAIL: reset"); end
    for (int a = 0; a < 64; a++) begin
      we = 1'b1; re = 1'b0; addr = 6'(a); din = 8'($urandom);
      ref_mem[a] = din;
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); re = 1'($urandom); addr = 6'($urandom); din = 8'($urandom);
      if (re) ref_out = we ? din : ref_mem[addr];
      if (we && re) n_through++;
      if (we) ref_mem[addr] = din;
      @(negedge clk);
      checks++;
      if (dout != ref_out) begin
        failures++;
        $display("FAIL: step %0d dout=%02h want %02h", i, dout, ref_out);
      end
    end
    checks++;
    if (n_through == 0) begin failures++; $display("FAIL: no write-through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
