// tb_ram_bist_ctrl - self-checking test of the RAM BIST sequencer: over
// three rounds the address must count 0..63 in every pass, the passes must
// alternate write (rw = 0) and read (rw = 1) every 64 cycles, and
// cmp_valid must follow the read pass by one cycle.
module tb_ram_bist_ctrl;
  logic       clk = 1'b0;
  logic       rst;
  logic       en, rw, cmp_valid, read_pass;
  logic [5:0] addr;
  int checks = 0, failures = 0;

  ram_bist_ctrl dut (.clk(clk), .rst(rst), .en(en), .rw(rw), .addr(addr),
                     .cmp_valid(cmp_valid), .read_pass(read_pass));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_rw, exp_valid;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (en) begin failures++; $display("FAIL: enabled during reset"); end
    rst = 1'b0;
    #1;
    for (int k = 0; k < 384; k++) begin
      exp_rw    = ((k / 64) % 2) == 1;
      exp_valid = (k >= 65) && ((((k - 1) / 64) % 2) == 1);
      checks++;
      if (!en || rw != exp_rw || addr != 6'(k % 64) || cmp_valid != exp_valid || read_pass != exp_rw) begin
        failures++;
        $display("FAIL: cycle %0d en=%b rw=%b addr=%0d valid=%b", k, en, rw, addr, cmp_valid);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
