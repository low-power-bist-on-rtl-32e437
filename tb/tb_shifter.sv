// tb_shifter - self-checking test of the 8-bit scan shifter: random mixes
// of parallel capture and serial shift against a reference register.
module tb_shifter;
  logic       clk = 1'b0;
  logic       rst, shift, si;
  logic [7:0] d, q;
  logic       so;
  int checks = 0, failures = 0;

  shifter #(.W(8)) dut (.clk(clk), .rst(rst), .shift(shift), .si(si), .d(d), .q(q), .so(so));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref_q;
    rst = 1'b1; shift = 1'b0; si = 1'b0; d = 8'h00;
    @(negedge clk);
    rst = 1'b0;
    ref_q = 8'h00;
    checks++;
    if (q != 8'h00) begin failures++; $display("FAIL: reset"); end
    for (int i = 0; i < 1000; i++) begin
      shift = ($urandom_range(0, 2) != 0);
      si    = 1'($urandom);
      d     = 8'($urandom);
      ref_q = shift ? {ref_q[6:0], si} : d;
      @(negedge clk);
      checks++;
      if (q != ref_q || so != ref_q[7]) begin
        failures++;
        $display("FAIL: step %0d q=%02h so=%b want %02h", i, q, so, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
