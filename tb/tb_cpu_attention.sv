// tb_cpu_attention: random register writes from both processors, including
// same-clock set and clear, against a model of the two attention flags; checks
// the flags and both read-back registers every clock.
module tb_cpu_attention;
  logic clk = 0, rst_n = 0, a_we = 0, b_we = 0, attn_a, attn_b;
  logic [7:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  bit ma = 0, mb = 0;
  int checks = 0, failures = 0, n_race = 0;

  cpu_attention dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(attn_a == ma && attn_b == mb, "flags");
      check(a_rdata == {6'd0, mb, ma} && b_rdata == {6'd0, ma, mb}, "read-back");
      a_we = ($urandom % 4) == 0; a_wdata = 8'($urandom);
      b_we = ($urandom % 4) == 0; b_wdata = 8'($urandom);
      @(posedge clk); #1;
      if (b_we && b_wdata[0] && a_we && a_wdata[1]) n_race++;
      if (b_we && b_wdata[0]) ma = 1; else if (a_we && a_wdata[1]) ma = 0;
      if (a_we && a_wdata[0]) mb = 1; else if (b_we && b_wdata[1]) mb = 0;
    end
    check(n_race > 0, "set/clear race exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
