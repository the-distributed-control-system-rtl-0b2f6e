// tb_knob_counter: turns a modelled quadrature encoder by random amounts in both
// directions, with contact bounce-free edges at random spacing, and checks the
// count (modulo 256) against the net number of steps, including wrap-around.
module tb_knob_counter;
  logic clk = 0, rst_n = 0, enc_a = 0, enc_b = 0;
  logic [7:0] count;
  bit cw;
  int n;
  int checks = 0, failures = 0, pos = 0, ups = 0, downs = 0;

  knob_counter #(.W(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic step(input bit cw);
    int d = 2 + ($urandom % 4);
    if (cw) begin
      enc_a = 1; repeat (d) @(posedge clk); enc_b = 1; repeat (d) @(posedge clk);
      enc_a = 0; repeat (d) @(posedge clk); enc_b = 0; repeat (d) @(posedge clk);
      pos++; ups++;
    end else begin
      enc_b = 1; repeat (d) @(posedge clk); enc_a = 1; repeat (d) @(posedge clk);
      enc_b = 0; repeat (d) @(posedge clk); enc_a = 0; repeat (d) @(posedge clk);
      pos--; downs++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(count == 0, "zero after reset");
    for (int k = 0; k < 40; k++) begin
      cw = $urandom % 2;
      n = 1 + $urandom % 30;
      for (int i = 0; i < n; i++) step(cw);
      repeat (4) @(posedge clk);
      check(count == 8'(pos), $sformatf("count %0d expected %0d", count, 8'(pos)));
    end
    for (int i = 0; i < 300; i++) step(1);   // wrap upward
    repeat (4) @(posedge clk);
    check(count == 8'(pos), "wrap");
    check(ups > 0 && downs > 0, "both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
