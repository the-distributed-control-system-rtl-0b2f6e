// tb_irq_priority: random request pulses on the seven sources; after each burst
// the test computes the expected level (highest pending enabled) and vector
// (lowest source at that level) itself and compares, then services one request
// at a time as a handler would, also toggling the enable mask.
module tb_irq_priority;
  localparam logic [20:0] LV = {3'd1, 3'd2, 3'd2, 3'd2, 3'd4, 3'd6, 3'd6};
  logic clk = 0, rst_n = 0, we = 0;
  logic [6:0] src = 0;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [2:0] ipl, vector;
  logic [6:0] pend = 0, en = '1;
  int checks = 0, failures = 0;
  logic [6:0] p, c;

  irq_priority #(.NSRC(7), .LEVELS(LV)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1; @(negedge clk); we = 0;
  endtask

  task automatic expect_state();
    int lv = 0, vec = 0;
    for (int i = 0; i < 7; i++)
      if (pend[i] && en[i] && int'(LV[i*3 +: 3]) > lv) begin lv = LV[i*3 +: 3]; vec = i; end
    #1;
    check(ipl == 3'(lv), $sformatf("ipl %0d expected %0d", ipl, lv));
    if (lv != 0) check(vector == 3'(vec), "vector");
    addr = 2'd0; #1; check(rdata[6:0] == pend, "pending register");
    addr = 2'd2; #1; check(rdata == {vector, 2'b00, ipl}, "status register");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_state();
    for (int round = 0; round < 60; round++) begin
      p = 7'($urandom);
      @(negedge clk); src = p; @(negedge clk); src = 0;
      pend |= p;
      @(negedge clk);
      expect_state();
      if (round % 10 == 5) begin en = 7'($urandom); wr(2'd1, {1'b0, en}); expect_state(); end
      // a held request does not re-trigger after it is cleared
      while (ipl != 0) begin
        c = 7'(1) << vector;
        wr(2'd0, {1'b0, c});
        pend &= ~c;
        @(negedge clk);
        expect_state();
      end
      en = '1; wr(2'd1, 8'h7F);
      @(negedge clk);
      expect_state();
    end
    // level source held high: latched once only
    @(negedge clk); src = 7'b0000001;
    repeat (3) @(negedge clk);
    pend |= 7'b1;
    expect_state();
    wr(2'd0, 8'h01); pend &= ~7'b1;
    repeat (3) @(negedge clk);
    expect_state();
    src = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
