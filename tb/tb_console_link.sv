// tb_console_link: plays the console at the other end of the serial line. For
// each exchange it decodes the two light bytes the card sends (checking the bit
// time and order), answers with four random bytes, and checks what the card
// latched, the done flag and clear. A second exchange goes unanswered to check
// the timeout. Clock and baud are scaled to 10 clocks per bit.
module tb_console_link;
  localparam int CLK_HZ = 48000, BAUD = 4800, DIV = CLK_HZ / BAUD;
  logic clk = 0, rst_n = 0;
  logic start = 0, clear = 0, busy, done, timeout, txd, rxd = 1;
  logic [15:0] lights = 0, switches;
  logic [7:0] kbd, knob;
  int checks = 0, failures = 0;

  console_link #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .TIMEOUT_BYTES(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic get_byte(output logic [7:0] b);
    @(negedge txd);
    repeat (DIV / 2) @(posedge clk);
    check(txd == 0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(posedge clk);
      b[i] = txd;
    end
    repeat (DIV) @(posedge clk);
    check(txd == 1, "stop bit");
  endtask

  task automatic put_byte(input logic [7:0] b);
    rxd = 0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (DIV) @(posedge clk);
    end
    rxd = 1;
    repeat (DIV) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b0, b1;
    logic [7:0] r [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      lights = 16'($urandom);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      check(busy && !done, "busy after start");
      get_byte(b0);
      get_byte(b1);
      check({b1, b0} == lights, "light bytes, low first");
      for (int i = 0; i < 4; i++) r[i] = 8'($urandom);
      repeat (DIV * 2) @(posedge clk);
      check(!done, "not done before reply");
      foreach (r[i]) put_byte(r[i]);
      repeat (4) @(posedge clk);
      check(done && !busy && !timeout, "done after four bytes");
      check(switches == {r[1], r[0]}, "switches");
      check(kbd == r[2], "keyboard byte");
      check(knob == r[3], "knob byte");
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(!done, "done cleared");
    end
    // unanswered exchange: timeout after eight character times
    begin
      logic [15:0] sw_old;
      int t0;
      sw_old = switches;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      get_byte(b0);
      get_byte(b1);
      t0 = 0;
      while (!done && t0 < 200 * DIV) begin @(posedge clk); t0++; end
      check(done && timeout, "timeout flagged");
      check(t0 >= 79 * DIV && t0 <= 81 * DIV + 5, $sformatf("timeout after 8 characters (%0d clocks)", t0));
      check(switches == sw_old, "old values kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
