// tb_console_panel: plays the communications card. Sends light-byte pairs to
// the console end, checks the lamp outputs, and decodes the four reply bytes:
// switch status, the keyboard byte (bit 7 = new key, cleared after being sent
// once) and the knob count after a number of encoder steps either way.
module tb_console_panel;
  localparam int CLK_HZ = 48000, BAUD = 4800, DIV = CLK_HZ / BAUD;
  logic clk = 0, rst_n = 0;
  logic rxd = 1, txd, kbd_strobe = 0, knob_a = 0, knob_b = 0;
  logic [15:0] lights, switches = 0;
  logic [6:0] kbd_data = 0;
  int checks = 0, failures = 0;
  int knob_model = 0;

  console_panel #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put_byte(input logic [7:0] b);
    rxd = 0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(posedge clk); end
    rxd = 1;
    repeat (DIV) @(posedge clk);
  endtask

  task automatic get_byte(output logic [7:0] b);
    @(negedge txd);
    repeat (DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = txd; end
    repeat (DIV) @(posedge clk);
    check(txd == 1, "stop bit");
  endtask

  task automatic turn(input int steps);   // positive = clockwise
    for (int i = 0; i < (steps < 0 ? -steps : steps); i++) begin
      // clockwise: A leads B; counter-clockwise: B leads A
      if (steps > 0) begin
        knob_a = 1; repeat (3) @(posedge clk); knob_b = 1; repeat (3) @(posedge clk);
        knob_a = 0; repeat (3) @(posedge clk); knob_b = 0; repeat (3) @(posedge clk);
      end else begin
        knob_b = 1; repeat (3) @(posedge clk); knob_a = 1; repeat (3) @(posedge clk);
        knob_b = 0; repeat (3) @(posedge clk); knob_a = 0; repeat (3) @(posedge clk);
      end
    end
    knob_model += steps;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r [4];
    logic [15:0] lt;
    logic [6:0] key;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      lt = 16'($urandom);
      switches = 16'($urandom);
      turn((k % 2 == 0) ? 5 + k : -(3 + k));
      if (k != 2) begin
        key = 7'($urandom);
        @(negedge clk); kbd_data = key; kbd_strobe = 1; @(negedge clk); kbd_strobe = 0;
      end
      fork
        begin put_byte(lt[7:0]); put_byte(lt[15:8]); end
        begin foreach (r[i]) get_byte(r[i]); end
      join
      check(lights == lt, "lamp outputs");
      check({r[1], r[0]} == switches, "switch bytes");
      if (k != 2) check(r[2] == {1'b1, key}, "new key flagged");
      else        check(r[2] == 8'h00, "no new key");
      check(r[3] == 8'(knob_model), $sformatf("knob %0d vs %0d", r[3], 8'(knob_model)));
    end
    // a lone byte followed by a long pause is forgotten
    put_byte(8'hAA);
    repeat (25 * DIV) @(posedge clk);
    lt = 16'h1234;
    fork
      begin put_byte(lt[7:0]); put_byte(lt[15:8]); end
      begin foreach (r[i]) get_byte(r[i]); end
    join
    check(lights == 16'h1234, "pairing restarts after a pause");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
