// tb_binary_io_card: random direction settings for the nine bytes; checks that
// output bytes drive their connector group at the right position and read back
// as written whatever the pins carry, that input bytes read the pins, and that
// the output enables follow the direction bits.
module tb_binary_io_card;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [23:0] pin_in [3], pin_out [3];
  logic [2:0]  pin_oe [3];
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  logic [7:0] model [9];
  logic [8:0] dir;
  int g, k;

  binary_io_card #(.GROUPS(3), .BYTES_PER_GROUP(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1; @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (pin_in[g]) pin_in[g] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (pin_oe[g]) check(pin_oe[g] == 3'b000, "all inputs after reset");
    for (int round = 0; round < 30; round++) begin
      dir = 9'($urandom);
      wr(5'h10, dir[7:0]);
      wr(5'h11, {7'd0, dir[8]});
      for (int i = 0; i < 9; i++) begin
        model[i] = 8'($urandom);
        wr(5'(i), model[i]);
      end
      foreach (pin_in[g]) pin_in[g] = 24'($urandom);
      @(negedge clk);
      for (int i = 0; i < 9; i++) begin
        g = i / 3; k = i % 3;
        addr = 5'(i);
        #1;
        check(pin_oe[g][k] == dir[i], $sformatf("oe byte %0d", i));
        check(pin_out[g][k*8 +: 8] == model[i], $sformatf("pin_out byte %0d", i));
        if (dir[i]) begin
          check(rdata == model[i], $sformatf("read-back byte %0d", i)); n_out++;
        end else begin
          check(rdata == pin_in[g][k*8 +: 8], $sformatf("input byte %0d", i)); n_in++;
        end
      end
      addr = 5'h10; #1; check(rdata == dir[7:0], "direction readback");
      addr = 5'h11; #1; check(rdata[0] == dir[8], "direction readback 2");
    end
    check(n_in > 0 && n_out > 0, "both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
