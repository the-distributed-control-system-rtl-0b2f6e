// tb_cpu_parallel_io: the processor card's four parallel I/O bytes. Random
// direction masks; checks pins, output enables, read-back and input reads.
module tb_cpu_parallel_io;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [31:0] pin_in = 0, pin_out;
  logic [3:0] byte_oe, dir;
  logic [7:0] model [4];
  int checks = 0, failures = 0;

  cpu_parallel_io #(.NBYTES(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1; @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(byte_oe == 4'b0000, "inputs after reset");
    for (int round = 0; round < 30; round++) begin
      dir = 4'($urandom);
      wr(3'd4, {4'd0, dir});
      for (int i = 0; i < 4; i++) begin model[i] = 8'($urandom); wr(3'(i), model[i]); end
      pin_in = $urandom;
      @(negedge clk);
      check(byte_oe == dir, "output enables");
      for (int i = 0; i < 4; i++) begin
        addr = 3'(i); #1;
        check(pin_out[i*8 +: 8] == model[i], "pin_out");
        check(rdata == (dir[i] ? model[i] : pin_in[i*8 +: 8]), $sformatf("read byte %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
