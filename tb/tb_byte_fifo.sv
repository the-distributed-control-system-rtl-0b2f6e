// tb_byte_fifo: random pushes and pops against a queue reference model; checks
// data order, full/empty/level at every clock, that a write to a full FIFO is
// dropped and raises the overflow flag, and that clear_ovf clears it.
module tb_byte_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, clear_ovf = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic full, empty, overflow;
  logic [4:0] level;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  int n_full = 0, n_ovf = 0;
  bit exp_ovf = 0;
  bit was_full, was_empty;
  int pw;

  byte_fifo #(.DEPTH(DEPTH), .W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
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
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill-heavy, drain-heavy, mixed
      pw = (cyc % 1000 < 300) ? 80 : (cyc % 1000 < 600) ? 20 : 50;
      @(negedge clk);
      check(level == 5'(q.size()), "level");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) check(rd_data == q[0], "rd_data order");
      check(overflow == exp_ovf, "overflow flag");
      wr_en     = ($urandom % 100) < pw;
      rd_en     = ($urandom % 100) < (100 - pw);
      wr_data   = 8'($urandom);
      clear_ovf = ($urandom % 100) < 3;
      begin
        was_full  = (q.size() == DEPTH);
        was_empty = (q.size() == 0);
        @(posedge clk);
        #1;
        if (was_full) n_full++;
        if (rd_en && !was_empty) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(wr_data);
        if (wr_en && was_full) begin exp_ovf = 1; n_ovf++; end
        else if (clear_ovf) exp_ovf = 0;
      end
    end
    check(n_full > 10 && n_ovf > 3, "full and overflow both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
