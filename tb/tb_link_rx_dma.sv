// tb_link_rx_dma: feeds bytes through a modelled FIFO read side into the receive
// DMA channel, with a memory that makes each transfer wait a random time.
// Checks every stored byte and its address, the byte count, that the channel
// stops at its limit without taking further bytes, and re-arming.
module tb_link_rx_dma;
  localparam int AW = 15;
  logic clk = 0, rst_n = 0;
  logic arm = 0, busy, done, fifo_empty, fifo_rd;
  logic [AW-1:0] base = 0;
  logic [15:0] limit = 0, count;
  logic [7:0] fifo_data;
  logic mem_req, mem_we, mem_ack;
  logic [AW-1:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic bus_hold = 0;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  logic [7:0] sent[$];

  link_rx_dma #(.AW(AW)) dut (.*);
  core_mem_model #(.AW(AW), .MAX_WAIT(5)) mem (.*);

  always #5 clk = ~clk;
  // FIFO outputs follow the queue; updated after every change, before the edge
  always @(negedge clk) begin
    fifo_empty = (q.size() == 0);
    fifo_data  = (q.size() == 0) ? 8'h00 : q[0];
  end
  always @(posedge clk) if (fifo_rd && q.size() > 0) void'(q.pop_front());

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_buffer(input int b, input int n);
    logic [7:0] before_end;
    sent.delete();
    before_end = mem.mem[b + n];
    @(negedge clk);
    base = AW'(b); limit = 16'(n); arm = 1;
    @(negedge clk);
    arm = 0;
    check(busy && !done && count == 0, "armed");
    for (int i = 0; i < n + 3; i++) begin
      logic [7:0] v = 8'($urandom);
      repeat ($urandom % 4) @(negedge clk);
      q.push_back(v);
      fifo_empty = 0;
      fifo_data  = q[0];
      sent.push_back(v);
    end
    wait (done);
    repeat (20) @(negedge clk);
    check(!busy && done, "done");
    check(count == 16'(n), "count");
    check(q.size() == 3, "stops at limit");
    for (int i = 0; i < n; i++) check(mem.mem[b + i] == sent[i], $sformatf("byte %0d", i));
    check(mem.mem[b + n] == before_end, "no write past limit");
    q.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    run_buffer(100, 40);
    run_buffer(2000, 7);
    run_buffer(32760, 5);    // address wraps at the top of 32K
    check(mem.waits > 5, "bus waits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
