// tb_link_tx_dma: the transmit DMA channel reads messages out of a modelled core
// memory (random bus waits) into a modelled FIFO that a link-side consumer drains
// slowly, so the FIFO fills and the channel has to hold a byte. Checks the byte
// stream, the length, done/busy and a zero-length start.
module tb_link_tx_dma;
  localparam int AW = 15, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, fifo_full, fifo_wr;
  logic [AW-1:0] base = 0;
  logic [15:0] length = 0;
  logic [7:0] fifo_data;
  logic mem_req, mem_we, mem_ack;
  logic [AW-1:0] mem_addr;
  logic [7:0] mem_wdata = 0, mem_rdata;
  logic bus_hold = 0;
  int checks = 0, failures = 0, full_cycles = 0;
  logic [7:0] q[$], got[$];
  bit drain = 1;

  link_tx_dma #(.AW(AW)) dut (.*);
  core_mem_model #(.AW(AW), .MAX_WAIT(3)) mem (.*);

  always #5 clk = ~clk;
  always @(negedge clk) fifo_full = (q.size() == DEPTH);
  always @(posedge clk) begin
    if (fifo_full) full_cycles++;
    if (drain && q.size() > 0 && ($urandom % 16) == 0) got.push_back(q.pop_front());
    if (fifo_wr) begin
      if (q.size() >= DEPTH) begin failures++; $display("FAIL write to full FIFO"); end
      q.push_back(fifo_data);
    end
  end

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

  task automatic send(input int b, input int n);
    got.delete();
    @(negedge clk);
    base = AW'(b); length = 16'(n); start = 1;
    @(negedge clk);
    start = 0;
    if (n > 0) check(busy && !done, "busy after start");
    wait (done);
    wait (q.size() == 0);
    repeat (5) @(negedge clk);
    check(!busy, "not busy at end");
    check(got.size() == n, $sformatf("length %0d got %0d", n, got.size()));
    for (int i = 0; i < n && i < got.size(); i++)
      check(got[i] == mem.mem[(b + i) % (2**AW)], $sformatf("byte %0d", i));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(300, 50);
    send(5000, 1);
    send(10, 0);
    check(done && !busy, "zero length completes at once");
    send(32766, 4);
    check(full_cycles > 10, "FIFO full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
