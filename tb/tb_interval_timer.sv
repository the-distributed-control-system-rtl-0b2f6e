// tb_interval_timer: at the default 8 MHz clock and 1 us tick. Channel 0 runs
// periodic at 6667 us (the 150-Hz stepping-motor interrupt); channel 1 is a
// one-shot restarted by a 15-Hz reference (66667 us period) and reloaded by the
// test after each interrupt to place events at 10, 15, 36, 41 and 51 ms into
// the cycle, as the Primary's poll schedule does. Checks every interrupt time to
// within one tick, one-shot stop, flag clearing and register read-back.
module tb_interval_timer;
  localparam int CLK_HZ = 8_000_000, US = 8;   // clocks per microsecond
  logic clk = 0, rst_n = 0, we = 0, sync = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [2:0] irq;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t_sync, last0 = -1;
  int n0 = 0, n_sched = 0;
  int d;

  interval_timer #(.CLK_HZ(CLK_HZ), .CHANNELS(3)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1; @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 150-Hz channel: measure periods; clear flag each time
  initial begin
    forever begin
      @(posedge clk);
      if (irq[0]) begin
        if (last0 >= 0) begin
          check(cyc - last0 >= 6667 * US - US && cyc - last0 <= 6667 * US + US,
                $sformatf("150-Hz period %0d clocks", cyc - last0));
        end
        last0 = cyc;
        n0++;
        @(negedge clk); addr = 4'd3; wdata = 8'h01; we = 1; @(negedge clk); we = 0;
      end
    end
  end

  initial begin
    int sched [5] = '{10000, 15000, 36000, 41000, 51000};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // channel 0: 6667 us periodic
    wr(4'd0, 8'(6667)); wr(4'd1, 8'(6667 >> 8)); wr(4'd2, 8'b011);
    // channel 1: one-shot, sync start, first event 10 ms
    wr(4'd4, 8'(10000)); wr(4'd5, 8'(10000 >> 8)); wr(4'd6, 8'b100);
    addr = 4'd6; #1; check(rdata == 8'b100, "control read-back");
    repeat (2) begin
      @(negedge clk); sync = 1; t_sync = cyc; @(negedge clk); sync = 0;
      for (int e = 0; e < 5; e++) begin
        wait (irq[1]);
        check(cyc - t_sync >= longint'(sched[e]) * US - US && cyc - t_sync <= longint'(sched[e]) * US + 3 * US,
              $sformatf("event %0d at %0d us", e, (cyc - t_sync) / US));
        n_sched++;
        wr(4'd7, 8'h01);                       // clear the flag
        addr = 4'd7; #1; check(rdata[1] == 0, "one-shot stopped");
        if (e < 4) begin
          d = sched[e + 1] - sched[e] - int'((cyc - t_sync) / US - sched[e]);
          wr(4'd4, 8'(d)); wr(4'd5, 8'(d >> 8)); wr(4'd6, 8'b101);
          // reset reload for the next cycle's sync start
        end
      end
      wr(4'd4, 8'(10000)); wr(4'd5, 8'(10000 >> 8)); wr(4'd6, 8'b100);
      while (cyc - t_sync < 66667 * US) @(posedge clk);
    end
    check(n0 >= 15, "150-Hz interrupts seen");
    check(n_sched == 10, "poll schedule events");
    check(irq[2] == 0, "idle channel quiet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
