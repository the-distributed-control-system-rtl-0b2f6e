// tb_primary_station: the Primary station at its default parameters through one
// 15-Hz cycle. The test plays the link-driver processor (interrupt handlers),
// the Primary console processor, the link controller and the core memory:
//  - timer channel 0, synchronised to the 15-Hz trigger, fires 10 ms into the
//    cycle ("poll indexes" time) and the handler sends an 8-byte poll frame by
//    transmit DMA; the frame's bytes are checked as the link controller takes
//    them at the 1 MHz rate, and the start time is checked;
//  - the loop answers with a 10-byte response, which receive DMA stores in core
//    memory; at frame end (level 6) the handler checks it and alerts the console
//    processor through its attention interrupt;
//  - the console processor answers with an attention request of its own (a Host
//    command), which reaches the link driver at level 1.
// Every handler checks it is served at the highest pending level; each mechanism
// is counted and must occur.
module tb_primary_station;
  import linac_pkg::*;
  localparam int US = 8, BYTE_CLK = 64;
  localparam logic [20:0] LV = PRI_IRQ_LEVELS;
  localparam logic [15:0] TMR = 16'h0C00, IRQ = 16'h1000, ATT = 16'h1400;

  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata, ccpu_wdata = 0, ccpu_rdata;
  logic        cpu_we = 0, ccpu_we = 0, ccpu_attn;
  logic [2:0]  ipl, irq_vector;
  logic        trig_15hz = 0;
  logic        adlc_irq = 0, adlc_rx_valid = 0, adlc_tx_valid, adlc_tx_take = 0;
  logic [7:0]  adlc_rx_data = 0, adlc_tx_data;
  logic        mem_req, mem_we, mem_ack, bus_hold = 0;
  logic [14:0] mem_addr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic        con_txd, con_rxd = 1, char_tick = 0;
  logic        vid_valid, vid_hsync, vid_vsync;
  logic [3:0]  vid_row, vid_line;
  logic [4:0]  vid_col;
  logic [7:0]  vid_char;

  int checks = 0, failures = 0;
  int n_poll_tx = 0, n_resp_rx = 0, n_attn_to_con = 0, n_attn_to_link = 0, n_15hz = 0,
      n_link_irq = 0, n_sched = 0;
  longint cyc = 0, t_sync = 0, t_poll = 0;
  logic [7:0] tx_got[$];
  logic [7:0] resp [10];

  primary_station dut (.*);
  core_mem_model #(.AW(15), .MAX_WAIT(3)) mem (
    .clk, .bus_hold, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack);

  always #62.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_we = 1; @(negedge clk); cpu_we = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); cpu_addr = a; #1; d = cpu_rdata;
  endtask
  function automatic logic [15:0] COMM(input logic [5:0] off); return {6'h00, 4'b1000, off}; endfunction

  initial begin
    #(40ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1ms);
    @(negedge clk); trig_15hz = 1; t_sync = cyc; @(negedge clk); trig_15hz = 0;
  end

  // link controller and the rest of the loop
  initial begin
    foreach (resp[i]) resp[i] = 8'(8'h40 + i * 9);
    forever begin
      repeat (BYTE_CLK) @(negedge clk);
      if (adlc_tx_valid) begin
        tx_got.push_back(adlc_tx_data);
        adlc_tx_take = 1; @(negedge clk); adlc_tx_take = 0;
        if (tx_got.size() == 8) begin
          // the poll has gone round; a Secondary's response comes back
          #(200us);
          foreach (resp[i]) begin
            @(negedge clk); adlc_rx_valid = 1; adlc_rx_data = resp[i];
            @(negedge clk); adlc_rx_valid = 0;
            repeat (BYTE_CLK - 2) @(negedge clk);
          end
          #(20us);
          @(negedge clk); adlc_irq = 1; #(2us); @(negedge clk); adlc_irq = 0;
        end
      end
    end
  end

  // Primary console processor: answers an attention with a Host command
  initial begin
    wait (rst_n);
    @(posedge ccpu_attn);
    n_attn_to_con++;
    #(50us);
    @(negedge clk); check(ccpu_rdata[0] == 1, "console sees its attention flag");
    ccpu_wdata = 8'h03; ccpu_we = 1; @(negedge clk); ccpu_we = 0;   // clear own, alert link driver
    #1; check(!ccpu_attn, "console attention cleared");
  end

  // link-driver processor
  logic [7:0] v, pend, st;
  int lv, maxlv;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) mem.mem[16'h0200 + i] = 8'(8'hA0 + i);   // poll message
    wr(TMR + 0, 8'(10000)); wr(TMR + 1, 8'(10000 >> 8)); wr(TMR + 2, 8'b100);
    wr(COMM(CR_RX_BASE_L), 8'h00); wr(COMM(CR_RX_BASE_H), 8'h03);
    wr(COMM(CR_RX_LIM_L), 8'd10);  wr(COMM(CR_RX_LIM_H), 8'h00);
    wr(COMM(CR_RX_CTRL), 8'h01);
    while (cyc < 25 * 1000 * US) begin
      @(negedge clk);
      if (ipl == 0) continue;
      @(negedge clk);
      cpu_addr = IRQ + 0; #1; pend = cpu_rdata;
      cpu_addr = IRQ + 2; #1; st   = cpu_rdata;
      maxlv = 0;
      for (int i = 0; i < PRI_NIRQ; i++) if (pend[i] && int'(LV[i*3 +: 3]) > maxlv) maxlv = LV[i*3 +: 3];
      lv = LV[st[7:5]*3 +: 3];
      check(int'(st[2:0]) == lv && lv == maxlv, "served at the highest pending level");
      unique case (pri_irq_src_e'(st[7:5]))
        PIRQ_15HZ: n_15hz++;
        PIRQ_TIMER_0: begin
          n_sched++;
          wr(TMR + 3, 8'h01);
          t_poll = cyc;
          check(cyc - t_sync >= 10000 * US && cyc - t_sync <= 10000 * US + 30 * US, "poll at 10 ms");
          wr(COMM(CR_TX_BASE_L), 8'h00); wr(COMM(CR_TX_BASE_H), 8'h02);
          wr(COMM(CR_TX_LEN_L), 8'd8);   wr(COMM(CR_TX_LEN_H), 8'h00);
          wr(COMM(CR_TX_CTRL), 8'h01);
          n_poll_tx++;
        end
        PIRQ_LINK_DMA: begin n_link_irq++; wr(COMM(CR_IRQ_CLR), 8'h01); end
        PIRQ_ADLC: begin
          n_resp_rx++;
          rd(COMM(CR_RX_CNT_L), v); check(v == 10, "response length");
          for (int i = 0; i < 10; i++) check(mem.mem[16'h0300 + i] == resp[i], "response byte");
          wr(ATT, 8'h01);                         // tell the Primary console
        end
        PIRQ_ATTN: begin
          n_attn_to_link++;
          rd(ATT, v); check(v[0] == 1, "link driver sees attention");
          wr(ATT, 8'h02);
          rd(ATT, v); check(v[0] == 0, "attention cleared");
        end
        default: check(0, "unexpected interrupt source");
      endcase
      wr(IRQ + 0, 8'(1) << st[7:5]);
    end
    check(tx_got.size() == 8, "poll frame length");
    for (int i = 0; i < 8 && i < tx_got.size(); i++) check(tx_got[i] == 8'(8'hA0 + i), "poll byte");
    $display("mechanisms: 15Hz=%0d sched=%0d poll_tx=%0d link_irq=%0d resp_rx=%0d attn_to_con=%0d attn_to_link=%0d",
             n_15hz, n_sched, n_poll_tx, n_link_irq, n_resp_rx, n_attn_to_con, n_attn_to_link);
    check(n_15hz == 1 && n_sched == 1 && n_poll_tx == 1 && n_link_irq >= 2 && n_resp_rx == 1 &&
          n_attn_to_con == 1 && n_attn_to_link == 1, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
