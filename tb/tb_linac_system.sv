// tb_linac_system: the Primary and a Secondary together through one 15-Hz
// cycle, at the top's default parameters. A behavioural loop stands in for the
// two MC6854 link controllers and the fiber line: it takes each station's
// transmit bytes at the 1 MHz byte rate (one per 8 us), delivers them to the
// other station's receive side and signals frame end there. The test plays both
// link-level processors and the Primary console processor:
//  1. The Primary's timer places its five polls at 10, 15, 36, 41 and 51 ms
//     after the 15-Hz trigger (a sync one-shot, re-armed after each poll for
//     the next); each poll is an 8-byte frame sent from core memory by
//     transmit DMA, its first byte the poll's number.
//  2. The Secondary receives each by DMA into its core memory while its bus is
//     held busy for 50 us (the FIFO bridges that), checks it, and answers with
//     the 9 binary I/O bytes it acquired at its own 15-Hz interrupt.
//  3. The Primary stores each answer by DMA, checks it against the Secondary's
//     connector inputs, and alerts its console processor (attention); the
//     console processor replies with an attention of its own. Both receive
//     channels are re-armed after each frame.
//  4. Meanwhile the Secondary's timer gives 150-Hz motor interrupts (each
//     puts out a 20 us pulse on a binary output, measured at the pin), a short
//     one-shot that lands while the 15-Hz handler runs, and starts a console
//     exchange at 4800 baud through the internal console line.
// Every handler checks that it is served at the highest pending level; each
// mechanism is counted and must occur at least once.
module tb_linac_system;
  import linac_pkg::*;
  localparam int US = 8, BYTE_CLK = 64;
  localparam logic [20:0] PLV = PRI_IRQ_LEVELS, SLV = IRQ_LEVELS_DEFAULT;
  localparam logic [15:0] BIO = 16'h0400, TMR = 16'h0C00, IRQ = 16'h1000, ATT = 16'h1400;

  logic clk = 0, rst_n = 0, trig_15hz = 0;
  // Primary
  logic [15:0] pri_cpu_addr = 0;
  logic [7:0]  pri_cpu_wdata = 0, pri_cpu_rdata, pri_ccpu_wdata = 0, pri_ccpu_rdata;
  logic        pri_cpu_we = 0, pri_ccpu_we = 0, pri_ccpu_attn;
  logic [2:0]  pri_ipl, pri_irq_vector;
  logic        pri_adlc_irq = 0, pri_adlc_rx_valid = 0, pri_adlc_tx_valid, pri_adlc_tx_take = 0;
  logic [7:0]  pri_adlc_rx_data = 0, pri_adlc_tx_data;
  logic        pri_mem_req, pri_mem_we, pri_mem_ack;
  logic [14:0] pri_mem_addr;
  logic [7:0]  pri_mem_wdata, pri_mem_rdata;
  logic        pri_con_txd, pri_con_rxd = 1, pri_char_tick = 0;
  logic        pri_vid_valid, pri_vid_hsync, pri_vid_vsync;
  logic [3:0]  pri_vid_row, pri_vid_line;
  logic [4:0]  pri_vid_col;
  logic [7:0]  pri_vid_char;
  // Secondary
  logic [15:0] sec_cpu_addr = 0;
  logic [7:0]  sec_cpu_wdata = 0, sec_cpu_rdata;
  logic        sec_cpu_we = 0;
  logic [2:0]  sec_ipl, sec_irq_vector;
  logic        sec_adlc_irq = 0, sec_adlc_rx_valid = 0, sec_adlc_tx_valid, sec_adlc_tx_take = 0;
  logic [7:0]  sec_adlc_rx_data = 0, sec_adlc_tx_data;
  logic        sec_mem_req, sec_mem_we, sec_mem_ack, sec_hold = 0, no_hold = 0;
  logic [14:0] sec_mem_addr;
  logic [7:0]  sec_mem_wdata, sec_mem_rdata;
  logic [23:0] sec_bio_in [3], sec_bio_out [3];
  logic [2:0]  sec_bio_oe [3];
  logic [31:0] sec_pio_in = 0, sec_pio_out;
  logic [3:0]  sec_pio_oe;
  logic        sec_char_tick = 0, sec_vid_valid, sec_vid_hsync, sec_vid_vsync;
  logic [3:0]  sec_vid_row, sec_vid_line;
  logic [4:0]  sec_vid_col;
  logic [7:0]  sec_vid_char;
  logic [15:0] sec_con_lights, sec_con_switches = 16'h1234;
  logic [6:0]  sec_kbd_data = 0;
  logic        sec_kbd_strobe = 0, sec_knob_a = 0, sec_knob_b = 0;

  int checks = 0, failures = 0;
  int n_poll = 0, n_sec_rx = 0, n_answer = 0, n_pri_rx = 0, n_attn_con = 0, n_attn_link = 0,
      n_15hz_p = 0, n_15hz_s = 0, n_motor = 0, n_console = 0, n_bridge = 0, n_prio = 0;
  longint cyc = 0, t_sync = 0;
  logic [7:0] acquired [9];
  int n_pulse = 0;
  longint t_rise = 0;

  // width of each stepping-motor pulse seen on the connector pin
  always @(posedge clk) begin
    if (rst_n && sec_bio_oe[0][0]) begin
      if (sec_bio_out[0][0] && t_rise == 0) t_rise = cyc;
      if (!sec_bio_out[0][0] && t_rise != 0) begin
        check(cyc - t_rise >= 20 * US && cyc - t_rise <= 20 * US + 4, "20 us motor pulse width");
        n_pulse++; t_rise = 0;
      end
    end
  end

  linac_system dut (.*);
  core_mem_model #(.AW(15), .MAX_WAIT(3), .SEED(7)) pmem (
    .clk, .bus_hold(no_hold), .mem_req(pri_mem_req), .mem_we(pri_mem_we), .mem_addr(pri_mem_addr),
    .mem_wdata(pri_mem_wdata), .mem_rdata(pri_mem_rdata), .mem_ack(pri_mem_ack));
  core_mem_model #(.AW(15), .MAX_WAIT(3), .SEED(11)) smem (
    .clk, .bus_hold(sec_hold), .mem_req(sec_mem_req), .mem_we(sec_mem_we), .mem_addr(sec_mem_addr),
    .mem_wdata(sec_mem_wdata), .mem_rdata(sec_mem_rdata), .mem_ack(sec_mem_ack));

  always #62.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- processor buses ----------------
  task automatic pwr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); pri_cpu_addr = a; pri_cpu_wdata = d; pri_cpu_we = 1; @(negedge clk); pri_cpu_we = 0;
  endtask
  task automatic prd(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); pri_cpu_addr = a; #1; d = pri_cpu_rdata;
  endtask
  task automatic swr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); sec_cpu_addr = a; sec_cpu_wdata = d; sec_cpu_we = 1; @(negedge clk); sec_cpu_we = 0;
  endtask
  task automatic srd(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); sec_cpu_addr = a; #1; d = sec_cpu_rdata;
  endtask
  function automatic logic [15:0] COMM(input logic [5:0] off); return {6'h00, 4'b1000, off}; endfunction

  initial begin
    #(70ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1ms);
    @(negedge clk); trig_15hz = 1; t_sync = cyc; @(negedge clk); trig_15hz = 0;
  end

  // ---------------- the loop: Primary -> Secondary -> Primary ----------------
  initial begin
    int n;
    forever begin
      repeat (BYTE_CLK) @(negedge clk);
      if (pri_adlc_tx_valid) begin
        // one frame of 8 bytes from the Primary, passed to the Secondary
        n = 0;
        fork
          begin
            repeat (2 * BYTE_CLK) @(negedge clk);
            sec_hold = 1; #(50us); sec_hold = 0; n_bridge++;
          end
          while (n < 8) begin
            if (pri_adlc_tx_valid) begin
              sec_adlc_rx_data = pri_adlc_tx_data; sec_adlc_rx_valid = 1; pri_adlc_tx_take = 1;
              @(negedge clk); sec_adlc_rx_valid = 0; pri_adlc_tx_take = 0;
              n++;
              repeat (BYTE_CLK - 1) @(negedge clk);
            end else @(negedge clk);
          end
        join
        #(20us);
        @(negedge clk); sec_adlc_irq = 1; #(2us); @(negedge clk); sec_adlc_irq = 0;
      end
      if (sec_adlc_tx_valid) begin
        n = 0;
        while (n < 9) begin
          if (sec_adlc_tx_valid) begin
            pri_adlc_rx_data = sec_adlc_tx_data; pri_adlc_rx_valid = 1; sec_adlc_tx_take = 1;
            @(negedge clk); pri_adlc_rx_valid = 0; sec_adlc_tx_take = 0;
            n++;
            repeat (BYTE_CLK - 1) @(negedge clk);
          end else @(negedge clk);
        end
        #(20us);
        @(negedge clk); pri_adlc_irq = 1; #(2us); @(negedge clk); pri_adlc_irq = 0;
      end
    end
  end

  // ---------------- Primary console processor ----------------
  initial begin
    wait (rst_n);
    forever begin
      @(posedge pri_ccpu_attn);
      n_attn_con++;
      #(30us);
      @(negedge clk); pri_ccpu_wdata = 8'h03; pri_ccpu_we = 1; @(negedge clk); pri_ccpu_we = 0;
    end
  end

  // ---------------- Primary link-driver processor ----------------
  localparam int SCHED [5] = '{10000, 15000, 36000, 41000, 51000};
  initial begin
    logic [7:0] v, pend, st;
    int lv, maxlv, d;
    repeat (5) @(posedge clk);
    wait (rst_n);
    for (int i = 1; i < 8; i++) pmem.mem[16'h0200 + i] = 8'(8'h10 + i);
    pwr(TMR + 0, 8'(10000)); pwr(TMR + 1, 8'(10000 >> 8)); pwr(TMR + 2, 8'b100);
    pwr(COMM(CR_RX_BASE_L), 8'h00); pwr(COMM(CR_RX_BASE_H), 8'h03);
    pwr(COMM(CR_RX_LIM_L), 8'd9);   pwr(COMM(CR_RX_LIM_H), 8'h00);
    pwr(COMM(CR_RX_CTRL), 8'h01);
    while (cyc < 56 * 1000 * US) begin
      @(negedge clk);
      if (pri_ipl == 0) continue;
      @(negedge clk);
      pri_cpu_addr = IRQ + 0; #1; pend = pri_cpu_rdata;
      pri_cpu_addr = IRQ + 2; #1; st   = pri_cpu_rdata;
      maxlv = 0;
      for (int i = 0; i < PRI_NIRQ; i++) if (pend[i] && int'(PLV[i*3 +: 3]) > maxlv) maxlv = PLV[i*3 +: 3];
      lv = PLV[st[7:5]*3 +: 3];
      check(int'(st[2:0]) == lv && lv == maxlv, "Primary served at highest level");
      if ($countones(pend) > 1) n_prio++;
      unique case (pri_irq_src_e'(st[7:5]))
        PIRQ_15HZ: n_15hz_p++;
        PIRQ_TIMER_0: begin
          pwr(TMR + 3, 8'h01);
          check(cyc - t_sync >= longint'(SCHED[n_poll]) * US && cyc - t_sync <= longint'(SCHED[n_poll]) * US + 30 * US,
                $sformatf("poll %0d at %0d ms", n_poll, SCHED[n_poll] / 1000));
          pmem.mem[16'h0200] = 8'(n_poll);
          if (n_poll < 4) begin
            d = SCHED[n_poll + 1] - int'((cyc - t_sync) / US);
            pwr(TMR + 0, 8'(d)); pwr(TMR + 1, 8'(d >> 8)); pwr(TMR + 2, 8'b101);
          end
          pwr(COMM(CR_TX_BASE_L), 8'h00); pwr(COMM(CR_TX_BASE_H), 8'h02);
          pwr(COMM(CR_TX_LEN_L), 8'd8);   pwr(COMM(CR_TX_LEN_H), 8'h00);
          pwr(COMM(CR_TX_CTRL), 8'h01);
          n_poll++;
        end
        PIRQ_LINK_DMA: pwr(COMM(CR_IRQ_CLR), 8'h01);
        PIRQ_ADLC: begin
          n_pri_rx++;
          prd(COMM(CR_RX_CNT_L), v); check(v == 9, "answer length at the Primary");
          for (int i = 0; i < 9; i++)
            check(pmem.mem[16'h0300 + i] == sec_bio_in[i / 3][(i % 3) * 8 +: 8], "answer = Secondary's inputs");
          pwr(COMM(CR_RX_CTRL), 8'h01);
          pwr(ATT, 8'h01);
        end
        PIRQ_ATTN: begin
          n_attn_link++;
          pwr(ATT, 8'h02);
        end
        default: check(0, "unexpected Primary interrupt");
      endcase
      prd(IRQ + 0, pend); if ((pend & ~(8'(1) << st[7:5])) != 0) n_prio++;
      pwr(IRQ + 0, 8'(1) << st[7:5]);
    end
  end

  // ---------------- Secondary processor ----------------
  initial begin
    logic [7:0] v, pend, st;
    int lv, maxlv;
    foreach (sec_bio_in[g]) sec_bio_in[g] = 24'($urandom);
    repeat (5) @(posedge clk);
    rst_n = 1;
    swr(BIO + 16'h10, 8'h01); swr(BIO + 16'h11, 8'h00);   // byte 0 output (motor), rest inputs
    swr(TMR + 0, 8'(6667)); swr(TMR + 1, 8'(6667 >> 8)); swr(TMR + 2, 8'b011);
    swr(TMR + 4, 8'(12000)); swr(TMR + 5, 8'(12000 >> 8)); swr(TMR + 6, 8'b100);
    swr(TMR + 8, 8'd1); swr(TMR + 9, 8'h00); swr(TMR + 10, 8'b100);   // settle delay after the trigger
    swr(COMM(CR_CON_LT_L), 8'h81); swr(COMM(CR_CON_LT_H), 8'h18);
    swr(COMM(CR_RX_BASE_L), 8'h00); swr(COMM(CR_RX_BASE_H), 8'h01);
    swr(COMM(CR_RX_LIM_L), 8'd8);   swr(COMM(CR_RX_LIM_H), 8'h00);
    swr(COMM(CR_RX_CTRL), 8'h01);
    while (cyc < 56 * 1000 * US) begin
      @(negedge clk);
      if (sec_ipl == 0) continue;
      @(negedge clk);
      sec_cpu_addr = IRQ + 0; #1; pend = sec_cpu_rdata;
      sec_cpu_addr = IRQ + 2; #1; st   = sec_cpu_rdata;
      maxlv = 0;
      for (int i = 0; i < NIRQ; i++) if (pend[i] && int'(SLV[i*3 +: 3]) > maxlv) maxlv = SLV[i*3 +: 3];
      lv = SLV[st[7:5]*3 +: 3];
      check(int'(st[2:0]) == lv && lv == maxlv, "Secondary served at highest level");
      if ($countones(pend) > 1) n_prio++;
      unique case (irq_src_e'(st[7:5]))
        IRQ_15HZ: begin
          n_15hz_s++;
          for (int i = 0; i < 9; i++) begin
            if (i == 0) begin acquired[0] = sec_bio_in[0][7:0]; continue; end
            srd(BIO + 16'(i), acquired[i]);
            check(acquired[i] == sec_bio_in[i / 3][(i % 3) * 8 +: 8], "acquired input");
          end
        end
        IRQ_TIMER_0: begin
          n_motor++;
          swr(TMR + 3, 8'h01);
          // a short step pulse on connector bit 0, timed by software
          swr(BIO + 0, 8'h01); #(20us); swr(BIO + 0, 8'h00);
        end
        IRQ_TIMER_2: swr(TMR + 11, 8'h01);
        IRQ_TIMER_1: begin
          swr(TMR + 7, 8'h01);
          swr(COMM(CR_CON_CTRL), 8'h01);
        end
        IRQ_CONSOLE: begin
          n_console++;
          srd(COMM(CR_CON_SW_L), v); check(v == 8'h34, "console switches");
          check(sec_con_lights == 16'h1881, "console lamps");
          swr(COMM(CR_IRQ_CLR), 8'h02);
        end
        IRQ_LINK_DMA: swr(COMM(CR_IRQ_CLR), 8'h01);
        IRQ_ADLC: begin
          n_sec_rx++;
          srd(COMM(CR_RX_CNT_L), v); check(v == 8, "poll length at the Secondary");
          check(smem.mem[16'h0100] == 8'(n_sec_rx - 1), "poll number at the Secondary");
          for (int i = 1; i < 8; i++) check(smem.mem[16'h0100 + i] == 8'(8'h10 + i), "poll byte at the Secondary");
          swr(COMM(CR_RX_CTRL), 8'h01);
          // answer list: the acquired binary data (byte 0 is read back from the pins' model)
          for (int i = 0; i < 9; i++) smem.mem[16'h0500 + i] = acquired[i];
          swr(COMM(CR_TX_BASE_L), 8'h00); swr(COMM(CR_TX_BASE_H), 8'h05);
          swr(COMM(CR_TX_LEN_L), 8'd9);   swr(COMM(CR_TX_LEN_H), 8'h00);
          swr(COMM(CR_TX_CTRL), 8'h01);
          n_answer++;
        end
        default: check(0, "unexpected Secondary interrupt");
      endcase
      srd(IRQ + 0, pend); if ((pend & ~(8'(1) << st[7:5])) != 0) n_prio++;
      swr(IRQ + 0, 8'(1) << st[7:5]);
    end
    srd(COMM(CR_FIFO_STAT), v); check(v[7] == 0, "no receive overflow at the Secondary");
    $display("mechanisms: poll=%0d sec_rx=%0d answer=%0d pri_rx=%0d attn_con=%0d attn_link=%0d 15hz_p=%0d 15hz_s=%0d motor=%0d pulses=%0d console=%0d bridge=%0d prio=%0d",
             n_poll, n_sec_rx, n_answer, n_pri_rx, n_attn_con, n_attn_link, n_15hz_p, n_15hz_s, n_motor, n_pulse, n_console, n_bridge, n_prio);
    check(n_poll == 5 && n_sec_rx == 5 && n_answer == 5 && n_pri_rx == 5, "five polls and answers round the loop");
    check(n_attn_con == 5 && n_attn_link == 5, "attention both ways");
    check(n_15hz_p == 1 && n_15hz_s == 1, "15-Hz interrupts");
    check(n_motor >= 3 && n_pulse == n_motor, "150-Hz motor interrupts, one pulse each");
    check(n_console == 1, "console exchange");
    check(n_bridge == 5, "busy bus bridged by the FIFO");
    check(n_prio >= 1, "competing interrupt requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
