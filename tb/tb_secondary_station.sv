// tb_secondary_station: one Secondary station through a little more than one
// 15-Hz Linac cycle (66.7 ms), at the top's default parameters (8 MHz clock,
// 4800 baud console line, 16-byte link FIFOs). The test plays the station
// processor, reacting to interrupts in priority order as its interrupt routines
// would, plus the link controller, the core memory and the console hardware:
//  - 15-Hz trigger (level 1): acquisition reads all binary inputs and checks them,
//    and a contactor output is switched on at one trigger and off at the next
//    (a pulse of 1 x 66 ms, measured at the pin);
//  - timer channel 0, 150 Hz (level 2): pulses a stepping-motor output bit;
//  - timer channel 1, 10 ms after the 15-Hz reference (level 2): starts the
//    console exchange; its end (level 4) delivers switches, key and knob;
//  - link controller frame end (level 6): a poll frame has been stored by
//    receive DMA (the bus is held busy meanwhile, so the FIFO bridges it); the
//    handler builds a reply in core memory and starts transmit DMA, whose bytes
//    the link controller takes at the 1 MHz link rate;
//  - the video RAM page is scanned and compared.
// Each mechanism is counted and must occur; a handler always checks that the
// level it is served at is the highest among the pending requests.
module tb_secondary_station;
  import linac_pkg::*;
  localparam int US = 8;                      // clocks per microsecond at 8 MHz
  localparam int BYTE_CLK = 64;               // one link byte per 8 us
  localparam logic [20:0] LV = IRQ_LEVELS_DEFAULT;

  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata;
  logic        cpu_we = 0;
  logic [2:0]  ipl, irq_vector;
  logic        trig_15hz = 0;
  logic        adlc_irq = 0, adlc_rx_valid = 0, adlc_tx_valid, adlc_tx_take = 0;
  logic [7:0]  adlc_rx_data = 0, adlc_tx_data;
  logic        mem_req, mem_we, mem_ack, bus_hold = 0;
  logic [14:0] mem_addr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic [23:0] bio_in [3], bio_out [3];
  logic [2:0]  bio_oe [3];
  logic [31:0] pio_in = 32'hDEAD_BEEF, pio_out;
  logic [3:0]  pio_oe;
  logic        char_tick = 0, vid_valid, vid_hsync, vid_vsync;
  logic [3:0]  vid_row, vid_line;
  logic [4:0]  vid_col;
  logic [7:0]  vid_char;
  logic [15:0] con_lights, con_switches = 16'hA55A;
  logic [6:0]  kbd_data = 0;
  logic        kbd_strobe = 0, knob_a = 0, knob_b = 0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_15hz = 0, n_motor = 0, n_con_start = 0, n_con_done = 0, n_frame_rx = 0,
      n_frame_tx = 0, n_link_irq = 0, n_prio = 0, n_fifo_bridge = 0, n_vid = 0, n_pio = 0;
  longint cyc = 0;
  longint t_sync = 0;
  logic [7:0] page [512];
  logic [7:0] poll [12];
  logic [7:0] tx_got[$];

  secondary_station dut (.*);
  core_mem_model #(.AW(15), .MAX_WAIT(3)) mem (
    .clk, .bus_hold, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack);

  always #62.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- CPU bus ----------------
  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_we = 1; @(negedge clk); cpu_we = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); cpu_addr = a; #1; d = cpu_rdata;
  endtask
  function automatic logic [15:0] COMM(input logic [5:0] off); return {6'h00, 4'b1000, off}; endfunction
  localparam logic [15:0] BIO = 16'h0400, PIO = 16'h0800, TMR = 16'h0C00, IRQ = 16'h1000;

  // ---------------- watchdog ----------------
  initial begin
    #(80ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- contactor pulse width at the connector pin ----------------
  int n_contactor = 0;
  longint t_on = 0;
  always @(posedge clk) begin
    if (rst_n && bio_oe[2][2]) begin
      if (bio_out[2][18] && t_on == 0) t_on = cyc;
      if (!bio_out[2][18] && t_on != 0) begin
        check(cyc - t_on >= 66667 * US - 5 * US && cyc - t_on <= 66667 * US + 5 * US, "1 x 66 ms contactor pulse");
        n_contactor++; t_on = 0;
      end
    end
  end

  // ---------------- Linac 15-Hz trigger ----------------
  initial begin
    #(1ms);
    forever begin
      @(negedge clk); trig_15hz = 1; t_sync = cyc; @(negedge clk); trig_15hz = 0;
      #(66667us);
    end
  end

  // ---------------- console hardware: key press and knob turns ----------------
  initial begin
    #(3ms);
    @(negedge clk); kbd_data = 7'h41; kbd_strobe = 1; @(negedge clk); kbd_strobe = 0;
    repeat (6) begin   // six clockwise steps
      knob_a = 1; #(20us); knob_b = 1; #(20us); knob_a = 0; #(20us); knob_b = 0; #(20us);
    end
  end

  // ---------------- display scan: one character every 4 clocks ----------------
  always @(posedge clk) char_tick <= (cyc % 4 == 0);
  always @(posedge clk) if (vid_valid && page_ready) begin
    n_vid++;
    if (vid_char != page[{vid_row, vid_col}]) begin
      failures++; $display("FAIL video char at row %0d col %0d", vid_row, vid_col);
    end
  end
  bit page_ready = 0;

  // ---------------- link controller ----------------
  initial begin
    foreach (poll[i]) poll[i] = 8'(8'h80 + i * 5);
    wait (t_sync != 0);
    #(2ms);
    fork
      for (int i = 0; i < 12; i++) begin
        @(negedge clk); adlc_rx_valid = 1; adlc_rx_data = poll[i];
        @(negedge clk); adlc_rx_valid = 0;
        repeat (BYTE_CLK - 2) @(negedge clk);
      end
      begin   // another Multibus master holds the bus for 60 us
        repeat (BYTE_CLK) @(negedge clk);
        bus_hold = 1; #(60us); bus_hold = 0;
        n_fifo_bridge++;
      end
    join
    #(20us);
    // end the frame while a timer request is pending, so two levels compete
    @(posedge clk iff ipl == 3'd2);
    adlc_irq = 1; #(2us); @(negedge clk); adlc_irq = 0;   // frame end
    // take the reply
    forever begin
      repeat (BYTE_CLK) @(negedge clk);
      if (adlc_tx_valid) begin
        tx_got.push_back(adlc_tx_data);
        adlc_tx_take = 1; @(negedge clk); adlc_tx_take = 0;
      end
    end
  end

  // ---------------- the station processor ----------------
  logic [7:0] v, pend, st;
  int lv, maxlv;
  logic [7:0] bio_model_out;
  initial begin
    foreach (bio_in[g]) bio_in[g] = 24'($urandom);
    repeat (5) @(posedge clk);
    rst_n = 1;
    // display page
    for (int a = 0; a < 512; a++) begin page[a] = 8'($urandom); wr(16'(a), page[a]); end
    page_ready = 1;
    // binary I/O: bytes 0,4,8 outputs, the rest inputs
    wr(BIO + 16'h10, 8'b0001_0001); wr(BIO + 16'h11, 8'h01);
    bio_model_out = 8'h00;
    wr(BIO + 0, bio_model_out); wr(BIO + 4, 8'h3C); wr(BIO + 8, 8'hC3);
    // parallel I/O: byte 0 output
    wr(PIO + 4, 8'h01); wr(PIO + 0, 8'h96);
    rd(PIO + 0, v); check(v == 8'h96 && pio_out[7:0] == 8'h96 && pio_oe == 4'b0001, "PIO output");
    rd(PIO + 3, v); check(v == pio_in[31:24], "PIO input");
    n_pio++;
    // timers: ch0 150 Hz periodic, ch1 one-shot 10 ms after the 15-Hz reference
    wr(TMR + 0, 8'(6667)); wr(TMR + 1, 8'(6667 >> 8)); wr(TMR + 2, 8'b011);
    wr(TMR + 4, 8'(10000)); wr(TMR + 5, 8'(10000 >> 8)); wr(TMR + 6, 8'b100);
    // console light pattern
    wr(COMM(CR_CON_LT_L), 8'h0F); wr(COMM(CR_CON_LT_H), 8'hF0);
    // receive buffer at 0x0100, 12 bytes
    wr(COMM(CR_RX_BASE_L), 8'h00); wr(COMM(CR_RX_BASE_H), 8'h01);
    wr(COMM(CR_RX_LIM_L), 8'd12);  wr(COMM(CR_RX_LIM_H), 8'h00);
    wr(COMM(CR_RX_CTRL), 8'h01);

    while (cyc < 70 * 1000 * US) begin
      @(negedge clk);
      if (ipl == 0) continue;
      // interrupt acknowledge: which source, and is it the most urgent?
      @(negedge clk);                   // both registers read in the same cycle
      cpu_addr = IRQ + 0; #1; pend = cpu_rdata;
      cpu_addr = IRQ + 2; #1; st   = cpu_rdata;
      maxlv = 0;
      for (int i = 0; i < NIRQ; i++) if (pend[i] && int'(LV[i*3 +: 3]) > maxlv) maxlv = LV[i*3 +: 3];
      lv = LV[st[7:5]*3 +: 3];
      check(int'(st[2:0]) == lv && lv == maxlv, "served at the highest pending level");
      if ($countones(pend) > 1) n_prio++;
      unique case (irq_src_e'(st[7:5]))
        IRQ_15HZ: begin
          n_15hz++;
          // contactor: one long pulse of 1 x 66 ms on byte 8 bit 2
          wr(BIO + 8, n_15hz == 1 ? 8'hC7 : 8'hC3);
          for (int i = 1; i < 8; i++) if (i != 4) begin
            rd(BIO + 16'(i), v);
            check(v == bio_in[i / 3][(i % 3) * 8 +: 8], "acquired binary input");
          end
          rd(BIO + 4, v); check(v == 8'h3C, "output read-back");
        end
        IRQ_TIMER_0: begin
          n_motor++;
          wr(TMR + 3, 8'h01);
          bio_model_out ^= 8'h01;               // motor step pulse edge
          wr(BIO + 0, bio_model_out);
          check(bio_out[0][7:0] == bio_model_out && bio_oe[0][0], "motor pulse on connector");
        end
        IRQ_TIMER_1: begin
          n_con_start++;
          wr(TMR + 7, 8'h01);
          check((cyc - t_sync) >= 10000 * US - 2 * US && (cyc - t_sync) <= 10000 * US + 40 * US,
                "console timer 10 ms after the 15-Hz reference");
          wr(COMM(CR_CON_CTRL), 8'h01);
        end
        IRQ_CONSOLE: begin
          n_con_done++;
          rd(COMM(CR_CON_SW_L), v); check(v == con_switches[7:0], "switches low");
          rd(COMM(CR_CON_SW_H), v); check(v == con_switches[15:8], "switches high");
          rd(COMM(CR_CON_KBD), v);  check(v == 8'hC1, "key 'A' flagged new");
          rd(COMM(CR_CON_KNOB), v); check(v == 8'd6, "knob count");
          check(con_lights == 16'hF00F, "console lamps");
          // six 10-bit characters; each receiver reports half a stop bit
          // early, so the exchange ends about one bit short of 60 bit times
          check((cyc - t_sync) > 10000 * US + 58 * 1667 &&
                (cyc - t_sync) < 10000 * US + 60 * 1667 + 100 * US,
                "exchange of six characters at 4800 baud");
          wr(COMM(CR_IRQ_CLR), 8'h02);
        end
        IRQ_ADLC: begin
          n_frame_rx++;
          rd(COMM(CR_RX_CNT_L), v); check(v == 12, "frame length");
          for (int i = 0; i < 12; i++) begin
            check(mem.mem[16'h0100 + i] == poll[i], "poll byte in core memory");
            mem.mem[16'h0400 + i] = poll[i] + 8'd1;   // the reply
          end
          wr(COMM(CR_TX_BASE_L), 8'h00); wr(COMM(CR_TX_BASE_H), 8'h04);
          wr(COMM(CR_TX_LEN_L), 8'd12);  wr(COMM(CR_TX_LEN_H), 8'h00);
          wr(COMM(CR_TX_CTRL), 8'h01);
        end
        IRQ_LINK_DMA: begin
          n_link_irq++;
          wr(COMM(CR_IRQ_CLR), 8'h01);
        end
        default: check(0, "unexpected interrupt source");
      endcase
      wr(IRQ + 0, 8'(1) << st[7:5]);
    end

    // reply frame on the link
    check(tx_got.size() == 12, $sformatf("reply length %0d", tx_got.size()));
    for (int i = 0; i < 12 && i < tx_got.size(); i++) check(tx_got[i] == poll[i] + 8'd1, "reply byte");
    if (tx_got.size() == 12) n_frame_tx++;
    rd(COMM(CR_FIFO_STAT), v); check(v[7] == 0, "no receive overflow");

    $display("mechanisms: 15Hz=%0d motor=%0d console_start=%0d console_done=%0d frame_rx=%0d frame_tx=%0d link_irq=%0d priority=%0d fifo_bridge=%0d video=%0d pio=%0d",
             n_15hz, n_motor, n_con_start, n_con_done, n_frame_rx, n_frame_tx, n_link_irq, n_prio, n_fifo_bridge, n_vid, n_pio);
    check(n_15hz == 2, "two 15-Hz interrupts");
    check(n_contactor == 1, "one contactor pulse");
    check(n_motor >= 9 && n_motor <= 11, "150-Hz motor interrupts in 70 ms");
    check(n_con_start >= 1 && n_con_done >= 1, "console exchange");
    check(n_frame_rx == 1 && n_frame_tx == 1, "poll frame in, reply out");
    check(n_link_irq >= 1, "link DMA interrupt");
    check(n_prio >= 1, "simultaneous requests arbitrated");
    check(n_fifo_bridge == 1, "busy bus bridged by the FIFO");
    check(n_vid > 1000, "display scanned");
    check(n_pio == 1, "parallel I/O");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
