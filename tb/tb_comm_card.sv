// tb_comm_card: drives the communications card through its CPU registers with
// modelled neighbours: a link controller that delivers and takes one byte every
// 8 us (1 MHz serial link, 8 MHz clock), a core memory with random bus waits
// that can be held busy, and a console at the end of the serial line (console
// rate scaled up to keep the run short). Checks:
//  - video RAM writes and reads through the card's address space;
//  - a received frame lands in memory in order, with the buffer-full interrupt;
//  - a bus held busy for 112 us loses nothing (FIFO absorbs about 14 bytes),
//    while 160 us overflows the 16-byte FIFO and sets the overflow flag;
//  - a transmitted message reaches the link controller in order;
//  - receive and transmit running at once share the memory port;
//  - a console exchange: light bytes out, four bytes in, console interrupt.
module tb_comm_card;
  import linac_pkg::*;
  localparam int CLK_HZ = 96_000, BAUD = 4800, DIV = CLK_HZ / BAUD;  // console scaled
  localparam int BYTE_CLK = 64;        // 8 us per link byte at 8 MHz
  logic clk = 0, rst_n = 0;
  logic [9:0] bus_addr = 0;
  logic [7:0] bus_wdata = 0, bus_rdata;
  logic bus_we = 0;
  logic adlc_rx_valid = 0, adlc_tx_valid, adlc_tx_take = 0;
  logic [7:0] adlc_rx_data = 0, adlc_tx_data;
  logic mem_req, mem_we, mem_ack, bus_hold = 0;
  logic [14:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic con_txd, con_rxd = 1, char_tick = 0;
  logic vid_valid, vid_hsync, vid_vsync;
  logic [3:0] vid_row, vid_line;
  logic [4:0] vid_col;
  logic [7:0] vid_char;
  logic irq_link, irq_console;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  bit take_en = 0;
  int rx_gnt = 0, tx_gnt = 0, both_req = 0;
  logic last_we = 0, last_we_valid = 0;

  comm_card #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(16), .AW(15)) dut (.*);
  core_mem_model #(.AW(15), .MAX_WAIT(4)) mem (
    .clk, .bus_hold, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [9:0] a, input logic [7:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1; @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(input logic [9:0] a, output logic [7:0] d);
    @(negedge clk); bus_addr = a; #1; d = bus_rdata;
  endtask
  function automatic logic [9:0] R(input logic [5:0] off);
    return {4'b1000, off};
  endfunction

  // link controller: takes a transmit byte every BYTE_CLK clocks when enabled
  initial forever begin
    repeat (BYTE_CLK) @(negedge clk);
    if (take_en && adlc_tx_valid) begin
      got.push_back(adlc_tx_data);
      adlc_tx_take = 1; @(negedge clk); adlc_tx_take = 0;
    end
  end

  // who uses the memory port
  always @(posedge clk) begin
    if (mem_req && mem_ack && mem_we)  rx_gnt++;
    if (mem_req && mem_ack && !mem_we) tx_gnt++;
    if (mem_req && mem_ack) begin
      if (last_we_valid && mem_we != last_we) both_req++;   // port changed hands
      last_we = mem_we; last_we_valid = 1;
    end
  end

  task automatic link_rx_bytes(input int n, input int first);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); adlc_rx_valid = 1; adlc_rx_data = 8'(first + i * 3);
      @(negedge clk); adlc_rx_valid = 0;
      repeat (BYTE_CLK - 2) @(negedge clk);
    end
  endtask

  task automatic arm_rx(input int base, input int lim);
    wr(R(CR_RX_BASE_L), 8'(base)); wr(R(CR_RX_BASE_H), 8'(base >> 8));
    wr(R(CR_RX_LIM_L), 8'(lim));   wr(R(CR_RX_LIM_H), 8'(lim >> 8));
    wr(R(CR_RX_CTRL), 8'h01);
  endtask

  task automatic start_tx(input int base, input int len);
    wr(R(CR_TX_BASE_L), 8'(base)); wr(R(CR_TX_BASE_H), 8'(base >> 8));
    wr(R(CR_TX_LEN_L), 8'(len));   wr(R(CR_TX_LEN_H), 8'(len >> 8));
    wr(R(CR_TX_CTRL), 8'h01);
  endtask

  task automatic put_serial(input logic [7:0] b);
    con_rxd = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin con_rxd = b[i]; repeat (DIV) @(posedge clk); end
    con_rxd = 1; repeat (DIV) @(posedge clk);
  endtask
  task automatic get_serial(output logic [7:0] b);
    @(negedge con_txd);
    repeat (DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = con_txd; end
    repeat (DIV) @(posedge clk);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] v, b0, b1;
  logic [7:0] vm [512];
  int ok;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- video RAM through the card
    for (int a = 0; a < 512; a++) begin vm[a] = 8'($urandom); wr(10'(a), vm[a]); end
    ok = 1;
    for (int a = 0; a < 512; a++) begin rd(10'(a), v); if (v != vm[a]) ok = 0; end
    check(ok == 1, "video RAM read-back");
    // ---- receive one frame, with short bus waits only
    arm_rx(1000, 20);
    link_rx_bytes(20, 5);
    repeat (200) @(negedge clk);
    rd(R(CR_RX_CTRL), v); check(v[1:0] == 2'b10, "rx done");
    rd(R(CR_RX_CNT_L), v); check(v == 20, "rx count");
    check(irq_link, "link interrupt on full buffer");
    ok = 1;
    for (int i = 0; i < 20; i++) if (mem.mem[1000 + i] != 8'(5 + i * 3)) ok = 0;
    check(ok == 1, "received bytes in memory");
    wr(R(CR_IRQ_CLR), 8'h01);
    check(!irq_link, "link interrupt cleared");
    // ---- bus busy for 112 us while 30 bytes arrive: no loss
    arm_rx(2000, 30);
    fork
      link_rx_bytes(30, 77);
      begin repeat (BYTE_CLK * 2) @(negedge clk); bus_hold = 1; repeat (896) @(negedge clk); bus_hold = 0; end
      begin
        int peak = 0;
        logic [7:0] st;
        repeat (BYTE_CLK * 20 / 4) begin
          rd(R(CR_FIFO_STAT), st);
          if (int'(st[4:0]) > peak) peak = int'(st[4:0]);
          repeat (3) @(negedge clk);
        end
        check(peak >= 12, $sformatf("FIFO filled during the busy bus (peak %0d)", peak));
      end
    join
    repeat (200) @(negedge clk);
    rd(R(CR_FIFO_STAT), v); check(v[7] == 0, "no overflow in 112 us");
    ok = 1;
    for (int i = 0; i < 30; i++) if (mem.mem[2000 + i] != 8'(77 + i * 3)) ok = 0;
    check(ok == 1, "all bytes kept across the busy bus");
    // ---- bus busy for 160 us: the 16-byte FIFO overflows
    arm_rx(3000, 40);
    fork
      link_rx_bytes(25, 1);
      begin repeat (BYTE_CLK) @(negedge clk); bus_hold = 1; repeat (1280) @(negedge clk); bus_hold = 0; end
    join
    repeat (200) @(negedge clk);
    rd(R(CR_FIFO_STAT), v); check(v[7] == 1, "overflow after 160 us");
    wr(R(CR_FIFO_STAT), 8'h80);
    rd(R(CR_FIFO_STAT), v); check(v[7] == 0, "overflow cleared");
    // ---- transmit a message
    wr(R(CR_IRQ_CLR), 8'h01);
    for (int i = 0; i < 40; i++) mem.mem[5000 + i] = 8'(i ^ 8'h5A);
    got.delete();
    take_en = 1;
    start_tx(5000, 40);
    wait (got.size() == 40);
    ok = 1;
    for (int i = 0; i < 40; i++) if (got[i] != 8'(i ^ 8'h5A)) ok = 0;
    check(ok == 1, "transmitted bytes in order");
    rd(R(CR_TX_CTRL), v); check(v[1:0] == 2'b10, "tx done");
    check(irq_link, "link interrupt on transmit");
    wr(R(CR_IRQ_CLR), 8'h01);
    // ---- receive and transmit together
    for (int i = 0; i < 30; i++) mem.mem[6000 + i] = 8'(200 - i);
    got.delete();
    both_req = 0;
    arm_rx(7000, 30);
    start_tx(6000, 30);
    link_rx_bytes(30, 9);
    wait (got.size() == 30);
    repeat (200) @(negedge clk);
    ok = 1;
    for (int i = 0; i < 30; i++) if (got[i] != 8'(200 - i) || mem.mem[7000 + i] != 8'(9 + i * 3)) ok = 0;
    check(ok == 1, "simultaneous receive and transmit");
    check(both_req > 10, "memory port alternated between the channels");
    check(rx_gnt >= 100 && tx_gnt >= 70, "memory port used by both channels");
    // ---- console exchange
    wr(R(CR_CON_LT_L), 8'h3C); wr(R(CR_CON_LT_H), 8'hA5);
    wr(R(CR_CON_CTRL), 8'h01);
    get_serial(b0); get_serial(b1);
    check(b0 == 8'h3C && b1 == 8'hA5, "light bytes sent");
    put_serial(8'h11); put_serial(8'h22); put_serial(8'hC1); put_serial(8'h07);
    repeat (5) @(negedge clk);
    check(irq_console, "console interrupt");
    rd(R(CR_CON_SW_L), v); check(v == 8'h11, "switch low");
    rd(R(CR_CON_SW_H), v); check(v == 8'h22, "switch high");
    rd(R(CR_CON_KBD), v);  check(v == 8'hC1, "keyboard");
    rd(R(CR_CON_KNOB), v); check(v == 8'h07, "knob");
    wr(R(CR_IRQ_CLR), 8'h02);
    check(!irq_console, "console interrupt cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
