// comm_card: the communications card, which connects a station's processor to
// both the SDLC loop and the local console.
//  - Link path: bytes from the link controller (an MC6854, outside this block)
//    enter a 16-byte receive FIFO and are written to core memory by the receive
//    DMA channel; the transmit DMA channel reads a message from core memory into
//    a 16-byte transmit FIFO from which the link controller takes bytes. The
//    FIFOs bridge the time the Multibus is not available. Both channels share
//    one memory master port; the receive channel wins when both ask, and a
//    channel keeps the port until its request is acknowledged.
//  - Display: the 16x32 video RAM display generator (video_display).
//  - Console: the serial interface that sends two light bytes and receives
//    switch, keyboard and knob bytes (console_link).
// CPU map (10-bit card address): 0x000-0x1FF video RAM; 0x200 + offset the
// registers listed in linac_pkg (CR_*). Reads are combinational, writes take
// effect on the clock. irq_link is set when a receive buffer fills or a
// transmit message has entered the FIFO; irq_console when a console exchange
// ends; both are cleared through CR_IRQ_CLR.
// What the card contains follows the document; the register map, the shared
// memory port and its priority are this design's own.
module comm_card
  import linac_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 8_000_000,
  parameter int unsigned BAUD       = 4800,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned AW         = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU access
  input  logic [9:0]    bus_addr,
  input  logic [7:0]    bus_wdata,
  input  logic          bus_we,
  output logic [7:0]    bus_rdata,
  // link controller byte interface
  input  logic          adlc_rx_valid,
  input  logic [7:0]    adlc_rx_data,
  output logic          adlc_tx_valid,
  output logic [7:0]    adlc_tx_data,
  input  logic          adlc_tx_take,
  // memory master port (Multibus DMA)
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  input  logic [7:0]    mem_rdata,
  input  logic          mem_ack,
  // console serial line
  output logic          con_txd,
  input  logic          con_rxd,
  // display scan
  input  logic          char_tick,
  output logic          vid_valid,
  output logic [3:0]    vid_row,
  output logic [4:0]    vid_col,
  output logic [3:0]    vid_line,
  output logic [7:0]    vid_char,
  output logic          vid_hsync,
  output logic          vid_vsync,
  // interrupt requests
  output logic          irq_link,
  output logic          irq_console
);
  localparam int unsigned LW = $clog2(FIFO_DEPTH + 1);

  logic       sel_regs, reg_we, vid_we;
  logic [5:0] roff;
  assign sel_regs = bus_addr[9];
  assign roff     = bus_addr[5:0];
  assign reg_we   = bus_we && sel_regs;
  assign vid_we   = bus_we && !sel_regs;

  // ---------------- registers ----------------
  logic [15:0] rx_base, rx_lim, tx_base, tx_len, lights;
  logic        rx_arm, tx_start, con_start, clr_link, clr_con, clr_ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_base <= '0; rx_lim <= '0; tx_base <= '0; tx_len <= '0; lights <= '0;
    end else if (reg_we) begin
      unique case (roff)
        CR_RX_BASE_L: rx_base[7:0]  <= bus_wdata;
        CR_RX_BASE_H: rx_base[15:8] <= bus_wdata;
        CR_RX_LIM_L:  rx_lim[7:0]   <= bus_wdata;
        CR_RX_LIM_H:  rx_lim[15:8]  <= bus_wdata;
        CR_TX_BASE_L: tx_base[7:0]  <= bus_wdata;
        CR_TX_BASE_H: tx_base[15:8] <= bus_wdata;
        CR_TX_LEN_L:  tx_len[7:0]   <= bus_wdata;
        CR_TX_LEN_H:  tx_len[15:8]  <= bus_wdata;
        CR_CON_LT_L:  lights[7:0]   <= bus_wdata;
        CR_CON_LT_H:  lights[15:8]  <= bus_wdata;
        default: ;
      endcase
    end
  end

  assign rx_arm    = reg_we && roff == CR_RX_CTRL   && bus_wdata[0];
  assign tx_start  = reg_we && roff == CR_TX_CTRL   && bus_wdata[0];
  assign con_start = reg_we && roff == CR_CON_CTRL  && bus_wdata[0];
  assign clr_link  = reg_we && roff == CR_IRQ_CLR   && bus_wdata[0];
  assign clr_con   = reg_we && roff == CR_IRQ_CLR   && bus_wdata[1];
  assign clr_ovf   = reg_we && roff == CR_FIFO_STAT && bus_wdata[7];

  // ---------------- receive path ----------------
  logic          rxf_full, rxf_empty, rxf_rd, rxf_ovf;
  logic [7:0]    rxf_data;
  logic [LW-1:0] rxf_level;
  logic          rx_busy, rx_done;
  logic [15:0]   rx_count;
  logic          rx_mreq, rx_mwe, rx_mack;
  logic [AW-1:0] rx_maddr;
  logic [7:0]    rx_mwdata;

  byte_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_rx_fifo (
    .clk, .rst_n, .wr_en(adlc_rx_valid), .wr_data(adlc_rx_data), .full(rxf_full),
    .rd_en(rxf_rd), .rd_data(rxf_data), .empty(rxf_empty), .level(rxf_level),
    .overflow(rxf_ovf), .clear_ovf(clr_ovf));

  link_rx_dma #(.AW(AW)) u_rx_dma (
    .clk, .rst_n, .arm(rx_arm), .base(rx_base[AW-1:0]), .limit(rx_lim),
    .busy(rx_busy), .done(rx_done), .count(rx_count),
    .fifo_empty(rxf_empty), .fifo_data(rxf_data), .fifo_rd(rxf_rd),
    .mem_req(rx_mreq), .mem_we(rx_mwe), .mem_addr(rx_maddr), .mem_wdata(rx_mwdata),
    .mem_ack(rx_mack));

  // ---------------- transmit path ----------------
  logic          txf_full, txf_empty, txf_wr, txf_ovf;
  logic [7:0]    txf_wdata;
  logic [LW-1:0] txf_level;
  logic          tx_busy, tx_done;
  logic          tx_mreq, tx_mwe, tx_mack;
  logic [AW-1:0] tx_maddr;

  link_tx_dma #(.AW(AW)) u_tx_dma (
    .clk, .rst_n, .start(tx_start), .base(tx_base[AW-1:0]), .length(tx_len),
    .busy(tx_busy), .done(tx_done),
    .fifo_full(txf_full), .fifo_wr(txf_wr), .fifo_data(txf_wdata),
    .mem_req(tx_mreq), .mem_we(tx_mwe), .mem_addr(tx_maddr), .mem_rdata(mem_rdata),
    .mem_ack(tx_mack));

  byte_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_tx_fifo (
    .clk, .rst_n, .wr_en(txf_wr), .wr_data(txf_wdata), .full(txf_full),
    .rd_en(adlc_tx_take), .rd_data(adlc_tx_data), .empty(txf_empty), .level(txf_level),
    .overflow(txf_ovf), .clear_ovf(clr_ovf));

  assign adlc_tx_valid = !txf_empty;

  // ---------------- shared memory port ----------------
  typedef enum logic [1:0] {OWN_NONE, OWN_RX, OWN_TX} owner_e;
  owner_e owner, owner_q;

  always_comb begin
    owner = owner_q;
    if (owner_q == OWN_NONE) begin
      if (rx_mreq)      owner = OWN_RX;
      else if (tx_mreq) owner = OWN_TX;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        owner_q <= OWN_NONE;
    else if (mem_req && mem_ack)       owner_q <= OWN_NONE;
    else                               owner_q <= owner;
  end

  always_comb begin
    unique case (owner)
      OWN_RX: begin
        mem_req = rx_mreq; mem_we = rx_mwe; mem_addr = rx_maddr; mem_wdata = rx_mwdata;
      end
      OWN_TX: begin
        mem_req = tx_mreq; mem_we = tx_mwe; mem_addr = tx_maddr; mem_wdata = '0;
      end
      default: begin
        mem_req = 1'b0; mem_we = 1'b0; mem_addr = '0; mem_wdata = '0;
      end
    endcase
  end
  assign rx_mack = mem_ack && owner == OWN_RX;
  assign tx_mack = mem_ack && owner == OWN_TX;

  // ---------------- console ----------------
  logic        con_busy, con_done, con_tmo;
  logic [15:0] con_sw;
  logic [7:0]  con_kbd, con_knob;

  console_link #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_console (
    .clk, .rst_n, .start(con_start), .clear(clr_con), .lights,
    .busy(con_busy), .done(con_done), .timeout(con_tmo),
    .switches(con_sw), .kbd(con_kbd), .knob(con_knob), .txd(con_txd), .rxd(con_rxd));

  assign irq_console = con_done;

  // ---------------- display ----------------
  logic [7:0] vid_rdata;
  video_display #(.ROWS(16), .COLS(32), .SCANS(12)) u_video (
    .clk, .rst_n, .cpu_addr(bus_addr[8:0]), .cpu_wdata(bus_wdata), .cpu_we(vid_we),
    .cpu_rdata(vid_rdata), .char_tick, .scan_valid(vid_valid), .scan_row(vid_row),
    .scan_col(vid_col), .scan_line(vid_line), .scan_char(vid_char),
    .hsync(vid_hsync), .vsync(vid_vsync));

  // ---------------- link interrupt ----------------
  logic rx_done_q, tx_done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_done_q <= 1'b0; tx_done_q <= 1'b0; irq_link <= 1'b0;
    end else begin
      rx_done_q <= rx_done;
      tx_done_q <= tx_done;
      if ((rx_done && !rx_done_q) || (tx_done && !tx_done_q)) irq_link <= 1'b1;
      else if (clr_link)                                       irq_link <= 1'b0;
    end
  end

  // ---------------- register read ----------------
  always_comb begin
    bus_rdata = vid_rdata;
    if (sel_regs) begin
      unique case (roff)
        CR_RX_BASE_L: bus_rdata = rx_base[7:0];
        CR_RX_BASE_H: bus_rdata = rx_base[15:8];
        CR_RX_LIM_L:  bus_rdata = rx_lim[7:0];
        CR_RX_LIM_H:  bus_rdata = rx_lim[15:8];
        CR_RX_CTRL:   bus_rdata = {6'd0, rx_done, rx_busy};
        CR_RX_CNT_L:  bus_rdata = rx_count[7:0];
        CR_RX_CNT_H:  bus_rdata = rx_count[15:8];
        CR_TX_BASE_L: bus_rdata = tx_base[7:0];
        CR_TX_BASE_H: bus_rdata = tx_base[15:8];
        CR_TX_LEN_L:  bus_rdata = tx_len[7:0];
        CR_TX_LEN_H:  bus_rdata = tx_len[15:8];
        CR_TX_CTRL:   bus_rdata = {6'd0, tx_done, tx_busy};
        CR_FIFO_STAT: bus_rdata = {rxf_ovf, 2'd0, 5'(rxf_level)};
        CR_CON_LT_L:  bus_rdata = lights[7:0];
        CR_CON_LT_H:  bus_rdata = lights[15:8];
        CR_CON_CTRL:  bus_rdata = {5'd0, con_tmo, con_done, con_busy};
        CR_CON_SW_L:  bus_rdata = con_sw[7:0];
        CR_CON_SW_H:  bus_rdata = con_sw[15:8];
        CR_CON_KBD:   bus_rdata = con_kbd;
        CR_CON_KNOB:  bus_rdata = con_knob;
        CR_IRQ_CLR:   bus_rdata = {6'd0, irq_console, irq_link};
        default:      bus_rdata = '0;
      endcase
    end
  end

  logic unused;
  assign unused = ^{txf_ovf, txf_level, rxf_full, rx_base[15], tx_base[15]};
endmodule
