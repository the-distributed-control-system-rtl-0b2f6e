// primary_station: the Multibus logic of the Primary station, which runs the
// SDLC loop. Its link-driver processor uses the same communications card as a
// Secondary, with link FIFOs and DMA to core memory, and the same three-channel
// timer, which places the polls at fixed times after the 15-Hz reference. A
// second processor in the same crate, the Primary console, talks to the Host
// computer; the two exchange messages through queues in shared memory and alert
// each other with attention interrupts (cpu_attention).
// Link-driver interrupt levels: link controller and link DMA 6, timers 2,
// 15-Hz trigger 1, attention from the Primary console 1.
// Link-driver CPU map (cpu_addr[15:10]): 0x0000 communications card,
// 0x0C00 timer, 0x1000 interrupt logic, 0x1400 attention register. The console
// CPU sees only its attention register (ccpu_*); its attention flag is ccpu_attn.
// The processors, the MC6854 and the shared core memory are outside, on ports.
// The composition and interrupt levels follow the original system; the address
// map is this design's own, matching the Secondary's where the cards are shared.
module primary_station
  import linac_pkg::*;
#(
  parameter int unsigned CLK_HZ     = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD       = BAUD_DEFAULT,
  parameter int unsigned FIFO_DEPTH = LINK_FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // link-driver processor bus
  input  logic [15:0]       cpu_addr,
  input  logic [7:0]        cpu_wdata,
  input  logic              cpu_we,
  output logic [7:0]        cpu_rdata,
  output logic [2:0]        ipl,
  output logic [2:0]        irq_vector,
  // Primary console processor: attention register and interrupt
  input  logic [7:0]        ccpu_wdata,
  input  logic              ccpu_we,
  output logic [7:0]        ccpu_rdata,
  output logic              ccpu_attn,
  // Linac 15-Hz trigger
  input  logic              trig_15hz,
  // MC6854 link controller
  input  logic              adlc_irq,
  input  logic              adlc_rx_valid,
  input  logic [7:0]        adlc_rx_data,
  output logic              adlc_tx_valid,
  output logic [7:0]        adlc_tx_data,
  input  logic              adlc_tx_take,
  // core memory (DMA master port)
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [7:0]        mem_wdata,
  input  logic [7:0]        mem_rdata,
  input  logic              mem_ack,
  // communications card console line and display scan (for a local console)
  output logic              con_txd,
  input  logic              con_rxd,
  input  logic              char_tick,
  output logic              vid_valid,
  output logic [3:0]        vid_row,
  output logic [4:0]        vid_col,
  output logic [3:0]        vid_line,
  output logic [7:0]        vid_char,
  output logic              vid_hsync,
  output logic              vid_vsync
);
  logic [5:0] sel;
  assign sel = cpu_addr[15:10];

  logic [7:0] rd_comm, rd_tmr, rd_irq, rd_attn;
  logic       irq_link, irq_console, attn_link;
  logic [2:0] tmr_irq;

  comm_card #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(FIFO_DEPTH), .AW(MEM_AW)) u_comm (
    .clk, .rst_n,
    .bus_addr(cpu_addr[9:0]), .bus_wdata(cpu_wdata), .bus_we(cpu_we && sel == SEL_COMM),
    .bus_rdata(rd_comm),
    .adlc_rx_valid, .adlc_rx_data, .adlc_tx_valid, .adlc_tx_data, .adlc_tx_take,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .con_txd, .con_rxd,
    .char_tick, .vid_valid, .vid_row, .vid_col, .vid_line, .vid_char, .vid_hsync, .vid_vsync,
    .irq_link, .irq_console);

  interval_timer #(.CLK_HZ(CLK_HZ), .CHANNELS(3)) u_timer (
    .clk, .rst_n, .addr(cpu_addr[3:0]), .wdata(cpu_wdata), .we(cpu_we && sel == SEL_TIMER),
    .rdata(rd_tmr), .sync(trig_15hz), .irq(tmr_irq));

  cpu_attention u_attn (
    .clk, .rst_n, .a_wdata(cpu_wdata), .a_we(cpu_we && sel == SEL_ATTN), .a_rdata(rd_attn),
    .b_wdata(ccpu_wdata), .b_we(ccpu_we), .b_rdata(ccpu_rdata),
    .attn_a(attn_link), .attn_b(ccpu_attn));

  irq_priority #(.NSRC(PRI_NIRQ), .LEVELS(PRI_IRQ_LEVELS)) u_irq (
    .clk, .rst_n,
    .src({attn_link, trig_15hz, tmr_irq[2], tmr_irq[1], tmr_irq[0], irq_link, adlc_irq}),
    .addr(cpu_addr[1:0]), .wdata(cpu_wdata), .we(cpu_we && sel == SEL_IRQ),
    .rdata(rd_irq), .ipl, .vector(irq_vector));

  always_comb begin
    unique case (sel)
      SEL_COMM:  cpu_rdata = rd_comm;
      SEL_TIMER: cpu_rdata = rd_tmr;
      SEL_IRQ:   cpu_rdata = rd_irq;
      SEL_ATTN:  cpu_rdata = rd_attn;
      default:   cpu_rdata = '0;
    endcase
  end

  // the card's console interface is unused by the Primary's software
  logic unused;
  assign unused = irq_console;
endmodule
