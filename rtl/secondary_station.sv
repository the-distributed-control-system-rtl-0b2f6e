// secondary_station: the Multibus logic of one Secondary station of the Linac
// control network, wired as a unit around the station processor's bus. It holds
//  - the communications card (link FIFOs and DMA, video display RAM, console
//    serial interface),
//  - the binary I/O card (nine bytes in three 24-bit connector groups),
//  - the processor card's three-channel timer, four bytes of parallel I/O and
//    priority interrupt logic,
//  - and, at the far end of the console serial line, the console's light
//    latches, switch/keyboard inputs and knob counter.
// The MC68000 processor, the MC6854 link controller and the 32K byte core
// memory are not part of this RTL: the processor's byte accesses arrive on the
// cpu_* ports, the link controller's byte interface is on adlc_*, and the
// communications card's DMA reaches core memory through mem_*.
// CPU map (cpu_addr[15:10] selects): 0x0000 communications card, 0x0400 binary
// I/O card, 0x0800 parallel I/O, 0x0C00 timer, 0x1000 interrupt logic. Reads
// are combinational; writes act on the clock edge.
// Interrupt levels: link controller and link DMA 6, console link 4, timers 2,
// 15-Hz trigger 1; ipl is the highest pending level. The composition follows
// the document; the address map and the interrupt wiring of the DMA and timer
// channels are this design's own.
module secondary_station
  import linac_pkg::*;
#(
  parameter int unsigned CLK_HZ     = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD       = BAUD_DEFAULT,
  parameter int unsigned FIFO_DEPTH = LINK_FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor bus
  input  logic [15:0]       cpu_addr,
  input  logic [7:0]        cpu_wdata,
  input  logic              cpu_we,
  output logic [7:0]        cpu_rdata,
  output logic [2:0]        ipl,
  output logic [2:0]        irq_vector,
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
  // binary I/O card connectors
  input  logic [23:0]       bio_in  [3],
  output logic [23:0]       bio_out [3],
  output logic [2:0]        bio_oe  [3],
  // processor-card parallel I/O
  input  logic [31:0]       pio_in,
  output logic [31:0]       pio_out,
  output logic [3:0]        pio_oe,
  // display scan to the character generator
  input  logic              char_tick,
  output logic              vid_valid,
  output logic [3:0]        vid_row,
  output logic [4:0]        vid_col,
  output logic [3:0]        vid_line,
  output logic [7:0]        vid_char,
  output logic              vid_hsync,
  output logic              vid_vsync,
  // console hardware
  output logic [15:0]       con_lights,
  input  logic [15:0]       con_switches,
  input  logic [6:0]        kbd_data,
  input  logic              kbd_strobe,
  input  logic              knob_a,
  input  logic              knob_b
);
  logic [5:0] sel;
  assign sel = cpu_addr[15:10];

  logic [7:0] rd_comm, rd_bio, rd_pio, rd_tmr, rd_irq;
  logic       irq_link, irq_console;
  logic [2:0] tmr_irq;
  logic       ser_down, ser_up;   // console serial line: card->console, console->card

  comm_card #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(FIFO_DEPTH), .AW(MEM_AW)) u_comm (
    .clk, .rst_n,
    .bus_addr(cpu_addr[9:0]), .bus_wdata(cpu_wdata), .bus_we(cpu_we && sel == SEL_COMM),
    .bus_rdata(rd_comm),
    .adlc_rx_valid, .adlc_rx_data, .adlc_tx_valid, .adlc_tx_data, .adlc_tx_take,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .con_txd(ser_down), .con_rxd(ser_up),
    .char_tick, .vid_valid, .vid_row, .vid_col, .vid_line, .vid_char, .vid_hsync, .vid_vsync,
    .irq_link, .irq_console);

  binary_io_card #(.GROUPS(3), .BYTES_PER_GROUP(3)) u_bio (
    .clk, .rst_n, .addr(cpu_addr[4:0]), .wdata(cpu_wdata), .we(cpu_we && sel == SEL_BIO),
    .rdata(rd_bio), .pin_in(bio_in), .pin_out(bio_out), .pin_oe(bio_oe));

  cpu_parallel_io #(.NBYTES(4)) u_pio (
    .clk, .rst_n, .addr(cpu_addr[2:0]), .wdata(cpu_wdata), .we(cpu_we && sel == SEL_PIO),
    .rdata(rd_pio), .pin_in(pio_in), .pin_out(pio_out), .byte_oe(pio_oe));

  interval_timer #(.CLK_HZ(CLK_HZ), .CHANNELS(3)) u_timer (
    .clk, .rst_n, .addr(cpu_addr[3:0]), .wdata(cpu_wdata), .we(cpu_we && sel == SEL_TIMER),
    .rdata(rd_tmr), .sync(trig_15hz), .irq(tmr_irq));

  irq_priority #(.NSRC(NIRQ), .LEVELS(IRQ_LEVELS_DEFAULT)) u_irq (
    .clk, .rst_n,
    .src({trig_15hz, tmr_irq[2], tmr_irq[1], tmr_irq[0], irq_console, irq_link, adlc_irq}),
    .addr(cpu_addr[1:0]), .wdata(cpu_wdata), .we(cpu_we && sel == SEL_IRQ),
    .rdata(rd_irq), .ipl, .vector(irq_vector));

  console_panel #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_console (
    .clk, .rst_n, .rxd(ser_down), .txd(ser_up), .lights(con_lights),
    .switches(con_switches), .kbd_data, .kbd_strobe, .knob_a, .knob_b);

  always_comb begin
    unique case (sel)
      SEL_COMM:  cpu_rdata = rd_comm;
      SEL_BIO:   cpu_rdata = rd_bio;
      SEL_PIO:   cpu_rdata = rd_pio;
      SEL_TIMER: cpu_rdata = rd_tmr;
      SEL_IRQ:   cpu_rdata = rd_irq;
      default:   cpu_rdata = '0;
    endcase
  end
endmodule
