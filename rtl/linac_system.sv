// linac_system: the station logic of the Linac control loop, with the Primary
// station and one Secondary station side by side. On the real loop the two are
// joined by their MC6854 link controllers, the link repeaters and the fiber-optic
// line, none of which is logic built here. So each station's link-controller
// byte interface, processor bus, core-memory DMA port and field I/O are ports,
// prefixed pri_ and sec_. Both stations share the clock and the Linac 15-Hz
// trigger. The full network has sixteen Secondaries, and more are added by
// instantiating secondary_station again.
module linac_system
  import linac_pkg::*;
#(
  parameter int unsigned CLK_HZ     = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD       = BAUD_DEFAULT,
  parameter int unsigned FIFO_DEPTH = LINK_FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig_15hz,
  // ---------------- Primary station ----------------
  input  logic [15:0]       pri_cpu_addr,
  input  logic [7:0]        pri_cpu_wdata,
  input  logic              pri_cpu_we,
  output logic [7:0]        pri_cpu_rdata,
  output logic [2:0]        pri_ipl,
  output logic [2:0]        pri_irq_vector,
  input  logic [7:0]        pri_ccpu_wdata,
  input  logic              pri_ccpu_we,
  output logic [7:0]        pri_ccpu_rdata,
  output logic              pri_ccpu_attn,
  input  logic              pri_adlc_irq,
  input  logic              pri_adlc_rx_valid,
  input  logic [7:0]        pri_adlc_rx_data,
  output logic              pri_adlc_tx_valid,
  output logic [7:0]        pri_adlc_tx_data,
  input  logic              pri_adlc_tx_take,
  output logic              pri_mem_req,
  output logic              pri_mem_we,
  output logic [MEM_AW-1:0] pri_mem_addr,
  output logic [7:0]        pri_mem_wdata,
  input  logic [7:0]        pri_mem_rdata,
  input  logic              pri_mem_ack,
  output logic              pri_con_txd,
  input  logic              pri_con_rxd,
  input  logic              pri_char_tick,
  output logic              pri_vid_valid,
  output logic [3:0]        pri_vid_row,
  output logic [4:0]        pri_vid_col,
  output logic [3:0]        pri_vid_line,
  output logic [7:0]        pri_vid_char,
  output logic              pri_vid_hsync,
  output logic              pri_vid_vsync,
  // ---------------- Secondary station ----------------
  input  logic [15:0]       sec_cpu_addr,
  input  logic [7:0]        sec_cpu_wdata,
  input  logic              sec_cpu_we,
  output logic [7:0]        sec_cpu_rdata,
  output logic [2:0]        sec_ipl,
  output logic [2:0]        sec_irq_vector,
  input  logic              sec_adlc_irq,
  input  logic              sec_adlc_rx_valid,
  input  logic [7:0]        sec_adlc_rx_data,
  output logic              sec_adlc_tx_valid,
  output logic [7:0]        sec_adlc_tx_data,
  input  logic              sec_adlc_tx_take,
  output logic              sec_mem_req,
  output logic              sec_mem_we,
  output logic [MEM_AW-1:0] sec_mem_addr,
  output logic [7:0]        sec_mem_wdata,
  input  logic [7:0]        sec_mem_rdata,
  input  logic              sec_mem_ack,
  input  logic [23:0]       sec_bio_in  [3],
  output logic [23:0]       sec_bio_out [3],
  output logic [2:0]        sec_bio_oe  [3],
  input  logic [31:0]       sec_pio_in,
  output logic [31:0]       sec_pio_out,
  output logic [3:0]        sec_pio_oe,
  input  logic              sec_char_tick,
  output logic              sec_vid_valid,
  output logic [3:0]        sec_vid_row,
  output logic [4:0]        sec_vid_col,
  output logic [3:0]        sec_vid_line,
  output logic [7:0]        sec_vid_char,
  output logic              sec_vid_hsync,
  output logic              sec_vid_vsync,
  output logic [15:0]       sec_con_lights,
  input  logic [15:0]       sec_con_switches,
  input  logic [6:0]        sec_kbd_data,
  input  logic              sec_kbd_strobe,
  input  logic              sec_knob_a,
  input  logic              sec_knob_b
);
  primary_station #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(FIFO_DEPTH)) u_primary (
    .clk, .rst_n, .trig_15hz,
    .cpu_addr(pri_cpu_addr), .cpu_wdata(pri_cpu_wdata), .cpu_we(pri_cpu_we),
    .cpu_rdata(pri_cpu_rdata), .ipl(pri_ipl), .irq_vector(pri_irq_vector),
    .ccpu_wdata(pri_ccpu_wdata), .ccpu_we(pri_ccpu_we), .ccpu_rdata(pri_ccpu_rdata),
    .ccpu_attn(pri_ccpu_attn),
    .adlc_irq(pri_adlc_irq), .adlc_rx_valid(pri_adlc_rx_valid), .adlc_rx_data(pri_adlc_rx_data),
    .adlc_tx_valid(pri_adlc_tx_valid), .adlc_tx_data(pri_adlc_tx_data),
    .adlc_tx_take(pri_adlc_tx_take),
    .mem_req(pri_mem_req), .mem_we(pri_mem_we), .mem_addr(pri_mem_addr),
    .mem_wdata(pri_mem_wdata), .mem_rdata(pri_mem_rdata), .mem_ack(pri_mem_ack),
    .con_txd(pri_con_txd), .con_rxd(pri_con_rxd),
    .char_tick(pri_char_tick), .vid_valid(pri_vid_valid), .vid_row(pri_vid_row),
    .vid_col(pri_vid_col), .vid_line(pri_vid_line), .vid_char(pri_vid_char),
    .vid_hsync(pri_vid_hsync), .vid_vsync(pri_vid_vsync));

  secondary_station #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(FIFO_DEPTH)) u_secondary (
    .clk, .rst_n, .trig_15hz,
    .cpu_addr(sec_cpu_addr), .cpu_wdata(sec_cpu_wdata), .cpu_we(sec_cpu_we),
    .cpu_rdata(sec_cpu_rdata), .ipl(sec_ipl), .irq_vector(sec_irq_vector),
    .adlc_irq(sec_adlc_irq), .adlc_rx_valid(sec_adlc_rx_valid), .adlc_rx_data(sec_adlc_rx_data),
    .adlc_tx_valid(sec_adlc_tx_valid), .adlc_tx_data(sec_adlc_tx_data),
    .adlc_tx_take(sec_adlc_tx_take),
    .mem_req(sec_mem_req), .mem_we(sec_mem_we), .mem_addr(sec_mem_addr),
    .mem_wdata(sec_mem_wdata), .mem_rdata(sec_mem_rdata), .mem_ack(sec_mem_ack),
    .bio_in(sec_bio_in), .bio_out(sec_bio_out), .bio_oe(sec_bio_oe),
    .pio_in(sec_pio_in), .pio_out(sec_pio_out), .pio_oe(sec_pio_oe),
    .char_tick(sec_char_tick), .vid_valid(sec_vid_valid), .vid_row(sec_vid_row),
    .vid_col(sec_vid_col), .vid_line(sec_vid_line), .vid_char(sec_vid_char),
    .vid_hsync(sec_vid_hsync), .vid_vsync(sec_vid_vsync),
    .con_lights(sec_con_lights), .con_switches(sec_con_switches),
    .kbd_data(sec_kbd_data), .kbd_strobe(sec_kbd_strobe), .knob_a(sec_knob_a), .knob_b(sec_knob_b));
endmodule
