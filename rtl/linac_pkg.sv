// linac_pkg: constants shared by the Secondary station logic.
// The 4800 baud console rate, the 16-byte link FIFOs, the 16x32 display and the
// 32K byte core memory are the station's documented sizes, as are the interrupt
// levels. The 8 MHz clock and
// the register/address map below are this design's own choices.
package linac_pkg;
  localparam int unsigned CLK_HZ_DEFAULT = 8_000_000;  // assumed CPU-board clock
  localparam int unsigned BAUD_DEFAULT   = 4800;       // console serial rate
  localparam int unsigned MEM_AW         = 15;         // 32K byte core memory
  localparam int unsigned LINK_FIFO_DEPTH = 16;        // per link direction

  // CPU I/O address map of the station top (bits [15:10] select a card)
  localparam logic [5:0] SEL_COMM  = 6'h00;  // 0x0000-0x03FF communications card
  localparam logic [5:0] SEL_BIO   = 6'h01;  // 0x0400-0x040F binary I/O card
  localparam logic [5:0] SEL_PIO   = 6'h02;  // 0x0800-0x0807 processor-card parallel I/O
  localparam logic [5:0] SEL_TIMER = 6'h03;  // 0x0C00-0x0C0F three-channel timer
  localparam logic [5:0] SEL_IRQ   = 6'h04;  // 0x1000-0x1003 priority interrupt logic

  // Communications card register offsets (card address bit 9 set)
  localparam logic [5:0] CR_RX_BASE_L = 6'h00, CR_RX_BASE_H = 6'h01,
                         CR_RX_LIM_L  = 6'h02, CR_RX_LIM_H  = 6'h03,
                         CR_RX_CTRL   = 6'h04,  // write: bit0 arm; read: bit0 busy, bit1 done
                         CR_RX_CNT_L  = 6'h05, CR_RX_CNT_H  = 6'h06,
                         CR_TX_BASE_L = 6'h08, CR_TX_BASE_H = 6'h09,
                         CR_TX_LEN_L  = 6'h0A, CR_TX_LEN_H  = 6'h0B,
                         CR_TX_CTRL   = 6'h0C,  // write: bit0 start; read: bit0 busy, bit1 done
                         CR_FIFO_STAT = 6'h0D,  // rx level[4:0]; bit7 rx overflow
                         CR_CON_LT_L  = 6'h10, CR_CON_LT_H = 6'h11,
                         CR_CON_CTRL  = 6'h12,  // write: bit0 start exchange; read: bit0 busy, bit1 done
                         CR_CON_SW_L  = 6'h13, CR_CON_SW_H = 6'h14,
                         CR_CON_KBD   = 6'h15, CR_CON_KNOB = 6'h16,
                         CR_IRQ_CLR   = 6'h17;  // write: bit0 link-done, bit1 console-done

  // Interrupt sources of the station and their MC68000 levels
  localparam int unsigned NIRQ = 7;
  typedef enum logic [2:0] {
    IRQ_ADLC = 3'd0, IRQ_LINK_DMA = 3'd1, IRQ_CONSOLE = 3'd2,
    IRQ_TIMER_0 = 3'd3, IRQ_TIMER_1 = 3'd4, IRQ_TIMER_2 = 3'd5, IRQ_15HZ = 3'd6
  } irq_src_e;
  localparam logic [NIRQ*3-1:0] IRQ_LEVELS_DEFAULT = {3'd1, 3'd2, 3'd2, 3'd2, 3'd4, 3'd6, 3'd6};

  // Primary station: link-driver CPU interrupt sources and levels
  localparam int unsigned PRI_NIRQ = 7;
  typedef enum logic [2:0] {
    PIRQ_ADLC = 3'd0, PIRQ_LINK_DMA = 3'd1, PIRQ_TIMER_0 = 3'd2, PIRQ_TIMER_1 = 3'd3,
    PIRQ_TIMER_2 = 3'd4, PIRQ_15HZ = 3'd5, PIRQ_ATTN = 3'd6
  } pri_irq_src_e;
  localparam logic [PRI_NIRQ*3-1:0] PRI_IRQ_LEVELS = {3'd1, 3'd1, 3'd2, 3'd2, 3'd2, 3'd6, 3'd6};
  localparam logic [5:0] SEL_ATTN = 6'h05;  // 0x1400 attention register (Primary)
endpackage
