// interval_timer: the three-channel timer of the processor card. A prescaler
// divides the clock to a 1 us tick; each channel is a 16-bit down-counter that
// raises its interrupt flag RELOAD ticks after it is started, then stops
// (one-shot) or reloads and goes on (periodic). The station uses one periodic
// channel for the 150-Hz stepping-motor interrupt and one to start the console
// exchange; the Primary arms one-shots from the 15-Hz reference to place its
// polls at fixed times in the 66 ms cycle. A channel with SYNC set (re)starts
// on every 'sync' pulse, so its times count from the 15-Hz interrupt.
// CPU map: channel c at 4c+0 reload low, 4c+1 reload high, 4c+2 control
// (bit0 run, bit1 periodic, bit2 sync start; writing run=1 starts the count),
// 4c+3 status (bit0 irq flag, write 1 to clear; bit1 running).
// The channel count and uses are the document's; the counter size, 1 us tick
// and registers are this design's own (the timer chip is not described).
module interval_timer #(
  parameter int unsigned CLK_HZ   = 8_000_000,
  parameter int unsigned CHANNELS = 3,
  parameter int unsigned TICK_HZ  = 1_000_000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [3:0]          addr,
  input  logic [7:0]          wdata,
  input  logic                we,
  output logic [7:0]          rdata,
  input  logic                sync,
  output logic [CHANNELS-1:0] irq
);
  localparam int unsigned PRE = (CLK_HZ / TICK_HZ > 0) ? CLK_HZ / TICK_HZ : 1;
  localparam int unsigned PW  = (PRE > 1) ? $clog2(PRE) : 1;

  typedef struct packed {
    logic [15:0] reload;
    logic        periodic;
    logic        sync_mode;
    logic        running;
    logic [15:0] count;
  } chan_t;

  chan_t        ch [CHANNELS];
  logic [PW-1:0] pre;
  logic          tick;

  assign tick = (pre == PW'(PRE-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pre <= '0;
    else        pre <= tick ? '0 : pre + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CHANNELS; c++) begin
        ch[c] <= '0;
        irq[c] <= 1'b0;
      end
    end else begin
      for (int c = 0; c < CHANNELS; c++) begin
        // counting
        if (ch[c].running && tick) begin
          if (ch[c].count <= 16'd1) begin
            irq[c] <= 1'b1;
            if (ch[c].periodic) ch[c].count   <= ch[c].reload;
            else                ch[c].running <= 1'b0;
          end else begin
            ch[c].count <= ch[c].count - 1'b1;
          end
        end
        // restart on the 15-Hz reference
        if (sync && ch[c].sync_mode && ch[c].reload != 0) begin
          ch[c].count   <= ch[c].reload;
          ch[c].running <= 1'b1;
        end
        // CPU writes
        if (we && addr[3:2] == 2'(c)) begin
          unique case (addr[1:0])
            2'd0: ch[c].reload[7:0]  <= wdata;
            2'd1: ch[c].reload[15:8] <= wdata;
            2'd2: begin
              ch[c].periodic  <= wdata[1];
              ch[c].sync_mode <= wdata[2];
              ch[c].running   <= wdata[0] && (ch[c].reload != 0);
              ch[c].count     <= ch[c].reload;
            end
            2'd3: if (wdata[0]) irq[c] <= 1'b0;
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    rdata = '0;
    for (int c = 0; c < CHANNELS; c++) begin
      if (addr[3:2] == 2'(c)) begin
        unique case (addr[1:0])
          2'd0: rdata = ch[c].reload[7:0];
          2'd1: rdata = ch[c].reload[15:8];
          2'd2: rdata = {5'd0, ch[c].sync_mode, ch[c].periodic, ch[c].running};
          default: rdata = {6'd0, ch[c].running, irq[c]};
        endcase
      end
    end
  end
endmodule
