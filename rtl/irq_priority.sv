// irq_priority: the station's priority interrupt logic. Each source has a fixed
// MC68000 level (LEVELS, 3 bits per source, source 0 in the low bits). A rising
// edge on a source sets its pending bit; ipl shows the highest level among the
// pending, enabled sources (0 = none), and 'vector' the lowest-numbered source
// at that level, which the handler reads to find its cause. Software clears a
// pending bit by writing it as 1.
// CPU map: 0 pending (read; write 1s to clear), 1 enable mask (read/write, all
// enabled after reset), 2 read {vector[2:0], 2'b0, ipl[2:0]}.
// Levels follow the document's interrupt structure (link driver 6, serial
// console 4, timer 2, 15-Hz acquisition and Primary console attention 1); edge
// latching, the mask and the vector register are this design's own.
module irq_priority #(
  parameter int unsigned NSRC = 7,
  parameter logic [NSRC*3-1:0] LEVELS = {3'd1, 3'd2, 3'd2, 3'd2, 3'd4, 3'd6, 3'd6}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src,
  input  logic [1:0]      addr,
  input  logic [7:0]      wdata,
  input  logic            we,
  output logic [7:0]      rdata,
  output logic [2:0]      ipl,
  output logic [2:0]      vector
);
  logic [NSRC-1:0] src_q, pending, enable, active;

  assign active = pending & enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q <= '0; pending <= '0; enable <= '1;
    end else begin
      src_q   <= src;
      pending <= (pending | (src & ~src_q))
               & ~((we && addr == 2'd0) ? wdata[NSRC-1:0] : '0);
      if (we && addr == 2'd1) enable <= wdata[NSRC-1:0];
    end
  end

  always_comb begin
    ipl    = '0;
    vector = '0;
    for (int i = NSRC - 1; i >= 0; i--) begin
      if (active[i] && LEVELS[i*3 +: 3] >= ipl) begin
        ipl    = LEVELS[i*3 +: 3];
        vector = 3'(i);
      end
    end
  end

  always_comb begin
    unique case (addr)
      2'd0:    rdata = 8'(pending);
      2'd1:    rdata = 8'(enable);
      2'd2:    rdata = {vector, 2'b00, ipl};
      default: rdata = '0;
    endcase
  end
  logic unused_wd;
  assign unused_wd = ^wdata[7:NSRC];
endmodule
