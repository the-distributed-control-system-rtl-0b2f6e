// link_rx_dma: receive DMA channel of the communications card. Bytes the link
// controller has put in the receive FIFO are written to core memory at
// consecutive addresses starting at 'base'. Each byte is one Multibus write:
// the channel raises mem_req with address and data and holds them until the
// bus answers mem_ack (arbitration plus the memory's transfer acknowledge, in
// one pulse), so a busy bus only lets bytes pile up in the FIFO.
// 'arm' (one cycle) loads base and limit and clears the count; the channel
// stops with 'done' after 'limit' bytes. That DMA carries the link data to core
// memory follows the document; the req/ack handshake, the limit and the
// registers are this design's own.
module link_rx_dma #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arm,
  input  logic [AW-1:0] base,
  input  logic [15:0]   limit,
  output logic          busy,
  output logic          done,
  output logic [15:0]   count,
  // receive FIFO read side
  input  logic          fifo_empty,
  input  logic [7:0]    fifo_data,
  output logic          fifo_rd,
  // memory master port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  input  logic          mem_ack
);
  logic [AW-1:0] ptr;

  assign mem_we  = 1'b1;
  assign fifo_rd = busy && !mem_req && !fifo_empty && (count != limit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; count <= '0; ptr <= '0;
      mem_req <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
    end else if (arm) begin
      busy <= (limit != 0); done <= (limit == 0); count <= '0; ptr <= base;
      mem_req <= 1'b0;
    end else begin
      if (fifo_rd) begin
        mem_req   <= 1'b1;
        mem_addr  <= ptr;
        mem_wdata <= fifo_data;
      end
      if (mem_req && mem_ack) begin
        mem_req <= 1'b0;
        ptr     <= ptr + 1'b1;
        count   <= count + 1'b1;
        if (count + 1'b1 == limit) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // request is held, unchanged, until acknowledged
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n || arm)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_wdata));
endmodule
