// link_tx_dma: transmit DMA channel of the communications card. 'start' (one
// cycle) loads a message address and length; the channel then reads the message
// from core memory one byte per Multibus read (mem_req held until mem_ack, data
// in mem_rdata with the ack) and pushes each byte into the transmit FIFO that
// feeds the link controller. A byte waits in the channel while the FIFO is full.
// 'done' is set after the last byte has entered the FIFO and stays set until the
// next start. The document gives the function (DMA out of core memory through a
// 16-byte FIFO); the handshake and registers are this design's own.
module link_tx_dma #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [15:0]   length,
  output logic          busy,
  output logic          done,
  // transmit FIFO write side
  input  logic          fifo_full,
  output logic          fifo_wr,
  output logic [7:0]    fifo_data,
  // memory master port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  input  logic [7:0]    mem_rdata,
  input  logic          mem_ack
);
  logic [15:0]   remaining;   // bytes not yet fetched
  logic          hold;        // fetched byte waiting for FIFO space

  assign mem_we  = 1'b0;
  assign fifo_wr = hold && !fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; remaining <= '0; hold <= 1'b0;
      fifo_data <= '0; mem_req <= 1'b0; mem_addr <= '0;
    end else if (start) begin
      busy <= (length != 0); done <= (length == 0);
      remaining <= length; mem_addr <= base; hold <= 1'b0; mem_req <= 1'b0;
    end else if (busy) begin
      if (!mem_req && !hold && remaining != 0) mem_req <= 1'b1;
      if (mem_req && mem_ack) begin
        mem_req   <= 1'b0;
        fifo_data <= mem_rdata;
        hold      <= 1'b1;
        mem_addr  <= mem_addr + 1'b1;
        remaining <= remaining - 1'b1;
      end
      if (fifo_wr) begin
        hold <= 1'b0;
        if (remaining == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr));
endmodule
