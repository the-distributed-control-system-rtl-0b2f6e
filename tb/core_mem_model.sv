// core_mem_model: behavioural stand-in for the station's 32K byte core memory
// card as seen by a Multibus DMA master. A request (mem_req with address, data
// and direction held) is answered by a one-cycle mem_ack after a pseudo-random
// wait of 0..MAX_WAIT clocks, which models the bus being busy with other
// masters; read data comes with the ack. While bus_hold is high no request is
// answered, which models a long bus occupation. 'waits' counts requests that waited.
// Not synthesizable as a card model: the real card is a commercial product.
module core_mem_model #(
  parameter int unsigned AW       = 15,
  parameter int unsigned MAX_WAIT = 6,
  parameter int unsigned SEED     = 1
) (
  input  logic          clk,
  input  logic          bus_hold,   // another master holds the bus: no ack
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [7:0]    mem_wdata,
  output logic [7:0]    mem_rdata,
  output logic          mem_ack
);
  logic [7:0] mem [2**AW];
  int unsigned wait_left;
  logic        counting;
  int unsigned waits;
  int unsigned lfsr;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 8'(i * 7 + 3);
    mem_ack = 0; mem_rdata = 0; counting = 0; waits = 0; wait_left = 0;
    lfsr = SEED;
  end

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack && !bus_hold) begin
      if (!counting) begin
        lfsr = lfsr * 1103515245 + 12345;
        wait_left = (lfsr >> 16) % (MAX_WAIT + 1);
        counting = 1;
        if (wait_left > 0) waits++;
      end
      if (wait_left == 0) begin
        mem_ack <= 1'b1;
        counting = 0;
        if (mem_we) mem[mem_addr] = mem_wdata;
        else        mem_rdata <= mem[mem_addr];
      end else begin
        wait_left--;
      end
    end
  end
endmodule
