// byte_port_bank: a bank of byte-wide I/O ports, each of which software makes an
// input or an output. An output byte is held in a latch that drives the pins
// and reads back as written, so outputs look like memory to the processor; an
// input byte reads the pins. One direction bit per byte (1 = output), all
// inputs after reset. CPU map: addresses 0..NBYTES-1 are the data bytes; with
// the top address bit set, address k holds the direction bits of bytes 8k..8k+7.
// Reads are combinational from the addressed register. Used for the binary I/O
// card and the processor card's parallel I/O. Read-back of outputs follows the
// document; the direction register and the map are this design's own.
module byte_port_bank #(
  parameter int unsigned NBYTES = 9,
  localparam int unsigned IW = (NBYTES > 1) ? $clog2(NBYTES) : 1,
  localparam int unsigned AW = IW + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [AW-1:0]         addr,
  input  logic [7:0]            wdata,
  input  logic                  we,
  output logic [7:0]            rdata,
  input  logic [NBYTES*8-1:0]   pin_in,
  output logic [NBYTES*8-1:0]   pin_out,
  output logic [NBYTES-1:0]     byte_oe
);
  localparam int unsigned ND = (NBYTES + 7) / 8;   // direction registers

  logic [7:0]        latch [NBYTES];
  logic [ND*8-1:0]   dir;
  logic              sel_dir;
  logic [IW-1:0]     idx;

  assign sel_dir = addr[AW-1];
  assign idx     = addr[IW-1:0];
  assign byte_oe = dir[NBYTES-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir <= '0;
      for (int i = 0; i < NBYTES; i++) latch[i] <= '0;
    end else if (we) begin
      if (sel_dir) begin
        for (int k = 0; k < ND; k++)
          if (idx == IW'(k)) dir[k*8 +: 8] <= wdata;
      end else begin
        for (int i = 0; i < NBYTES; i++)
          if (idx == IW'(i)) latch[i] <= wdata;
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (sel_dir) begin
      for (int k = 0; k < ND; k++)
        if (idx == IW'(k)) rdata = dir[k*8 +: 8];
    end else begin
      for (int i = 0; i < NBYTES; i++)
        if (idx == IW'(i)) rdata = dir[i] ? latch[i] : pin_in[i*8 +: 8];
    end
    for (int i = 0; i < NBYTES; i++) pin_out[i*8 +: 8] = latch[i];
  end
endmodule
