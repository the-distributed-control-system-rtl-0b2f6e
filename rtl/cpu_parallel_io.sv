// cpu_parallel_io: the four bytes of parallel I/O on the processor card. Each
// byte is an input or an output (direction register at address 4, bit i for
// byte i, 1 = output, inputs after reset); outputs read back as written.
// Address 0..3 are the data bytes. The four bytes are the document's; how they
// are programmed is this design's own, shared with the binary I/O card.
module cpu_parallel_io #(
  parameter int unsigned NBYTES = 4,
  localparam int unsigned AW = ((NBYTES > 1) ? $clog2(NBYTES) : 1) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AW-1:0]       addr,
  input  logic [7:0]          wdata,
  input  logic                we,
  output logic [7:0]          rdata,
  input  logic [NBYTES*8-1:0] pin_in,
  output logic [NBYTES*8-1:0] pin_out,
  output logic [NBYTES-1:0]   byte_oe
);

  byte_port_bank #(.NBYTES(NBYTES)) u_bank (
    .clk, .rst_n, .addr, .wdata, .we, .rdata, .pin_in, .pin_out, .byte_oe);
endmodule
