// binary_io_card: the station's single binary I/O card design. Nine bytes are
// arranged as three groups of three; each group is one 24-bit, 50-pin connector
// (group g holds bytes 3g, 3g+1, 3g+2, least significant first). Each byte is an
// input or an output under software control, and output bytes read back as
// written. Pulsed, inverted or timed outputs are made by software writing the
// latches at the right moments; the card itself only latches and reads.
// CPU map (5-bit address): 0x00-0x08 data bytes, 0x10-0x11 direction bits
// (1 = output; byte 8 is bit 0 of 0x11). Register timing: writes take effect
// at the next clock, reads are combinational. The byte organisation follows the
// document; the direction register and map are this design's own.
module binary_io_card #(
  parameter int unsigned GROUPS          = 3,
  parameter int unsigned BYTES_PER_GROUP = 3,
  localparam int unsigned NB = GROUPS * BYTES_PER_GROUP,
  localparam int unsigned AW = ((NB > 1) ? $clog2(NB) : 1) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [AW-1:0] addr,
  input  logic [7:0]  wdata,
  input  logic        we,
  output logic [7:0]  rdata,
  input  logic [BYTES_PER_GROUP*8-1:0] pin_in  [GROUPS],
  output logic [BYTES_PER_GROUP*8-1:0] pin_out [GROUPS],
  output logic [BYTES_PER_GROUP-1:0]   pin_oe  [GROUPS]
);
  localparam int unsigned GW = BYTES_PER_GROUP * 8;

  logic [NB*8-1:0] all_in, all_out;
  logic [NB-1:0]   all_oe;

  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      all_in[g*GW +: GW]                         = pin_in[g];
      pin_out[g]                                 = all_out[g*GW +: GW];
      pin_oe[g]                                  = all_oe[g*BYTES_PER_GROUP +: BYTES_PER_GROUP];
    end
  end

  byte_port_bank #(.NBYTES(NB)) u_bank (
    .clk, .rst_n, .addr, .wdata, .we, .rdata,
    .pin_in(all_in), .pin_out(all_out), .byte_oe(all_oe));
endmodule
