// byte_fifo: the 16-byte buffer that sits in each direction between the link
// controller and the Multibus DMA on the communications card. At the 1 MHz link
// rate one byte arrives every 8 us, so 16 bytes ride out about 128 us of bus
// unavailability. Register array with wrap-around pointers and a level counter.
// Interface: synchronous write (wr_en, wr_data) and read (rd_en) in one clock
// domain; rd_data shows the oldest byte while !empty (first-word fall-through).
// A write while full is dropped and sets the sticky 'overflow' flag until
// clear_ovf. Depth 16 and byte width follow the document; the overflow flag and
// the fall-through read are this design's choices.
module byte_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  output logic                       full,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic                       overflow,
  input  logic                       clear_ovf
);
  localparam int unsigned PW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full    = (level == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (level == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0; overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
      if (wr_en && full)  overflow <= 1'b1;
      else if (clear_ovf) overflow <= 1'b0;
    end
  end

  a_level_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(level) <= DEPTH);
endmodule
