// video_display: the communications card's 16-line by 32-character display
// memory. The CPU writes character codes into a 512-byte video RAM (address =
// row*32 + column) and can read them back; because a whole page is rewritten by
// plain memory writes, page updates run far faster than through a serial
// terminal. The display side scans the RAM in raster order: each 'char_tick'
// moves one character position to the right; after 32 positions the raster line
// (scan_line, 0..SCANS-1) advances, and after SCANS lines the character row.
// One clock after a char_tick the block presents the position and the character
// code there, with scan_valid high, for a character generator; hsync pulses with
// the first character of every raster line and vsync with the first of a frame.
// CPU reads are combinational. The RAM size follows the document; the raster
// order, SCANS and the sync pulses are this design's own, and the font/dot
// generator that turns codes into pixels is not part of this block.
module video_display #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 32,
  parameter int unsigned SCANS = 12,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned CW = $clog2(COLS),
  localparam int unsigned LW = $clog2(SCANS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RW+CW-1:0] cpu_addr,
  input  logic [7:0]       cpu_wdata,
  input  logic             cpu_we,
  output logic [7:0]       cpu_rdata,
  input  logic             char_tick,
  output logic             scan_valid,
  output logic [RW-1:0]    scan_row,
  output logic [CW-1:0]    scan_col,
  output logic [LW-1:0]    scan_line,
  output logic [7:0]       scan_char,
  output logic             hsync,
  output logic             vsync
);
  logic [7:0]    vram [ROWS*COLS];
  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [LW-1:0] line;

  assign cpu_rdata = vram[cpu_addr];

  always_ff @(posedge clk) begin
    if (cpu_we) vram[cpu_addr] <= cpu_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; col <= '0; line <= '0;
      scan_valid <= 1'b0; scan_row <= '0; scan_col <= '0; scan_line <= '0;
      scan_char <= '0; hsync <= 1'b0; vsync <= 1'b0;
    end else begin
      scan_valid <= char_tick;
      hsync      <= char_tick && col == '0;
      vsync      <= char_tick && col == '0 && line == '0 && row == '0;
      if (char_tick) begin
        scan_row  <= row;
        scan_col  <= col;
        scan_line <= line;
        scan_char <= vram[{row, col}];
        if (col == CW'(COLS-1)) begin
          col <= '0;
          if (line == LW'(SCANS-1)) begin
            line <= '0;
            row  <= (row == RW'(ROWS-1)) ? '0 : row + 1'b1;
          end else begin
            line <= line + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
