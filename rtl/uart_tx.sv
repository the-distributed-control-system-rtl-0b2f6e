// uart_tx: asynchronous serial transmitter for the console link. One start bit,
// eight data bits LSB first, one stop bit; bit time CLK_HZ/BAUD clocks. 'start'
// with 'data' is taken when !busy. The line idles high. The frame format is this
// design's choice; the 4800 baud default is the console link's documented rate.
module uart_tx #(
  parameter int unsigned CLK_HZ = 8_000_000,
  parameter int unsigned BAUD   = 4800
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  localparam int unsigned DIV = (CLK_HZ + BAUD/2) / BAUD;
  logic [$clog2(DIV)-1:0] tick;
  logic [3:0]             nbit;    // bits left to send
  logic [9:0]             shreg;

  assign busy = (nbit != 0);
  assign txd  = busy ? shreg[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0; nbit <= '0; shreg <= '1;
    end else if (!busy) begin
      if (start) begin
        shreg <= {1'b1, data, 1'b0};
        nbit  <= 4'd10;
        tick  <= '0;
      end
    end else if (tick == ($clog2(DIV))'(DIV-1)) begin
      tick  <= '0;
      shreg <= {1'b1, shreg[9:1]};
      nbit  <= nbit - 1'b1;
    end else begin
      tick <= tick + 1'b1;
    end
  end
endmodule
