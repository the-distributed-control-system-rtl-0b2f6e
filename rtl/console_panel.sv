// console_panel: the console end of the serial link to the communications card.
// It receives the two light bytes (low byte first) and, once both are in, drives
// them onto the lamp outputs of the lighted pushbuttons and answers with four
// bytes: switch status low, switch status high, the keyboard byte and the knob
// counter. The keyboard byte is the last ASCII character with bit 7 set as a
// "new key" flag; it reads 0 after it has been sent once. A pause longer than
// two character times between light bytes restarts the byte pairing.
// What is sent each way follows the document; the byte order, the new-key flag
// and the resynchronisation are this design's own.
module console_panel #(
  parameter int unsigned CLK_HZ = 8_000_000,
  parameter int unsigned BAUD   = 4800
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic        txd,
  output logic [15:0] lights,
  input  logic [15:0] switches,
  input  logic [6:0]  kbd_data,
  input  logic        kbd_strobe,
  input  logic        knob_a,
  input  logic        knob_b
);
  localparam int unsigned GAP = 20 * ((CLK_HZ + BAUD/2) / BAUD);

  logic       rx_valid, rx_ferr, tx_busy, tx_start;
  logic [7:0] rx_data, tx_data, lt_lo, kbd_reg, knob, snap_kbd, snap_knob;
  logic [15:0] snap_sw;
  logic       have_lo;
  logic [2:0] to_send;   // reply bytes left
  logic [$clog2(GAP+1)-1:0] gap_cnt;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rxd, .valid(rx_valid), .frame_err(rx_ferr), .data(rx_data));
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(tx_data), .busy(tx_busy), .txd);
  knob_counter #(.W(8)) u_knob (.clk, .rst_n, .enc_a(knob_a), .enc_b(knob_b), .count(knob));

  assign tx_start = (to_send != 0) && !tx_busy;
  always_comb begin
    unique case (to_send)
      3'd4:    tx_data = snap_sw[7:0];
      3'd3:    tx_data = snap_sw[15:8];
      3'd2:    tx_data = snap_kbd;
      default: tx_data = snap_knob;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lights <= '0; lt_lo <= '0; have_lo <= 1'b0; kbd_reg <= '0; to_send <= '0;
      snap_sw <= '0; snap_kbd <= '0; snap_knob <= '0; gap_cnt <= '0;
    end else begin
      if (kbd_strobe) kbd_reg <= {1'b1, kbd_data};
      if (tx_start) to_send <= to_send - 1'b1;

      if (have_lo && gap_cnt == ($clog2(GAP+1))'(GAP)) have_lo <= 1'b0;
      else if (have_lo) gap_cnt <= gap_cnt + 1'b1;

      if (rx_valid) begin
        gap_cnt <= '0;
        if (!have_lo) begin
          lt_lo   <= rx_data;
          have_lo <= 1'b1;
        end else begin
          lights    <= {rx_data, lt_lo};
          have_lo   <= 1'b0;
          snap_sw   <= switches;
          snap_kbd  <= kbd_reg;
          snap_knob <= knob;
          to_send   <= 3'd4;
          if (!kbd_strobe) kbd_reg <= '0;
        end
      end
    end
  end

  logic unused_ferr;
  assign unused_ferr = rx_ferr;
endmodule
