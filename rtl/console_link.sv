// console_link: the communications card's end of the serial line to the local
// console. One exchange, started by software from the timer interrupt, sends
// the two light bytes that drive the lighted pushbuttons (low byte first), then
// receives four bytes: switch status low and high, the keyboard byte and the
// knob counter byte. When the fourth byte is in, the received bytes are latched
// into the output registers and 'done' is set; it is the source of the
// console-link interrupt and stays set until 'clear' or the next 'start'. If the
// console stops answering for TIMEOUT_BYTES character times the exchange ends
// with 'done' and 'timeout' set and the old values kept.
// The two-out/four-in exchange and 4800 baud follow the document; the byte
// order, the character format (8N1, in uart_tx/uart_rx) and the timeout are
// this design's own.
module console_link #(
  parameter int unsigned CLK_HZ        = 8_000_000,
  parameter int unsigned BAUD          = 4800,
  parameter int unsigned TIMEOUT_BYTES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        clear,
  input  logic [15:0] lights,
  output logic        busy,
  output logic        done,
  output logic        timeout,
  output logic [15:0] switches,
  output logic [7:0]  kbd,
  output logic [7:0]  knob,
  output logic        txd,
  input  logic        rxd
);
  localparam int unsigned TMO = TIMEOUT_BYTES * 10 * ((CLK_HZ + BAUD/2) / BAUD);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_RECV} state_e;
  state_e      state;
  logic [1:0]  idx;
  logic [7:0]  rx_buf [3];
  logic        tx_start, tx_busy, rx_valid, rx_ferr;
  logic [7:0]  tx_data, rx_data;
  logic [$clog2(TMO+1)-1:0] tmo_cnt;

  assign busy     = (state != S_IDLE);
  assign tx_start = (state == S_SEND) && !tx_busy && !(idx == 2'd2);
  assign tx_data  = idx[0] ? lights[15:8] : lights[7:0];

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(tx_data), .busy(tx_busy), .txd);
  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rxd, .valid(rx_valid), .frame_err(rx_ferr), .data(rx_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; done <= 1'b0; timeout <= 1'b0; tmo_cnt <= '0;
      switches <= '0; kbd <= '0; knob <= '0;
      rx_buf[0] <= '0; rx_buf[1] <= '0; rx_buf[2] <= '0;
    end else begin
      if (clear) done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SEND; idx <= '0; done <= 1'b0; timeout <= 1'b0;
        end
        S_SEND: begin
          if (tx_start) idx <= idx + 1'b1;
          if (idx == 2'd2 && !tx_busy) begin
            state <= S_RECV; idx <= '0; tmo_cnt <= '0;
          end
        end
        S_RECV: begin
          if (rx_valid) begin
            tmo_cnt <= '0;
            idx     <= idx + 1'b1;
            if (idx == 2'd3) begin
              switches <= {rx_buf[1], rx_buf[0]};
              kbd      <= rx_buf[2];
              knob     <= rx_data;
              done     <= 1'b1;
              state    <= S_IDLE;
            end else begin
              rx_buf[idx] <= rx_data;
            end
          end else if (tmo_cnt == ($clog2(TMO+1))'(TMO)) begin
            done <= 1'b1; timeout <= 1'b1; state <= S_IDLE;
          end else begin
            tmo_cnt <= tmo_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a framing error only loses that byte; the timeout ends the exchange
  logic unused_ferr;
  assign unused_ferr = rx_ferr;
endmodule
