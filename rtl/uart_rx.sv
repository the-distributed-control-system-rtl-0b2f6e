// uart_rx: asynchronous serial receiver for the console link (start bit, eight
// data bits LSB first, one stop bit). The line is synchronised with two flip-
// flops; a falling edge starts a frame, each bit is sampled in the middle of its
// bit time. 'valid' pulses one clock with 'data'; 'frame_err' pulses instead
// when the stop bit is low. Frame format is this design's choice.
module uart_rx #(
  parameter int unsigned CLK_HZ = 8_000_000,
  parameter int unsigned BAUD   = 4800
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic       frame_err,
  output logic [7:0] data
);
  localparam int unsigned DIV = (CLK_HZ + BAUD/2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV);
  logic [1:0]    sync;
  logic          active;
  logic [CW-1:0] tick;
  logic [3:0]    nbit;     // samples taken in this frame
  logic [8:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11; active <= 1'b0; tick <= '0; nbit <= '0; shreg <= '0;
      valid <= 1'b0; frame_err <= 1'b0; data <= '0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (!active) begin
        if (!sync[1]) begin           // start bit seen
          active <= 1'b1;
          tick   <= CW'(DIV/2);
          nbit   <= '0;
        end
      end else if (tick == CW'(DIV-1)) begin
        tick <= '0;
        if (nbit == 0 && sync[1]) begin
          active <= 1'b0;             // start bit did not last: glitch
        end else begin
          shreg <= {sync[1], shreg[8:1]};
          nbit  <= nbit + 1'b1;
          if (nbit == 4'd9) begin
            active <= 1'b0;
            if (sync[1]) begin
              valid <= 1'b1;
              data  <= shreg[8:1];
            end else begin
              frame_err <= 1'b1;
            end
          end
        end
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end
  logic unused_start;
  assign unused_start = shreg[0];   // the start-bit sample
endmodule
