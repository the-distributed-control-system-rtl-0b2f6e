// knob_counter: the console's up-down counter on the shaft encoder knob. The two
// encoder phases are synchronised with two flip-flops each; every rising edge
// of phase A counts up when phase B is low and down when B is high. The 8-bit
// count wraps and is never cleared: software reads it each cycle and works with
// differences. The up-down counter and its one-byte width follow the document;
// the quadrature decoding (one count per cycle of A) is this design's own.
module knob_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enc_a,
  input  logic         enc_b,
  output logic [W-1:0] count
);
  logic [2:0] a_s;   // two sync stages plus edge history
  logic [1:0] b_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_s <= '0; b_s <= '0; count <= '0;
    end else begin
      a_s <= {a_s[1:0], enc_a};
      b_s <= {b_s[0], enc_b};
      if (a_s[1] && !a_s[2]) begin
        if (b_s[1]) count <= count - 1'b1;
        else        count <= count + 1'b1;
      end
    end
  end
endmodule
