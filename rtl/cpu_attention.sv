// cpu_attention: the attention interrupts between the two processors of the
// Primary station, which share one Multibus crate. The link-driver CPU (side A)
// and the Primary console CPU (side B, the Host interface) each have a one-byte
// register. Writing bit 0 raises the other side's attention flag ("look at the
// queue I just filled"), and writing bit 1 clears one's own flag. A read returns
// {6'b0, other side's flag, own flag}. attn_a and attn_b are the flags, which
// feed each processor's interrupt logic (level 1 on the link driver). A set and
// a clear of the same flag in one clock leave it set, so no request is lost.
// The two-way attention interrupt follows the description of the Primary
// station; the register layout is this design's own.
module cpu_attention (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] a_wdata,
  input  logic       a_we,
  output logic [7:0] a_rdata,
  input  logic [7:0] b_wdata,
  input  logic       b_we,
  output logic [7:0] b_rdata,
  output logic       attn_a,
  output logic       attn_b
);
  logic set_a, clr_a, set_b, clr_b;
  assign set_a = b_we && b_wdata[0];
  assign clr_a = a_we && a_wdata[1];
  assign set_b = a_we && a_wdata[0];
  assign clr_b = b_we && b_wdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      attn_a <= 1'b0;
      attn_b <= 1'b0;
    end else begin
      if (set_a)      attn_a <= 1'b1;
      else if (clr_a) attn_a <= 1'b0;
      if (set_b)      attn_b <= 1'b1;
      else if (clr_b) attn_b <= 1'b0;
    end
  end

  assign a_rdata = {6'd0, attn_b, attn_a};
  assign b_rdata = {6'd0, attn_a, attn_b};

  logic unused;
  assign unused = ^{a_wdata[7:2], b_wdata[7:2]};
endmodule
