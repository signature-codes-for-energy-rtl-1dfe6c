// Transition-signaling decoder at the receiving end of a link.
//
// A register keeps the previous wire value b(t-1); the recovered data bit is
// s(t) = b(t) xor b(t-1), so a wire transition reads as 1 and a steady wire
// as 0. This is the decoder of the transition-signaling scheme; the reset
// value 0 (matching the encoder's) is this design's choice.
//
// Interface: b is the wire value from the link; s is combinational and valid
// in the same cycle that b carries the transition.
module tsig_decoder #(
  parameter int unsigned WIDTH = 34
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s
);

  logic [WIDTH-1:0] b_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_prev <= '0;
    else        b_prev <= b;
  end

  assign s = b ^ b_prev;

endmodule
