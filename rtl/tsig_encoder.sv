// Transition-signaling encoder at the sending end of a link.
//
// Each data bit s is sent as a transition: a 1 toggles the wire, a 0 leaves
// it alone. The wire value b is held in a register and b(t) = s(t) xor
// b(t-1), so the number of wire transitions equals the number of 1s sent and
// the switching energy of a transfer is known from its data alone. This is
// the encoder of the transition-signaling scheme; the reset value 0 of the
// register is this design's choice.
//
// Interface: s is the level data to send this cycle (drive 0 when idle); b is
// the registered wire value, which changes one clock after s is presented.
module tsig_encoder #(
  parameter int unsigned WIDTH = 34
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] b
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b <= '0;
    else        b <= b ^ s;
  end

endmodule
