// One unidirectional NoC link with transition signaling.
//
// The 34 flit wires carry transition-coded data: a tsig_encoder at the
// sending router turns each 1 into a wire toggle, and a tsig_decoder at the
// receiving router turns it back into a level. While no flit is sent the
// encoder input is held at 0, so the wires stay quiet. A separate valid wire
// marks the cycles that carry a flit, and a credit wire runs back from the
// receiver to the sender each time the receiver frees a buffer slot. Valid
// and credit are plain level control wires; their presence and the credit
// flow control are this design's choices.
//
// Timing: a flit presented with in_valid at cycle t is seen at the far end
// with out_valid at cycle t+1 (the encoder register is the link's pipeline
// stage). credit_in is passed back to credit_out in the same cycle.
module noc_link
  import signoc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // sending end
  input  flit_t in_flit,
  input  logic  in_valid,
  output logic  credit_out,
  // receiving end
  output flit_t out_flit,
  output logic  out_valid,
  input  logic  credit_in,
  // wire state, exposed for observing link activity
  output logic [FLIT_W-1:0] wires
);

  logic [FLIT_W-1:0] s_tx, s_rx;

  assign s_tx = in_valid ? FLIT_W'(in_flit) : '0;

  tsig_encoder #(.WIDTH(FLIT_W)) u_enc (
    .clk, .rst_n, .s(s_tx), .b(wires)
  );

  tsig_decoder #(.WIDTH(FLIT_W)) u_dec (
    .clk, .rst_n, .b(wires), .s(s_rx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  assign out_flit   = flit_t'(s_rx);
  assign credit_out = credit_in;

endmodule
