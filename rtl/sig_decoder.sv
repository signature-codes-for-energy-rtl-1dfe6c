// Sig-NoC destination decoder (network-interface side of the receiving node).
//
// The head flit of each packet carries the packet's 8-bit signature in its
// reserved bits. The decoder keeps that signature in a register and XORs it
// with every byte of the body and tail flits that follow, which restores the
// original data and address bytes; a zero signature (message packets) leaves
// them unchanged. Decoding happens only here, at the destination, and costs
// one XOR level. Clearing the signature field of the delivered head flit, so
// the core sees the head as it was sent, is this design's choice.
//
// Interface: in_* is the flit stream from the network, out_* the decoded
// stream to the core; out_flit is combinational from in_flit (no latency).
module sig_decoder
  import signoc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  input  logic  in_valid,
  output flit_t out_flit,
  output logic  out_valid,
  output logic [SIG_W-1:0] sig_seen
);

  logic [SIG_W-1:0] sig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      sig_q <= '0;
    else if (in_valid && in_flit.ftype == FLIT_HEAD) sig_q <= head_sig(in_flit);
  end

  always_comb begin
    out_flit  = in_flit;
    out_valid = in_valid;
    if (in_flit.ftype == FLIT_HEAD)
      out_flit.payload[SIG_LSB +: SIG_W] = '0;
    else
      out_flit.payload = xor_sig(in_flit.payload, sig_q);
  end

  assign sig_seen = sig_q;

endmodule
