// Credit counter for credit-based flow control on one link.
//
// Holds the number of free slots in the input buffer at the far end of the
// link. It starts at the buffer depth, drops by one for each flit sent and
// rises by one for each credit returned when the far end frees a slot. A
// flit may be sent only while ok is set. Credit flow control is this
// design's choice.
//
// Interface: consume and give may occur in the same cycle; ok is
// registered-state output.
module credit_cnt #(
  parameter int unsigned MAX = 4,
  localparam int unsigned W = $clog2(MAX + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic consume,
  input  logic give,
  output logic ok
);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= W'(MAX);
    else        cnt <= cnt - W'(consume) + W'(give);
  end

  assign ok = (cnt != '0);

  a_have_credit: assert property (@(posedge clk) disable iff (!rst_n) !(consume && cnt == '0))
    else $error("flit sent without a credit");
  a_no_excess: assert property (@(posedge clk) disable iff (!rst_n) !(give && !consume && cnt == W'(MAX)))
    else $error("credit returned beyond buffer depth");

endmodule
