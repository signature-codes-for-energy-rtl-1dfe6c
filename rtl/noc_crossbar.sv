// Router crossbar switch.
//
// Connects the front flit of the selected input buffer to each output port:
// output o carries in_flit[sel[o]] while valid[o] is set, and is quiet (all
// zeros) otherwise, so an idle output sends no transitions on its link. A
// plain multiplexer per output is this design's choice.
//
// Interface and timing: purely combinational.
module noc_crossbar
  import signoc_pkg::*;
#(
  parameter int unsigned N = NPORTS,
  localparam int unsigned SEL_W = $clog2(N)
) (
  input  flit_t [N-1:0]            in_flit,
  input  logic  [N-1:0][SEL_W-1:0] sel,
  input  logic  [N-1:0]            valid,
  output flit_t [N-1:0]            out_flit
);

  always_comb begin
    for (int o = 0; o < N; o++)
      out_flit[o] = valid[o] ? in_flit[sel[o]] : '0;
  end

endmodule
