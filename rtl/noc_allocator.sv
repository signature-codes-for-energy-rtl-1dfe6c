// Channel allocator of a router, one virtual channel per port.
//
// Each router input requests the output port its front flit is routed to.
// An output that is free may be taken only by a head flit; the winner among
// the head flits asking for it is chosen round-robin, and the output then
// stays reserved for that input until the packet's tail flit has passed
// (wormhole switching). A flit is granted only when the output has a credit,
// i.e. a free slot in the next router's input buffer. The allocator picks a
// channel for a packet when its head flit arrives, as the network's channel
// allocator does; one channel per port, round-robin priority and wormhole
// reservation are this design's choices.
//
// Interface: req_* describe the front flit of each input. For each output,
// out_valid says a flit moves this cycle and out_sel which input it comes
// from; in_pop says which inputs give up their front flit. Combinational
// grants, reservation state updated at the clock edge.
module noc_allocator
  import signoc_pkg::*;
#(
  parameter int unsigned N = NPORTS,
  localparam int unsigned SEL_W = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               req_valid,
  input  logic [N-1:0][SEL_W-1:0]    req_port,
  input  logic [N-1:0]               req_head,
  input  logic [N-1:0]               req_tail,
  input  logic [N-1:0]               credit_ok,
  output logic [N-1:0]               out_valid,
  output logic [N-1:0][SEL_W-1:0]    out_sel,
  output logic [N-1:0]               in_pop,
  output logic [N-1:0]               locked
);

  logic [N-1:0][SEL_W-1:0] owner_q, ptr_q;
  logic [N-1:0]            locked_q;
  logic [N-1:0][N-1:0]     cand;

  logic [N-1:0]            multi_grant;

  assign locked = locked_q;

  // input k places after input p, wrapping around
  function automatic logic [SEL_W-1:0] rot(logic [SEL_W-1:0] p, int k);
    return SEL_W'((int'(p) + k) % int'(N));
  endfunction

  always_comb begin
    in_pop    = '0;
    out_valid = '0;
    out_sel   = '0;
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++)
        cand[o][i] = req_valid[i] && (req_port[i] == SEL_W'(o)) &&
                     (locked_q[o] ? (owner_q[o] == SEL_W'(i)) : req_head[i]);
      if (credit_ok[o]) begin
        // round-robin: first candidate after the last winner
        for (int k = N; k >= 1; k--) begin
          if (cand[o][rot(ptr_q[o], k)]) begin
            out_valid[o] = 1'b1;
            out_sel[o]   = rot(ptr_q[o], k);
          end
        end
        if (out_valid[o]) in_pop[out_sel[o]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= '0;
      owner_q  <= '0;
      ptr_q    <= '0;
    end else begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o]) begin
          ptr_q[o] <= out_sel[o];
          if (req_tail[out_sel[o]]) begin
            locked_q[o] <= 1'b0;
          end else if (req_head[out_sel[o]]) begin
            locked_q[o] <= 1'b1;
            owner_q[o]  <= out_sel[o];
          end
        end
      end
    end
  end

  // an input is granted by at most one output
  always_comb begin
    multi_grant = '0;
    for (int o1 = 0; o1 < N; o1++)
      for (int o2 = o1 + 1; o2 < N; o2++)
        if (out_valid[o1] && out_valid[o2] && out_sel[o1] == out_sel[o2])
          multi_grant[o1] = 1'b1;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) multi_grant == '0)
    else $error("one input granted by two outputs");

endmodule
