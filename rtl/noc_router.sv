// Five-port mesh router (local, north, east, south, west).
//
// Every arriving flit is written into the input buffer of its port. For the
// flit at the front of each buffer, the router works out the output port:
// a head flit is routed by its destination field, dimension order X first
// then Y; body and tail flits follow the port their head took. The channel
// allocator grants outputs, holding each one for a whole packet, and the
// crossbar moves the granted flits to the output ports. Each output keeps a
// credit counter for the buffer at the other end of its link, and each input
// returns a credit when it pops a flit. The router neither encodes nor
// decodes packet data: Sig-NoC coding happens only at source and
// destination, and transition signaling lives in the links. Input buffers,
// channel allocation and crossbar are the network's router stages; the
// routing algorithm, buffer depth, single channel per port and credit flow
// control are this design's choices.
//
// Timing: a flit written into an input buffer at cycle t can leave at cycle
// t+1 at the earliest (one cycle per router, plus one per link).
module noc_router
  import signoc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  flit_t [NPORTS-1:0]   in_flit,
  input  logic  [NPORTS-1:0]   in_valid,
  output logic  [NPORTS-1:0]   in_credit,    // slot freed, to upstream
  output flit_t [NPORTS-1:0]   out_flit,
  output logic  [NPORTS-1:0]   out_valid,
  input  logic  [NPORTS-1:0]   out_credit    // slot freed downstream
);

  localparam int unsigned SEL_W = $clog2(NPORTS);

  flit_t [NPORTS-1:0]            front;
  logic  [NPORTS-1:0]            empty, pop, credit_ok;
  logic  [NPORTS-1:0][SEL_W-1:0] route, route_q, sel;
  logic  [NPORTS-1:0]            is_head, is_tail;

  function automatic logic [SEL_W-1:0] xy_route(logic [NODE_W-1:0] dest);
    int dx, dy;
    dx = int'(dest) % int'(MESH_X) - int'(X);
    dy = int'(dest) / int'(MESH_X) - int'(Y);
    if (dx > 0)      return SEL_W'(PORT_E);
    else if (dx < 0) return SEL_W'(PORT_W);
    else if (dy > 0) return SEL_W'(PORT_S);
    else if (dy < 0) return SEL_W'(PORT_N);
    else             return SEL_W'(PORT_L);
  endfunction

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic [FLIT_W-1:0] rd;
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en  (in_valid[p]),
      .wr_data(in_flit[p]),
      .rd_en  (pop[p]),
      .rd_data(rd),
      .empty  (empty[p]),
      .full   ()
    );
    assign front[p]   = flit_t'(rd);
    assign is_head[p] = (front[p].ftype == FLIT_HEAD);
    assign is_tail[p] = (front[p].ftype == FLIT_TAIL);
    assign route[p]   = is_head[p] ? xy_route(head_dest(front[p])) : route_q[p];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    route_q[p] <= '0;
      else if (pop[p] && is_head[p]) route_q[p] <= route[p];
    end

    credit_cnt #(.MAX(BUF_DEPTH)) u_cred (
      .clk, .rst_n,
      .consume(out_valid[p]),
      .give   (out_credit[p]),
      .ok     (credit_ok[p])
    );
  end

  noc_allocator #(.N(NPORTS)) u_alloc (
    .clk, .rst_n,
    .req_valid(~empty),
    .req_port (route),
    .req_head (is_head),
    .req_tail (is_tail),
    .credit_ok(credit_ok),
    .out_valid(out_valid),
    .out_sel  (sel),
    .in_pop   (pop),
    .locked   ()
  );

  noc_crossbar #(.N(NPORTS)) u_xbar (
    .in_flit (front),
    .sel     (sel),
    .valid   (out_valid),
    .out_flit(out_flit)
  );

  assign in_credit = pop;

  // every head flit must name a node of the mesh
  logic [NPORTS-1:0] bad_dest;
  always_comb
    for (int p = 0; p < NPORTS; p++)
      bad_dest[p] = !empty[p] && is_head[p] && (int'(head_dest(front[p])) >= int'(MESH_X * MESH_Y));
  a_dest_in_mesh: assert property (@(posedge clk) disable iff (!rst_n) bad_dest == '0)
    else $error("head flit addressed outside the mesh");

endmodule
