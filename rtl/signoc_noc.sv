// Sig-NoC: a 2D-mesh on-chip network whose links use transition signaling
// and whose data packets are signature-coded once, at the source.
//
// Each of the MESH_X x MESH_Y nodes has a network interface and a router.
// On the sending side the interface's sig_encoder collects a packet from the
// core, computes its 8-bit signature, writes it into the head flit and XORs
// it into every body and tail byte, then injects the packet over a link into
// the router's local port. Routers forward flits hop by hop (dimension order,
// wormhole, credit flow control) without touching the coding. Every link,
// between routers and between router and interface, is a noc_link: the
// sender's register toggles a wire for each 1 and the receiver turns
// toggles back into 1s, so each hop costs one transition per 1 in the flit.
// On the receiving side the interface's sig_decoder XORs the signature back
// out, and the core sees the packet as it was sent.
//
// Node n sits at x = n % MESH_X, y = n / MESH_X; north is y-1, east x+1. The
// mesh size follows the evaluated 4x4 system; the per-node structure and the
// link, routing and flow-control details are this design's choices.
//
// Interface: per node, inj_* is a valid/ready packet stream from the core
// (head, body..., tail) and ej_* the decoded stream to the core, which is
// always accepted. est_ones/est_valid give each injected packet's link-energy
// estimate (1s per hop) when its head flit leaves the encoder.
module signoc_noc
  import signoc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned NODES    = MESH_X * MESH_Y,
  localparam int unsigned EST_W    = $clog2((BODY_FLITS + 2) * FLIT_W + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  flit_t [NODES-1:0]            inj_flit,
  input  logic  [NODES-1:0]            inj_valid,
  output logic  [NODES-1:0]            inj_ready,
  output flit_t [NODES-1:0]            ej_flit,
  output logic  [NODES-1:0]            ej_valid,
  output logic  [NODES-1:0][EST_W-1:0] est_ones,
  output logic  [NODES-1:0]            est_valid
);

  // router-side signals, indexed [node][port]
  flit_t [NODES-1:0][NPORTS-1:0] r_in_flit, r_out_flit;
  logic  [NODES-1:0][NPORTS-1:0] r_in_valid, r_in_credit;
  logic  [NODES-1:0][NPORTS-1:0] r_out_valid, r_out_credit;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // ---------------- router ----------------
      noc_router #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)
      ) u_router (
        .clk, .rst_n,
        .in_flit   (r_in_flit[N]),
        .in_valid  (r_in_valid[N]),
        .in_credit (r_in_credit[N]),
        .out_flit  (r_out_flit[N]),
        .out_valid (r_out_valid[N]),
        .out_credit(r_out_credit[N])
      );

      // ---------------- network interface: send side ----------------
      flit_t enc_flit;
      logic  enc_valid, enc_ready, inj_ok, inj_cred;

      sig_encoder u_enc (
        .clk, .rst_n,
        .in_flit  (inj_flit[N]),
        .in_valid (inj_valid[N]),
        .in_ready (inj_ready[N]),
        .out_flit (enc_flit),
        .out_valid(enc_valid),
        .out_ready(enc_ready),
        .est_ones (est_ones[N]),
        .est_valid(est_valid[N]),
        .sig_used ()
      );

      credit_cnt #(.MAX(BUF_DEPTH)) u_inj_cred (
        .clk, .rst_n,
        .consume(enc_valid && enc_ready),
        .give   (inj_cred),
        .ok     (inj_ok)
      );
      assign enc_ready = inj_ok;

      noc_link u_inj_link (
        .clk, .rst_n,
        .in_flit   (enc_flit),
        .in_valid  (enc_valid && enc_ready),
        .credit_out(inj_cred),
        .out_flit  (r_in_flit[N][PORT_L]),
        .out_valid (r_in_valid[N][PORT_L]),
        .credit_in (r_in_credit[N][PORT_L]),
        .wires     ()
      );

      // ---------------- network interface: receive side ----------------
      flit_t dec_in;
      logic  dec_in_valid;

      noc_link u_ej_link (
        .clk, .rst_n,
        .in_flit   (r_out_flit[N][PORT_L]),
        .in_valid  (r_out_valid[N][PORT_L]),
        .credit_out(r_out_credit[N][PORT_L]),
        .out_flit  (dec_in),
        .out_valid (dec_in_valid),
        .credit_in (dec_in_valid),   // the core always accepts
        .wires     ()
      );

      sig_decoder u_dec (
        .clk, .rst_n,
        .in_flit  (dec_in),
        .in_valid (dec_in_valid),
        .out_flit (ej_flit[N]),
        .out_valid(ej_valid[N]),
        .sig_seen ()
      );

      // ---------------- links to the east and south neighbours ----------------
      if (x + 1 < MESH_X) begin : g_east
        noc_link u_e (   // this node east -> neighbour west
          .clk, .rst_n,
          .in_flit   (r_out_flit[N][PORT_E]),
          .in_valid  (r_out_valid[N][PORT_E]),
          .credit_out(r_out_credit[N][PORT_E]),
          .out_flit  (r_in_flit[N+1][PORT_W]),
          .out_valid (r_in_valid[N+1][PORT_W]),
          .credit_in (r_in_credit[N+1][PORT_W]),
          .wires     ()
        );
        noc_link u_w (   // neighbour west -> this node east
          .clk, .rst_n,
          .in_flit   (r_out_flit[N+1][PORT_W]),
          .in_valid  (r_out_valid[N+1][PORT_W]),
          .credit_out(r_out_credit[N+1][PORT_W]),
          .out_flit  (r_in_flit[N][PORT_E]),
          .out_valid (r_in_valid[N][PORT_E]),
          .credit_in (r_in_credit[N][PORT_E]),
          .wires     ()
        );
      end else begin : g_east_edge
        assign r_in_flit[N][PORT_E]    = '0;
        assign r_in_valid[N][PORT_E]   = 1'b0;
        assign r_out_credit[N][PORT_E] = 1'b0;
      end

      if (y + 1 < MESH_Y) begin : g_south
        noc_link u_s (   // this node south -> neighbour north
          .clk, .rst_n,
          .in_flit   (r_out_flit[N][PORT_S]),
          .in_valid  (r_out_valid[N][PORT_S]),
          .credit_out(r_out_credit[N][PORT_S]),
          .out_flit  (r_in_flit[N+MESH_X][PORT_N]),
          .out_valid (r_in_valid[N+MESH_X][PORT_N]),
          .credit_in (r_in_credit[N+MESH_X][PORT_N]),
          .wires     ()
        );
        noc_link u_n (   // neighbour north -> this node south
          .clk, .rst_n,
          .in_flit   (r_out_flit[N+MESH_X][PORT_N]),
          .in_valid  (r_out_valid[N+MESH_X][PORT_N]),
          .credit_out(r_out_credit[N+MESH_X][PORT_N]),
          .out_flit  (r_in_flit[N][PORT_S]),
          .out_valid (r_in_valid[N][PORT_S]),
          .credit_in (r_in_credit[N][PORT_S]),
          .wires     ()
        );
      end else begin : g_south_edge
        assign r_in_flit[N][PORT_S]    = '0;
        assign r_in_valid[N][PORT_S]   = 1'b0;
        assign r_out_credit[N][PORT_S] = 1'b0;
      end

      if (x == 0) begin : g_west_edge
        assign r_in_flit[N][PORT_W]    = '0;
        assign r_in_valid[N][PORT_W]   = 1'b0;
        assign r_out_credit[N][PORT_W] = 1'b0;
      end
      if (y == 0) begin : g_north_edge
        assign r_in_flit[N][PORT_N]    = '0;
        assign r_in_valid[N][PORT_N]   = 1'b0;
        assign r_out_credit[N][PORT_N] = 1'b0;
      end
    end
  end

endmodule
