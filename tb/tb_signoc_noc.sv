// End-to-end testbench for the Sig-NoC mesh at its default 4x4 size.
//
// Every node's core sends data packets (head, 16 body flits, tail) and
// message packets (head, tail) to random nodes, with data of varying density
// of 1s. Checked:
//  - every packet arrives at its destination decoded, equal to what was sent,
//    and in order per source/destination pair;
//  - each packet's energy estimate equals the 1s of its coded form;
//  - the wire transitions counted on all links of the mesh equal the sum,
//    over packets, of coded 1s times links crossed (hops + 2), i.e. the link
//    energy is exactly what the source predicted;
//  - coding reduces the 1s of the traffic.
// Mechanisms counted, each must occur: data packets with a nonzero signature,
// message packets (zero signature), injection back-pressure, contention
// inside the routers, traffic on every inter-router link direction.
module tb_signoc_noc;
  import signoc_pkg::*;
  import tb_signoc_pkg::*;

  localparam int MX = 4, MY = 4, NODES = MX * MY;
  localparam int PKTS_PER_NODE = 24;

  logic clk = 0, rst_n = 0;
  flit_t [NODES-1:0] inj_flit, ej_flit;
  logic  [NODES-1:0] inj_valid, inj_ready, ej_valid, est_valid;
  logic  [NODES-1:0][9:0] est_ones;
  int checks = 0, failures = 0;

  signoc_noc dut (.clk, .rst_n, .inj_flit, .inj_valid, .inj_ready,
                  .ej_flit, .ej_valid, .est_ones, .est_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_t exp_q[NODES][NODES][$];   // [src][dest]
  int   est_q[NODES][$];          // expected estimate per source
  int   dest_q[NODES][$];         // destination of each packet per source
  int   t_q[NODES][NODES][$];     // cycle each head left its encoder, [src][dest]
  int   cycle = 0, n_min_latency = 0;
  int   cur_src[NODES], cur_idx[NODES];
  longint predicted = 0, toggles = 0, ones_plain = 0, ones_coded = 0;
  int   n_sent = 0, n_recv = 0, n_data_sig = 0, n_msg = 0, n_backpressure = 0;

  // ---------------- link activity ----------------
  int n_router_stall = 0;
  int link_toggles_dir[4];   // E, W, S, N directions
  for (genvar y = 0; y < MY; y++) begin : g_ty
    for (genvar x = 0; x < MX; x++) begin : g_tx
      logic [FLIT_W-1:0] pi = '0, pe = '0;
      // a router input holding flits that do not move this cycle
      always @(posedge clk)
        if (rst_n) n_router_stall += $countones(~dut.g_y[y].g_x[x].u_router.empty & ~dut.g_y[y].g_x[x].u_router.pop);
      always @(posedge clk) begin
        if (rst_n) toggles += $countones(dut.g_y[y].g_x[x].u_inj_link.wires ^ pi);
        if (rst_n) toggles += $countones(dut.g_y[y].g_x[x].u_ej_link.wires ^ pe);
        pi = dut.g_y[y].g_x[x].u_inj_link.wires;
        pe = dut.g_y[y].g_x[x].u_ej_link.wires;
      end
      if (x + 1 < MX) begin : g_te
        logic [FLIT_W-1:0] p1 = '0, p2 = '0;
        always @(posedge clk) begin
          if (rst_n) toggles += $countones(dut.g_y[y].g_x[x].g_east.u_e.wires ^ p1);
          if (rst_n) toggles += $countones(dut.g_y[y].g_x[x].g_east.u_w.wires ^ p2);
          if (rst_n) link_toggles_dir[0] += $countones(dut.g_y[y].g_x[x].g_east.u_e.wires ^ p1);
          if (rst_n) link_toggles_dir[1] += $countones(dut.g_y[y].g_x[x].g_east.u_w.wires ^ p2);
          p1 = dut.g_y[y].g_x[x].g_east.u_e.wires;
          p2 = dut.g_y[y].g_x[x].g_east.u_w.wires;
        end
      end
      if (y + 1 < MY) begin : g_ts
        logic [FLIT_W-1:0] p1 = '0, p2 = '0;
        always @(posedge clk) begin
          if (rst_n) toggles += $countones(dut.g_y[y].g_x[x].g_south.u_s.wires ^ p1);
          if (rst_n) toggles += $countones(dut.g_y[y].g_x[x].g_south.u_n.wires ^ p2);
          if (rst_n) link_toggles_dir[2] += $countones(dut.g_y[y].g_x[x].g_south.u_s.wires ^ p1);
          if (rst_n) link_toggles_dir[3] += $countones(dut.g_y[y].g_x[x].g_south.u_n.wires ^ p2);
          p1 = dut.g_y[y].g_x[x].g_south.u_s.wires;
          p2 = dut.g_y[y].g_x[x].g_south.u_n.wires;
        end
      end
    end
  end

  // ---------------- ejection checker ----------------
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NODES; d++) begin
      if (est_valid[d]) begin
        checks++;
        if (est_q[d].size() == 0 || int'(est_ones[d]) != est_q[d][0]) begin
          failures++;
          $display("node %0d estimate %0d expected %0d", d, est_ones[d], (est_q[d].size() != 0) ? est_q[d][0] : -1);
        end
        if (est_q[d].size() != 0) void'(est_q[d].pop_front());
        if (dest_q[d].size() != 0) t_q[d][dest_q[d].pop_front()].push_back(cycle);
      end
      if (ej_valid[d]) begin
        flit_t f;
        f = ej_flit[d];
        checks++;
        if (f.ftype == FLIT_HEAD) begin
          int s;
          s = int'(f.payload[SRC_LSB +: NODE_W]);
          if (cur_src[d] != -1 || s >= NODES || exp_q[s][d].size() == 0) begin
            failures++;
            $display("node %0d: unexpected head %s", d, fstr(f));
          end else begin
            int lat;
            cur_src[d] = s; cur_idx[d] = 0;
            // head latency: at least one cycle per link and per router
            lat = cycle - t_q[s][d].pop_front();
            checks++;
            if (lat < 3 + 2 * hops(s, d)) begin
              failures++;
              $display("%0d->%0d arrived after %0d cycles, minimum is %0d", s, d, lat, 3 + 2 * hops(s, d));
            end
            if (lat == 3 + 2 * hops(s, d)) n_min_latency++;
          end
        end
        if (cur_src[d] >= 0) begin
          if (f !== exp_q[cur_src[d]][d][0][cur_idx[d]]) begin
            failures++;
            if (failures < 10) $display("node %0d flit %0d: got %s expected %s", d, cur_idx[d], fstr(f),
                                        fstr(exp_q[cur_src[d]][d][0][cur_idx[d]]));
          end
          cur_idx[d]++;
          if (f.ftype == FLIT_TAIL) begin
            void'(exp_q[cur_src[d]][d].pop_front());
            cur_src[d] = -1; n_recv++;
          end
        end
      end
    end
  end

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % MX) - (d % MX); dy = (s / MX) - (d / MX);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  task automatic core(int s);
    for (int n = 0; n < PKTS_PER_NODE; n++) begin
      pkt_t p, c;
      int d, pct;
      // hot spot traffic to the four corner directories every other packet
      d = $urandom_range(NODES - 1);
      if (n % 2 == 0) d = (n / 2 % 4 == 0) ? 0 : (n / 2 % 4 == 1) ? MX - 1 :
                          (n / 2 % 4 == 2) ? NODES - MX : NODES - 1;
      pct = $urandom_range(100);
      p = (n % 4 == 1) ? mk_msg(s, d, pct) : mk_data(s, d, pct);
      c = ref_encode(p);
      exp_q[s][d].push_back(p);
      est_q[s].push_back(ones(c));
      dest_q[s].push_back(d);
      predicted  += longint'(ones(c)) * (hops(s, d) + 2);
      ones_plain += ones(p);
      ones_coded += ones(c);
      if (p.size() > 2 && c[0].payload[SIG_LSB +: 8] != 0) n_data_sig++;
      if (p.size() == 2) n_msg++;
      n_sent++;
      foreach (p[k]) begin
        inj_valid[s] = 1; inj_flit[s] = p[k];
        @(posedge clk);
        while (!inj_ready[s]) begin n_backpressure++; @(posedge clk); end
        #1;
      end
      inj_valid[s] = 0;
      repeat ($urandom_range(3)) @(posedge clk);
      #1;
    end
  endtask


  initial begin
    inj_valid = '0; inj_flit = '0;
    foreach (cur_src[d]) cur_src[d] = -1;
    foreach (link_toggles_dir[i]) link_toggles_dir[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < NODES; s++) begin
      automatic int ss = s;
      fork core(ss); join_none
    end
    wait fork;
    repeat (500) @(posedge clk);
    checks++;
    if (n_recv != n_sent) begin failures++; $display("received %0d of %0d packets", n_recv, n_sent); end
    checks++;
    if (toggles != predicted) begin
      failures++; $display("link transitions %0d, predicted at the sources %0d", toggles, predicted);
    end
    checks++;
    if (ones_coded >= ones_plain) begin failures++; $display("coding did not reduce 1s"); end
    checks++;
    if (n_data_sig == 0 || n_msg == 0 || n_backpressure == 0 || n_router_stall == 0 || n_min_latency == 0) begin
      failures++; $display("coverage: signed data %0d, messages %0d, back-pressure %0d, router stalls %0d",
                           n_data_sig, n_msg, n_backpressure, n_router_stall);
    end
    foreach (link_toggles_dir[i]) begin
      checks++;
      if (link_toggles_dir[i] == 0) begin failures++; $display("no traffic in link direction %0d", i); end
    end
    $display("packets %0d (signed data %0d, messages %0d), back-pressure cycles %0d, router stalls %0d",
             n_recv, n_data_sig, n_msg, n_backpressure, n_router_stall);
    $display("packets delivered at the minimum latency 3 + 2*hops: %0d", n_min_latency);
    $display("link transitions %0d = predicted %0d; 1s sent plain %0d, coded %0d (%0d%% fewer)",
             toggles, predicted, ones_plain, ones_coded, 100 * (ones_plain - ones_coded) / ones_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
