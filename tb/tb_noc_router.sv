// Testbench for noc_router at position (1,1) of a 4x4 mesh. Each of the five
// inputs sends random data and message packets; upstream senders respect
// credits, downstream receivers return credits after random delays. Each
// packet must leave on the port chosen by X-then-Y routing, whole and in
// order, without flits of other packets in between. Contention for an output
// and credit stalls must both occur.
module tb_noc_router;
  import signoc_pkg::*;
  import tb_signoc_pkg::*;

  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  flit_t [4:0] in_flit, out_flit;
  logic  [4:0] in_valid, in_credit, out_valid, out_credit;
  int checks = 0, failures = 0, cycle = 0;

  noc_router #(.MESH_X(4), .MESH_Y(4), .X(1), .Y(1), .BUF_DEPTH(D)) dut (
    .clk, .rst_n, .in_flit, .in_valid, .in_credit, .out_flit, .out_valid, .out_credit);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy(int dest);
    int dx, dy;
    dx = dest % 4; dy = dest / 4;
    if (dx > 1) return PORT_E;
    if (dx < 1) return PORT_W;
    if (dy > 1) return PORT_S;
    if (dy < 1) return PORT_N;
    return PORT_L;
  endfunction

  pkt_t exp_q[5][5][$];   // [output][input] packets expected
  int   cur_in[5];        // input whose packet is passing an output, -1 none
  int   cur_idx[5];
  int   pending[5];       // credits owed by each receiver
  int   credits[5];       // upstream credit counters
  int   n_pkts = 0, n_recv = 0, n_contention = 0, n_credit_stall = 0;
  int   per_out[5];
  logic sending[5];

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) begin
      if (out_valid[o]) begin
        flit_t f;
        f = out_flit[o];
        checks++;
        if (f.ftype == FLIT_HEAD) begin
          int src;
          src = int'(f.payload[SRC_LSB +: NODE_W]);
          if (cur_in[o] != -1 || src > 4 || exp_q[o][src].size() == 0) begin
            failures++;
            $display("output %0d: unexpected head %s", o, fstr(f));
          end else begin
            cur_in[o] = src; cur_idx[o] = 0;
          end
        end
        if (cur_in[o] >= 0) begin
          if (f !== exp_q[o][cur_in[o]][0][cur_idx[o]]) begin
            failures++;
            if (failures < 10) $display("output %0d flit %0d: got %s expected %s", o, cur_idx[o], fstr(f),
                                        fstr(exp_q[o][cur_in[o]][0][cur_idx[o]]));
          end
          cur_idx[o]++;
          if (f.ftype == FLIT_TAIL) begin
            void'(exp_q[o][cur_in[o]].pop_front());
            cur_in[o] = -1; n_recv++; per_out[o]++;
          end
        end
        pending[o]++;
      end
    end
    // contention: two inputs with fronts for the same free output
  end

  // credit return, random delay
  always @(negedge clk) begin
    for (int o = 0; o < 5; o++) begin
      out_credit[o] = (pending[o] > 0) && ($urandom_range(2) == 0);
      if (out_credit[o]) pending[o]--;
    end
  end

  // upstream credit counters
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < 5; i++) credits[i] += int'(in_credit[i]) - int'(in_valid[i]);

  task automatic sender(int i);
    for (int n = 0; n < 40; n++) begin
      pkt_t p;
      int dest;
      dest = $urandom_range(15);
      p = (n % 3 == 0) ? mk_msg(i, dest, 50) : mk_data(i, dest, 50);
      p[0].payload[MODE_LSB +: MODE_W] = MODE_W'(n);
      exp_q[xy(dest)][i].push_back(p);
      n_pkts++;
      foreach (p[k]) begin
        in_valid[i] = 0;
        while (credits[i] <= 0 || $urandom_range(4) == 0) begin
          if (credits[i] <= 0) n_credit_stall++;
          @(posedge clk); #1;
        end
        in_valid[i] = 1; in_flit[i] = p[k];
        @(posedge clk); #1;
      end
      in_valid[i] = 0;
    end
  endtask

  // count cycles where two inputs' front flits wait for the same output
  always @(posedge clk) if (rst_n) begin
    int want[5];
    foreach (want[o]) want[o] = 0;
    for (int i = 0; i < 5; i++)
      if (!dut.empty[i]) want[dut.route[i]]++;
    foreach (want[o]) if (want[o] > 1) n_contention++;
  end

  initial begin
    in_valid = '0; in_flit = '0; out_credit = '0;
    foreach (cur_in[o]) begin cur_in[o] = -1; pending[o] = 0; credits[o] = D; per_out[o] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      sender(0); sender(1); sender(2); sender(3); sender(4);
    join
    repeat (300) @(posedge clk);
    checks++;
    if (n_recv != n_pkts) begin failures++; $display("received %0d of %0d packets", n_recv, n_pkts); end
    checks++;
    if (n_contention == 0 || n_credit_stall == 0) begin
      failures++; $display("coverage: contention %0d credit stalls %0d", n_contention, n_credit_stall);
    end
    foreach (per_out[o]) begin
      checks++;
      if (per_out[o] == 0) begin failures++; $display("output %0d never used", o); end
    end
    $display("packets %0d, contention cycles %0d, credit stalls %0d", n_recv, n_contention, n_credit_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
