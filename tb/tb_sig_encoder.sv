// Testbench for sig_encoder. Random data and message packets, with gaps on
// the input and back-pressure on the output, are compared flit by flit
// against the reference coding; the energy estimate must equal the 1s of the
// coded packet, coding must never add 1s, and a packet must start leaving the
// cycle after its tail flit was taken.
module tb_sig_encoder;
  import signoc_pkg::*;
  import tb_signoc_pkg::*;

  logic clk = 0, rst_n = 0;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready, est_valid;
  logic [9:0] est_ones;
  logic [7:0] sig_used;
  int checks = 0, failures = 0, cycle = 0;
  pkt_t exp_q[$];        // coded packets expected, in order
  int   flit_idx = 0;
  int   tail_in_cycle = -1, n_latency = 0, n_data = 0, n_msg = 0, n_nonzero_sig = 0;
  logic gaps = 1'b1;

  sig_encoder dut (.clk, .rst_n, .in_flit, .in_valid, .in_ready,
                   .out_flit, .out_valid, .out_ready, .est_ones, .est_valid, .sig_used);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && in_flit.ftype == FLIT_TAIL) tail_in_cycle <= cycle;
    if (est_valid) begin
      checks++;
      if (int'(est_ones) != ones(exp_q[0])) begin
        failures++;
        $display("estimate %0d, coded packet has %0d ones", est_ones, ones(exp_q[0]));
      end
      if (!gaps) begin
        checks++; n_latency++;
        if (cycle != tail_in_cycle + 1) begin
          failures++;
          $display("head left at %0d, tail taken at %0d", cycle, tail_in_cycle);
        end
      end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_flit !== exp_q[0][flit_idx]) begin
        failures++;
        if (failures < 10) $display("flit %0d: got %s expected %s", flit_idx, fstr(out_flit), fstr(exp_q[0][flit_idx]));
      end
      if (flit_idx == exp_q[0].size() - 1) begin
        void'(exp_q.pop_front());
        flit_idx = 0;
      end else flit_idx++;
    end
  end

  task automatic send(pkt_t p);
    pkt_t c;
    c = ref_encode(p);
    checks++;
    if (ones(c) - $countones(c[0].payload[SIG_LSB +: 8]) > ones(p)) begin
      failures++;
      $display("reference coding added 1s");
    end
    if (p.size() > 2) begin
      n_data++;
      if (c[0].payload[SIG_LSB +: 8] != 0) n_nonzero_sig++;
      // coding must not add 1s, counting the signature in the head
      checks++;
      if (ones(c) > ones(p)) begin failures++; $display("coded packet has more 1s"); end
    end else n_msg++;
    exp_q.push_back(c);
    foreach (p[k]) begin
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid = 0; @(posedge clk); #1;
      end
      in_valid = 1; in_flit = p[k];
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_flit = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // no gaps, no back-pressure: latency check
    gaps = 0;
    send(mk_data(1, 2, 70));
    send(mk_msg(3, 4, 50));
    send(mk_data(5, 6, 20));
    wait (exp_q.size() == 0);
    @(posedge clk); #1;
    gaps = 1;
    fork
      forever begin @(posedge clk); #1 out_ready = ($urandom_range(3) != 0); end
    join_none
    for (int n = 0; n < 60; n++) begin
      if (n % 4 == 3) send(mk_msg(n % 16, (n + 5) % 16, 50));
      else            send(mk_data(n % 16, (n * 3) % 16, (n * 13) % 101));
    end
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_latency < 3 || n_nonzero_sig == 0 || n_msg == 0) begin
      failures++;
      $display("coverage: latency %0d nonzero-sig %0d msg %0d", n_latency, n_nonzero_sig, n_msg);
    end
    $display("data %0d (nonzero signature %0d), message %0d", n_data, n_nonzero_sig, n_msg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
