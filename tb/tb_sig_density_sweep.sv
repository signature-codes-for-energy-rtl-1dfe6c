// Density sweep on a single link: source encoder -> transition-signaling
// link -> destination decoder, fed with random data packets whose bits are 1
// with probability 0.1, 0.2, ... 1.0.
//
// For each density the testbench counts the wire transitions the coded
// packets cause on the link and compares them with the transitions the same
// packets would cause uncoded under transition signaling (their number of
// 1s). It prints the ratio, the relative link energy of signature coding,
// and checks that
//  - every packet is decoded back to the original;
//  - the measured transitions equal the encoder's own estimates;
//  - coding never costs more than uncoded transition signaling;
//  - the saving grows with the density of 1s: little at 10-30% 1s, nearly
//    all of it at 100% 1s.
module tb_sig_density_sweep;
  import signoc_pkg::*;
  import tb_signoc_pkg::*;

  localparam int PKTS = 40;
  logic clk = 0, rst_n = 0;
  flit_t in_flit, enc_flit, link_flit, dec_flit;
  logic in_valid, in_ready, enc_valid, link_valid, dec_valid, est_valid, credit;
  logic [9:0] est_ones;
  logic [7:0] sig_used, sig_seen;
  logic [FLIT_W-1:0] wires, wires_prev;
  int checks = 0, failures = 0;
  longint toggles = 0, est_sum = 0;
  flit_t exp_q[$];

  sig_encoder u_enc (.clk, .rst_n, .in_flit, .in_valid, .in_ready,
                     .out_flit(enc_flit), .out_valid(enc_valid), .out_ready(1'b1),
                     .est_ones, .est_valid, .sig_used);
  noc_link u_link (.clk, .rst_n, .in_flit(enc_flit), .in_valid(enc_valid), .credit_out(credit),
                   .out_flit(link_flit), .out_valid(link_valid), .credit_in(1'b0), .wires);
  sig_decoder u_dec (.clk, .rst_n, .in_flit(link_flit), .in_valid(link_valid),
                     .out_flit(dec_flit), .out_valid(dec_valid), .sig_seen);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    toggles += $countones(wires ^ wires_prev);
    wires_prev = wires;
    if (est_valid) est_sum += est_ones;
    if (dec_valid) begin
      checks++;
      if (exp_q.size() == 0 || dec_flit !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("decoded %s expected %s", fstr(dec_flit), exp_q.size() ? fstr(exp_q[0]) : "none");
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    real ratio[11];
    longint plain, t0, e0;
    in_valid = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wires_prev = wires;
    for (int d = 1; d <= 10; d++) begin
      plain = 0; t0 = toggles; e0 = est_sum;
      for (int n = 0; n < PKTS; n++) begin
        pkt_t p;
        p = mk_data(n % 16, (n + 3) % 16, d * 10);
        plain += ones(p);
        foreach (p[k]) begin
          exp_q.push_back(p[k]);
          in_valid = 1; in_flit = p[k];
          do @(posedge clk); while (!in_ready);
          #1;
        end
        in_valid = 0;
      end
      wait (exp_q.size() == 0);
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (toggles - t0 != est_sum - e0) begin
        failures++;
        $display("density %0d%%: %0d transitions, estimated %0d", d * 10, toggles - t0, est_sum - e0);
      end
      checks++;
      if (toggles - t0 > plain) begin
        failures++;
        $display("density %0d%%: coding costs more than uncoded", d * 10);
      end
      ratio[d] = real'(toggles - t0) / real'(plain);
      $display("probability of 1s %0.1f: relative link energy %0.3f (%0d of %0d transitions)",
               d / 10.0, ratio[d], toggles - t0, plain);
    end
    for (int d = 2; d <= 10; d++) begin
      checks++;
      if (ratio[d] > ratio[d-1] + 0.02) begin
        failures++;
        $display("saving shrinks from %0d%% to %0d%% ones", (d - 1) * 10, d * 10);
      end
    end
    checks++;
    if (ratio[1] < 0.9 || ratio[10] > 0.1) begin
      failures++;
      $display("ratio at 10%% ones %0.3f, at 100%% ones %0.3f", ratio[1], ratio[10]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
