// Testbench for noc_link: flits arrive unchanged one cycle after they are
// sent, the wires toggle exactly once per 1 sent and never while idle, and
// credits pass back unchanged.
module tb_noc_link;
  import signoc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t in_flit, out_flit;
  logic in_valid, out_valid, credit_in, credit_out;
  logic [FLIT_W-1:0] wires, wires_prev;
  flit_t sent_q[$];
  int checks = 0, failures = 0, toggles = 0, ones_sent = 0, idle_cycles = 0;

  noc_link dut (.clk, .rst_n, .in_flit, .in_valid, .credit_out,
                .out_flit, .out_valid, .credit_in, .wires);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_flit = '0; in_valid = 0; credit_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wires_prev = wires;
    for (int t = 0; t < 800; t++) begin
      in_valid = ($urandom_range(3) != 0);
      in_flit  = flit_t'({$urandom, $urandom});
      if (!in_valid) in_flit = flit_t'({$urandom, $urandom}); // noise while idle
      credit_in = $urandom_range(1);
      #1;
      checks++;
      if (credit_out !== credit_in) failures++;
      if (in_valid) begin
        sent_q.push_back(in_flit);
        ones_sent += $countones(in_flit);
      end else idle_cycles++;
      @(posedge clk); #1;
      toggles += $countones(wires ^ wires_prev);
      wires_prev = wires;
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("t=%0d out_valid %b, expected %b", t, out_valid, in_valid);
      end else if (out_valid) begin
        flit_t exp;
        exp = sent_q.pop_front();
        if (out_flit !== exp) begin
          failures++;
          if (failures < 5) $display("t=%0d got %h expected %h", t, out_flit, exp);
        end
      end
    end
    checks++;
    if (toggles != ones_sent) begin
      failures++;
      $display("toggles %0d != ones sent %0d", toggles, ones_sent);
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
