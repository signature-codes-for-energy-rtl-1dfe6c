// Testbench for noc_allocator, directed: a free output goes to one head flit
// at a time, round-robin; once granted it stays with that input until the
// tail; body flits cannot take a free output; no grant without a credit;
// different outputs are granted in parallel.
module tb_noc_allocator;
  logic clk = 0, rst_n = 0;
  logic [4:0] req_valid, req_head, req_tail, credit_ok, out_valid, in_pop, locked;
  logic [4:0][2:0] req_port, out_sel;
  int checks = 0, failures = 0;

  noc_allocator dut (.clk, .rst_n, .req_valid, .req_port, .req_head, .req_tail,
                     .credit_ok, .out_valid, .out_sel, .in_pop, .locked);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // set the front flit of input i: kind 0 none, 1 head, 2 body, 3 tail
  task automatic setreq(int i, int kind, int port);
    req_valid[i] = (kind != 0);
    req_head[i]  = (kind == 1);
    req_tail[i]  = (kind == 3);
    req_port[i]  = 3'(port);
  endtask

  initial begin
    int first;
    req_valid = '0; req_head = '0; req_tail = '0; req_port = '0; credit_ok = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // inputs 1 and 3 both send a head to output 2
    setreq(1, 1, 2); setreq(3, 1, 2);
    #1;
    chk("one winner", out_valid[2] && $countones(in_pop) == 1);
    first = out_sel[2];
    chk("winner is a requester", first == 1 || first == 3);
    @(posedge clk); #1;
    chk("output locked", locked[2]);
    // winner now has a body flit, loser still a head
    setreq(first, 2, 2);
    #1;
    chk("locked output keeps its owner", out_valid[2] && out_sel[2] == 3'(first) && !in_pop[4 - first]);
    // no credit: nothing moves
    credit_ok[2] = 0;
    #1;
    chk("no grant without credit", !out_valid[2] && in_pop == '0);
    credit_ok[2] = 1;
    // meanwhile input 0 heads to output 4 in parallel
    setreq(0, 1, 4);
    #1;
    chk("parallel outputs", out_valid[4] && out_sel[4] == 0 && out_valid[2] && in_pop[0] && in_pop[first]);
    @(posedge clk); #1;
    setreq(0, 0, 0);
    // winner sends its tail
    setreq(first, 3, 2);
    #1;
    chk("tail granted to owner", out_valid[2] && out_sel[2] == 3'(first));
    @(posedge clk); #1;
    chk("output released after tail", !locked[2]);
    setreq(first, 0, 0);
    #1;
    chk("other input wins next", out_valid[2] && out_sel[2] == 3'(4 - first));
    @(posedge clk); #1;
    setreq(4 - first, 0, 0);
    // a body flit alone cannot take a free output
    setreq(2, 2, 1);
    #1;
    chk("body flit cannot open output", !out_valid[1]);
    setreq(2, 0, 0);
    // output 4 is still reserved for input 0: a head from input 1 must wait
    setreq(1, 1, 4);
    #1;
    chk("reserved output refuses other heads", !out_valid[4]);
    setreq(1, 0, 0);
    setreq(0, 3, 4);
    @(posedge clk); #1;
    setreq(0, 0, 0);
    // round robin: inputs 0..4 all send single-flit-sized head+tail packets to
    // output 3; each must be served once in five packets
    begin
      int served[5];
      foreach (served[i]) served[i] = 0;
      for (int i = 0; i < 5; i++) setreq(i, 1, 3);
      for (int n = 0; n < 10; n++) begin
        #1;
        chk("rr head grant", out_valid[3]);
        first = out_sel[3];
        served[first]++;
        @(posedge clk); #1;
        setreq(first, 3, 3);
        #1;
        chk("rr tail to same input", out_valid[3] && out_sel[3] == 3'(first));
        @(posedge clk); #1;
        setreq(first, 1, 3);
      end
      foreach (served[i]) chk($sformatf("input %0d served twice", i), served[i] == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
