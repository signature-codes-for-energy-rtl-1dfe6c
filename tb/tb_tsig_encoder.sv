// Testbench for tsig_encoder: the wire must toggle exactly where a 1 is sent,
// one clock after it is presented, and stay still on 0s.
module tb_tsig_encoder;
  localparam int W = 34;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] s, b, model;
  int checks = 0, failures = 0, toggles = 0, ones_sent = 0;
  logic [W-1:0] b_prev;

  tsig_encoder #(.WIDTH(W)) dut (.clk, .rst_n, .s, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    b_prev = b;
    for (int t = 0; t < 500; t++) begin
      s = (t % 7 == 3) ? '0 : {$urandom, $urandom};
      @(posedge clk); #1;
      model = model ^ s;
      ones_sent += $countones(s);
      toggles   += $countones(b ^ b_prev);
      b_prev = b;
      checks++;
      if (b !== model) begin
        failures++;
        if (failures < 5) $display("t=%0d b=%h expected %h", t, b, model);
      end
    end
    checks++;
    if (toggles != ones_sent) begin
      failures++;
      $display("toggles %0d != ones sent %0d", toggles, ones_sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
