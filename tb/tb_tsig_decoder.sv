// Testbench for tsig_decoder: it must read a wire change as 1 and a steady
// wire as 0, in the cycle the wire changes.
module tb_tsig_decoder;
  localparam int W = 34;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] b, s, prev;
  int checks = 0, failures = 0;

  tsig_decoder #(.WIDTH(W)) dut (.clk, .rst_n, .b, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = '0; prev = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      // change some wires, or none at all every few cycles
      b = (t % 5 == 2) ? b : b ^ {$urandom, $urandom};
      #1;
      checks++;
      if (s !== (b ^ prev)) begin
        failures++;
        if (failures < 5) $display("t=%0d s=%h expected %h", t, s, b ^ prev);
      end
      @(posedge clk); #1;
      prev = b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
