// Testbench for flit_fifo: random writes and reads, never writing when full,
// checked against a queue; also checks the empty/full flags and that a
// written flit is readable on the next cycle.
module tb_flit_fifo;
  localparam int W = 34, D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0;

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en,
                                         .rd_data, .empty, .full);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D)) begin
        failures++;
        $display("t=%0d flags empty=%b full=%b, %0d stored", t, empty, full, q.size());
      end
      if (full) n_full++;
      if (!empty) begin
        checks++;
        if (rd_data !== q[0]) begin
          failures++;
          if (failures < 10) $display("t=%0d read %h expected %h", t, rd_data, q[0]);
        end
      end
      // phases: fill up, drain, mix
      rd_en = !empty && (((t / 100) % 3 == 0) ? ($urandom_range(4) == 0) :
                         ((t / 100) % 3 == 1) ? 1'b1 : $urandom_range(1));
      wr_en = (!full || rd_en) && ($urandom_range(1) == 1);
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      #1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
