// Testbench for sig_decoder: packets coded by the reference model, with idle
// cycles between flits, must come out exactly as the originals.
module tb_sig_decoder;
  import signoc_pkg::*;
  import tb_signoc_pkg::*;

  logic clk = 0, rst_n = 0;
  flit_t in_flit, out_flit;
  logic in_valid, out_valid;
  logic [7:0] sig_seen;
  int checks = 0, failures = 0;

  sig_decoder dut (.clk, .rst_n, .in_flit, .in_valid, .out_flit, .out_valid, .sig_seen);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p, c;
    in_valid = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      p = (n % 3 == 2) ? mk_msg(n % 16, 3, 60) : mk_data(n % 16, 7, (n * 11) % 101);
      c = ref_encode(p);
      foreach (c[k]) begin
        while ($urandom_range(2) == 0) begin
          in_valid = 0; in_flit = flit_t'({$urandom, $urandom}); @(posedge clk); #1;
        end
        in_valid = 1; in_flit = c[k];
        #1;
        checks++;
        if (!out_valid || out_flit !== p[k]) begin
          failures++;
          if (failures < 10) $display("pkt %0d flit %0d: got %s expected %s", n, k, fstr(out_flit), fstr(p[k]));
        end
        @(posedge clk); #1;
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
