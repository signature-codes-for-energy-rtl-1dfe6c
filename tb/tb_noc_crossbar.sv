// Testbench for noc_crossbar: random selections; each valid output must carry
// the selected input's flit and each idle output all zeros.
module tb_noc_crossbar;
  import signoc_pkg::*;
  flit_t [4:0] in_flit, out_flit;
  logic  [4:0][2:0] sel;
  logic  [4:0] valid;
  int checks = 0, failures = 0;

  noc_crossbar dut (.in_flit, .sel, .valid, .out_flit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 5; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        sel[i]     = 3'($urandom_range(4));
        valid[i]   = $urandom_range(1);
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (out_flit[o] !== (valid[o] ? in_flit[sel[o]] : flit_t'('0))) begin
          failures++;
          if (failures < 10) $display("t=%0d out %0d wrong", t, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
