// Testbench for signature_gen. First the four-nibble example of the signature
// scheme: counts 3, 4, 2, 1 give signature 1100 with threshold "greater than
// 2". Then random 68-byte packets at the default size, against a
// bit-by-bit majority model.
module tb_signature_gen;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // nibble instance
  logic        clr4, add4;
  logic [3:0]  w4, sig4;
  logic [3:0][2:0] cnt4;
  logic [2:0]  u4;
  signature_gen #(.SIG_W(4), .WORD_W(4), .MAX_UNITS(4)) dut4 (
    .clk, .rst_n, .clear(clr4), .add_en(add4), .word(w4),
    .sig(sig4), .cnt(cnt4), .units(u4));

  // default instance: bytes, four per 32-bit word, 68 bytes
  logic        clr, add;
  logic [31:0] w;
  logic [7:0]  sig;
  logic [7:0][6:0] cnt;
  logic [6:0]  u;
  signature_gen dut (
    .clk, .rst_n, .clear(clr), .add_en(add), .word(w),
    .sig(sig), .cnt(cnt), .units(u));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [3:0] nib [4];
    int rc[8];
    int density;
    clr4 = 0; add4 = 0; w4 = '0; clr = 0; add = 0; w = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // nibbles as columns of the example: bit 3 is the top row
    nib[0] = 4'b1101; nib[1] = 4'b0110; nib[2] = 4'b1100; nib[3] = 4'b1110;
    clr4 = 1; @(posedge clk); #1 clr4 = 0;
    for (int k = 0; k < 4; k++) begin
      add4 = 1; w4 = nib[k]; @(posedge clk); #1;
    end
    add4 = 0;
    chk("counter bit3", cnt4[3], 3);
    chk("counter bit2", cnt4[2], 4);
    chk("counter bit1", cnt4[1], 2);
    chk("counter bit0", cnt4[0], 1);
    chk("nibble signature", sig4, 4'b1100);
    for (int k = 0; k < 4; k++) chk("codeword ones", $countones(nib[k] ^ sig4), $countones(nib[k] ^ 4'b1100));

    // random 68-byte packets over a range of densities
    for (int pkt = 0; pkt < 60; pkt++) begin
      density = (pkt * 7) % 101;
      foreach (rc[i]) rc[i] = 0;
      clr = 1; @(posedge clk); #1 clr = 0;
      for (int k = 0; k < 17; k++) begin
        add = 1;
        for (int b = 0; b < 32; b++) w[b] = ($urandom_range(99) < density);
        for (int j = 0; j < 4; j++) for (int i = 0; i < 8; i++) rc[i] += w[8*j+i];
        @(posedge clk); #1;
      end
      add = 0;
      chk("units", u, 68);
      for (int i = 0; i < 8; i++) begin
        chk($sformatf("pkt %0d cnt[%0d]", pkt, i), cnt[i], rc[i]);
        chk($sformatf("pkt %0d sig[%0d]", pkt, i), sig[i], rc[i] > 34);
      end
    end
    // exact tie: 34 of 68 bytes have a 1 in every position -> signature 0
    clr = 1; @(posedge clk); #1 clr = 0;
    for (int k = 0; k < 17; k++) begin
      add = 1; w = (k < 8) ? 32'hFFFF_FFFF : (k == 8 ? 32'h0000_FFFF : 32'h0);
      @(posedge clk); #1;
    end
    add = 0;
    chk("tie signature", sig, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
