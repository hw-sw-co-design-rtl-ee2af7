// ecc_decoder_tb: self-checking test of the SEC-DED decoder.
//
// Builds codewords with the test's own reference encoder, then presents
// them clean, with every possible single-bit flip and with random double
// flips. Clean words must decode as OK with the same data; single flips as
// SINGLE with the original data and codeword restored and the syndrome
// pointing at the flipped position; double flips as DOUBLE.
module ecc_decoder_tb;
  import scrub_pkg::*;

  int checks = 0, failures = 0;
  codeword_t   cw_in, cw_out;
  data_t       d_out;
  ecc_status_e st;
  syndrome_t   syn;

  ecc_decoder dut (.codeword_i(cw_in), .data_o(d_out), .codeword_o(cw_out),
                   .status_o(st), .syndrome_o(syn));

  function automatic logic [38:0] ref_encode(input logic [31:0] v);
    logic [38:0] c;
    int k;
    c = '0;
    k = 0;
    for (int p = 1; p <= 38; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) begin
        c[p] = v[k];
        k++;
      end
    for (int i = 0; i < 6; i++) begin
      logic par;
      par = 1'b0;
      for (int p = 1; p <= 38; p++)
        if (((p >> i) & 1) == 1 && p != (1 << i)) par ^= c[p];
      c[1 << i] = par;
    end
    c[0] = ^c[38:1];
    return c;
  endfunction

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 60; n++) begin
      logic [31:0] v;
      logic [38:0] good;
      v    = (n == 0) ? 32'h0 : (n == 1) ? 32'hFFFF_FFFF : $urandom;
      good = ref_encode(v);
      // clean
      cw_in = good;
      #1;
      expect_eq(st == ECC_OK && d_out == v && cw_out == good, "clean word");
      // every single flip
      for (int b = 0; b < 39; b++) begin
        cw_in = good ^ (39'h1 << b);
        #1;
        expect_eq(st == ECC_SINGLE, $sformatf("single flip bit %0d status", b));
        expect_eq(d_out == v && cw_out == good, $sformatf("single flip bit %0d corrected", b));
        expect_eq(int'(syn) == b, $sformatf("single flip bit %0d syndrome %0d", b, syn));
      end
      // random double flips
      for (int r = 0; r < 20; r++) begin
        int b1, b2;
        b1 = $urandom_range(38, 0);
        b2 = (b1 + 1 + $urandom_range(37, 0)) % 39;
        cw_in = good ^ (39'h1 << b1) ^ (39'h1 << b2);
        #1;
        expect_eq(st == ECC_DOUBLE, $sformatf("double flip %0d,%0d", b1, b2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
