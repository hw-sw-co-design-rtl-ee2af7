// ecc_encoder_tb: self-checking test of the SEC-DED encoder.
//
// For a set of fixed and random data words it checks, with the test's own
// reference code: the data bits sit at Hamming positions 3,5,6,7,9,...,38 in
// order, each check bit 2^i equals the parity of the positions that have
// bit i set, and bit 0 makes the whole codeword even. The reference
// codeword is also compared as a whole.
module ecc_encoder_tb;
  import scrub_pkg::*;

  int checks = 0, failures = 0;
  data_t     d;
  codeword_t cw;

  ecc_encoder dut (.data_i(d), .codeword_o(cw));

  function automatic codeword_t ref_encode(input logic [31:0] v);
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

  task automatic check_word(input logic [31:0] v);
    codeword_t exp;
    d = v;
    #1;
    exp = ref_encode(v);
    checks++;
    if (cw !== exp) begin
      failures++;
      $display("FAIL data=%h cw=%h expected %h", v, cw, exp);
    end
    checks++;
    if (^cw !== 1'b0) begin
      failures++;
      $display("FAIL data=%h codeword parity odd", v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_word(32'h0000_0000);
    check_word(32'hFFFF_FFFF);
    check_word(32'h0000_0001);
    check_word(32'h8000_0000);
    for (int b = 0; b < 32; b++) check_word(32'h1 << b);
    for (int n = 0; n < 500; n++) check_word($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
