// ecc_ram_tb: self-checking test of the ECC-protected single-port RAM.
//
// A 64-word RAM is filled with random data through the encoding write port
// and read back, checking the one-cycle read latency, the decoded data, the
// stored codeword (against the test's own encoder) and the OK status. Raw
// writes then plant codewords with one and two flipped bits: the read must
// return the corrected data and SINGLE, or DOUBLE, while rcw_o shows the raw
// stored word unchanged.
module ecc_ram_tb;
  import scrub_pkg::*;

  localparam int WORDS = 64;

  logic clk = 0, rst_n = 0;
  logic en = 0, we = 0, raw = 0;
  logic [5:0] addr = '0;
  data_t wdata = '0;
  codeword_t wcw = '0;
  logic rvalid;
  codeword_t rcw;
  data_t rdata;
  ecc_status_e rstatus;

  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];

  ecc_ram #(.WORDS(WORDS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .we_i(we), .raw_i(raw), .addr_i(addr),
    .wdata_i(wdata), .wcw_i(wcw), .rvalid_o(rvalid), .rcw_o(rcw), .rdata_o(rdata),
    .rstatus_o(rstatus));

  always #5 clk = ~clk;

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

  task automatic wr(input int a, input logic [31:0] v);
    @(negedge clk);
    en = 1; we = 1; raw = 0; addr = 6'(a); wdata = v;
    @(negedge clk);
    en = 0; we = 0;
  endtask

  task automatic wr_raw(input int a, input logic [38:0] c);
    @(negedge clk);
    en = 1; we = 1; raw = 1; addr = 6'(a); wcw = c;
    @(negedge clk);
    en = 0; we = 0; raw = 0;
  endtask

  // Read: request for one cycle; result must be valid right after the edge.
  task automatic rd(input int a, output logic [31:0] v, output ecc_status_e s,
                    output logic [38:0] c);
    @(negedge clk);
    en = 1; we = 0; addr = 6'(a);
    @(negedge clk);
    en = 0;
    expect_eq(rvalid == 1'b1, "rvalid one cycle after the read");
    v = rdata; s = rstatus; c = rcw;
    @(negedge clk);
    expect_eq(rvalid == 1'b0, "rvalid is a single-cycle pulse");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    ecc_status_e s;
    logic [38:0] c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      model[a] = $urandom;
      wr(a, model[a]);
    end
    for (int a = 0; a < WORDS; a++) begin
      rd(a, v, s, c);
      expect_eq(v == model[a] && s == ECC_OK, $sformatf("read back word %0d", a));
      expect_eq(c == ref_encode(model[a]), $sformatf("stored codeword %0d", a));
    end
    // single-bit upsets
    for (int a = 0; a < WORDS; a++) begin
      int b;
      b = $urandom_range(38, 0);
      wr_raw(a, ref_encode(model[a]) ^ (39'h1 << b));
      rd(a, v, s, c);
      expect_eq(v == model[a] && s == ECC_SINGLE, $sformatf("single upset word %0d bit %0d", a, b));
      expect_eq(c == (ref_encode(model[a]) ^ (39'h1 << b)), "raw codeword keeps the upset");
    end
    // double-bit upsets
    for (int a = 0; a < 16; a++) begin
      wr_raw(a, ref_encode(model[a]) ^ 39'h3 << (a + 2));
      rd(a, v, s, c);
      expect_eq(s == ECC_DOUBLE, $sformatf("double upset word %0d", a));
    end
    // a normal write repairs the word
    wr(3, 32'hCAFE_F00D);
    rd(3, v, s, c);
    expect_eq(v == 32'hCAFE_F00D && s == ECC_OK, "rewrite after upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
