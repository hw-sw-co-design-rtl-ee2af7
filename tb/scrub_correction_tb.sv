// scrub_correction_tb: self-checking test of the scrubber's correction unit.
//
// Presents checked words (clean, one flipped bit, two flipped bits) and
// checks the event outputs, the stall, and the write-back buffer: a single
// error must load the corrected codeword and address and hold them until
// wb_done_i; a double error must not load it; a bus write to the checked
// word in the check cycle, or to the buffered word while it waits, must drop
// the write-back.
module scrub_correction_tb;
  import scrub_pkg::*;

  logic clk = 0, rst_n = 0;
  logic check = 0, bus_wr = 0, wb_done = 0;
  logic [7:0] check_addr = '0, bus_wr_addr = '0;
  codeword_t cw = '0;
  logic wb_valid, sec, ded, stall;
  logic [7:0] wb_addr;
  codeword_t wb_cw;

  int checks = 0, failures = 0;

  scrub_correction #(.MEM_WORDS(256)) dut (
    .clk_i(clk), .rst_ni(rst_n), .check_i(check), .check_addr_i(check_addr),
    .codeword_i(cw), .bus_wr_i(bus_wr), .bus_wr_addr_i(bus_wr_addr), .wb_done_i(wb_done),
    .wb_valid_o(wb_valid), .wb_addr_o(wb_addr), .wb_cw_o(wb_cw), .sec_o(sec), .ded_o(ded),
    .stall_o(stall));

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

  // Present one checked word for a cycle; sample the combinational outputs.
  task automatic present(input logic [38:0] c, input logic [7:0] a,
                         input bit bw, input logic [7:0] bwa,
                         output bit s, output bit d, output bit st);
    @(negedge clk);
    check = 1; cw = c; check_addr = a; bus_wr = bw; bus_wr_addr = bwa;
    #1;
    s = sec; d = ded; st = stall;
    @(negedge clk);
    check = 0; bus_wr = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s, d, st;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [31:0] v;
      logic [38:0] good;
      logic [7:0] a;
      int b;
      v = $urandom; good = ref_encode(v); a = 8'($urandom); b = $urandom_range(38, 0);
      // clean
      present(good, a, 0, 0, s, d, st);
      expect_eq(!s && !d && !st && !wb_valid, "clean word: no event, no write-back");
      // single error -> write-back held until done
      present(good ^ (39'h1 << b), a, 0, 0, s, d, st);
      expect_eq(s && !d && st, "single error reported with stall");
      expect_eq(wb_valid && wb_addr == a && wb_cw == good, "write-back buffer loaded");
      repeat ($urandom_range(3, 0)) begin
        @(negedge clk);
        expect_eq(wb_valid, "write-back waits for the port");
      end
      @(negedge clk);
      wb_done = 1;
      @(negedge clk);
      wb_done = 0;
      expect_eq(!wb_valid, "write-back done");
      // double error
      present(good ^ (39'h1 << b) ^ (39'h1 << ((b + 7) % 39)), a, 0, 0, s, d, st);
      expect_eq(!s && d && !st && !wb_valid, "double error: reported, not written back");
      // bus write to the same word in the check cycle
      present(good ^ (39'h1 << b), a, 1, a, s, d, st);
      expect_eq(s && !wb_valid, "stale write-back dropped in the check cycle");
      // bus write to another word does not matter
      present(good ^ (39'h1 << b), a, 1, a ^ 8'h1, s, d, st);
      expect_eq(wb_valid, "write to another word keeps the write-back");
      // bus write to the buffered word while it waits
      @(negedge clk);
      bus_wr = 1; bus_wr_addr = a;
      @(negedge clk);
      bus_wr = 0;
      expect_eq(!wb_valid, "stale write-back dropped while waiting");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
