// scrub_regfile_tb: self-checking test of the scrubber's register file.
//
// A 4 KiB RAM with 8-word slices gives 128 slices in 4 map registers, then
// CTRL, SEC_CNT and DED_CNT. The test writes random slice maps and checks
// the read-back (one cycle later) and the bit each slice sees (slice k is
// bit k%32 of register k/32); checks CTRL's enable and watchdog bits; counts
// error events and checks that a write clears a counter, that an event in
// the clearing cycle is kept, and that reads outside the map give 0.
module scrub_regfile_tb;
  import scrub_pkg::*;

  localparam int MEM_BYTES = 4096, SLICE_WORDS = 8;
  localparam int N_SLICES = 128, MAP_REGS = 4;

  logic clk = 0, rst_n = 0;
  logic en = 0, we = 0;
  logic [2:0] addr = '0;
  data_t wdata = '0, rdata;
  logic sec_inc = 0, ded_inc = 0;
  logic [N_SLICES-1:0] map;
  logic enable, wd_en;

  int checks = 0, failures = 0;
  logic [31:0] model [MAP_REGS];

  scrub_regfile #(.MEM_BYTES(MEM_BYTES), .SLICE_WORDS(SLICE_WORDS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rdata_o(rdata), .sec_inc_i(sec_inc), .ded_inc_i(ded_inc), .slice_map_o(map),
    .enable_o(enable), .wd_en_o(wd_en));

  always #5 clk = ~clk;

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input int a, input logic [31:0] v);
    @(negedge clk);
    en = 1; we = 1; addr = 3'(a); wdata = v;
    @(negedge clk);
    en = 0; we = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk);
    en = 1; we = 0; addr = 3'(a);
    @(negedge clk);
    en = 0;
    v = rdata;
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(map == '0 && !enable && !wd_en, "reset state");
    for (int r = 0; r < MAP_REGS; r++) begin
      rd(r, v);
      expect_eq(v == 0, "map reads 0 after reset");
    end
    rd(MAP_REGS + 1, v);
    expect_eq(v == 0, "SEC_CNT 0 after reset");
    for (int it = 0; it < 20; it++) begin
      for (int r = 0; r < MAP_REGS; r++) begin
        model[r] = (it == 0 && r == 0) ? 32'b1000101 : $urandom;
        wr(r, model[r]);
      end
      for (int r = 0; r < MAP_REGS; r++) begin
        rd(r, v);
        expect_eq(v == model[r], $sformatf("map register %0d read-back", r));
      end
      for (int k = 0; k < N_SLICES; k++)
        expect_eq(map[k] == model[k / 32][k % 32], $sformatf("slice %0d map bit", k));
    end
    // CTRL
    wr(MAP_REGS, 32'h1);
    expect_eq(enable && !wd_en, "CTRL enable");
    wr(MAP_REGS, 32'h3);
    expect_eq(enable && wd_en, "CTRL enable + watchdog");
    rd(MAP_REGS, v);
    expect_eq(v == 3, "CTRL read-back");
    wr(MAP_REGS, 32'h0);
    expect_eq(!enable && !wd_en, "CTRL cleared");
    // counters
    @(negedge clk);
    sec_inc = 1;
    repeat (5) @(negedge clk);
    sec_inc = 0;
    ded_inc = 1;
    repeat (3) @(negedge clk);
    ded_inc = 0;
    rd(MAP_REGS + 1, v);
    expect_eq(v == 5, $sformatf("SEC_CNT counted 5, got %0d", v));
    rd(MAP_REGS + 2, v);
    expect_eq(v == 3, $sformatf("DED_CNT counted 3, got %0d", v));
    wr(MAP_REGS + 1, 32'hDEAD);
    rd(MAP_REGS + 1, v);
    expect_eq(v == 0, "write clears SEC_CNT");
    rd(MAP_REGS + 2, v);
    expect_eq(v == 3, "DED_CNT untouched by SEC_CNT clear");
    // event in the clearing cycle
    @(negedge clk);
    en = 1; we = 1; addr = 3'(MAP_REGS + 2); wdata = 0; ded_inc = 1;
    @(negedge clk);
    en = 0; we = 0; ded_inc = 0;
    rd(MAP_REGS + 2, v);
    expect_eq(v == 1, "event in clear cycle kept");
    // beyond the register space
    rd(7, v);
    expect_eq(v == 0, "unmapped register reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
