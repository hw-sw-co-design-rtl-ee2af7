// scrubber_tb: self-checking test of the scrubber (register file, FSM and
// correction unit together) against a behavioural single-port RAM.
//
// The RAM model (in the test) holds codewords, reads with one cycle of
// latency and gives the port to the test's own bus traffic first. A 2 KiB
// RAM in 8-word slices (64 slices, 2 map registers) is filled with encoded
// data, upsets are planted in used and unused slices, the slice map and
// CTRL are programmed through the register port, and one full pass is run.
// Afterwards single upsets in used slices must be repaired in the RAM, those
// in unused slices left alone, double upsets left but counted, and SEC_CNT /
// DED_CNT must match. A second phase runs a pass under random bus reads and
// writes and checks that every word holds exactly the last data written to
// it (no write-back of stale data) and decodes clean if it was in a used
// slice.
module scrubber_tb;
  import scrub_pkg::*;

  localparam int MEM_BYTES = 2048, SLICE_WORDS = 8, WD = 4;
  localparam int MEM_WORDS = 512, N_SLICES = 64, MAP_REGS = 2;

  logic clk = 0, rst_n = 0;
  logic reg_en = 0, reg_we = 0;
  logic [2:0] reg_addr = '0;
  data_t reg_wdata = '0, reg_rdata;
  logic ram_req, ram_we, ram_gnt;
  logic [8:0] ram_addr;
  codeword_t ram_wcw, ram_cw;
  logic bus_ram = 0, bus_wr = 0;
  logic [8:0] bus_addr = '0;
  data_t bus_wdata = '0;
  logic active, skip, pass_done, sec, ded;

  int checks = 0, failures = 0;
  logic [38:0] mem [MEM_WORDS];
  logic [31:0] golden [MEM_WORDS];
  logic [63:0] map = '0;
  int pass_cnt = 0;

  scrubber #(.MEM_BYTES(MEM_BYTES), .SLICE_WORDS(SLICE_WORDS), .WATCHDOG_CYCLES(WD)) dut (
    .clk_i(clk), .rst_ni(rst_n), .reg_en_i(reg_en), .reg_we_i(reg_we), .reg_addr_i(reg_addr),
    .reg_wdata_i(reg_wdata), .reg_rdata_o(reg_rdata), .ram_req_o(ram_req), .ram_we_o(ram_we),
    .ram_addr_o(ram_addr), .ram_wcw_o(ram_wcw), .ram_gnt_i(ram_gnt), .ram_cw_i(ram_cw),
    .bus_ram_i(bus_ram), .bus_wr_i(bus_wr), .bus_wr_addr_i(bus_addr), .bus_sec_i(1'b0),
    .bus_ded_i(1'b0), .active_o(active), .skip_o(skip), .pass_done_o(pass_done),
    .sec_o(sec), .ded_o(ded));

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

  // Behavioural single-port RAM, bus first.
  assign ram_gnt = ram_req && !bus_ram;
  always @(posedge clk) begin
    if (bus_ram) begin
      if (bus_wr) mem[bus_addr] <= ref_encode(bus_wdata);
      else        ram_cw <= mem[bus_addr];
    end else if (ram_req) begin
      if (ram_we) mem[ram_addr] <= ram_wcw;
      else        ram_cw <= mem[ram_addr];
    end
    if (pass_done) pass_cnt++;
  end

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic reg_wr(input int a, input logic [31:0] v);
    @(negedge clk);
    reg_en = 1; reg_we = 1; reg_addr = 3'(a); reg_wdata = v;
    @(negedge clk);
    reg_en = 0; reg_we = 0;
  endtask

  task automatic reg_rd(input int a, output logic [31:0] v);
    @(negedge clk);
    reg_en = 1; reg_we = 0; reg_addr = 3'(a);
    @(negedge clk);
    reg_en = 0;
    v = reg_rdata;
  endtask

  task automatic run_one_pass(input bit traffic);
    int start;
    reg_wr(MAP_REGS, 32'h1);
    start = pass_cnt;
    while (pass_cnt == start) begin
      @(negedge clk);
      if (traffic) begin
        int r;
        r = $urandom_range(3, 0);
        bus_ram   = (r != 0);
        bus_wr    = (r == 1);
        bus_addr  = 9'($urandom);
        bus_wdata = $urandom;
        if (bus_wr) golden[bus_addr] = bus_wdata;
      end
    end
    @(negedge clk);
    bus_ram = 0; bus_wr = 0;
    reg_wr(MAP_REGS, 32'h0);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int n_single_used = 0, n_double_used = 0;
    bit upset [MEM_WORDS];
    int kind [MEM_WORDS];
    for (int w = 0; w < MEM_WORDS; w++) begin
      golden[w] = $urandom;
      mem[w] = ref_encode(golden[w]);
      kind[w] = 0;
    end
    map = {$urandom, $urandom};
    map[0] = 1'b1;
    map[1] = 1'b0;
    // plant upsets: kind 1 single, kind 2 double
    for (int n = 0; n < 40; n++) begin
      int w;
      w = $urandom_range(MEM_WORDS - 1, 0);
      if (kind[w] == 0) begin
        kind[w] = (n % 5 == 4) ? 2 : 1;
        if (kind[w] == 1) mem[w] = mem[w] ^ (39'h1 << $urandom_range(38, 0));
        else              mem[w] = mem[w] ^ 39'h3 << $urandom_range(37, 0);
        if (map[w / SLICE_WORDS]) begin
          if (kind[w] == 1) n_single_used++;
          else              n_double_used++;
        end
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    reg_wr(0, map[31:0]);
    reg_wr(1, map[63:32]);
    run_one_pass(0);
    for (int w = 0; w < MEM_WORDS; w++) begin
      if (kind[w] == 0)
        expect_eq(mem[w] == ref_encode(golden[w]), $sformatf("clean word %0d untouched", w));
      else if (kind[w] == 1 && map[w / SLICE_WORDS])
        expect_eq(mem[w] == ref_encode(golden[w]), $sformatf("single upset word %0d repaired", w));
      else
        expect_eq(mem[w] != ref_encode(golden[w]), $sformatf("upset word %0d left alone", w));
    end
    reg_rd(MAP_REGS + 1, v);
    expect_eq(v == n_single_used, $sformatf("SEC_CNT %0d expected %0d", v, n_single_used));
    reg_rd(MAP_REGS + 2, v);
    expect_eq(v == n_double_used, $sformatf("DED_CNT %0d expected %0d", v, n_double_used));
    expect_eq(n_single_used > 0 && n_double_used > 0, "test planted both kinds in used slices");
    reg_wr(MAP_REGS + 1, 0);
    reg_rd(MAP_REGS + 1, v);
    expect_eq(v == 0, "SEC_CNT cleared by a write");

    // second phase: all slices used, upsets everywhere, random bus traffic
    for (int w = 0; w < MEM_WORDS; w++) begin
      mem[w] = ref_encode(golden[w]);
      if (w % 3 == 0) mem[w] = mem[w] ^ (39'h1 << (w % 39));
    end
    reg_wr(0, 32'hFFFF_FFFF);
    reg_wr(1, 32'hFFFF_FFFF);
    run_one_pass(1);
    for (int w = 0; w < MEM_WORDS; w++)
      expect_eq(mem[w] == ref_encode(golden[w]),
                $sformatf("word %0d holds its last written data, clean", w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
