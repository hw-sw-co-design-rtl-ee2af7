// scrub_fsm_tb: self-checking test of the scrubber's address walk.
//
// A 64-word RAM in 8 slices of 8 words. For random slice maps the test
// records every granted read and checks it against the walk it expects: the
// words of used slices in ascending order, nothing from unused slices, one
// read per word per pass. Without bus traffic a pass must take exactly
// (used words + unused slices) cycles from one pass_done pulse to the next.
// With random bus traffic (which takes the port) the reads must keep the
// same order and nothing may be lost or repeated. It also checks that
// check_o follows each granted read one cycle later with its address, that a
// pending write-back takes the port before any read, that no read starts in a
// stall cycle, that the watchdog holds reads off for WATCHDOG_CYCLES after
// bus traffic, and that re-enabling restarts the walk at word 0.
module scrub_fsm_tb;
  import scrub_pkg::*;

  localparam int MEM_WORDS = 64, SLICE_WORDS = 8, N_SLICES = 8, WD = 3;

  logic clk = 0, rst_n = 0;
  logic enable = 0, wd_en = 0, bus_ram = 0, stall = 0, wb_valid = 0;
  logic [N_SLICES-1:0] map = '0;
  logic [5:0] wb_addr = '0;
  logic req, we, gnt, check, wb_done, active, skip, pass_done;
  logic [5:0] addr, check_addr;

  int checks = 0, failures = 0;
  int reads [$];
  int cur [$];
  int last_pass [$];
  int pass_cnt = 0;
  int last_rd_addr = -1;
  bit last_rd = 0;
  int cyc = 0, last_bus_cyc = -100;

  scrub_fsm #(.MEM_WORDS(MEM_WORDS), .SLICE_WORDS(SLICE_WORDS), .WATCHDOG_CYCLES(WD)) dut (
    .clk_i(clk), .rst_ni(rst_n), .enable_i(enable), .wd_en_i(wd_en), .slice_map_i(map),
    .bus_ram_i(bus_ram), .req_o(req), .we_o(we), .addr_o(addr), .gnt_i(gnt),
    .check_o(check), .check_addr_o(check_addr), .stall_i(stall), .wb_valid_i(wb_valid),
    .wb_addr_i(wb_addr), .wb_done_o(wb_done), .active_o(active), .skip_o(skip),
    .pass_done_o(pass_done));

  assign gnt = req && !bus_ram;

  always #5 clk = ~clk;

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Monitor: record granted reads, check the check_o timing and the rules.
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (bus_ram) last_bus_cyc = cyc;
    expect_eq(check == last_rd && (!last_rd || int'(check_addr) == last_rd_addr),
              "check follows a granted read by one cycle");
    if (wb_valid) expect_eq(req && we && addr == wb_addr, "write-back owns the request");
    if (stall && !wb_valid) expect_eq(!req, "no read in a stall cycle");
    if (wd_en && req && !we) expect_eq(cyc - last_bus_cyc > WD, "watchdog holds reads off");
    last_rd = req && gnt && !we;
    last_rd_addr = int'(addr);
    if (pass_done) begin
      last_pass = cur;
      cur.delete();
      pass_cnt++;
    end
    if (req && gnt && !we) begin
      reads.push_back(int'(addr));
      cur.push_back(int'(addr));
    end
  end

  function automatic int expected_cycles(input logic [N_SLICES-1:0] m);
    int c = 0;
    for (int s = 0; s < N_SLICES; s++) c += m[s] ? SLICE_WORDS : 1;
    return c;
  endfunction

  // Wait for a pass_done pulse; returns the cycle count waited.
  task automatic wait_pass(output int n);
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!pass_done && n < 100000);
    expect_eq(n < 100000, "pass completes");
  endtask

  task automatic check_walk(input logic [N_SLICES-1:0] m);
    int k = 0;
    int exp_n = 0;
    reads = last_pass;
    for (int s = 0; s < N_SLICES; s++) if (m[s]) exp_n += SLICE_WORDS;
    expect_eq(reads.size() == exp_n, $sformatf("reads per pass %0d expected %0d", reads.size(), exp_n));
    for (int w = 0; w < MEM_WORDS; w++)
      if (m[w / SLICE_WORDS]) begin
        if (k < reads.size()) expect_eq(reads[k] == w, $sformatf("read %0d is word %0d", k, w));
        k++;
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // idle bus: exact order and timing
    for (int it = 0; it < 12; it++) begin
      map = (it == 0) ? 8'b0100_0101 : (it == 1) ? 8'hFF : (it == 2) ? 8'h00 : 8'($urandom);
      @(negedge clk);
      enable = 1;
      wait_pass(n);             // first (partial) pass after enable
      wait_pass(n);
      expect_eq(n == expected_cycles(map),
                $sformatf("pass of map %b took %0d cycles, expected %0d", map, n, expected_cycles(map)));
      @(posedge clk);
      check_walk(map);
      @(negedge clk);
      enable = 0;
      @(negedge clk);
    end
    // restart at word 0 after re-enable
    map = 8'hFF;
    reads.delete();
    @(negedge clk);
    enable = 1;
    repeat (5) @(negedge clk);
    expect_eq(reads.size() > 0 && reads[0] == 0, "walk starts at word 0");
    enable = 0;
    @(negedge clk);
    // random bus traffic
    for (int it = 0; it < 8; it++) begin
      map = 8'($urandom) | 8'h1;
      @(negedge clk);
      enable = 1;
      n = pass_cnt;
      while (pass_cnt < n + 2) begin
        @(negedge clk);
        bus_ram = ($urandom_range(2, 0) == 0);
      end
      bus_ram = 0;
      check_walk(map);
      enable = 0;
      @(negedge clk);
    end
    // write-back priority and stall
    map = 8'hFF;
    enable = 1;
    repeat (3) @(negedge clk);
    wb_valid = 1; wb_addr = 6'd42;
    @(negedge clk);
    expect_eq(wb_done, "write-back granted on a free port");
    wb_valid = 0;
    stall = 1;
    repeat (3) @(negedge clk);
    stall = 0;
    enable = 0;
    @(negedge clk);
    // watchdog
    wd_en = 1;
    enable = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      bus_ram = ($urandom_range(7, 0) == 0);
    end
    bus_ram = 0;
    enable = 0;
    wd_en = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
