// scrub_ip_top_tb: end-to-end test of the scrubbing IP through its bus.
//
// A 4 KiB RAM (1024 words) with the default 32-word slices: 32 slices, one
// map register, so the registers sit at byte 4096 (map), 4100 (CTRL),
// 4104 (SEC_CNT) and 4108 (DED_CNT). The test
//   1. writes the whole RAM through the bus and reads it back;
//   2. programs a slice map through the bus and reads it back;
//   3. plants single and double upsets straight into the RAM array, in used
//      and unused slices;
//   4. enables the scrubber and runs two passes on an idle bus, checking
//      that the second pass takes exactly (used words + unused slices)
//      cycles, that used-slice single upsets are repaired in the array,
//      and that SEC_CNT and DED_CNT (read through the bus) match;
//   5. reads upset words in unused slices through the bus: corrected data
//      for a single upset (and SEC_CNT counts it), bus_rerr_o for a double;
//   6. forces the two write-back hazards (a bus write to the word being
//      checked, and to the word waiting for write-back) and checks the new
//      data survives;
//   7. runs passes under random bus traffic, with and without the watchdog,
//      and checks the whole RAM against the data last written.
// It counts how often each mechanism occurred (slice skip, word scrubbed,
// correction, double detection, scrubber losing the port to the bus,
// watchdog hold-off, stale write-back dropped, bus read corrected, counter
// cleared, pass wrap) and fails for any that never did.
module scrub_ip_top_tb;
  import scrub_pkg::*;

  localparam int MEM_BYTES = 4096, SLICE_WORDS = 32, WD = 4;
  localparam int MEM_WORDS = 1024, N_SLICES = 32;
  localparam int REG_MAP = MEM_BYTES, REG_CTRL = MEM_BYTES + 4;
  localparam int REG_SEC = MEM_BYTES + 8, REG_DED = MEM_BYTES + 12;

  logic clk = 0, rst_n = 0;
  logic bus_req = 0, bus_we = 0;
  logic [31:0] bus_addr = '0;
  data_t bus_wdata = '0;
  logic bus_gnt, bus_rvalid, bus_rerr;
  data_t bus_rdata;
  logic s_active, s_skip, s_pass, s_sec, s_ded;

  int checks = 0, failures = 0;
  logic [31:0] golden [MEM_WORDS];
  logic [31:0] map;
  int cyc = 0;
  int pass_cnt = 0, last_pass_cyc = 0, pass_len = 0;

  // mechanism counters
  int n_skip = 0, n_scrub_rd = 0, n_corr = 0, n_ded = 0, n_lost_port = 0;
  int n_wd_hold = 0, n_stale_drop = 0, n_bus_corr = 0, n_cnt_clear = 0, n_wrap = 0;

  scrub_ip_top #(.MEM_BYTES(MEM_BYTES), .SLICE_WORDS(SLICE_WORDS), .WATCHDOG_CYCLES(WD)) dut (
    .clk_i(clk), .rst_ni(rst_n), .bus_req_i(bus_req), .bus_we_i(bus_we), .bus_addr_i(bus_addr),
    .bus_wdata_i(bus_wdata), .bus_gnt_o(bus_gnt), .bus_rvalid_o(bus_rvalid),
    .bus_rdata_o(bus_rdata), .bus_rerr_o(bus_rerr), .scrub_active_o(s_active),
    .scrub_skip_o(s_skip), .scrub_pass_done_o(s_pass), .scrub_sec_o(s_sec),
    .scrub_ded_o(s_ded));

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

  // Monitor of the mechanisms.
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (s_skip) n_skip++;
    if (dut.scr_req && dut.scr_gnt && !dut.scr_we) n_scrub_rd++;
    if (s_sec) n_corr++;
    if (s_ded) n_ded++;
    if (dut.scr_req && !dut.scr_gnt) n_lost_port++;
    if (dut.u_scrubber.enable && dut.u_scrubber.wd_en && dut.u_scrubber.u_fsm.wd_q != 0 &&
        !dut.bus_ram)
      n_wd_hold++;
    if ((dut.u_scrubber.u_corr.sec_o && dut.u_scrubber.u_corr.stale_now) ||
        (dut.u_scrubber.u_corr.wb_valid_q && dut.u_scrubber.u_corr.stale_buf))
      n_stale_drop++;
    if (dut.bus_sec) n_bus_corr++;
    if (s_pass) begin
      n_wrap++;
      pass_cnt++;
      pass_len = cyc - last_pass_cyc;
      last_pass_cyc = cyc;
    end
  end

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic bus_write(input logic [31:0] a, input logic [31:0] v);
    @(negedge clk);
    bus_req = 1; bus_we = 1; bus_addr = a; bus_wdata = v;
    #1;
    expect_eq(bus_gnt, "bus write granted at once");
    @(negedge clk);
    bus_req = 0; bus_we = 0;
    if (a < MEM_BYTES) golden[a / 4] = v;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] v, output logic err);
    @(negedge clk);
    bus_req = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_req = 0;
    expect_eq(bus_rvalid, "read data valid one cycle later");
    v = bus_rdata;
    err = bus_rerr;
  endtask

  task automatic wait_passes(input int k);
    int start;
    start = pass_cnt;
    while (pass_cnt < start + k) @(negedge clk);
  endtask

  function automatic int used_words(input logic [31:0] m);
    int n = 0;
    for (int s = 0; s < N_SLICES; s++) n += m[s] ? SLICE_WORDS : 0;
    return n;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    logic err;
    int n_single_used = 0, n_double_used = 0;
    int kind [MEM_WORDS];
    int w_s1, w_d1, target;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. fill and read back
    for (int w = 0; w < MEM_WORDS; w++) bus_write(w * 4, $urandom);
    for (int w = 0; w < MEM_WORDS; w += 7) begin
      bus_read(w * 4, v, err);
      expect_eq(v == golden[w] && !err, $sformatf("read back word %0d", w));
    end

    // 2. slice map: slice 0 used, slice 1 unused, ~half the rest used
    map = $urandom;
    map[0] = 1'b1;
    map[1] = 1'b0;
    bus_write(REG_MAP, map);
    bus_read(REG_MAP, v, err);
    expect_eq(v == map, "slice map read back through the bus");

    // 3. upsets (none in slice 0, so the pass boundary never sees one)
    for (int w = 0; w < MEM_WORDS; w++) kind[w] = 0;
    for (int n = 0; n < 60; n++) begin
      int w;
      w = $urandom_range(MEM_WORDS - 1, SLICE_WORDS);
      if (kind[w] == 0) begin
        kind[w] = (n % 4 == 3) ? 2 : 1;
        if (kind[w] == 1) dut.u_ram.mem[w] = ref_encode(golden[w]) ^ (39'h1 << $urandom_range(38, 0));
        else              dut.u_ram.mem[w] = ref_encode(golden[w]) ^ (39'h5 << $urandom_range(36, 0));
        if (map[w / SLICE_WORDS]) begin
          if (kind[w] == 1) n_single_used++;
          else              n_double_used++;
        end
      end
    end
    w_s1 = -1; w_d1 = -1;
    for (int w = 0; w < MEM_WORDS; w++) begin
      if (!map[w / SLICE_WORDS] && kind[w] == 1 && w_s1 < 0) w_s1 = w;
      if (!map[w / SLICE_WORDS] && kind[w] == 2 && w_d1 < 0) w_d1 = w;
    end

    // 4. two passes on an idle bus
    bus_write(REG_CTRL, 32'h1);
    wait_passes(2);
    bus_write(REG_CTRL, 32'h0);
    expect_eq(pass_len == used_words(map) + (N_SLICES - $countones(map)),
              $sformatf("clean pass took %0d cycles, expected %0d", pass_len,
                        used_words(map) + (N_SLICES - $countones(map))));
    for (int w = 0; w < MEM_WORDS; w++) begin
      if (kind[w] == 1 && map[w / SLICE_WORDS])
        expect_eq(dut.u_ram.mem[w] == ref_encode(golden[w]), $sformatf("word %0d repaired", w));
      if (kind[w] != 0 && !map[w / SLICE_WORDS])
        expect_eq(dut.u_ram.mem[w] != ref_encode(golden[w]), $sformatf("unused word %0d not scrubbed", w));
    end
    bus_read(REG_SEC, v, err);
    expect_eq(v == n_single_used, $sformatf("SEC_CNT %0d expected %0d", v, n_single_used));
    bus_read(REG_DED, v, err);
    expect_eq(v == 2 * n_double_used, $sformatf("DED_CNT %0d expected %0d", v, 2 * n_double_used));
    bus_write(REG_SEC, 0);
    bus_write(REG_DED, 0);
    bus_read(REG_SEC, v, err);
    expect_eq(v == 0, "SEC_CNT cleared");
    if (v == 0) n_cnt_clear++;
    bus_read(REG_DED, v, err);
    expect_eq(v == 0, "DED_CNT cleared");
    if (v == 0) n_cnt_clear++;

    // 5. bus reads of upset words in unused slices
    if (w_s1 >= 0) begin
      bus_read(w_s1 * 4, v, err);
      expect_eq(v == golden[w_s1] && !err, "bus read corrects a single upset on the fly");
      bus_read(REG_SEC, v, err);
      expect_eq(v == 1, "bus-read single upset counted");
    end
    if (w_d1 >= 0) begin
      bus_read(w_d1 * 4, v, err);
      expect_eq(err, "bus read flags a double upset");
    end

    // 6. write-back hazards: all slices used
    bus_write(REG_MAP, 32'hFFFF_FFFF);
    map = 32'hFFFF_FFFF;
    for (int w = 0; w < MEM_WORDS; w++) dut.u_ram.mem[w] = ref_encode(golden[w]);
    // (a) bus write in the check cycle
    target = 300;
    dut.u_ram.mem[target] = ref_encode(golden[target]) ^ 39'h10;
    bus_write(REG_CTRL, 32'h1);
    while (!(dut.u_scrubber.check && dut.u_scrubber.check_addr == 10'(target))) @(negedge clk);
    bus_req = 1; bus_we = 1; bus_addr = target * 4; bus_wdata = 32'h1234_5678;
    golden[target] = 32'h1234_5678;
    @(negedge clk);
    bus_req = 0; bus_we = 0;
    // (b) bus write while the write-back waits
    target = 700;
    dut.u_ram.mem[target] = ref_encode(golden[target]) ^ 39'h100;
    while (!(dut.u_scrubber.wb_valid && dut.u_scrubber.wb_addr == 10'(target))) @(negedge clk);
    bus_req = 1; bus_we = 1; bus_addr = target * 4; bus_wdata = 32'h9ABC_DEF0;
    golden[target] = 32'h9ABC_DEF0;
    @(negedge clk);
    bus_req = 0; bus_we = 0;
    wait_passes(1);
    bus_write(REG_CTRL, 32'h0);
    expect_eq(dut.u_ram.mem[300] == ref_encode(32'h1234_5678), "new data kept (check-cycle hazard)");
    expect_eq(dut.u_ram.mem[700] == ref_encode(32'h9ABC_DEF0), "new data kept (waiting write-back)");

    // 7. random traffic, without then with the watchdog
    for (int ph = 0; ph < 2; ph++) begin
      int start;
      for (int w = 0; w < MEM_WORDS; w += 5)
        dut.u_ram.mem[w] = ref_encode(golden[w]) ^ (39'h1 << (w % 39));
      bus_write(REG_CTRL, ph ? 32'h3 : 32'h1);
      start = pass_cnt;
      while (pass_cnt < start + 2) begin
        int r;
        @(negedge clk);
        r = $urandom_range(ph ? 9 : 3, 0);
        bus_req = (r < 3);
        bus_we  = (r == 0);
        bus_addr = $urandom_range(MEM_WORDS - 1, 0) * 4;
        bus_wdata = $urandom;
        if (bus_req && bus_we) golden[bus_addr / 4] = bus_wdata;
      end
      @(negedge clk);
      bus_req = 0; bus_we = 0;
      bus_write(REG_CTRL, 32'h0);
      for (int w = 0; w < MEM_WORDS; w++)
        expect_eq(dut.u_ram.mem[w] == ref_encode(golden[w]),
                  $sformatf("phase %0d word %0d clean with last data", ph, w));
    end

    $display("mechanisms: skip=%0d scrub_reads=%0d corrections=%0d doubles=%0d lost_port=%0d",
             n_skip, n_scrub_rd, n_corr, n_ded, n_lost_port);
    $display("            watchdog_hold=%0d stale_drop=%0d bus_corrected=%0d counter_clear=%0d wraps=%0d",
             n_wd_hold, n_stale_drop, n_bus_corr, n_cnt_clear, n_wrap);
    expect_eq(n_skip > 0, "slice skip happened");
    expect_eq(n_scrub_rd > 0, "scrub read happened");
    expect_eq(n_corr > 0, "scrubber correction happened");
    expect_eq(n_ded > 0, "double-error detection happened");
    expect_eq(n_lost_port > 0, "bus took the port from the scrubber");
    expect_eq(n_wd_hold > 0, "watchdog held scrubbing off");
    expect_eq(n_stale_drop >= 2, "stale write-back dropped");
    expect_eq(n_bus_corr > 0, "bus read corrected");
    expect_eq(n_cnt_clear == 2, "counters cleared by writes");
    expect_eq(n_wrap > 0, "pass wrap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
