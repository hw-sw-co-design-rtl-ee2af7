// scrub_ip_full_tb: the scrubbing IP at its default size (1 MiB of RAM,
// 32-word slices, 8192 slice bits) running the memory profiles of three
// applications: a matrix multiplication (6.40 % of the RAM in use), a CNN
// (34.96 %) and a rover mobility firmware (25.57 %), with 31, 73 and 94
// single-event upsets injected into used words respectively.
//
// For each profile the test marks the used slices (half at the bottom of
// the RAM for data, half at the top for the stack), writes every used word
// (a sample through the bus, the rest straight into the array), programs
// the 256 map registers through the bus and enables the scrubber. While it
// runs, the upsets are injected one by one at random times spread over two
// passes. It checks that every upset was repaired, each within one pass
// (plus the cycles the other repairs take) of its injection, that SEC_CNT
// equals the number injected, and that a clean pass takes exactly (used
// words + unused slices) cycles, against 262144 for a scrubber that reads
// every word. It prints the mean and worst injection-to-repair time.
module scrub_ip_full_tb;
  import scrub_pkg::*;

  localparam int MEM_BYTES = 1048576, MEM_WORDS = 262144;
  localparam int SLICE_WORDS = 32, N_SLICES = 8192, MAP_REGS = 256;
  localparam int REG_CTRL = MEM_BYTES + MAP_REGS * 4;
  localparam int REG_SEC  = REG_CTRL + 4;

  logic clk = 0, rst_n = 0;
  logic bus_req = 0, bus_we = 0;
  logic [31:0] bus_addr = '0;
  data_t bus_wdata = '0;
  logic bus_gnt, bus_rvalid, bus_rerr;
  data_t bus_rdata;
  logic s_active, s_skip, s_pass, s_sec, s_ded;

  int checks = 0, failures = 0;
  int cyc = 0, pass_cnt = 0, last_pass_cyc = 0, pass_len = 0;
  bit used [N_SLICES];
  logic [31:0] golden [int];

  scrub_ip_top dut (
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

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (s_pass) begin
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
    @(negedge clk);
    bus_req = 0; bus_we = 0;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] v);
    @(negedge clk);
    bus_req = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_req = 0;
    v = bus_rdata;
  endtask

  task automatic run_profile(input string name, input real occ, input int n_seu);
    int n_used, start, enable_cyc;
    int seu_w [$];
    int seu_t [$];
    int injected [int];
    int exp_pass, lat_max;
    longint lat_sum;
    logic [31:0] v;
    bit fixed [int];
    n_used = int'(occ * N_SLICES);   // rounds to nearest
    for (int s = 0; s < N_SLICES; s++)
      used[s] = (s < (n_used + 1) / 2) || (s >= N_SLICES - n_used / 2);
    golden.delete();
    for (int s = 0; s < N_SLICES; s++)
      if (used[s])
        for (int k = 0; k < SLICE_WORDS; k++) begin
          int w;
          w = s * SLICE_WORDS + k;
          golden[w] = $urandom;
          if (k == 0) bus_write(w * 4, golden[w]);
          else        dut.u_ram.mem[w] = ref_encode(golden[w]);
        end
    for (int r = 0; r < MAP_REGS; r++) begin
      logic [31:0] m;
      for (int b = 0; b < 32; b++) m[b] = used[r * 32 + b];
      bus_write(MEM_BYTES + r * 4, m);
    end
    bus_write(REG_SEC, 0);
    // pick distinct used words and random injection times over two passes
    exp_pass = n_used * SLICE_WORDS + (N_SLICES - n_used);
    while (seu_w.size() < n_seu) begin
      int w;
      bit dup;
      w = $urandom_range(MEM_WORDS - 1, 0);
      dup = 0;
      foreach (seu_w[i]) if (seu_w[i] == w) dup = 1;
      if (used[w / SLICE_WORDS] && !dup) begin
        seu_w.push_back(w);
        seu_t.push_back($urandom_range(2 * exp_pass, 0));
      end
    end
    lat_sum = 0;
    lat_max = 0;
    bus_write(REG_CTRL, 32'h1);
    enable_cyc = cyc;
    start = pass_cnt;
    // inject while the scrubber runs and time each repair
    while (fixed.num() < n_seu && cyc - enable_cyc < 6 * exp_pass) begin
      @(negedge clk);
      foreach (seu_w[i]) begin
        if (!injected.exists(i) && cyc - enable_cyc >= seu_t[i]) begin
          injected[i] = cyc;
          dut.u_ram.mem[seu_w[i]] = ref_encode(golden[seu_w[i]]) ^ (39'h1 << $urandom_range(38, 0));
        end else if (injected.exists(i) && !fixed.exists(i) &&
                     dut.u_ram.mem[seu_w[i]] == ref_encode(golden[seu_w[i]])) begin
          fixed[i] = 1;
          lat_sum += cyc - injected[i];
          if (cyc - injected[i] > lat_max) lat_max = cyc - injected[i];
        end
      end
    end
    // one more clean pass for the timing check
    start = pass_cnt;
    while (pass_cnt < start + 2) @(negedge clk);
    expect_eq(lat_max <= exp_pass + 2 * n_seu + 4,
              $sformatf("%s: worst injection-to-repair %0d cycles, bound %0d", name, lat_max,
                        exp_pass + 2 * n_seu + 4));
    bus_write(REG_CTRL, 32'h0);
    foreach (seu_w[i])
      expect_eq(dut.u_ram.mem[seu_w[i]] == ref_encode(golden[seu_w[i]]),
                $sformatf("%s: upset in word %0d repaired", name, seu_w[i]));
    bus_read(REG_SEC, v);
    expect_eq(v == n_seu, $sformatf("%s: SEC_CNT %0d expected %0d", name, v, n_seu));
    expect_eq(pass_len == n_used * SLICE_WORDS + (N_SLICES - n_used),
              $sformatf("%s: pass %0d cycles, expected %0d", name, pass_len,
                        n_used * SLICE_WORDS + (N_SLICES - n_used)));
    $display("%s: occupation %0d/%0d slices, upsets repaired %0d/%0d, pass %0d cycles (full-RAM walk %0d), injection to repair mean %0d max %0d cycles",
             name, n_used, N_SLICES, fixed.num(), n_seu, pass_len, MEM_WORDS,
             (fixed.num() > 0) ? int'(lat_sum / fixed.num()) : 0, lat_max);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_profile("matrix multiplication", 0.0640, 31);
    run_profile("CNN", 0.3496, 73);
    run_profile("rover firmware", 0.2557, 94);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
