// mem_access_logic_tb: self-checking test of the address decode and the
// bus-first arbitration of the single RAM port.
//
// With a 1024-byte RAM and 12 scrubber registers it drives random bus and
// scrubber requests (addresses spread over the RAM, the register space and
// beyond) and compares every output with a reference written in the test:
// addresses below 1024 go to the RAM at the same word, others go to register
// (address - 1024)/4; the scrubber is granted only when the bus leaves the
// RAM alone, and then its request drives the RAM port.
module mem_access_logic_tb;
  import scrub_pkg::*;

  localparam int MEM_BYTES = 1024;
  localparam int REG_WORDS = 12;

  logic bus_req, bus_we, bus_gnt;
  logic [31:0] bus_addr;
  data_t bus_wdata;
  logic scr_req, scr_we, scr_gnt;
  logic [7:0] scr_addr;
  codeword_t scr_wcw;
  logic mem_en, mem_we, mem_raw;
  logic [7:0] mem_addr;
  data_t mem_wdata;
  codeword_t mem_wcw;
  logic reg_en, reg_we, reg_hit;
  logic [3:0] reg_addr;
  data_t reg_wdata;
  logic bus_ram, bus_ram_wr;

  int checks = 0, failures = 0;
  int n_ram = 0, n_reg = 0, n_scr_gnt = 0, n_scr_blocked = 0;

  mem_access_logic #(.MEM_BYTES(MEM_BYTES), .REG_WORDS(REG_WORDS)) dut (
    .bus_req_i(bus_req), .bus_we_i(bus_we), .bus_addr_i(bus_addr), .bus_wdata_i(bus_wdata),
    .bus_gnt_o(bus_gnt), .scr_req_i(scr_req), .scr_we_i(scr_we), .scr_addr_i(scr_addr),
    .scr_wcw_i(scr_wcw), .scr_gnt_o(scr_gnt), .mem_en_o(mem_en), .mem_we_o(mem_we),
    .mem_raw_o(mem_raw), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata), .mem_wcw_o(mem_wcw),
    .reg_en_o(reg_en), .reg_we_o(reg_we), .reg_addr_o(reg_addr), .reg_hit_o(reg_hit),
    .reg_wdata_o(reg_wdata), .bus_ram_o(bus_ram), .bus_ram_wr_o(bus_ram_wr));

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (addr=%h req=%b scr=%b)", what, bus_addr, bus_req, scr_req);
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
    for (int n = 0; n < 4000; n++) begin
      bit in_ram;
      int sel;
      bus_req   = $urandom_range(1, 0) == 1;
      bus_we    = $urandom_range(1, 0) == 1;
      sel       = $urandom_range(3, 0);
      bus_addr  = (sel < 2) ? $urandom_range(MEM_BYTES - 1, 0) :
                  (sel == 2) ? MEM_BYTES + $urandom_range(REG_WORDS * 4 - 1, 0) :
                  $urandom;
      if (n == 0) bus_addr = MEM_BYTES;        // first register
      if (n == 1) bus_addr = MEM_BYTES - 4;    // last RAM word
      bus_wdata = $urandom;
      scr_req   = $urandom_range(1, 0) == 1;
      scr_we    = $urandom_range(1, 0) == 1;
      scr_addr  = 8'($urandom);
      scr_wcw   = {7'($urandom), 32'($urandom)};
      #1;
      in_ram = bus_addr < MEM_BYTES;
      expect_eq(bus_gnt == bus_req, "bus always granted");
      expect_eq(bus_ram == (bus_req && in_ram), "RAM decode");
      expect_eq(bus_ram_wr == (bus_req && in_ram && bus_we), "RAM write flag");
      expect_eq(reg_en == (bus_req && !in_ram), "register decode");
      if (!in_ram) begin
        expect_eq(reg_we == bus_we && reg_wdata == bus_wdata, "register control");
        if (bus_addr - MEM_BYTES < REG_WORDS * 4) begin
          expect_eq(reg_hit && reg_addr == 4'((bus_addr - MEM_BYTES) / 4), "register offset");
        end else begin
          expect_eq(!reg_hit, "no register hit past the register space");
        end
      end
      if (bus_req && in_ram) begin
        n_ram++;
        expect_eq(!scr_gnt, "scrubber blocked while the bus uses the RAM");
        if (scr_req) n_scr_blocked++;
        expect_eq(mem_en && mem_we == bus_we && !mem_raw && mem_addr == 8'(bus_addr / 4) &&
                  mem_wdata == bus_wdata, "bus drives the RAM port");
      end else begin
        if (bus_req) n_reg++;
        expect_eq(scr_gnt == scr_req, "scrubber granted when the bus is elsewhere");
        if (scr_gnt) n_scr_gnt++;
        expect_eq(mem_en == scr_req, "scrubber request drives enable");
        if (scr_req)
          expect_eq(mem_we == scr_we && mem_raw && mem_addr == scr_addr && mem_wcw == scr_wcw,
                    "scrubber drives the RAM port");
      end
    end
    expect_eq(n_ram > 0 && n_reg > 0 && n_scr_gnt > 0 && n_scr_blocked > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
