// scrub_ip_top: ECC-protected data RAM with an application-profiled scrubber.
//
// Drop-in replacement for a microcontroller's data RAM. It holds MEM_BYTES of
// RAM with SEC-DED ECC (32 data + 7 check bits per word), a memory access
// logic that shares the RAM's single port between the bus and the scrubber,
// and the scrubber with its register file. The scrubber's registers sit in
// the address space right after the RAM: byte address MEM_BYTES is register
// 0. Default sizes are those of the reference system: 1 MiB of data RAM and
// slices of 32 words (ceil(262144/32) = 8192 slice bits in 256 registers).
//
// Bus protocol (request/grant with a read-valid one cycle later, the style of
// a small RISC-V core's data port; the exact protocol is this design's own
// choice): in a cycle with bus_req_i high the access is accepted at once
// (bus_gnt_o = bus_req_i); a read returns bus_rdata_o with bus_rvalid_o one
// cycle later. RAM reads come back corrected; bus_rerr_o flags an
// uncorrectable word. Only whole 32-bit words are written (no byte enables).
//
// Status outputs (pulses) expose scrubber activity for monitoring: a word
// read or skipped slice, the end of a pass, and errors found.
module scrub_ip_top
  import scrub_pkg::*;
#(
  parameter  int unsigned MEM_BYTES       = 1048576,
  parameter  int unsigned SLICE_WORDS     = 32,
  parameter  int unsigned WATCHDOG_CYCLES = 16
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // data bus
  input  logic        bus_req_i,
  input  logic        bus_we_i,
  input  logic [31:0] bus_addr_i,
  input  data_t       bus_wdata_i,
  output logic        bus_gnt_o,
  output logic        bus_rvalid_o,
  output data_t       bus_rdata_o,
  output logic        bus_rerr_o,
  // scrubber status
  output logic        scrub_active_o,
  output logic        scrub_skip_o,
  output logic        scrub_pass_done_o,
  output logic        scrub_sec_o,
  output logic        scrub_ded_o
);

  localparam int unsigned MEM_WORDS = MEM_BYTES / 4;
  localparam int unsigned N_SLICES  = (MEM_WORDS + SLICE_WORDS - 1) / SLICE_WORDS;
  localparam int unsigned MAP_REGS  = (N_SLICES + 31) / 32;
  localparam int unsigned REG_WORDS = MAP_REGS + 3;
  localparam int unsigned RAW       = (REG_WORDS > 1) ? $clog2(REG_WORDS) : 1;
  localparam int unsigned MAW       = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;

  // RAM port
  logic           mem_en, mem_we, mem_raw;
  logic [MAW-1:0] mem_addr;
  data_t          mem_wdata;
  codeword_t      mem_wcw;
  logic           ram_rvalid;
  codeword_t      ram_rcw;
  data_t          ram_rdata;
  ecc_status_e    ram_rstatus;
  // scrubber side
  logic           scr_req, scr_we, scr_gnt;
  logic [MAW-1:0] scr_addr;
  codeword_t      scr_wcw;
  logic           reg_en, reg_we, reg_hit;
  logic [RAW-1:0] reg_addr;
  data_t          reg_wdata, reg_rdata;
  logic           bus_ram, bus_ram_wr;
  // read return
  logic           bus_rd_ram_q, bus_rd_reg_q;
  logic           bus_sec, bus_ded;

  mem_access_logic #(
    .MEM_BYTES (MEM_BYTES),
    .REG_WORDS (REG_WORDS)
  ) u_mal (
    .bus_req_i    (bus_req_i),
    .bus_we_i     (bus_we_i),
    .bus_addr_i   (bus_addr_i),
    .bus_wdata_i  (bus_wdata_i),
    .bus_gnt_o    (bus_gnt_o),
    .scr_req_i    (scr_req),
    .scr_we_i     (scr_we),
    .scr_addr_i   (scr_addr),
    .scr_wcw_i    (scr_wcw),
    .scr_gnt_o    (scr_gnt),
    .mem_en_o     (mem_en),
    .mem_we_o     (mem_we),
    .mem_raw_o    (mem_raw),
    .mem_addr_o   (mem_addr),
    .mem_wdata_o  (mem_wdata),
    .mem_wcw_o    (mem_wcw),
    .reg_en_o     (reg_en),
    .reg_we_o     (reg_we),
    .reg_addr_o   (reg_addr),
    .reg_hit_o    (reg_hit),
    .reg_wdata_o  (reg_wdata),
    .bus_ram_o    (bus_ram),
    .bus_ram_wr_o (bus_ram_wr)
  );

  ecc_ram #(
    .WORDS (MEM_WORDS)
  ) u_ram (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .en_i      (mem_en),
    .we_i      (mem_we),
    .raw_i     (mem_raw),
    .addr_i    (mem_addr),
    .wdata_i   (mem_wdata),
    .wcw_i     (mem_wcw),
    .rvalid_o  (ram_rvalid),
    .rcw_o     (ram_rcw),
    .rdata_o   (ram_rdata),
    .rstatus_o (ram_rstatus)
  );

  scrubber #(
    .MEM_BYTES       (MEM_BYTES),
    .SLICE_WORDS     (SLICE_WORDS),
    .WATCHDOG_CYCLES (WATCHDOG_CYCLES)
  ) u_scrubber (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .reg_en_i      (reg_en && reg_hit),
    .reg_we_i      (reg_we),
    .reg_addr_i    (reg_addr),
    .reg_wdata_i   (reg_wdata),
    .reg_rdata_o   (reg_rdata),
    .ram_req_o     (scr_req),
    .ram_we_o      (scr_we),
    .ram_addr_o    (scr_addr),
    .ram_wcw_o     (scr_wcw),
    .ram_gnt_i     (scr_gnt),
    .ram_cw_i      (ram_rcw),
    .bus_ram_i     (bus_ram),
    .bus_wr_i      (bus_ram_wr),
    .bus_wr_addr_i (mem_addr),
    .bus_sec_i     (bus_sec),
    .bus_ded_i     (bus_ded),
    .active_o      (scrub_active_o),
    .skip_o        (scrub_skip_o),
    .pass_done_o   (scrub_pass_done_o),
    .sec_o         (scrub_sec_o),
    .ded_o         (scrub_ded_o)
  );

  // Read return: remember which side a bus read went to.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      bus_rd_ram_q <= 1'b0;
      bus_rd_reg_q <= 1'b0;
    end else begin
      bus_rd_ram_q <= bus_ram && !bus_we_i;
      bus_rd_reg_q <= bus_req_i && !bus_we_i && !bus_ram;
    end
  end

  always_comb begin
    bus_rvalid_o = bus_rd_ram_q || bus_rd_reg_q;
    bus_rdata_o  = bus_rd_ram_q ? ram_rdata : (bus_rd_reg_q ? reg_rdata : '0);
    bus_rerr_o   = bus_rd_ram_q && ram_rvalid && (ram_rstatus == ECC_DOUBLE);
    bus_sec      = bus_rd_ram_q && ram_rvalid && (ram_rstatus == ECC_SINGLE);
    bus_ded      = bus_rerr_o;
  end

endmodule
