// scrubber: application-profiled RAM scrubber.
//
// Groups the three parts of the scrubber: the memory-mapped register file
// (slice map, enable, error counters), the FSM that walks the RAM and skips
// the slices marked unused, and the correction unit that checks each word
// read and writes corrected words back. Software programs the slice map from
// a profile of the application's memory use, so scrubbing time is spent only
// on memory the application occupies.
//
// Interfaces:
//   * register port (reg_*): bus accesses already decoded to the scrubber's
//     space, word addressed, read data one cycle later;
//   * RAM port (ram_req_o .. ram_gnt_i): read and raw-write requests to the
//     shared single-port RAM, retried until granted;
//   * ram_cw_i: the RAM's registered raw read codeword, checked one cycle
//     after a granted scrubber read;
//   * bus_ram_i / bus_wr_*: the bus's use of the RAM, for the watchdog and to
//     drop stale write-backs;
//   * bus_sec_i / bus_ded_i: errors the RAM's own decoder found on bus
//     reads, which are counted with the scrubber's own finds.
module scrubber
  import scrub_pkg::*;
#(
  parameter  int unsigned MEM_BYTES       = 1048576,
  parameter  int unsigned SLICE_WORDS     = 32,
  parameter  int unsigned WATCHDOG_CYCLES = 16,
  localparam int unsigned MEM_WORDS       = MEM_BYTES / 4,
  localparam int unsigned N_SLICES        = (MEM_WORDS + SLICE_WORDS - 1) / SLICE_WORDS,
  localparam int unsigned MAP_REGS        = (N_SLICES + 31) / 32,
  localparam int unsigned REG_WORDS       = MAP_REGS + 3,
  localparam int unsigned RAW             = (REG_WORDS > 1) ? $clog2(REG_WORDS) : 1,
  localparam int unsigned MAW             = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  // register port
  input  logic           reg_en_i,
  input  logic           reg_we_i,
  input  logic [RAW-1:0] reg_addr_i,
  input  data_t          reg_wdata_i,
  output data_t          reg_rdata_o,
  // RAM port
  output logic           ram_req_o,
  output logic           ram_we_o,
  output logic [MAW-1:0] ram_addr_o,
  output codeword_t      ram_wcw_o,
  input  logic           ram_gnt_i,
  input  codeword_t      ram_cw_i,
  // bus activity
  input  logic           bus_ram_i,
  input  logic           bus_wr_i,
  input  logic [MAW-1:0] bus_wr_addr_i,
  input  logic           bus_sec_i,
  input  logic           bus_ded_i,
  // status
  output logic           active_o,
  output logic           skip_o,
  output logic           pass_done_o,
  output logic           sec_o,
  output logic           ded_o
);

  logic [N_SLICES-1:0] slice_map;
  logic                enable, wd_en;
  logic                check, stall, wb_valid, wb_done;
  logic [MAW-1:0]      check_addr, wb_addr;
  logic                scr_sec, scr_ded;

  scrub_regfile #(
    .MEM_BYTES   (MEM_BYTES),
    .SLICE_WORDS (SLICE_WORDS)
  ) u_regfile (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .en_i        (reg_en_i),
    .we_i        (reg_we_i),
    .addr_i      (reg_addr_i),
    .wdata_i     (reg_wdata_i),
    .rdata_o     (reg_rdata_o),
    .sec_inc_i   (scr_sec || bus_sec_i),
    .ded_inc_i   (scr_ded || bus_ded_i),
    .slice_map_o (slice_map),
    .enable_o    (enable),
    .wd_en_o     (wd_en)
  );

  scrub_fsm #(
    .MEM_WORDS       (MEM_WORDS),
    .SLICE_WORDS     (SLICE_WORDS),
    .WATCHDOG_CYCLES (WATCHDOG_CYCLES)
  ) u_fsm (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .enable_i     (enable),
    .wd_en_i      (wd_en),
    .slice_map_i  (slice_map),
    .bus_ram_i    (bus_ram_i),
    .req_o        (ram_req_o),
    .we_o         (ram_we_o),
    .addr_o       (ram_addr_o),
    .gnt_i        (ram_gnt_i),
    .check_o      (check),
    .check_addr_o (check_addr),
    .stall_i      (stall),
    .wb_valid_i   (wb_valid),
    .wb_addr_i    (wb_addr),
    .wb_done_o    (wb_done),
    .active_o     (active_o),
    .skip_o       (skip_o),
    .pass_done_o  (pass_done_o)
  );

  scrub_correction #(
    .MEM_WORDS (MEM_WORDS)
  ) u_corr (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .check_i       (check),
    .check_addr_i  (check_addr),
    .codeword_i    (ram_cw_i),
    .bus_wr_i      (bus_wr_i),
    .bus_wr_addr_i (bus_wr_addr_i),
    .wb_done_i     (wb_done),
    .wb_valid_o    (wb_valid),
    .wb_addr_o     (wb_addr),
    .wb_cw_o       (ram_wcw_o),
    .sec_o         (scr_sec),
    .ded_o         (scr_ded),
    .stall_o       (stall)
  );

  assign sec_o = scr_sec;
  assign ded_o = scr_ded;

endmodule
