// mem_access_logic: routes bus accesses and shares the single RAM port.
//
// Address decode: a bus access below MEM_BYTES goes to the RAM at the same
// address; an access at or above MEM_BYTES goes to the scrubber's registers,
// at the address minus MEM_BYTES (so with a 1024-byte RAM, byte address 1024
// is scrubber register 0). Both follow the memory access logic of the
// reference design. Addresses are byte addresses; the RAM and the registers
// are addressed by 32-bit word (address bits [1:0] are dropped).
//
// Arbitration: the bus always wins. The scrubber's request is granted only
// in cycles in which the bus does not access the RAM, so a single-port RAM
// is enough and the core is never stalled by scrubbing.
//
// Purely combinational. Besides the routed control signals it reports
// whether the bus is using the RAM this cycle (bus_ram_o) and whether that
// use is a write (bus_ram_wr_o), which the scrubber needs for its watchdog
// and to drop a write-back that a newer bus write has made stale.
module mem_access_logic
  import scrub_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 1048576,
  parameter int unsigned REG_WORDS = 259,
  localparam int unsigned MAW = $clog2(MEM_BYTES / 4),
  localparam int unsigned RAW = (REG_WORDS > 1) ? $clog2(REG_WORDS) : 1
) (
  // bus side
  input  logic           bus_req_i,
  input  logic           bus_we_i,
  input  logic [31:0]    bus_addr_i,
  input  data_t         bus_wdata_i,
  output logic           bus_gnt_o,
  // scrubber's RAM port request
  input  logic           scr_req_i,
  input  logic           scr_we_i,
  input  logic [MAW-1:0] scr_addr_i,
  input  codeword_t      scr_wcw_i,
  output logic           scr_gnt_o,
  // RAM port
  output logic           mem_en_o,
  output logic           mem_we_o,
  output logic           mem_raw_o,
  output logic [MAW-1:0] mem_addr_o,
  output data_t          mem_wdata_o,
  output codeword_t      mem_wcw_o,
  // scrubber register port
  output logic           reg_en_o,
  output logic           reg_we_o,
  output logic [RAW-1:0] reg_addr_o,
  output logic           reg_hit_o,
  output data_t          reg_wdata_o,
  // bus activity on the RAM
  output logic           bus_ram_o,
  output logic           bus_ram_wr_o
);

  logic        to_scrub;
  logic [31:0] scrub_off;

  always_comb begin
    to_scrub  = (bus_addr_i >= 32'(MEM_BYTES));
    scrub_off = bus_addr_i - 32'(MEM_BYTES);

    bus_ram_o    = bus_req_i && !to_scrub;
    bus_ram_wr_o = bus_ram_o && bus_we_i;

    // register side
    reg_en_o    = bus_req_i && to_scrub;
    reg_we_o    = bus_we_i;
    reg_addr_o  = scrub_off[RAW+1:2];
    reg_hit_o   = (scrub_off[31:2] < 30'(REG_WORDS));
    reg_wdata_o = bus_wdata_i;

    // RAM side: bus first, scrubber in the gaps
    scr_gnt_o = scr_req_i && !bus_ram_o;
    if (bus_ram_o) begin
      mem_en_o   = 1'b1;
      mem_we_o   = bus_we_i;
      mem_raw_o  = 1'b0;
      mem_addr_o = bus_addr_i[MAW+1:2];
    end else begin
      mem_en_o   = scr_req_i;
      mem_we_o   = scr_we_i;
      mem_raw_o  = 1'b1;
      mem_addr_o = scr_addr_i;
    end
    mem_wdata_o = bus_wdata_i;
    mem_wcw_o   = scr_wcw_i;

    bus_gnt_o = bus_req_i;
  end

endmodule
