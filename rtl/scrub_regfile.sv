// scrub_regfile: the scrubber's memory-mapped register file.
//
// The RAM is cut into slices of SLICE_WORDS words, and each slice owns one
// bit of the slice map: 1 means the slice is in use and is scrubbed, 0 means
// the scrubber skips it. The map takes ceil(memory length / slice length)
// bits, packed 32 to a register: slice k is bit k%32 of register k/32, so
// register 0, bit 0 covers the first slice. After the map come three
// registers (word offsets from the start of the scrubber's space):
//   MAP_REGS+0  CTRL     bit 0 enables the scrubber, bit 1 enables the bus
//                        watchdog (scrubbing held off while the bus is busy)
//   MAP_REGS+1  SEC_CNT  number of single (corrected) errors found
//   MAP_REGS+2  DED_CNT  number of double (uncorrectable) errors found
// The slice map, the enable and the two error counters follow the reference
// design; the order of the registers, the watchdog bit and the counter
// details are this design's choice. A write of any value to a counter clears
// it (an error found in that same cycle is kept, the counter becomes 1);
// counters saturate instead of wrapping. Writes to the map and CTRL store
// the value; reading a register outside the map gives 0.
//
// Timing: access in cycle t, read data in cycle t+1 (like the RAM).
module scrub_regfile
  import scrub_pkg::*;
#(
  parameter  int unsigned MEM_BYTES   = 1048576,
  parameter  int unsigned SLICE_WORDS = 32,
  localparam int unsigned MEM_WORDS   = MEM_BYTES / 4,
  localparam int unsigned N_SLICES    = (MEM_WORDS + SLICE_WORDS - 1) / SLICE_WORDS,
  localparam int unsigned MAP_REGS    = (N_SLICES + 31) / 32,
  localparam int unsigned REG_WORDS   = MAP_REGS + 3,
  localparam int unsigned RAW         = (REG_WORDS > 1) ? $clog2(REG_WORDS) : 1
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  // bus access (already decoded to this register space)
  input  logic                en_i,
  input  logic                we_i,
  input  logic [RAW-1:0]      addr_i,
  input  data_t               wdata_i,
  output data_t               rdata_o,
  // error events
  input  logic                sec_inc_i,
  input  logic                ded_inc_i,
  // configuration out
  output logic [N_SLICES-1:0] slice_map_o,
  output logic                enable_o,
  output logic                wd_en_o
);

  localparam int unsigned CTRL_IDX = MAP_REGS;
  localparam int unsigned SEC_IDX  = MAP_REGS + 1;
  localparam int unsigned DED_IDX  = MAP_REGS + 2;
  localparam int unsigned MIW      = (MAP_REGS > 1) ? $clog2(MAP_REGS) : 1;

  logic [MAP_REGS*32-1:0] map_q;   // register i is map_q[32*i +: 32]
  logic [1:0]  ctrl_q;
  data_t       sec_q, ded_q;
  data_t       rdata_q;

  logic wr_map, wr_ctrl, wr_sec, wr_ded;
  logic [MIW-1:0] map_idx;

  assign map_idx = MIW'(addr_i);

  always_comb begin
    wr_map  = en_i && we_i && (int'(addr_i) < MAP_REGS);
    wr_ctrl = en_i && we_i && (int'(addr_i) == CTRL_IDX);
    wr_sec  = en_i && we_i && (int'(addr_i) == SEC_IDX);
    wr_ded  = en_i && we_i && (int'(addr_i) == DED_IDX);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      map_q  <= '0;
      ctrl_q <= '0;
    end else begin
      if (wr_map)  map_q[32*map_idx +: 32] <= wdata_i;
      if (wr_ctrl) ctrl_q        <= wdata_i[1:0];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sec_q <= '0;
      ded_q <= '0;
    end else begin
      if (wr_sec)                sec_q <= data_t'(sec_inc_i);
      else if (sec_inc_i && ~&sec_q) sec_q <= sec_q + 1'b1;
      if (wr_ded)                ded_q <= data_t'(ded_inc_i);
      else if (ded_inc_i && ~&ded_q) ded_q <= ded_q + 1'b1;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rdata_q <= '0;
    end else if (en_i && !we_i) begin
      if (int'(addr_i) < MAP_REGS)       rdata_q <= map_q[32*map_idx +: 32];
      else if (int'(addr_i) == CTRL_IDX) rdata_q <= data_t'(ctrl_q);
      else if (int'(addr_i) == SEC_IDX)  rdata_q <= sec_q;
      else if (int'(addr_i) == DED_IDX)  rdata_q <= ded_q;
      else                               rdata_q <= '0;
    end
  end

  assign slice_map_o = map_q[N_SLICES-1:0];

  assign rdata_o  = rdata_q;
  assign enable_o = ctrl_q[0];
  assign wd_en_o  = ctrl_q[1];

endmodule
