// scrub_fsm: the scrubber's address walk and RAM-port sequencing.
//
// While enabled, the FSM walks the RAM word by word from address 0 to the end
// and starts again at 0. At every word it looks up the word's slice in the
// slice map. If the slice is in use it reads the word (one word per cycle
// when the port is free); if not, it jumps to the first word of the next
// slice in a single cycle, without touching the RAM. This is the walk of the
// reference scrubber algorithm; it scrubs a profiled memory in about
// (used words + unused slices) cycles instead of (all words) cycles.
//
// The RAM port is shared with the bus, which always wins: a request that is
// not granted (gnt_i low) is simply repeated in the next cycle. A read
// granted in cycle t is checked by the correction unit in cycle t+1
// (check_o, check_addr_o). A pending write-back from the correction unit is
// served before any new read, and no read is issued in a cycle whose check
// found a single error (stall_i), so there is never more than one
// correction in flight.
//
// Watchdog (this design's reading of the optional bus watchdog): when wd_en_i
// is set, every bus access to the RAM reloads a counter with
// WATCHDOG_CYCLES, and new reads start only once it has run down to zero, so
// scrubbing keeps out of the way of bursts of core traffic.
//
// A rising enable restarts the walk at address 0; clearing enable stops new
// reads (a pending write-back is still completed). pass_done_o pulses for
// one cycle when the walk wraps from the end of the RAM back to 0.
module scrub_fsm
  import scrub_pkg::*;
#(
  parameter  int unsigned MEM_WORDS       = 262144,
  parameter  int unsigned SLICE_WORDS     = 32,
  parameter  int unsigned WATCHDOG_CYCLES = 16,
  localparam int unsigned N_SLICES        = (MEM_WORDS + SLICE_WORDS - 1) / SLICE_WORDS,
  localparam int unsigned MAW             = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1,
  localparam int unsigned SW              = (N_SLICES > 1) ? $clog2(N_SLICES) : 1,
  localparam int unsigned WW              = $clog2(WATCHDOG_CYCLES + 1) + 1
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                enable_i,
  input  logic                wd_en_i,
  input  logic [N_SLICES-1:0] slice_map_i,
  // bus activity on the RAM
  input  logic                bus_ram_i,
  // RAM port request
  output logic                req_o,
  output logic                we_o,
  output logic [MAW-1:0]      addr_o,
  input  logic                gnt_i,
  // correction unit
  output logic                check_o,
  output logic [MAW-1:0]      check_addr_o,
  input  logic                stall_i,
  input  logic                wb_valid_i,
  input  logic [MAW-1:0]      wb_addr_i,
  output logic                wb_done_o,
  // status
  output logic                active_o,
  output logic                skip_o,
  output logic                pass_done_o
);

  typedef enum logic [0:0] {S_IDLE, S_SCAN} state_e;

  state_e         state_q;
  logic [MAW-1:0] addr_q;
  logic           pend_q;
  logic [MAW-1:0] pend_addr_q;
  logic [WW-1:0]  wd_q;

  logic           run;
  logic [SW-1:0]  slice;
  logic           slice_used;
  logic           rd_req;
  logic [MAW:0]   next_word, next_slice;

  always_comb begin
    slice      = SW'(addr_q / MAW'(SLICE_WORDS));
    slice_used = slice_map_i[slice];
    next_word  = {1'b0, addr_q} + 1'b1;
    next_slice = (MAW+1)'((int'(slice) + 1) * SLICE_WORDS);
    run        = (state_q == S_SCAN) && enable_i &&
                 (!wd_en_i || (wd_q == '0 && !bus_ram_i));
    rd_req     = run && !wb_valid_i && !stall_i && slice_used;
    skip_o     = run && !wb_valid_i && !stall_i && !slice_used;

    req_o     = wb_valid_i || rd_req;
    we_o      = wb_valid_i;
    addr_o    = wb_valid_i ? wb_addr_i : addr_q;
    wb_done_o = wb_valid_i && gnt_i;

    check_o      = pend_q;
    check_addr_o = pend_addr_q;
    active_o     = run;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      addr_q      <= '0;
      pend_q      <= 1'b0;
      pend_addr_q <= '0;
      wd_q        <= '0;
      pass_done_o <= 1'b0;
    end else begin
      pass_done_o <= 1'b0;
      pend_q      <= rd_req && gnt_i;
      if (rd_req && gnt_i) pend_addr_q <= addr_q;

      if (bus_ram_i)       wd_q <= WW'(WATCHDOG_CYCLES);
      else if (wd_q != '0) wd_q <= wd_q - 1'b1;

      case (state_q)
        S_IDLE: begin
          if (enable_i) begin
            state_q <= S_SCAN;
            addr_q  <= '0;
          end
        end
        S_SCAN: begin
          if (!enable_i) begin
            state_q <= S_IDLE;
          end else if (rd_req && gnt_i) begin
            if (next_word >= (MAW+1)'(MEM_WORDS)) begin
              addr_q      <= '0;
              pass_done_o <= 1'b1;
            end else begin
              addr_q <= next_word[MAW-1:0];
            end
          end else if (skip_o) begin
            if (next_slice >= (MAW+1)'(MEM_WORDS)) begin
              addr_q      <= '0;
              pass_done_o <= 1'b1;
            end else begin
              addr_q <= next_slice[MAW-1:0];
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
