// scrub_correction: the scrubber's correction unit.
//
// When the scrubber's read of a RAM word comes back (check_i, one cycle after
// the read), this unit decodes the raw codeword. A clean word needs nothing.
// A single error is reported (sec_o) and the corrected codeword is kept in a
// one-entry write-back buffer (wb_valid_o, wb_addr_o, wb_cw_o) until the
// scrubber's FSM gets the RAM port and writes it (wb_done_i). A double error
// is reported (ded_o) and left in place: it cannot be corrected.
//
// A bus write always has priority, so the bus may write a word between the
// scrubber's read and its write-back. Writing back then would bring old data
// back, so a bus write to the checked address in the check cycle, or to the
// buffered address while the write-back waits, drops the write-back. The
// reference design names a correction unit inside the scrubber; the
// write-back buffer and this hazard rule are this design's choice.
//
// stall_o is high in a check cycle that found a single error: the FSM must
// not issue a new read then, so the buffer is never overwritten.
module scrub_correction
  import scrub_pkg::*;
#(
  parameter  int unsigned MEM_WORDS = 262144,
  localparam int unsigned MAW       = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           check_i,
  input  logic [MAW-1:0] check_addr_i,
  input  codeword_t      codeword_i,
  input  logic           bus_wr_i,
  input  logic [MAW-1:0] bus_wr_addr_i,
  input  logic           wb_done_i,
  output logic           wb_valid_o,
  output logic [MAW-1:0] wb_addr_o,
  output codeword_t      wb_cw_o,
  output logic           sec_o,
  output logic           ded_o,
  output logic           stall_o
);

  ecc_status_e    status;
  codeword_t      fixed_cw;
  logic           wb_valid_q;
  logic [MAW-1:0] wb_addr_q;
  codeword_t      wb_cw_q;
  logic           stale_now, stale_buf;

  ecc_decoder u_dec (
    .codeword_i (codeword_i),
    .data_o     (),
    .codeword_o (fixed_cw),
    .status_o   (status),
    .syndrome_o ()
  );

  always_comb begin
    sec_o     = check_i && (status == ECC_SINGLE);
    ded_o     = check_i && (status == ECC_DOUBLE);
    stall_o   = sec_o;
    stale_now = bus_wr_i && (bus_wr_addr_i == check_addr_i);
    stale_buf = bus_wr_i && (bus_wr_addr_i == wb_addr_q);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wb_valid_q <= 1'b0;
      wb_addr_q  <= '0;
      wb_cw_q    <= '0;
    end else begin
      if (sec_o && !stale_now) begin
        wb_valid_q <= 1'b1;
        wb_addr_q  <= check_addr_i;
        wb_cw_q    <= fixed_cw;
      end else if (wb_valid_q && (wb_done_i || stale_buf)) begin
        wb_valid_q <= 1'b0;
      end
    end
  end

  assign wb_valid_o = wb_valid_q;
  assign wb_addr_o  = wb_addr_q;
  assign wb_cw_o    = wb_cw_q;

  // The FSM never checks a new word while a write-back is pending.
  a_no_overwrite: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(check_i && wb_valid_q && !wb_done_i && !stale_buf));

endmodule
