// ecc_ram: single-port RAM that stores ECC-protected words.
//
// Each location holds a 39-bit codeword (32 data bits and 7 check bits). A
// normal write encodes the 32-bit data word on the way in; a raw write
// (raw_i=1) stores a codeword as given, which is how the scrubber writes back
// a corrected word. A read registers the stored codeword; one cycle later the
// raw codeword (rcw_o) and its decoded form (rdata_o, rstatus_o) are
// available, together with rvalid_o. The decoded data is corrected on the
// fly, but the stored word stays wrong until someone writes it back.
//
// The memory is a plain array with one synchronous port, so any RAM that can
// hold the wider words (an SRAM macro or an FPGA block RAM) can replace it;
// one port is all the scrubbing IP needs, since the memory access logic
// arbitrates between the bus and the scrubber. The array is not reset.
//
// Timing: request in cycle t (en_i), data out in cycle t+1, held until the
// next read.
module ecc_ram
  import scrub_pkg::*;
#(
  parameter int unsigned WORDS = 262144,            // 1 MiB of 32-bit words
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        en_i,
  input  logic        we_i,
  input  logic        raw_i,
  input  logic [AW-1:0] addr_i,
  input  data_t       wdata_i,
  input  codeword_t   wcw_i,
  output logic        rvalid_o,
  output codeword_t   rcw_o,
  output data_t       rdata_o,
  output ecc_status_e rstatus_o
);

  codeword_t mem [WORDS];
  codeword_t rcw_q;
  codeword_t enc_cw;
  logic      rvalid_q;

  ecc_encoder u_enc (
    .data_i     (wdata_i),
    .codeword_o (enc_cw)
  );

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      if (we_i) mem[addr_i] <= raw_i ? wcw_i : enc_cw;
      else      rcw_q       <= mem[addr_i];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_q <= 1'b0;
    else         rvalid_q <= en_i && !we_i;
  end

  ecc_decoder u_dec (
    .codeword_i (rcw_q),
    .data_o     (rdata_o),
    .codeword_o (),
    .status_o   (rstatus_o),
    .syndrome_o ()
  );

  assign rcw_o    = rcw_q;
  assign rvalid_o = rvalid_q;

endmodule
