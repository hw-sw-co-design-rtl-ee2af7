// ecc_decoder: SEC-DED decoder of the RAM's ECC.
//
// Checks a 39-bit codeword read from the RAM. It computes the 6-bit Hamming
// syndrome and the overall parity, flips the bit a single error points at,
// and reports whether the word was clean, held a corrected single error, or
// held an uncorrectable (double) error. Single-error correction with
// double-error detection is the protection the reference system relies on;
// the exact code and bit layout (see scrub_pkg) are this design's choice.
//
// Interface: codeword_i in; data_o (corrected data), codeword_o (corrected
// codeword, ready to be written back), status_o and syndrome_o out.
// Purely combinational. For a double error the outputs carry the word as read.
module ecc_decoder
  import scrub_pkg::*;
(
  input  codeword_t   codeword_i,
  output data_t       data_o,
  output codeword_t   codeword_o,
  output ecc_status_e status_o,
  output syndrome_t   syndrome_o
);

  syndrome_t syn;
  logic      parity;
  codeword_t fixed;

  always_comb begin
    syn    = syndrome_of(codeword_i);
    parity = ^codeword_i;
    fixed  = codeword_i;
    if (!parity) begin
      status_o = (syn == '0) ? ECC_OK : ECC_DOUBLE;
    end else if (int'(syn) < CW_W) begin
      // syn == 0 points at bit 0, the overall parity bit itself.
      fixed[syn] = ~codeword_i[syn];
      status_o   = ECC_SINGLE;
    end else begin
      status_o = ECC_DOUBLE;
    end
    codeword_o = fixed;
    data_o     = gather_data(fixed);
    syndrome_o = syn;
  end

endmodule
