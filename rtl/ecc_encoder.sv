// ecc_encoder: SEC-DED encoder of the RAM's ECC.
//
// Turns a 32-bit data word into the 39-bit codeword stored in the RAM
// (32 data bits and 7 check bits, the check-bit count of the reference
// system's custom RAM). The code itself, an extended Hamming code, is this
// design's own choice; its bit layout is documented in scrub_pkg.
//
// Interface: data_i in, codeword_o out. Purely combinational.
module ecc_encoder
  import scrub_pkg::*;
(
  input  data_t     data_i,
  output codeword_t codeword_o
);

  always_comb codeword_o = encode(data_i);

endmodule
