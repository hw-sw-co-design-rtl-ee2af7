// scrub_pkg: types and functions shared by the scrubbing IP.
//
// The RAM stores 32-bit data words protected by 7 check bits (a 39-bit
// codeword), which is the width of the custom RAM of the reference system.
// The code is an extended Hamming (SEC-DED) code, this design's own choice of
// code for those 7 bits:
//   codeword bit 0        overall parity over the other 38 bits
//   codeword bits 1..38   Hamming positions 1..38; positions 1,2,4,8,16,32
//                         hold the check bits, the other 32 positions hold
//                         the data bits in ascending order
// A syndrome s (6 bits, XOR of the positions of all set bits) and the overall
// parity p classify a word: s=0,p=0 clean; p=1 single error at position s
// (s=0 means the overall parity bit); s!=0,p=0 double error; p=1 with s>38
// cannot be a single error and is reported as a double error.
package scrub_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ECC_W  = 7;
  localparam int unsigned CW_W   = DATA_W + ECC_W;   // 39
  localparam int unsigned SYN_W  = 6;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [CW_W-1:0]   codeword_t;
  typedef logic [SYN_W-1:0]  syndrome_t;

  // Outcome of a codeword check.
  typedef enum logic [1:0] {
    ECC_OK     = 2'd0,
    ECC_SINGLE = 2'd1,   // one bit flipped, corrected
    ECC_DOUBLE = 2'd2    // two (or an uncorrectable number of) bits flipped
  } ecc_status_e;

  // True for Hamming positions that hold a check bit.
  function automatic logic is_pow2(input int unsigned pos);
    return (pos != 0) && ((pos & (pos - 1)) == 0);
  endfunction

  // Place 32 data bits at the non-power-of-two positions 3,5,6,7,9,...,38.
  function automatic codeword_t scatter_data(input data_t d);
    codeword_t cw;
    int unsigned k;
    cw = '0;
    k  = 0;
    for (int unsigned pos = 1; pos < CW_W; pos++) begin
      if (!is_pow2(pos)) begin
        cw[pos] = d[k];
        k++;
      end
    end
    return cw;
  endfunction

  // Collect the data bits back out of a codeword.
  function automatic data_t gather_data(input codeword_t cw);
    data_t d;
    int unsigned k;
    d = '0;
    k = 0;
    for (int unsigned pos = 1; pos < CW_W; pos++) begin
      if (!is_pow2(pos)) begin
        d[k] = cw[pos];
        k++;
      end
    end
    return d;
  endfunction

  // XOR of the positions of all set bits among positions 1..38.
  function automatic syndrome_t syndrome_of(input codeword_t cw);
    syndrome_t s;
    s = '0;
    for (int unsigned pos = 1; pos < CW_W; pos++) begin
      if (cw[pos]) s ^= SYN_W'(pos);
    end
    return s;
  endfunction

  function automatic codeword_t encode(input data_t d);
    codeword_t cw;
    syndrome_t s;
    cw = scatter_data(d);
    s  = syndrome_of(cw);
    // Setting check bit 2^i cancels bit i of the syndrome of the data bits.
    for (int unsigned i = 0; i < SYN_W; i++) cw[1 << i] = s[i];
    cw[0] = ^cw[CW_W-1:1];
    return cw;
  endfunction

endpackage
