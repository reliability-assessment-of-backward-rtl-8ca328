// ber_pkg: constants, types and functions shared by the backward-error-recovery
// (BER) platform.
//
// Frame geometry: FRAME_WORDS 32-bit words per frame (the size of a Virtex-5
// frame), with a 12-bit ECC field held in the low bits of the last word. The ECC is an extended Hamming (SECDED) code over the frame:
// every data bit gets a Hamming position that is not a power of two, the 11
// check bits hold the XOR of the positions of all set data bits, and bit 11
// makes the parity of the whole frame even. A frame is checked by streaming
// its words through word_ecc() and XOR-ing the results, see frame_ecc.
//
// The frame size, the ECC placement and the golden content generator are this
// design's choices; the document only states that each frame carries parity
// bits produced when the bitstream is generated, checked by FRAME_ECC.
package ber_pkg;

  localparam int WORD_W      = 32;
  localparam int FRAME_WORDS = 41;            // words per frame
  localparam int ECC_WORD    = FRAME_WORDS - 1; // word that holds the ECC field
  localparam int ECC_W       = 12;            // {overall parity, 11 Hamming bits}
  localparam int HAM_W       = ECC_W - 1;
  localparam int WIDX_W      = $clog2(FRAME_WORDS);

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ECC_W-1:0]  ecc_t;   // [11] = parity, [10:0] = Hamming syndrome

  // Result of a frame check.
  typedef enum logic [1:0] {
    ECC_OK     = 2'd0,
    ECC_SINGLE = 2'd1,   // odd number of flips: one bit, correctable
    ECC_DOUBLE = 2'd2    // even number of flips with non-zero syndrome
  } ecc_status_e;

  // Hamming position of data bit d (0-based): the d-th integer >= 3 that is
  // not a power of two.
  function automatic logic [HAM_W-1:0] hpos(input int unsigned d);
    int unsigned p;
    p = d + 1;
    for (int k = 0; k < HAM_W; k++)
      if ((32'd1 << k) <= p) p = p + 1;
    return HAM_W'(p);
  endfunction

  // ECC contribution of one frame word. Bits of the ECC field contribute
  // their stored value (Hamming part and parity). Bits selected by mask are
  // not covered by the code (captured user state).
  function automatic ecc_t word_ecc(input logic [WIDX_W-1:0] widx,
                                    input word_t data, input word_t mask);
    ecc_t acc;
    int unsigned g;
    acc = '0;
    for (int b = 0; b < WORD_W; b++) begin
      if (data[b] && !mask[b]) begin
        acc[ECC_W-1] = ~acc[ECC_W-1];
        if (int'(widx) == ECC_WORD && b < ECC_W) begin
          if (b < HAM_W) acc[b] = ~acc[b];
        end else begin
          g = int'(widx) * WORD_W + b;
          if (int'(widx) >= ECC_WORD) g = g - ECC_W;
          acc[HAM_W-1:0] = acc[HAM_W-1:0] ^ hpos(g);
        end
      end
    end
    return acc;
  endfunction

  // Content of word w of frame f in the golden bitstream before its ECC field
  // is filled in: a fixed integer hash of (f, w), ECC field bits zero.
  function automatic word_t golden_raw(input int unsigned f, input int unsigned w);
    logic [31:0] x;
    x = (f * 32'd2654435761) ^ (w * 32'd40503) ^ 32'h5bd1e995;
    x = x ^ (x >> 15);
    x = x * 32'h2c1b3c6d;
    x = x ^ (x >> 12);
    if (w == ECC_WORD) x[ECC_W-1:0] = '0;
    return x;
  endfunction

endpackage
