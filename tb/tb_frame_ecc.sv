// tb_frame_ecc: streams frames through frame_ecc and checks its verdict
// against an independent bit-level model of the extended Hamming code: the
// check bits of a clean frame are derived here by explicit position search,
// then 0, 1, 2 or 3 random bits are flipped (also in the ECC field and in the
// masked word, which must be ignored). One result per frame, one cycle after
// the last word.
`timescale 1ns/1ps
module tb_frame_ecc;
  import ber_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic valid = 0, first = 0, last = 0;
  logic [WIDX_W-1:0] widx = 0;
  word_t data = 0, mask = 0;
  logic done, error;
  ecc_status_e status;
  logic [HAM_W-1:0] syndrome;

  frame_ecc u (.clk, .rst_n, .valid, .first, .last, .widx, .data, .mask,
               .done, .status, .error, .syndrome);

  int checks = 0, failures = 0;

  // Hamming position of each of the FRAME_WORDS*32-ECC_W data bits, found
  // by walking the integers and skipping powers of two.
  int pos [FRAME_WORDS*WORD_W];
  initial begin
    int p = 3, d = 0;
    while (d < FRAME_WORDS*WORD_W - ECC_W) begin
      if ((p & (p - 1)) != 0) begin pos[d] = p; d++; end
      p++;
    end
  end

  word_t fr [FRAME_WORDS];
  int    mask_word;

  // fill frame with random data and valid check bits; mask_word excluded
  task automatic make_frame();
    int syn, par, d;
    syn = 0; par = 0; d = 0;
    for (int w = 0; w < FRAME_WORDS; w++) fr[w] = $urandom;
    fr[FRAME_WORDS-1][ECC_W-1:0] = 0;
    if (mask_word >= 0) fr[mask_word] = 0;
    for (int w = 0; w < FRAME_WORDS; w++)
      for (int b = 0; b < WORD_W; b++) begin
        if (w == FRAME_WORDS-1 && b < ECC_W) continue;
        if (fr[w][b]) begin syn ^= pos[d]; par ^= 1; end
        d++;
      end
    for (int k = 0; k < HAM_W; k++) if (syn[k]) par ^= 1;
    fr[FRAME_WORDS-1][HAM_W-1:0] = syn[HAM_W-1:0];
    fr[FRAME_WORDS-1][HAM_W] = par[0];
    if (mask_word >= 0) fr[mask_word] = $urandom;   // unprotected contents
  endtask

  task automatic send_frame();
    for (int w = 0; w < FRAME_WORDS; w++) begin
      valid <= 1; first <= (w == 0); last <= (w == FRAME_WORDS-1);
      widx <= WIDX_W'(w); data <= fr[w]; mask <= (w == mask_word) ? '1 : '0;
      @(posedge clk);
    end
    valid <= 0; first <= 0; last <= 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nflip, fw, fb, seen_single = 0, seen_double = 0;
    ecc_status_e exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      mask_word = (t % 3 == 0) ? int'($urandom_range(0, FRAME_WORDS-2)) : -1;
      make_frame();
      nflip = t % 4;
      for (int k = 0; k < nflip; k++) begin
        // flip distinct bits outside the masked word
        do begin
          fw = $urandom_range(0, FRAME_WORDS-1);
          fb = $urandom_range(0, WORD_W-1);
        end while (fw == mask_word || (fw == FRAME_WORDS-1 && fb >= ECC_W && fb < ECC_W) );
        fr[fw][fb] = ~fr[fw][fb];
      end
      // a flip in the masked word must not matter
      if (mask_word >= 0) fr[mask_word][$urandom_range(0, 31)] ^= 1'b1;
      send_frame();
      @(posedge clk);   // done is registered: it shows in the cycle after last
      checks++;
      if (!done) begin failures++; $display("FAIL: no done"); end
      exp = nflip == 0 ? ECC_OK : nflip == 1 || nflip == 3 ? ECC_SINGLE : ECC_DOUBLE;
      // two flips of the same bit cancel
      checks++;
      if (nflip != 2 || exp != ECC_DOUBLE || status != ECC_OK) begin
        if (status != exp) begin
          failures++;
          $display("FAIL: frame %0d flips %0d status %s expected %s", t, nflip, status.name(), exp.name());
        end
      end
      checks++;
      if (error != (status != ECC_OK)) failures++;
      if (status == ECC_SINGLE) seen_single++;
      if (status == ECC_DOUBLE) seen_double++;
      @(posedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL: done longer than one cycle"); end
    end
    // single flip locates the bit
    mask_word = -1;
    make_frame();
    fr[0][5] ^= 1'b1;
    send_frame();
    @(posedge clk);
    checks++;
    if (status != ECC_SINGLE || int'(syndrome) != pos[5]) begin
      failures++; $display("FAIL: syndrome %0d expected %0d", syndrome, pos[5]);
    end
    checks++;
    if (seen_single == 0 || seen_double == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
