// tb_frame_store: a golden store checks its generated bitstream (content per
// ber_pkg::golden_raw, state words of context frames zero, and an ECC field
// recomputed here from first principles: the data syndrome is zero and the
// whole frame has even parity) and the generation time of N_FRAMES *
// FRAME_WORDS cycles; a plain store is checked as a RAM with random traffic.
`timescale 1ns/1ps
module tb_frame_store;
  import ber_pkg::*;
  localparam int NF = 6, FPE = 3, NC = 1, CB = 1, SW = 2, FA_W = $clog2(NF);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic g_ready, g_rd = 0, r_ready, r_rd = 0, r_wr = 0;
  logic [FA_W-1:0] g_f = 0, r_rf = 0, r_wf = 0;
  logic [WIDX_W-1:0] g_w = 0, r_rw = 0, r_ww = 0;
  word_t g_q, r_q, r_d = 0;
  frame_store #(.N_FRAMES(NF), .GOLDEN(1'b1), .FRAMES_PER_ERR(FPE), .NCTX(NC), .CTX_BASE(CB),
                .STATE_WORD(SW)) ug (
    .clk, .rst_n, .ready(g_ready), .rd(g_rd), .rd_frame(g_f), .rd_widx(g_w), .rdata(g_q),
    .wr(1'b0), .wr_frame('0), .wr_widx('0), .wdata('0));
  frame_store #(.N_FRAMES(NF), .GOLDEN(1'b0)) ur (
    .clk, .rst_n, .ready(r_ready), .rd(r_rd), .rd_frame(r_rf), .rd_widx(r_rw), .rdata(r_q),
    .wr(r_wr), .wr_frame(r_wf), .wr_widx(r_ww), .wdata(r_d));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int pos [FRAME_WORDS*WORD_W];
  initial begin
    int p = 3, d = 0;
    while (d < FRAME_WORDS*WORD_W - ECC_W) begin
      if ((p & (p - 1)) != 0) begin pos[d] = p; d++; end
      p++;
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int n = 0;
    word_t fr [FRAME_WORDS];
    word_t ref_mem [NF*FRAME_WORDS];
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(r_ready, "plain store ready at once");
    while (!g_ready) begin @(negedge clk); n++; end
    check(n == NF*FRAME_WORDS, $sformatf("generation took %0d cycles", n));
    for (int f = 0; f < NF; f++) begin
      int syn, par, d;
      bit ctx;
      syn = 0; par = 0; d = 0;
      ctx = (f % FPE) >= CB && (f % FPE) < CB + NC;
      for (int w = 0; w < FRAME_WORDS; w++) begin
        g_rd = 1; g_f = FA_W'(f); g_w = WIDX_W'(w);
        @(negedge clk);
        fr[w] = g_q;
      end
      g_rd = 0;
      for (int w = 0; w < FRAME_WORDS; w++) begin
        word_t e;
        e = golden_raw(f, w);
        if (ctx && w == SW) e = 0;
        if (w == ECC_WORD) check(fr[w][31:ECC_W] == e[31:ECC_W], "ecc word data bits");
        else check(fr[w] == e, $sformatf("frame %0d word %0d", f, w));
        for (int b = 0; b < WORD_W; b++) begin
          if (w == ECC_WORD && b < ECC_W) begin
            if (fr[w][b]) begin par ^= 1; if (b < HAM_W) syn ^= (1 << b); end
            continue;
          end
          if (fr[w][b] && !(ctx && w == SW)) begin syn ^= pos[d]; par ^= 1; end
          d++;
        end
      end
      check(syn == 0, $sformatf("frame %0d syndrome %0d", f, syn));
      check(par == 0, $sformatf("frame %0d parity", f));
    end
    // plain RAM
    for (int i = 0; i < NF*FRAME_WORDS; i++) begin
      r_wr = 1; r_wf = FA_W'(i / FRAME_WORDS); r_ww = WIDX_W'(i % FRAME_WORDS);
      r_d = $urandom; ref_mem[i] = r_d;
      @(negedge clk);
    end
    r_wr = 0;
    for (int t = 0; t < 500; t++) begin
      int a = $urandom_range(0, NF*FRAME_WORDS-1);
      if (t % 3 == 0) begin
        r_wr = 1; r_wf = FA_W'(a / FRAME_WORDS); r_ww = WIDX_W'(a % FRAME_WORDS);
        r_d = $urandom; ref_mem[a] = r_d;
        @(negedge clk); r_wr = 0;
      end else begin
        r_rd = 1; r_rf = FA_W'(a / FRAME_WORDS); r_rw = WIDX_W'(a % FRAME_WORDS);
        @(negedge clk); r_rd = 0;
        check(r_q == ref_mem[a], "ram read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
