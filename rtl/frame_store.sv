// frame_store: frame-addressed word memory standing for the external storage
// of the golden bitstream and of the checkpoints (Compact Flash behind the
// SysACE controller in the evaluation platform).
//
// N_FRAMES frames of FRAME_WORDS words, one synchronous read port (data one
// cycle after rd) and one write port. With GOLDEN = 1 the store generates the
// golden bitstream itself after reset, one word per cycle: word w of frame f
// is ber_pkg::golden_raw(f, w), the state word of context frames is zero, and
// the ECC field of the last word is computed from the other bits exactly as
// the bitstream generator would (extended Hamming, see ber_pkg). 'ready' rises
// when that is done (N_FRAMES * FRAME_WORDS cycles after reset) and stays high.
// With GOLDEN = 0 the store is plain RAM and 'ready' is high from reset.
//
// The document names this storage only; its organisation is this design's.
module frame_store
  import ber_pkg::*;
#(
  parameter int N_FRAMES       = 72,
  parameter bit GOLDEN         = 1'b0,
  parameter int FRAMES_PER_ERR = 72,   // context-frame layout, used if GOLDEN
  parameter int NCTX           = 2,
  parameter int CTX_BASE       = 8,
  parameter int STATE_WORD     = 0,
  localparam int FA_W          = $clog2(N_FRAMES)
)(
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready,
  input  logic               rd,
  input  logic [FA_W-1:0]    rd_frame,
  input  logic [WIDX_W-1:0]  rd_widx,
  output word_t              rdata,
  input  logic               wr,
  input  logic [FA_W-1:0]    wr_frame,
  input  logic [WIDX_W-1:0]  wr_widx,
  input  word_t              wdata
);

  localparam int DEPTH = N_FRAMES * FRAME_WORDS;
  localparam int AW    = $clog2(DEPTH);

  word_t mem [DEPTH];

  // golden bitstream generator
  logic              gen_busy;
  logic [FA_W-1:0]   gen_f;
  logic [WIDX_W-1:0] gen_w;
  ecc_t              gen_acc;
  word_t             gen_word, gen_mask;
  ecc_t              gen_fin;

  always_comb begin
    int unsigned off;
    off      = int'(gen_f) % FRAMES_PER_ERR;
    gen_mask = (int'(gen_w) == STATE_WORD && off >= CTX_BASE && off < CTX_BASE + NCTX)
               ? '1 : '0;
    gen_word = golden_raw(int'(gen_f), int'(gen_w)) & ~gen_mask;
    gen_fin  = gen_acc ^ word_ecc(gen_w, gen_word, gen_mask);
    if (int'(gen_w) == ECC_WORD)
      gen_word[ECC_W-1:0] = {gen_fin[ECC_W-1] ^ (^gen_fin[HAM_W-1:0]), gen_fin[HAM_W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_busy <= GOLDEN;
      gen_f    <= '0;
      gen_w    <= '0;
      gen_acc  <= '0;
    end else if (gen_busy) begin
      if (int'(gen_w) == FRAME_WORDS - 1) begin
        gen_w   <= '0;
        gen_acc <= '0;
        if (int'(gen_f) == N_FRAMES - 1) gen_busy <= 1'b0;
        else                             gen_f    <= gen_f + 1'b1;
      end else begin
        gen_w   <= gen_w + 1'b1;
        gen_acc <= gen_fin;
      end
    end
  end

  assign ready = !gen_busy;

  logic [AW-1:0] waddr, raddr;
  word_t         wd;
  logic          we;
  always_comb begin
    if (gen_busy) begin
      we    = 1'b1;
      waddr = AW'(int'(gen_f) * FRAME_WORDS + int'(gen_w));
      wd    = gen_word;
    end else begin
      we    = wr;
      waddr = AW'(int'(wr_frame) * FRAME_WORDS + int'(wr_widx));
      wd    = wdata;
    end
    raddr = AW'(int'(rd_frame) * FRAME_WORDS + int'(rd_widx));
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wd;
    if (rd) rdata <= mem[raddr];
  end

endmodule
