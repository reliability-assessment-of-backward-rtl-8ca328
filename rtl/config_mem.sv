// config_mem: behavioural model of the configuration layer of the FPGA region
// that holds the Enhanced Reliability Regions (ERRs). It stands for SRAM
// configuration cells and the capture/restore paths of the device, so it is a
// model of a process-specific part, written in synthesizable style.
//
// The region is N_ERR * FRAMES_PER_ERR frames of FRAME_WORDS 32-bit words.
// Frame word access (the configuration access port) reads with one cycle of
// latency and writes on the clock edge. The model holds no content at
// power-up: the bitstream is written through the access port (the reliability
// controller copies the golden copy in after reset).
//
// In every ERR the NCTX frames starting at offset CTX_BASE are context
// frames: word STATE_WORD of each of them does not hold configuration bits but
// the captured state of the ERR's flip-flops (32 bits per context frame).
// gcapture[e] copies user_state[e] into those words (GCAPTURE); grestore[e]
// drives them on restore_state[e] together with restore_load[e] for one cycle
// (GRESTORE). Those words are written by the access port like any other word
// and are not covered by the frame ECC.
//
// The document describes readback capture, GCAPTURE and GRESTORE; the frame
// geometry and which frames carry state are this design's choices.
module config_mem
  import ber_pkg::*;
#(
  parameter int N_ERR          = 1,
  parameter int FRAMES_PER_ERR = 72,
  parameter int NCTX           = 2,
  parameter int CTX_BASE       = 8,
  parameter int STATE_WORD     = 0,
  localparam int N_FRAMES      = N_ERR * FRAMES_PER_ERR,
  localparam int FA_W          = $clog2(N_FRAMES),
  localparam int STATE_W       = NCTX * WORD_W
)(
  input  logic                   clk,
  // frame word access
  input  logic                   rd,
  input  logic                   wr,
  input  logic [FA_W-1:0]        frame,
  input  logic [WIDX_W-1:0]      widx,
  input  word_t                  wdata,
  output word_t                  rdata,
  // capture / restore of user state
  input  logic [N_ERR-1:0]       gcapture,
  input  logic [N_ERR-1:0]       grestore,
  input  logic [STATE_W-1:0]     user_state    [N_ERR],
  output logic [STATE_W-1:0]     restore_state [N_ERR],
  output logic [N_ERR-1:0]       restore_load
);

  localparam int DEPTH = N_FRAMES * FRAME_WORDS;

  word_t mem [DEPTH];
  word_t cap_q [N_ERR][NCTX];

  // decode: is this address a captured-state word, and of which ERR/frame
  logic             is_state;
  int unsigned      st_err, st_ctx;
  always_comb begin
    int unsigned off;
    off      = int'(frame) % FRAMES_PER_ERR;
    st_err   = int'(frame) / FRAMES_PER_ERR;
    st_ctx   = off - CTX_BASE;
    is_state = (int'(widx) == STATE_WORD) && off >= CTX_BASE && off < CTX_BASE + NCTX;
  end

  logic [$clog2(DEPTH)-1:0] addr;
  assign addr = $clog2(DEPTH)'(int'(frame) * FRAME_WORDS + int'(widx));

  always_ff @(posedge clk) begin
    if (wr && !is_state) mem[addr] <= wdata;
    if (rd) rdata <= is_state ? cap_q[st_err][st_ctx] : mem[addr];
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < N_ERR; e++) begin
      if (gcapture[e]) begin
        for (int c = 0; c < NCTX; c++)
          cap_q[e][c] <= user_state[e][c*WORD_W +: WORD_W];
      end else if (wr && is_state && st_err == e) begin
        cap_q[e][st_ctx] <= wdata;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < N_ERR; e++) begin
      restore_load[e] <= grestore[e];
      for (int c = 0; c < NCTX; c++)
        restore_state[e][c*WORD_W +: WORD_W] <= cap_q[e][c];
    end
  end

endmodule
