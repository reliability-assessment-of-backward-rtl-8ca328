// fault_injector: emulates radiation-induced upsets in the configuration
// layer of the ERR region, the way the injection routine of the evaluation
// platform does: a timer fires every INJ_PERIOD cycles; the injector then
// draws the characteristics of one event, asks for the configuration access
// port (req/gnt, the reliability controller parks while it holds it), and for
// every bit of the event reads the frame word, inverts the bit and writes the
// word back (read-modify-write, two cycles per bit).
//
// Event draw (32-bit xorshift generator, seed SEED):
//  * frame uniform over the region, word uniform over the frame, bit uniform;
//  * shape: with probability MBU_PCT % a multi-frame upset (the same bit in
//    consecutive frames), else a single-word upset (adjacent bits of one word);
//  * size 1..4 bits from the cumulative percentages of the distribution
//    table for that shape (defaults: the example law of the document,
//    54/39/6/1 % and 41/34/13/12 %).
// Injection only runs while 'enable' is high. n_events / n_bits count what was
// injected; last_* describe the most recent event.
//
// The document gives the timer-driven routine, the read / invert / rewrite
// sequence and the example distribution; the random generator, the uniform
// address law, the two shapes, MBU_PCT and the timer period in cycles
// (0.1 s, the document's 10 events per second, at an assumed 100 MHz) are
// this design's choices.
module fault_injector
  import ber_pkg::*;
#(
  parameter int          N_FRAMES   = 72,
  parameter int unsigned INJ_PERIOD = 10_000_000,
  parameter int          MBU_PCT    = 50,
  parameter logic [31:0] SEED       = 32'h1234_5678,
  // cumulative percentages for sizes 1, 2, 3 (size 4 takes the rest)
  parameter int          SBU_CUM1 = 54, SBU_CUM2 = 93, SBU_CUM3 = 99,
  parameter int          MBU_CUM1 = 41, MBU_CUM2 = 75, MBU_CUM3 = 88,
  localparam int         FA_W = $clog2(N_FRAMES)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // access port hand-over
  output logic              req,
  input  logic              gnt,
  output logic              cfg_rd,
  output logic              cfg_wr,
  output logic [FA_W-1:0]   cfg_frame,
  output logic [WIDX_W-1:0] cfg_widx,
  output word_t             cfg_wdata,
  input  word_t             cfg_rdata,
  // statistics
  output logic [31:0]       n_events,
  output logic [31:0]       n_bits,
  output logic              last_mbu,
  output logic [2:0]        last_size,
  output logic [FA_W-1:0]   last_frame,
  output logic [WIDX_W-1:0] last_widx,
  output logic [4:0]        last_bit
);

  typedef enum logic [2:0] {I_IDLE, I_DRAW, I_REQ, I_RD, I_WR, I_DONE} ist_e;

  ist_e              st;
  logic [31:0]       rng;
  logic [31:0]       timer;
  logic [FA_W-1:0]   ev_f, cur_f;
  logic [WIDX_W-1:0] ev_w;
  logic [4:0]        ev_b, cur_b;
  logic              ev_mbu;
  logic [2:0]        ev_n, k;

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  // scale a 16-bit random value to [0, n)
  function automatic int unsigned scale(input logic [15:0] r, input int unsigned n);
    return int'((32'(r) * 32'(n)) >> 16);
  endfunction

  int unsigned pct_size, pct_shape;
  logic [2:0]  size_sbu, size_mbu;
  always_comb begin
    pct_size  = scale(rng[15:0], 100);
    pct_shape = scale(rng[31:16], 100);
    size_sbu  = pct_size < SBU_CUM1 ? 3'd1 : pct_size < SBU_CUM2 ? 3'd2 :
                pct_size < SBU_CUM3 ? 3'd3 : 3'd4;
    size_mbu  = pct_size < MBU_CUM1 ? 3'd1 : pct_size < MBU_CUM2 ? 3'd2 :
                pct_size < MBU_CUM3 ? 3'd3 : 3'd4;
  end

  always_comb begin
    cfg_rd    = (st == I_RD);
    cfg_wr    = (st == I_WR);
    cfg_frame = cur_f;
    cfg_widx  = ev_w;
    cfg_wdata = cfg_rdata ^ (word_t'(1) << cur_b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE;
      rng <= (SEED == 0) ? 32'h1 : SEED;
      timer <= '0;
      ev_f <= '0; ev_w <= '0; ev_b <= '0; ev_mbu <= 1'b0; ev_n <= '0;
      cur_f <= '0; cur_b <= '0; k <= '0;
      req <= 1'b0;
      n_events <= '0; n_bits <= '0;
      last_mbu <= 1'b0; last_size <= '0; last_frame <= '0; last_widx <= '0; last_bit <= '0;
    end else begin
      rng <= xorshift(rng);
      unique case (st)
        I_IDLE: if (enable) begin
          if (timer >= INJ_PERIOD - 1) begin
            timer <= '0;
            ev_f  <= FA_W'(scale(rng[15:0], N_FRAMES));
            ev_w  <= WIDX_W'(scale(rng[31:16], FRAME_WORDS));
            st    <= I_DRAW;
          end else begin
            timer <= timer + 1;
          end
        end

        I_DRAW: begin
          ev_b   <= rng[4:0];
          ev_mbu <= pct_shape < MBU_PCT;
          ev_n   <= (pct_shape < MBU_PCT) ? size_mbu : size_sbu;
          st     <= I_REQ;
          req    <= 1'b1;
        end

        I_REQ: begin
          cur_f <= ev_f;
          cur_b <= ev_b;
          k     <= '0;
          if (gnt) st <= I_RD;
        end

        I_RD: st <= I_WR;

        I_WR: begin
          n_bits <= n_bits + 1;
          if (k == ev_n - 1'b1) begin
            st  <= I_DONE;
            req <= 1'b0;
          end else begin
            k <= k + 1'b1;
            if (ev_mbu) cur_f <= (int'(cur_f) == N_FRAMES - 1) ? '0 : cur_f + 1'b1;
            else        cur_b <= cur_b + 1'b1;
            st <= I_RD;
          end
        end

        I_DONE: if (!gnt) begin
          n_events   <= n_events + 1;
          last_mbu   <= ev_mbu;
          last_size  <= ev_n;
          last_frame <= ev_f;
          last_widx  <= ev_w;
          last_bit   <= ev_b;
          st         <= I_IDLE;
        end

        default: st <= I_IDLE;
      endcase
    end
  end

  // the port is touched only while it is granted
  assert property (@(posedge clk) disable iff (!rst_n) (cfg_rd || cfg_wr) |-> gnt);

endmodule
