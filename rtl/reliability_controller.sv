// reliability_controller: backward error recovery (BER) for the Enhanced
// Reliability Regions (ERRs) of an SRAM FPGA, using the configuration access
// port only, so the protected IP runs undisturbed except while it is being
// recovered.
//
// After reset it writes the golden bitstream into the configuration layer
// (LOAD) and takes a first checkpoint of every ERR. Then it loops:
//  * Fault detection (FD): read back the next frame of the ERR region and
//    check it with FRAME_ECC. Only detection is used, never ECC correction.
//  * Hardware checkpoint (HC), every CKPT_PERIOD cycles: pulse gcapture[e]
//    (GCAPTURE: flip-flop state is copied into the context frames), read the
//    NCTX context frames back and store them in the checkpoint store. Two
//    banks per ERR are used; the new one becomes current only if every
//    context frame passed its ECC check, else the controller recovers.
//  * Hardware recovery (HR) when a frame fails its check: halt[e] stops the
//    ERR, the faulty frame is rewritten from the golden copy, the context
//    frames are rewritten from the last checkpoint, grestore[e] (GRESTORE)
//    reloads the flip-flops, and the ERR is released. The ERR is halted for
//    (NCTX + 1) * T_FRAME + 2 cycles, with T_FRAME = FRAME_WORDS + 1 the
//    cycles to write one frame (one word per cycle plus the read latency).
// Between operations, when inj_req is high, the controller parks and grants
// the access port to the fault injector (inj_gnt) until inj_req drops.
//
// Memories read with one cycle of latency; the copy engine issues one read
// per cycle and writes each word the cycle it returns.
//
// The document gives the three operations, their order, that FD and HC run
// alongside the task and that only HR stops it, and the recovery time
// t_frame_write * (context frames + 1). The state machine, the double-banked
// checkpoint, the initial load and the injector hand-over are this design's.
module reliability_controller
  import ber_pkg::*;
#(
  parameter int N_ERR          = 1,
  parameter int FRAMES_PER_ERR = 72,
  parameter int NCTX           = 2,
  parameter int CTX_BASE       = 8,
  parameter int STATE_WORD     = 0,
  parameter int CKPT_PERIOD    = 1_000_000,
  localparam int N_FRAMES      = N_ERR * FRAMES_PER_ERR,
  localparam int FA_W          = $clog2(N_FRAMES),
  localparam int N_CK          = 2 * N_ERR * NCTX,
  localparam int CA_W          = $clog2(N_CK)
)(
  input  logic               clk,
  input  logic               rst_n,
  // configuration access port
  output logic               cfg_rd,
  output logic               cfg_wr,
  output logic [FA_W-1:0]    cfg_frame,
  output logic [WIDX_W-1:0]  cfg_widx,
  output word_t              cfg_wdata,
  input  word_t              cfg_rdata,
  // golden copy (read only)
  input  logic               gold_ready,
  output logic               gold_rd,
  output logic [FA_W-1:0]    gold_frame,
  output logic [WIDX_W-1:0]  gold_widx,
  input  word_t              gold_rdata,
  // checkpoint store
  output logic               ck_rd,
  output logic [CA_W-1:0]    ck_rframe,
  output logic [WIDX_W-1:0]  ck_rwidx,
  input  word_t              ck_rdata,
  output logic               ck_wr,
  output logic [CA_W-1:0]    ck_wframe,
  output logic [WIDX_W-1:0]  ck_wwidx,
  output word_t              ck_wdata,
  // ERR control
  output logic [N_ERR-1:0]   halt,
  output logic [N_ERR-1:0]   gcapture,
  output logic [N_ERR-1:0]   grestore,
  // fault injector hand-over
  input  logic               inj_req,
  output logic               inj_gnt,
  // status
  output logic               loaded,          // golden bitstream written
  output logic [31:0]        n_fd_frames,     // frames checked by FD
  output logic [31:0]        n_fd_passes,     // complete FD sweeps
  output logic [31:0]        n_detect,        // faulty frames found
  output logic [31:0]        n_ckpt,          // checkpoints committed
  output logic [31:0]        n_recover,       // recoveries done
  output logic [FA_W-1:0]    last_bad_frame,
  output ecc_status_e        last_bad_status, // single or double upset
  output logic [31:0]        last_recovery_cycles
);

  typedef enum logic [3:0] {
    S_WAIT, S_LOAD, S_DISPATCH, S_INJ, S_FD, S_FD_CHK,
    S_HC_CAP, S_HC_GO, S_HC, S_HC_CHK, S_HR_GOLD, S_HR_CTX, S_HR_RST, S_HR_WAIT
  } state_e;

  typedef enum logic [1:0] {SRC_CFG, SRC_GOLD, SRC_CK} src_e;

  state_e               st;
  src_e                 src;
  logic [FA_W-1:0]      src_frame, dst_frame;   // dst_frame: config frame
  logic [CA_W-1:0]      src_ck, dst_ck;
  logic [WIDX_W-1:0]    iss_w;                   // next word to read
  logic                 iss_on;                  // reads still to issue
  logic                 rv;                      // read data returns this cycle
  logic [WIDX_W-1:0]    rv_w;
  logic                 xfer_done;
  word_t                rdat;

  logic [FA_W-1:0]      fd_f;                    // FD scan position
  logic [FA_W-1:0]      bad_f;
  logic [$clog2(N_ERR+1)-1:0] cur_e;             // ERR being served
  logic [$clog2(NCTX+1)-1:0]  cur_c;             // context frame index
  logic [N_ERR-1:0]     bank;                    // current checkpoint bank
  logic                 hc_err;
  logic [31:0]          ck_timer;
  logic                 ck_due;
  logic [31:0]          rec_cnt;

  // ECC checker on the readback stream
  logic         ecc_done, ecc_error;
  ecc_status_e  ecc_status;
  word_t        ecc_mask;

  function automatic logic [FA_W-1:0] ctx_frame(input int unsigned e, input int unsigned c);
    return FA_W'(e * FRAMES_PER_ERR + CTX_BASE + c);
  endfunction

  function automatic logic is_ctx(input logic [FA_W-1:0] f);
    int unsigned off;
    off = int'(f) % FRAMES_PER_ERR;
    return off >= CTX_BASE && off < CTX_BASE + NCTX;
  endfunction

  function automatic logic [CA_W-1:0] ck_slot(input logic b, input int unsigned e,
                                              input int unsigned c);
    return CA_W'((int'(b) * N_ERR + e) * NCTX + c);
  endfunction

  // ---------------------------------------------------------------- copy engine
  // source read
  always_comb begin
    cfg_rd     = iss_on && src == SRC_CFG;
    gold_rd    = iss_on && src == SRC_GOLD;
    ck_rd      = iss_on && src == SRC_CK;
    gold_frame = src_frame;
    gold_widx  = iss_w;
    ck_rframe  = src_ck;
    ck_rwidx   = iss_w;
    unique case (src)
      SRC_GOLD: rdat = gold_rdata;
      SRC_CK:   rdat = ck_rdata;
      default:  rdat = cfg_rdata;
    endcase
    xfer_done  = rv && int'(rv_w) == FRAME_WORDS - 1;
    // configuration port: reads use the source frame, writes the destination
    cfg_wr     = rv && (st == S_LOAD || st == S_HR_GOLD || st == S_HR_CTX);
    cfg_frame  = cfg_wr ? dst_frame : src_frame;
    cfg_widx   = cfg_wr ? rv_w : iss_w;
    cfg_wdata  = rdat;
    // checkpoint store write during HC
    ck_wr      = rv && st == S_HC;
    ck_wframe  = dst_ck;
    ck_wwidx   = rv_w;
    ck_wdata   = rdat;
    ecc_mask   = (is_ctx(src_frame) && int'(rv_w) == STATE_WORD) ? '1 : '0;
  end

  frame_ecc u_ecc (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (rv && (st == S_FD || st == S_HC)),
    .first    (rv_w == '0),
    .last     (int'(rv_w) == FRAME_WORDS - 1),
    .widx     (rv_w),
    .data     (rdat),
    .mask     (ecc_mask),
    .done     (ecc_done),
    .status   (ecc_status),
    .error    (ecc_error),
    .syndrome ()
  );

  // ---------------------------------------------------------------- control
  // start_xfer: begin reading frame words from the selected source
  task automatic start_xfer(input src_e s);
    src    <= s;
    iss_w  <= '0;
    iss_on <= 1'b1;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= S_WAIT;
      src            <= SRC_CFG;
      src_frame      <= '0;
      dst_frame      <= '0;
      src_ck         <= '0;
      dst_ck         <= '0;
      iss_w          <= '0;
      iss_on         <= 1'b0;
      rv             <= 1'b0;
      rv_w           <= '0;
      fd_f           <= '0;
      bad_f          <= '0;
      cur_e          <= '0;
      cur_c          <= '0;
      bank           <= '0;
      hc_err         <= 1'b0;
      ck_timer       <= '0;
      ck_due         <= 1'b1;
      rec_cnt        <= '0;
      halt           <= '0;
      gcapture       <= '0;
      grestore       <= '0;
      inj_gnt        <= 1'b0;
      loaded         <= 1'b0;
      n_fd_frames    <= '0;
      n_fd_passes    <= '0;
      n_detect       <= '0;
      n_ckpt         <= '0;
      n_recover      <= '0;
      last_bad_frame <= '0;
      last_bad_status <= ECC_OK;
      last_recovery_cycles <= '0;
    end else begin
      gcapture <= '0;
      grestore <= '0;

      // issue side of the copy engine
      rv   <= iss_on;
      rv_w <= iss_w;
      if (iss_on) begin
        if (int'(iss_w) == FRAME_WORDS - 1) iss_on <= 1'b0;
        else                                iss_w  <= iss_w + 1'b1;
      end

      // checkpoint timer
      if (loaded && !ck_due) begin
        if (ck_timer >= 32'(CKPT_PERIOD - 1)) begin
          ck_timer <= '0;
          ck_due   <= 1'b1;
        end else begin
          ck_timer <= ck_timer + 1;
        end
      end

      if (|halt) rec_cnt <= rec_cnt + 1;

      unique case (st)
        S_WAIT: if (gold_ready) begin
          src_frame <= '0;
          dst_frame <= '0;
          start_xfer(SRC_GOLD);
          st <= S_LOAD;
        end

        S_LOAD: if (xfer_done) begin
          if (int'(dst_frame) == N_FRAMES - 1) begin
            loaded <= 1'b1;
            st     <= S_DISPATCH;
          end else begin
            src_frame <= src_frame + 1'b1;
            dst_frame <= dst_frame + 1'b1;
            start_xfer(SRC_GOLD);
          end
        end

        S_DISPATCH: begin
          if (inj_req) begin
            inj_gnt <= 1'b1;
            st      <= S_INJ;
          end else if (ck_due) begin
            cur_e <= '0;
            st    <= S_HC_CAP;
          end else begin
            src_frame <= fd_f;
            start_xfer(SRC_CFG);
            st <= S_FD;
          end
        end

        S_INJ: if (!inj_req) begin
          inj_gnt <= 1'b0;
          st      <= S_DISPATCH;
        end

        S_FD: if (xfer_done) st <= S_FD_CHK;

        S_FD_CHK: if (ecc_done) begin
          n_fd_frames <= n_fd_frames + 1;
          if (ecc_error) begin
            bad_f <= fd_f;
            cur_e <= ($clog2(N_ERR+1))'(int'(fd_f) / FRAMES_PER_ERR);
            st    <= S_HR_GOLD;
            n_detect       <= n_detect + 1;
            last_bad_frame <= fd_f;
            last_bad_status <= ecc_status;
            halt[int'(fd_f) / FRAMES_PER_ERR] <= 1'b1;
            rec_cnt   <= 32'd1;
            src_frame <= fd_f;
            dst_frame <= fd_f;
            start_xfer(SRC_GOLD);
          end else begin
            st <= S_DISPATCH;
          end
          if (int'(fd_f) == N_FRAMES - 1) begin
            fd_f        <= '0;
            n_fd_passes <= n_fd_passes + 1;
          end else begin
            fd_f <= fd_f + 1'b1;
          end
        end

        S_HC_CAP: begin
          gcapture[cur_e] <= 1'b1;
          cur_c     <= '0;
          hc_err    <= 1'b0;
          src_frame <= ctx_frame(int'(cur_e), 0);
          dst_ck    <= ck_slot(~bank[cur_e], int'(cur_e), 0);
          st        <= S_HC_GO;
        end

        // the capture lands at the end of this cycle, before the first read
        S_HC_GO: begin
          start_xfer(SRC_CFG);
          st <= S_HC;
        end

        S_HC: if (xfer_done) st <= S_HC_CHK;

        S_HC_CHK: if (ecc_done) begin
          if (ecc_error && !hc_err) begin
            hc_err         <= 1'b1;
            bad_f          <= src_frame;
            n_detect       <= n_detect + 1;
            last_bad_frame <= src_frame;
            last_bad_status <= ecc_status;
          end
          if (int'(cur_c) == NCTX - 1) begin
            if (ecc_error || hc_err) begin
              // keep the old checkpoint and recover from it
              halt[cur_e] <= 1'b1;
              rec_cnt     <= 32'd1;
              src_frame   <= ecc_error && !hc_err ? src_frame : bad_f;
              dst_frame   <= ecc_error && !hc_err ? src_frame : bad_f;
              start_xfer(SRC_GOLD);
              st <= S_HR_GOLD;
            end else begin
              bank[cur_e] <= ~bank[cur_e];
              n_ckpt      <= n_ckpt + 1;
              if (int'(cur_e) == N_ERR - 1) begin
                ck_due <= 1'b0;
                st     <= S_DISPATCH;
              end else begin
                cur_e <= cur_e + 1'b1;
                st    <= S_HC_CAP;
              end
            end
          end else begin
            cur_c     <= cur_c + 1'b1;
            src_frame <= ctx_frame(int'(cur_e), int'(cur_c) + 1);
            dst_ck    <= ck_slot(~bank[cur_e], int'(cur_e), int'(cur_c) + 1);
            start_xfer(SRC_CFG);
            st        <= S_HC;
          end
        end

        S_HR_GOLD: if (xfer_done) begin
          cur_c     <= '0;
          src_ck    <= ck_slot(bank[cur_e], int'(cur_e), 0);
          dst_frame <= ctx_frame(int'(cur_e), 0);
          start_xfer(SRC_CK);
          st <= S_HR_CTX;
        end

        S_HR_CTX: if (xfer_done) begin
          if (int'(cur_c) == NCTX - 1) begin
            grestore[cur_e] <= 1'b1;
            st <= S_HR_RST;
          end else begin
            cur_c     <= cur_c + 1'b1;
            src_ck    <= ck_slot(bank[cur_e], int'(cur_e), int'(cur_c) + 1);
            dst_frame <= ctx_frame(int'(cur_e), int'(cur_c) + 1);
            start_xfer(SRC_CK);
          end
        end

        S_HR_RST: st <= S_HR_WAIT;   // restore data loads into the ERR now

        // a recovery that interrupted a checkpoint round leaves ck_due set,
        // so a fresh checkpoint follows at once
        S_HR_WAIT: begin
          halt      <= '0;
          hc_err    <= 1'b0;
          n_recover <= n_recover + 1;
          last_recovery_cycles <= rec_cnt;
          st        <= S_DISPATCH;
        end

        default: st <= S_DISPATCH;
      endcase
    end
  end

  property p_halt_only_in_hr;
    @(posedge clk) disable iff (!rst_n)
      (|halt) |-> (st inside {S_HR_GOLD, S_HR_CTX, S_HR_RST, S_HR_WAIT});
  endproperty
  assert property (p_halt_only_in_hr);

  property p_no_access_while_injecting;
    @(posedge clk) disable iff (!rst_n) inj_gnt |-> !(cfg_rd || cfg_wr);
  endproperty
  assert property (p_no_access_while_injecting);

endmodule
