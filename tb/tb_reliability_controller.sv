// tb_reliability_controller: the controller with a configuration layer,
// golden and checkpoint stores, two ERRs and a scripted injector. Checks the
// initial load, periodic checkpoints of both ERRs, detection of single and
// double upsets by the FD sweep, recovery of only the ERR concerned with a
// halt of (NCTX+1)*(FRAME_WORDS+1)+2 cycles (the document's recovery time,
// one frame write per context frame plus the faulty frame), restore of the
// checkpointed context, an upset in a context frame, masked state words that
// are ignored, and the port hand-over to the injector.
`timescale 1ns/1ps
module tb_reliability_controller;
  import ber_pkg::*;
  localparam int NE = 2, FPE = 8, NC = 2, CB = 2, SW = 0, CKP = 3000;
  localparam int NF = NE * FPE, FA_W = $clog2(NF), NCK = 2 * NE * NC, CA_W = $clog2(NCK);
  localparam int T_REC = (NC + 1) * (FRAME_WORDS + 1) + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rc_rd, rc_wr, c_rd, c_wr, t_rd = 0, t_wr = 0;
  logic [FA_W-1:0] rc_f, c_f, t_f = 0;
  logic [WIDX_W-1:0] rc_w, c_w, t_w = 0;
  word_t rc_d, c_d, c_q, t_d = 0;
  logic g_ready, g_rd, k_rd, k_wr;
  logic [FA_W-1:0] g_f;
  logic [WIDX_W-1:0] g_w, k_rw, k_ww;
  logic [CA_W-1:0] k_rf, k_wf;
  word_t g_q, k_q, k_d;
  logic [NE-1:0] halt, gcapture, grestore, restore_load;
  logic inj_req = 0, inj_gnt, loaded;
  logic [31:0] n_fd_frames, n_fd_passes, n_detect, n_ckpt, n_recover, last_rec;
  logic [FA_W-1:0] last_bad;
  ecc_status_e last_status;
  logic [NC*WORD_W-1:0] user_state [NE];
  logic [NC*WORD_W-1:0] restore_state [NE];

  assign c_rd = inj_gnt ? t_rd : rc_rd;
  assign c_wr = inj_gnt ? t_wr : rc_wr;
  assign c_f  = inj_gnt ? t_f : rc_f;
  assign c_w  = inj_gnt ? t_w : rc_w;
  assign c_d  = inj_gnt ? t_d : rc_d;

  config_mem #(.N_ERR(NE), .FRAMES_PER_ERR(FPE), .NCTX(NC), .CTX_BASE(CB), .STATE_WORD(SW)) ucfg (
    .clk, .rd(c_rd), .wr(c_wr), .frame(c_f), .widx(c_w), .wdata(c_d), .rdata(c_q),
    .gcapture, .grestore, .user_state, .restore_state, .restore_load);
  frame_store #(.N_FRAMES(NF), .GOLDEN(1'b1), .FRAMES_PER_ERR(FPE), .NCTX(NC), .CTX_BASE(CB),
                .STATE_WORD(SW)) ugold (
    .clk, .rst_n, .ready(g_ready), .rd(g_rd), .rd_frame(g_f), .rd_widx(g_w), .rdata(g_q),
    .wr(1'b0), .wr_frame('0), .wr_widx('0), .wdata('0));
  frame_store #(.N_FRAMES(NCK), .GOLDEN(1'b0)) uck (
    .clk, .rst_n, .ready(), .rd(k_rd), .rd_frame(k_rf), .rd_widx(k_rw), .rdata(k_q),
    .wr(k_wr), .wr_frame(k_wf), .wr_widx(k_ww), .wdata(k_d));

  reliability_controller #(.N_ERR(NE), .FRAMES_PER_ERR(FPE), .NCTX(NC), .CTX_BASE(CB),
                           .STATE_WORD(SW), .CKPT_PERIOD(CKP)) u (
    .clk, .rst_n,
    .cfg_rd(rc_rd), .cfg_wr(rc_wr), .cfg_frame(rc_f), .cfg_widx(rc_w), .cfg_wdata(rc_d), .cfg_rdata(c_q),
    .gold_ready(g_ready), .gold_rd(g_rd), .gold_frame(g_f), .gold_widx(g_w), .gold_rdata(g_q),
    .ck_rd(k_rd), .ck_rframe(k_rf), .ck_rwidx(k_rw), .ck_rdata(k_q),
    .ck_wr(k_wr), .ck_wframe(k_wf), .ck_wwidx(k_ww), .ck_wdata(k_d),
    .halt, .gcapture, .grestore, .inj_req, .inj_gnt,
    .loaded, .n_fd_frames, .n_fd_passes, .n_detect, .n_ckpt, .n_recover,
    .last_bad_frame(last_bad), .last_bad_status(last_status), .last_recovery_cycles(last_rec));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ERR user state: free-running counters that stop while halted
  logic [63:0] cnt [NE];
  always_ff @(posedge clk)
    for (int e = 0; e < NE; e++) begin
      if (!rst_n) cnt[e] <= 64'(e) << 40;
      else if (restore_load[e]) cnt[e] <= restore_state[e];
      else if (!halt[e]) cnt[e] <= cnt[e] + 1;
    end
  always_comb for (int e = 0; e < NE; e++) user_state[e] = cnt[e];

  // checkpoint bookkeeping and halt measurement
  logic [63:0] cap [NE];
  int halt_len [NE];
  int n_halts [NE];
  int n_caps = 0;
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++) begin
      if (gcapture[e]) begin cap[e] <= cnt[e]; n_caps++; end
      if (halt[e]) halt_len[e]++;
      else if (halt_len[e] != 0) begin
        n_halts[e]++;
        check(halt_len[e] == T_REC, $sformatf("ERR%0d halted %0d cycles, expected %0d", e, halt_len[e], T_REC));
        check(last_rec == T_REC, "reported recovery time");
        check(cnt[e] == cap[e], $sformatf("ERR%0d context restored", e));
        halt_len[e] = 0;
      end
    end
  end

  function automatic int diffs();
    int d = 0;
    for (int i = 0; i < NF*FRAME_WORDS; i++) begin
      int f = i / FRAME_WORDS, w = i % FRAME_WORDS;
      if (w == SW && (f % FPE) >= CB && (f % FPE) < CB + NC) continue;
      if (ucfg.mem[i] != ugold.mem[i]) d++;
    end
    return d;
  endfunction

  task automatic inject(input int f, input int w, input word_t m);
    @(negedge clk);
    inj_req = 1;
    while (!inj_gnt) @(negedge clk);
    t_rd = 1; t_f = FA_W'(f); t_w = WIDX_W'(w);
    @(negedge clk);
    t_rd = 0; t_wr = 1; t_d = c_q ^ m;
    @(negedge clk);
    t_wr = 0; inj_req = 0;
    while (inj_gnt) @(negedge clk);
  endtask

  task automatic sweep();   // wait for two complete FD sweeps
    logic [31:0] p;
    p = n_fd_passes;
    wait (n_fd_passes >= p + 2);
    wait (halt == '0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d0, r0;
    for (int e = 0; e < NE; e++) begin halt_len[e] = 0; n_halts[e] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (loaded);
    check(diffs() == 0, "golden bitstream loaded");
    wait (n_ckpt == NE);
    check(n_detect == 0, "no false detection");
    // single upset in a plain frame of ERR 1
    d0 = n_detect; r0 = n_recover;
    inject(FPE + 5, 7, 32'h0000_0100);
    sweep();
    check(n_detect == d0 + 1 && last_bad == FA_W'(FPE + 5), "single upset detected in its frame");
    check(last_status == ECC_SINGLE, "classified single");
    check(n_recover == r0 + 1 && n_halts[1] == 1 && n_halts[0] == 0, "only ERR 1 recovered");
    check(diffs() == 0, "frame repaired");
    // double upset in ERR 0, also in the ECC field
    d0 = n_detect;
    inject(4, ECC_WORD, 32'h0000_0003);
    sweep();
    check(n_detect == d0 + 1 && last_status == ECC_DOUBLE && last_bad == 4, "double upset detected");
    check(n_halts[0] == 1, "ERR 0 recovered");
    check(diffs() == 0, "frame repaired");
    // upset in a context frame of ERR 0
    d0 = n_detect;
    inject(CB + 1, 9, 32'h8000_0000);
    sweep();
    check(n_detect == d0 + 1 && last_bad == FA_W'(CB + 1), "context frame upset detected");
    check(diffs() == 0, "context frame repaired");
    // upsets in a state word are not covered by the frame ECC
    d0 = n_detect;
    inject(FPE + CB, SW, 32'h0000_0010);
    sweep();
    check(n_detect == d0, "state word upset ignored");
    // checkpoints keep coming for both ERRs
    d0 = n_ckpt;
    repeat (2 * CKP) @(posedge clk);
    check(n_ckpt >= d0 + NE, "periodic checkpoints");
    check(n_caps >= int'(n_ckpt), "each checkpoint captured");
    check(n_fd_frames >= n_fd_passes * NF, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
