// inj_rig: one platform with a behavioural processor encrypting throughout
// and the fault injector running at INJ_PERIOD. Used by tb_inj_period to run
// the same platform at several injection periods side by side. The rig does
// its own checks on every recovery: the ERR is halted for the
// (NCTX+1)*(FRAME_WORDS+1)+2 cycles of one recovery, the controller reports
// that value, and every recovery reloads the context. It counts encryptions
// that finished without a recovery (ciphertext checked against the reference
// AES) and those a recovery interrupted. 'cfg_diffs' compares the
// configuration layer with the golden copy, state words excluded.
`timescale 1ns/1ps
module inj_rig #(
  parameter int unsigned INJ_PERIOD = 10_000,
  parameter logic [31:0] SEED       = 32'h1357_9BDF
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inj_enable,
  input  logic        run,
  output logic        loaded,
  output logic        cpu_halt,
  output logic        idle,
  output logic [31:0] n_events,
  output logic [31:0] n_recover,
  output logic [31:0] n_ckpt
);
  import ber_pkg::*;
  import aes_ref_pkg::*;

  localparam int FPE = 72, CTX_BASE = 8, NCTX = 2, CPB = 16;
  localparam int T_REC = (NCTX + 1) * (FRAME_WORDS + 1) + 2;

  logic [7:0] port_id, out_port, in_port;
  logic write_strobe, read_strobe, txd;
  logic [31:0] n_fd_frames, n_fd_passes, n_detect, last_rec, n_bits;
  logic [$clog2(FPE)-1:0] last_bad_frame;
  ecc_status_e last_bad_status;

  ber_platform #(
    .FRAMES_PER_ERR(FPE), .CTX_BASE(CTX_BASE), .CKPT_PERIOD(20000),
    .INJ_PERIOD(INJ_PERIOD), .MBU_PCT(50), .INJ_SEED(SEED), .CLKS_PER_BIT(CPB)
  ) plat (
    .clk, .rst_n, .inj_enable,
    .port_id, .out_port, .write_strobe, .read_strobe, .in_port, .cpu_halt, .txd,
    .loaded, .n_fd_frames, .n_fd_passes, .n_detect, .n_ckpt, .n_recover,
    .last_bad_frame, .last_bad_status, .last_recovery_cycles(last_rec),
    .n_events, .n_bits
  );

  logic done, was_halted;
  bytes16_t pt, key, ct;
  int n_enc;
  aes_cpu_model cpu (
    .clk, .halt(cpu_halt), .run, .port_id, .out_port, .write_strobe, .read_strobe,
    .in_port, .done, .pt, .key, .ct, .was_halted, .n_enc
  );

  int checks = 0, failures = 0;
  int enc_ok = 0, enc_hit = 0, m_halt = 0, m_restore = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (period %0d): %s", INJ_PERIOD, what); end
  endtask

  always @(posedge clk) if (done) begin
    bytes16_t r;
    r = encrypt(pt, key);
    if (!was_halted) begin
      for (int i = 0; i < 16; i++) check(ct[i] == r[i], $sformatf("ciphertext byte %0d", i));
      enc_ok++;
    end else enc_hit++;
  end

  int halt_len = 0;
  always @(posedge clk) begin
    if (!rst_n) halt_len <= 0;
    else if (cpu_halt) halt_len <= halt_len + 1;
    else if (halt_len != 0) begin
      m_halt++;
      check(halt_len == T_REC, $sformatf("halt length %0d, expected %0d", halt_len, T_REC));
      check(last_rec == T_REC, $sformatf("reported recovery %0d", last_rec));
      halt_len <= 0;
    end
    if (rst_n && plat.restore_load[0]) m_restore++;
  end

  assign idle = !plat.inj_req && !plat.inj_gnt && !cpu_halt;

  function automatic int cfg_diffs();
    int d;
    d = 0;
    for (int f = 0; f < FPE; f++)
      for (int w = 0; w < FRAME_WORDS; w++) begin
        if (w == 0 && f >= CTX_BASE && f < CTX_BASE + NCTX) continue;
        if (plat.u_cfg.mem[f*FRAME_WORDS+w] != plat.u_golden.mem[f*FRAME_WORDS+w]) d++;
      end
    return d;
  endfunction
endmodule
