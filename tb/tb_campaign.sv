// tb_campaign: one complete fault-injection campaign of 1000 events, the
// campaign length of the reference evaluation, at a shortened injection
// period (20,000 cycles instead of 0.1 s) with the example event law. The
// behavioural processor encrypts throughout. Checks as in tb_ber_platform;
// at the end it reports the share of encryptions that ran without being
// interrupted by a recovery.
`timescale 1ns/1ps
module tb_campaign;
  import ber_pkg::*;
  import aes_ref_pkg::*;

  localparam int FPE = 72, CTX_BASE = 8, NCTX = 2, CPB = 16;
  localparam int T_FRAME = FRAME_WORDS + 1;
  localparam int T_REC = (NCTX + 1) * T_FRAME + 2;

  logic clk = 0, rst_n = 0, inj_enable = 0;
  always #5 clk = ~clk;

  logic [7:0] port_id, out_port, in_port;
  logic write_strobe, read_strobe, cpu_halt, txd, loaded;
  logic [31:0] n_fd_frames, n_fd_passes, n_detect, n_ckpt, n_recover, last_rec, n_events, n_bits;
  logic [$clog2(FPE)-1:0] last_bad_frame;
  ecc_status_e last_bad_status;

  ber_platform #(
    .FRAMES_PER_ERR(FPE), .CTX_BASE(CTX_BASE), .CKPT_PERIOD(20000),
    .INJ_PERIOD(20000), .MBU_PCT(50), .INJ_SEED(32'hC0FF_EE11), .CLKS_PER_BIT(CPB)
  ) dut (
    .clk, .rst_n, .inj_enable,
    .port_id, .out_port, .write_strobe, .read_strobe, .in_port, .cpu_halt, .txd,
    .loaded, .n_fd_frames, .n_fd_passes, .n_detect, .n_ckpt, .n_recover,
    .last_bad_frame, .last_bad_status, .last_recovery_cycles(last_rec),
    .n_events, .n_bits
  );

  logic run = 0, done, was_halted;
  bytes16_t pt, key, ct;
  int n_enc;
  aes_cpu_model cpu (
    .clk, .halt(cpu_halt), .run, .port_id, .out_port, .write_strobe, .read_strobe,
    .in_port, .done, .pt, .key, .ct, .was_halted, .n_enc
  );

  logic rx_valid, rx_en = 0;
  always @(posedge clk) rx_en <= rst_n;
  logic [7:0] rx_data;
  int rx_ferr;
  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (.clk, .rxd(txd), .en(rx_en), .valid(rx_valid), .data(rx_data), .frame_err(rx_ferr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // serial log
  logic [7:0] rxq [$];
  always @(posedge clk) if (rx_valid) rxq.push_back(rx_data);

  // mechanism counters
  int m_single = 0, m_double = 0, m_halt = 0, m_restore = 0, m_sbu = 0, m_mbu = 0,
      m_gnt = 0, m_enc_ok = 0, m_enc_hit = 0, m_serial_ok = 0;
  bit prev_halted = 0;

  // encryption results
  always @(posedge clk) if (done) begin
    bytes16_t r;
    r = encrypt(pt, key);
    if (!was_halted) begin
      for (int i = 0; i < 16; i++) check(ct[i] == r[i], $sformatf("ciphertext byte %0d", i));
      m_enc_ok++;
    end else m_enc_hit++;
    // serial line carries what the processor sent (a halt stretches the
    // bit being sent, so interrupted transfers are not compared)
    if (!was_halted && !prev_halted) begin
      check(rxq.size() == 48, $sformatf("serial bytes %0d", rxq.size()));
      m_serial_ok++;
    end
    for (int i = 0; i < 48 && rxq.size() > 0 && !was_halted && !prev_halted; i++) begin
      logic [7:0] b, e;
      b = rxq.pop_front();
      e = i < 16 ? pt[i] : i < 32 ? key[i-16] : ct[i-32];
      check(b == e, $sformatf("serial byte %0d", i));
    end
    rxq.delete();
    prev_halted = was_halted;
  end

  // recovery timing and context restore
  int halt_len = 0;
  logic [63:0] ck_pending, ck_ref;
  logic [31:0] n_ckpt_q;
  logic hc_captured = 0;
  always @(posedge clk) begin
    if (dut.gcapture[0]) ck_pending <= dut.user_state[0];
    n_ckpt_q <= n_ckpt;
    if (rst_n && n_ckpt != n_ckpt_q) begin ck_ref <= ck_pending; hc_captured <= 1; end
    if (!rst_n) halt_len <= 0;
    else if (cpu_halt) halt_len <= halt_len + 1;
    else if (halt_len != 0) begin
      m_halt++;
      check(halt_len == T_REC, $sformatf("halt length %0d, expected %0d", halt_len, T_REC));
      check(last_rec == T_REC, $sformatf("reported recovery %0d", last_rec));
      check(dut.user_state[0] == ck_ref, $sformatf("context restored from checkpoint at %0t: %h vs %h", $time, dut.user_state[0], ck_ref));
      halt_len <= 0;
    end
    if (rst_n && dut.restore_load[0]) m_restore++;
  end

  logic gnt_q = 0;
  always @(posedge clk) begin
    gnt_q <= dut.inj_gnt;
    if (dut.inj_gnt && !gnt_q) m_gnt++;
  end
  logic [31:0] ndet_q = 0, nev_q = 0;
  always @(posedge clk) begin
    ndet_q <= n_detect;
    nev_q  <= n_events;
    if (rst_n && n_detect != ndet_q) begin
      if (last_bad_status == ECC_SINGLE) m_single++;
      if (last_bad_status == ECC_DOUBLE) m_double++;
    end
    if (rst_n && n_events != nev_q) begin
      if (dut.u_inj.last_mbu) m_mbu++; else m_sbu++;
    end
  end

  // configuration layer against golden copy, state words excluded
  function automatic int cfg_diffs();
    int d = 0;
    for (int f = 0; f < FPE; f++)
      for (int w = 0; w < FRAME_WORDS; w++) begin
        if (w == 0 && f >= CTX_BASE && f < CTX_BASE + NCTX) continue;
        if (dut.u_cfg.mem[f*FRAME_WORDS+w] != dut.u_golden.mem[f*FRAME_WORDS+w]) d++;
      end
    return d;
  endfunction

  initial begin
    // watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes16_t fp, fk, fc;
    logic [127:0] exp_c = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    // reference model against the FIPS-197 example
    for (int i = 0; i < 16; i++) begin fp[i] = 8'(i * 17); fk[i] = 8'(i); end
    fc = encrypt(fp, fk);
    for (int i = 0; i < 16; i++) check(fc[i] == exp_c[127-8*i -: 8], "FIPS-197 reference");

    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (loaded);
    check(cfg_diffs() == 0, "configuration equals golden after load");
    wait (n_ckpt >= 1);
    run = 1;
    inj_enable = 1;
    wait (n_events >= 1000);
    inj_enable = 0;
    @(posedge clk);
    wait (!dut.inj_req && !dut.inj_gnt);
    begin
      logic [31:0] p0;
      p0 = n_fd_passes;
      wait (n_fd_passes >= p0 + 2);
    end
    wait (!cpu_halt);
    run = 0;
    wait (done);
    repeat (10) @(posedge clk);
    check(cfg_diffs() == 0, $sformatf("configuration equals golden at end (%0d words differ)", cfg_diffs()));
    check(m_serial_ok > 0, "serial logs checked");
    $display("mechanisms: fd_frames=%0d passes=%0d ckpt=%0d detect=%0d single=%0d double=%0d recover=%0d halt=%0d restore=%0d events=%0d bits=%0d sbu=%0d mbu=%0d gnt=%0d enc_ok=%0d enc_hit=%0d",
             n_fd_frames, n_fd_passes, n_ckpt, n_detect, m_single, m_double, n_recover, m_halt,
             m_restore, n_events, n_bits, m_sbu, m_mbu, m_gnt, m_enc_ok, m_enc_hit);
    check(n_fd_passes > 0, "FD sweep happened");
    check(n_ckpt > 1, "checkpoints happened");
    check(m_single > 0, "single-upset detection happened");
    check(m_double > 0, "double-upset detection happened");
    check(n_recover > 0 && m_halt == int'(n_recover), "recoveries happened and each halted the ERR");
    check(m_restore == int'(n_recover), "each recovery restored the context");
    check(m_sbu > 0 && m_mbu > 0, "both event shapes happened");
    check(m_gnt >= int'(n_events), "injector was granted the port for each event");
    check(m_enc_ok > 0, "encryptions completed");
    $display("encryptions: %0d, not interrupted by a recovery: %0d (%0d %%)", m_enc_ok + m_enc_hit,
             m_enc_ok, 100 * m_enc_ok / (m_enc_ok + m_enc_hit));
    check(n_events == 1000, "campaign of 1000 events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
