// tb_inj_period: the injection-period sweep. Three copies of the platform
// run side by side, each with a behavioural processor encrypting
// throughout, at injection periods in the ratio 1 : 2 : 10 (the 0.1 s,
// 0.2 s and 1 s of the reference evaluation, shortened to 5,000, 10,000 and
// 50,000 cycles so that the sweep simulates in seconds). After the same
// run time each copy must have had its share of events, recovered from
// every one of them (halt length, restore, configuration equal to the golden
// copy at the end), and the share of encryptions that ran without being
// interrupted by a recovery must grow as the period grows.
`timescale 1ns/1ps
module tb_inj_period;
  localparam int unsigned P0 = 5_000;
  localparam int unsigned PER [3] = '{P0, 2 * P0, 10 * P0};
  localparam int RUN_CYCLES = 40 * 10 * P0;

  logic clk = 0, rst_n = 0, inj_enable = 0, run = 0;
  always #5 clk = ~clk;

  logic [2:0] loaded, cpu_halt, idle;
  logic [31:0] n_events [3], n_recover [3], n_ckpt [3];

  inj_rig #(.INJ_PERIOD(PER[0]), .SEED(32'h1357_9BDF)) r0 (
    .clk, .rst_n, .inj_enable, .run, .loaded(loaded[0]), .cpu_halt(cpu_halt[0]), .idle(idle[0]),
    .n_events(n_events[0]), .n_recover(n_recover[0]), .n_ckpt(n_ckpt[0]));
  inj_rig #(.INJ_PERIOD(PER[1]), .SEED(32'h2468_ACE1)) r1 (
    .clk, .rst_n, .inj_enable, .run, .loaded(loaded[1]), .cpu_halt(cpu_halt[1]), .idle(idle[1]),
    .n_events(n_events[1]), .n_recover(n_recover[1]), .n_ckpt(n_ckpt[1]));
  inj_rig #(.INJ_PERIOD(PER[2]), .SEED(32'h0F1E_2D3C)) r2 (
    .clk, .rst_n, .inj_enable, .run, .loaded(loaded[2]), .cpu_halt(cpu_halt[2]), .idle(idle[2]),
    .n_events(n_events[2]), .n_recover(n_recover[2]), .n_ckpt(n_ckpt[2]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (RUN_CYCLES + 2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ok [3], hit [3], diffs [3];
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (&loaded);
    wait (n_ckpt[0] >= 1 && n_ckpt[1] >= 1 && n_ckpt[2] >= 1);
    run = 1;
    inj_enable = 1;
    repeat (RUN_CYCLES) @(posedge clk);
    inj_enable = 0;
    repeat (2) @(posedge clk);
    wait (&idle);
    // two more detection sweeps (about 3,200 cycles each) clear any upset
    // injected last
    repeat (20_000) @(posedge clk);
    wait (&idle);
    run = 0;
    repeat (20_000) @(posedge clk);
    ok   = '{r0.enc_ok, r1.enc_ok, r2.enc_ok};
    hit  = '{r0.enc_hit, r1.enc_hit, r2.enc_hit};
    diffs = '{r0.cfg_diffs(), r1.cfg_diffs(), r2.cfg_diffs()};
    checks   += r0.checks + r1.checks + r2.checks;
    failures += r0.failures + r1.failures + r2.failures;
    for (int i = 0; i < 3; i++) begin
      $display("period %0d cycles: events %0d, recoveries %0d, encryptions %0d, not interrupted %0d (%0d %%)",
               PER[i], n_events[i], n_recover[i], ok[i] + hit[i], ok[i], 100 * ok[i] / (ok[i] + hit[i]));
      check(n_events[i] >= RUN_CYCLES / PER[i] * 98 / 100 - 1 && n_events[i] <= RUN_CYCLES / PER[i] + 1,
            $sformatf("period %0d: %0d events", PER[i], n_events[i]));
      check(n_recover[i] > 0, $sformatf("period %0d: recoveries happened", PER[i]));
      check(diffs[i] == 0, $sformatf("period %0d: configuration equals golden at end (%0d words differ)", PER[i], diffs[i]));
      check(ok[i] > 0, $sformatf("period %0d: encryptions completed", PER[i]));
    end
    check(r0.m_halt == int'(n_recover[0]) && r1.m_halt == int'(n_recover[1]) && r2.m_halt == int'(n_recover[2]),
          "each recovery halted the ERR once");
    check(r0.m_restore == int'(n_recover[0]) && r1.m_restore == int'(n_recover[1]) && r2.m_restore == int'(n_recover[2]),
          "each recovery restored the context");
    check(ok[0] * (ok[1] + hit[1]) < ok[1] * (ok[0] + hit[0]),
          "fewer interrupted encryptions at period x2 than x1");
    check(ok[1] * (ok[2] + hit[2]) < ok[2] * (ok[1] + hit[1]),
          "fewer interrupted encryptions at period x10 than x2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
