// tb_dut: the design under test with a behavioural processor running AES-128
// through its I/O port. Checks each ciphertext against the reference AES,
// the serial log (plaintext, key, ciphertext) against what was sent, that a
// halt in mid-run only delays the work, and that a context restore puts the
// S-box register and DATAGEN state back (the next arrays repeat the ones
// drawn after the captured state).
`timescale 1ns/1ps
module tb_dut;
  import aes_ref_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, halt = 0, txd, state_load = 0;
  logic [7:0] port_id, out_port, in_port;
  logic write_strobe, read_strobe;
  logic [63:0] state, state_in = 0;
  always #5 clk = ~clk;

  dut #(.CLKS_PER_BIT(CPB)) u (.clk, .rst_n, .halt, .port_id, .out_port, .write_strobe,
        .read_strobe, .in_port, .txd, .state, .state_in, .state_load);

  logic run = 0, done, was_halted;
  bytes16_t pt, key, ct;
  int n_enc;
  aes_cpu_model cpu (.clk, .halt, .run, .port_id, .out_port, .write_strobe, .read_strobe,
                     .in_port, .done, .pt, .key, .ct, .was_halted, .n_enc);
  logic rv, rx_en = 0;
  logic [7:0] rd;
  int ferr;
  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (.clk, .rxd(txd), .en(rx_en), .valid(rv), .data(rd), .frame_err(ferr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] rxq [$];
  always @(posedge clk) if (rv) rxq.push_back(rd);
  bytes16_t pts [$];
  always @(posedge clk) if (done) begin
    bytes16_t r;
    r = encrypt(pt, key);
    for (int i = 0; i < 16; i++) check(ct[i] == r[i], $sformatf("ct byte %0d", i));
    pts.push_back(pt);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] snap;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); rx_en <= 1;
    snap = state;            // context before any array is drawn
    run = 1;
    wait (n_enc == 1);
    run = 0;
    @(posedge clk);
    repeat (4*CPB) @(posedge clk);
    check(rxq.size() == 48, $sformatf("serial bytes %0d", rxq.size()));
    for (int i = 0; i < 48 && i < rxq.size(); i++)
      check(rxq[i] == (i < 16 ? pt[i] : i < 32 ? key[i-16] : ct[i-32]), $sformatf("serial byte %0d", i));
    check(ferr == 0, "serial framing");
    // second run with a halt in the middle of it
    run = 1;
    repeat (3000) @(posedge clk);
    halt <= 1;
    repeat (500) @(posedge clk);
    halt <= 0;
    wait (n_enc == 2);
    run = 0;
    // restore the initial context: the next arrays equal the first ones
    @(posedge clk);
    repeat (20*CPB) @(posedge clk);
    state_in <= snap; state_load <= 1;
    @(posedge clk);
    state_load <= 0;
    @(posedge clk);
    check(state == snap, "state restored");
    run = 1;
    wait (n_enc == 3);
    run = 0;
    repeat (2) @(posedge clk);
    check(pts.size() == 3, "three encryptions");
    for (int i = 0; i < 16; i++) check(pts[2][i] == pts[0][i], "restored generator repeats plaintext");
    check(pts[1][0] != pts[0][0] || pts[1][1] != pts[0][1], "new plaintext each run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
