// tb_datagen: requests several new arrays and compares all 32 bytes with a
// software xorshift32 model (32 bits per fill cycle, byte j of a step to
// index 4*cycle+j); checks busy lasts 8 cycles, that ce low freezes the
// block and that load sets the generator state.
`timescale 1ns/1ps
module tb_datagen;
  logic clk = 0, rst_n = 0, ce = 1, gen = 0, busy, load = 0;
  logic [4:0] rd_idx = 0;
  logic [7:0] rd_byte;
  logic [31:0] state, state_in = 0;
  always #5 clk = ~clk;
  datagen #(.SEED(32'hACE1_2468)) u (.clk, .rst_n, .ce, .gen, .busy, .rd_idx, .rd_byte,
                                      .state, .load, .state_in);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [31:0] xs(input logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5; return x;
  endfunction
  logic [31:0] m;
  logic [7:0] exp [32];
  task automatic request(input int hold_cycles);
    int n;
    realtime t0;
    gen <= 1; @(posedge clk); gen <= 0;
    t0 = $realtime;
    for (int c = 0; c < 8; c++) begin
      for (int j = 0; j < 4; j++) exp[4*c+j] = m[8*j +: 8];
      m = xs(m);
    end
    if (hold_cycles > 0) begin
      @(posedge clk); ce <= 0; repeat (hold_cycles) @(posedge clk); ce <= 1;
    end
    #1;
    while (busy) begin @(posedge clk); #1; end
    n = int'(($realtime - t0 - 1) / 10);
    check(n == 8 + hold_cycles, $sformatf("busy for %0d cycles", n));
    for (int i = 0; i < 32; i++) begin
      rd_idx = 5'(i); #1;
      check(rd_byte == exp[i], $sformatf("byte %0d %02x expected %02x", i, rd_byte, exp[i]));
    end
    check(state == m, "state");
  endtask
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    m = 32'hACE1_2468;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    request(0);
    request(0);
    request(5);
    load <= 1; state_in <= 32'h0BAD_F00D; @(posedge clk); load <= 0;
    m = 32'h0BAD_F00D;
    request(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
