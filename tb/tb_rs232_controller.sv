// tb_rs232_controller: sends random bytes and decodes the line with an
// independent receiver; checks the value, the 10-bit frame length
// (10 * CLKS_PER_BIT cycles of busy), idle-high line and the freeze on ce low.
`timescale 1ns/1ps
module tb_rs232_controller;
  localparam int CPB = 12;
  logic clk = 0, rst_n = 0, ce = 1, we = 0, busy, txd;
  logic [7:0] wdata = 0;
  always #5 clk = ~clk;
  rs232_controller #(.CLKS_PER_BIT(CPB)) u (.clk, .rst_n, .ce, .we, .wdata, .busy, .txd);
  logic rv, en = 0;
  logic [7:0] rd;
  int ferr;
  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (.clk, .rxd(txd), .en, .valid(rv), .data(rd), .frame_err(ferr));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [7:0] got [$];
  always @(posedge clk) if (rv) got.push_back(rd);
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] sent [$];
    int n;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); en <= 1;
    #1 check(txd == 1'b1 && !busy, "idle line high");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] b = 8'($urandom);
      @(negedge clk);
      we = 1; wdata = b; sent.push_back(b);
      @(negedge clk);
      we = 0;
      n = 0;
      if (i == 7) begin
        ce = 0; repeat (30) @(negedge clk); ce = 1;
      end
      while (busy) begin @(negedge clk); n++; end
      if (i != 7) check(n == 10*CPB, $sformatf("busy %0d cycles", n));
    end
    repeat (3*CPB) @(posedge clk);
    check(got.size() == 20, $sformatf("received %0d bytes", got.size()));
    for (int i = 0; i < 20 && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("byte %0d: %02x expected %02x", i, got[i], sent[i]));
    check(ferr == 0, "stop bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
