// tb_sbox_ip: all 256 inputs against the reference S-box (inverse by search
// plus affine map), plus the FIPS-197 spot values 0x00->0x63, 0x53->0xed;
// checks the one-cycle latency, that ce low holds the register and that
// load overwrites it.
`timescale 1ns/1ps
module tb_sbox_ip;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, we = 0, load = 0;
  logic [7:0] wdata = 0, q, state_in = 0;
  always #5 clk = ~clk;
  sbox_ip u (.clk, .rst_n, .ce, .we, .wdata, .q, .load, .state_in);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      we <= 1; wdata <= 8'(i);
      @(posedge clk);
      we <= 0;
      #1;
      check(q == ref_sbox(8'(i)), $sformatf("sbox(%02x) = %02x", i, q));
    end
    we <= 1; wdata <= 8'h53; @(posedge clk); #1 check(q == 8'hed, "0x53 -> 0xed");
    we <= 1; wdata <= 8'h00; @(posedge clk); #1 check(q == 8'h63, "0x00 -> 0x63");
    ce <= 0; we <= 1; wdata <= 8'h53; @(posedge clk); #1 check(q == 8'h63, "ce low holds");
    load <= 1; state_in <= 8'h5a; @(posedge clk); #1 check(q == 8'h5a, "load");
    load <= 0; ce <= 1; we <= 0;
    @(posedge clk); #1 check(q == 8'h5a, "hold without write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
