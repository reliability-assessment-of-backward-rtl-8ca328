// tb_io_controller: drives the processor port with random accesses and checks
// the write strobes each device sees and the registered read data against the
// port map (0x00 S-box, 0x01 transmitter status, 0x02 DATAGEN status,
// 0x10..0x2F DATAGEN bytes, others zero), including the hold on ce low.
`timescale 1ns/1ps
module tb_io_controller;
  logic clk = 0, rst_n = 0, ce = 1;
  logic [7:0] port_id = 0, out_port = 0, in_port, sbox_q, dg_byte, wdata;
  logic write_strobe = 0, read_strobe = 0, sbox_we, tx_we, tx_busy, dg_gen, dg_busy;
  logic [4:0] dg_idx;
  always #5 clk = ~clk;
  io_controller u (.clk, .rst_n, .ce, .port_id, .out_port, .write_strobe, .read_strobe,
                   .in_port, .sbox_we, .sbox_q, .tx_we, .tx_busy, .dg_gen, .dg_busy,
                   .dg_idx, .dg_byte, .wdata);
  // device stand-ins
  assign dg_byte = {3'b101, dg_idx};
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] expect_rd(input logic [7:0] p);
    if (p == 8'h00) return sbox_q;
    if (p == 8'h01) return {7'b0, tx_busy};
    if (p == 8'h02) return {7'b0, dg_busy};
    if (p >= 8'h10 && p <= 8'h1f) return {3'b101, 1'b0, p[3:0]};
    if (p >= 8'h20 && p <= 8'h2f) return {3'b101, 1'b1, p[3:0]};
    return 8'h00;
  endfunction
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] e, prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      port_id = (i % 3 == 0) ? 8'($urandom_range(0, 3)) : 8'($urandom_range(0, 63));
      out_port = 8'($urandom);
      sbox_q = 8'($urandom); tx_busy = 1'($urandom); dg_busy = 1'($urandom);
      write_strobe = 0; read_strobe = 0;
      if ($urandom_range(0, 1)) write_strobe = 1; else read_strobe = 1;
      ce = (i % 17 != 5);
      #1;
      check(sbox_we == (write_strobe && port_id == 0), "sbox_we");
      check(tx_we == (write_strobe && port_id == 1), "tx_we");
      check(dg_gen == (write_strobe && port_id == 2 && out_port[0]), "dg_gen");
      check(wdata == out_port, "wdata");
      e = expect_rd(port_id);
      prev = in_port;
      @(negedge clk);
      if (read_strobe && ce) check(in_port == e, $sformatf("read %02x: %02x expected %02x", port_id, in_port, e));
      else check(in_port == prev, "in_port holds");
      write_strobe = 0; read_strobe = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
