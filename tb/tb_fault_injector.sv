// tb_fault_injector: the injector against a frame memory model and a
// controller stand-in that grants the port a few cycles after each request.
// For every event it checks that exactly the reported bits were inverted
// (adjacent bits of one word, or the same bit in consecutive frames), that
// events come INJ_PERIOD cycles apart once the port is back, that nothing is
// touched without the grant or while disabled, and that over 3000 events the
// sizes follow the cumulative percentages of each shape within 3 points.
`timescale 1ns/1ps
module tb_fault_injector;
  import ber_pkg::*;
  localparam int NF = 10, PER = 40, FA_W = $clog2(NF), N_EV = 3000;
  logic clk = 0, rst_n = 0, enable = 0, req, gnt = 0, rd, wr, last_mbu;
  logic [FA_W-1:0] frame, last_frame;
  logic [WIDX_W-1:0] widx, last_widx;
  word_t wdata, rdata;
  logic [31:0] n_events, n_bits;
  logic [2:0] last_size;
  logic [4:0] last_bit;
  always #5 clk = ~clk;
  fault_injector #(.N_FRAMES(NF), .INJ_PERIOD(PER), .MBU_PCT(50), .SEED(32'h2545_F491)) u (
    .clk, .rst_n, .enable, .req, .gnt, .cfg_rd(rd), .cfg_wr(wr), .cfg_frame(frame),
    .cfg_widx(widx), .cfg_wdata(wdata), .cfg_rdata(rdata), .n_events, .n_bits,
    .last_mbu, .last_size, .last_frame, .last_widx, .last_bit);

  word_t mem [NF][FRAME_WORDS];
  word_t snap [NF][FRAME_WORDS];
  always_ff @(posedge clk) begin
    if (rd) rdata <= mem[frame][widx];
    if (wr) mem[frame][widx] <= wdata;
  end
  // controller stand-in: grant after 3 cycles, drop one cycle after req
  int wait_c = 0;
  always_ff @(posedge clk) begin
    if (!req) begin gnt <= 0; wait_c <= 0; end
    else if (!gnt) begin
      wait_c <= wait_c + 1;
      if (wait_c == 2) gnt <= 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && (rd || wr) && !gnt) check(0, "access without grant");

  initial begin
    repeat (N_EV * (PER + 20) + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [2][5];
    int nmbu = 0, flips, ok, cum;
    int cumr [2][3] = '{'{54, 93, 99}, '{41, 75, 88}};
    realtime t_free, t_req;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 5; j++) hist[i][j] = 0;
    for (int f = 0; f < NF; f++) for (int w = 0; w < FRAME_WORDS; w++) mem[f][w] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    check(n_events == 0 && !req, "nothing while disabled");
    enable = 1;
    t_free = $realtime;
    for (int ev = 0; ev < N_EV; ev++) begin
      snap = mem;
      @(posedge req);
      t_req = $realtime;
      if (ev > 0) check(int'((t_req - t_free) / 10) == PER + 1,
                        $sformatf("event spacing %0d", int'((t_req - t_free) / 10)));
      wait (n_events == 32'(ev + 1));
      t_free = $realtime;
      @(negedge clk);
      // compare memory: exactly the reported bits differ
      flips = 0; ok = 1;
      for (int f = 0; f < NF; f++)
        for (int w = 0; w < FRAME_WORDS; w++)
          for (int b = 0; b < WORD_W; b++)
            if (mem[f][w][b] != snap[f][w][b]) begin
              int k;
              flips++;
              if (w != int'(last_widx)) ok = 0;
              if (last_mbu) begin
                k = (f - int'(last_frame) + NF) % NF;
                if (b != int'(last_bit) || k >= int'(last_size)) ok = 0;
              end else begin
                k = (b - int'(last_bit) + 32) % 32;
                if (f != int'(last_frame) || k >= int'(last_size)) ok = 0;
              end
            end
      check(ok == 1 && flips == int'(last_size), $sformatf("event %0d: %0d flips, size %0d", ev, flips, last_size));
      hist[last_mbu][last_size]++;
      if (last_mbu) nmbu++;
    end
    enable = 0;
    check(n_bits == 32'(hist[0][1] + 2*hist[0][2] + 3*hist[0][3] + 4*hist[0][4] +
                        hist[1][1] + 2*hist[1][2] + 3*hist[1][3] + 4*hist[1][4]), "bit count");
    check(nmbu > N_EV * 45 / 100 && nmbu < N_EV * 55 / 100, $sformatf("multi-frame share %0d", nmbu));
    for (int s = 0; s < 2; s++) begin
      int tot;
      tot = 0;
      for (int j = 1; j <= 4; j++) tot += hist[s][j];
      cum = 0;
      for (int j = 1; j <= 3; j++) begin
        cum += hist[s][j];
        check(cum * 100 > (cumr[s][j-1] - 3) * tot && cum * 100 < (cumr[s][j-1] + 3) * tot,
              $sformatf("shape %0d size<=%0d: %0d of %0d", s, j, cum, tot));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
