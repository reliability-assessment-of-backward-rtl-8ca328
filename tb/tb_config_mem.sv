// tb_config_mem: random frame-word writes and reads against a reference
// array, with GCAPTURE and GRESTORE pulses mixed in. Reads return data one
// cycle later; the state word of a context frame returns the captured user
// state; grestore[e] gives restore_load[e] and the captured words one cycle
// later.
`timescale 1ns/1ps
module tb_config_mem;
  import ber_pkg::*;
  localparam int NE = 2, FPE = 6, NC = 2, CB = 1, SW = 3;
  localparam int NF = NE * FPE, FA_W = $clog2(NF), SWID = NC * WORD_W;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd = 0, wr = 0;
  logic [FA_W-1:0] frame = 0;
  logic [WIDX_W-1:0] widx = 0;
  word_t wdata = 0, rdata;
  logic [NE-1:0] gcapture = 0, grestore = 0, restore_load;
  logic [SWID-1:0] user_state [NE];
  logic [SWID-1:0] restore_state [NE];
  config_mem #(.N_ERR(NE), .FRAMES_PER_ERR(FPE), .NCTX(NC), .CTX_BASE(CB), .STATE_WORD(SW)) u (
    .clk, .rd, .wr, .frame, .widx, .wdata, .rdata, .gcapture, .grestore,
    .user_state, .restore_state, .restore_load);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  word_t ref_mem [NF][FRAME_WORDS];
  function automatic bit is_state(input int f, input int w);
    return w == SW && (f % FPE) >= CB && (f % FPE) < CB + NC;
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int f, w, e, nstate = 0;
    word_t expd;
    for (e = 0; e < NE; e++) user_state[e] = '0;
    // fill everything
    for (f = 0; f < NF; f++)
      for (w = 0; w < FRAME_WORDS; w++) begin
        @(negedge clk);
        wr = 1; frame = FA_W'(f); widx = WIDX_W'(w); wdata = $urandom;
        ref_mem[f][w] = wdata;
      end
    @(negedge clk); wr = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd = 0; wr = 0; gcapture = 0; grestore = 0;
      f = $urandom_range(0, NF-1);
      w = (t % 4 == 0) ? SW : $urandom_range(0, FRAME_WORDS-1);
      frame = FA_W'(f); widx = WIDX_W'(w);
      case ($urandom_range(0, 9))
        0: begin
          e = $urandom_range(0, NE-1);
          user_state[e] = {$urandom, $urandom};
          gcapture[e] = 1;
          for (int c = 0; c < NC; c++) ref_mem[e*FPE+CB+c][SW] = user_state[e][c*WORD_W +: WORD_W];
        end
        1: begin
          e = $urandom_range(0, NE-1);
          grestore[e] = 1;
          @(negedge clk);
          grestore = 0;
          check(restore_load[e], "restore_load");
          for (int c = 0; c < NC; c++)
            check(restore_state[e][c*WORD_W +: WORD_W] == ref_mem[e*FPE+CB+c][SW], "restore data");
        end
        2, 3, 4: begin
          wr = 1; wdata = $urandom;
          ref_mem[f][w] = wdata;
        end
        default: begin
          rd = 1;
          expd = ref_mem[f][w];
          if (is_state(f, w)) nstate++;
          @(negedge clk);
          rd = 0;
          check(rdata == expd, $sformatf("read f%0d w%0d", f, w));
        end
      endcase
    end
    check(nstate > 50, "state words were read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
