// ber_platform: one Enhanced Reliability Region (ERR) holding the design under
// test, protected by backward error recovery, with the fault-emulation
// injector of the evaluation platform.
//
//   frame_store (golden) --+                       +-- frame_store (checkpoints)
//                          v                       v
//   fault_injector --> [access-port mux] <-- reliability_controller
//                          |                 halt / gcapture / grestore
//                          v                       |
//                     config_mem  <--- user state --- dut (+ external processor)
//
// The reliability controller loads the golden bitstream into the
// configuration layer after reset, then scans frames with FRAME_ECC,
// checkpoints the DUT context every CKPT_PERIOD cycles and, on a detected
// upset, halts the DUT, rewrites the faulty frame and the context frames and
// restores the flip-flops. The injector flips configuration bits every
// INJ_PERIOD cycles while inj_enable is high, taking the access port from the
// controller between two of its operations.
//
// The processor of the DUT is outside this RTL: its I/O port is a port of the
// platform, and cpu_halt tells it to stop while the ERR is being recovered.
// The structure follows the document's platform; one ERR, the frame counts
// and the periods are this design's defaults.
module ber_platform
  import ber_pkg::*;
#(
  parameter int          FRAMES_PER_ERR = 72,
  parameter int          CTX_BASE       = 8,
  parameter int          CKPT_PERIOD    = 1_000_000,
  parameter int unsigned INJ_PERIOD     = 10_000_000,
  parameter int          MBU_PCT        = 50,
  parameter logic [31:0] INJ_SEED       = 32'h1234_5678,
  parameter int          CLKS_PER_BIT   = 868,
  localparam int         N_ERR          = 1,
  localparam int         NCTX           = 2,     // 64 bits of DUT context
  localparam int         STATE_WORD     = 0,
  localparam int         N_FRAMES       = N_ERR * FRAMES_PER_ERR,
  localparam int         FA_W           = $clog2(N_FRAMES),
  localparam int         N_CK           = 2 * N_ERR * NCTX,
  localparam int         CA_W           = $clog2(N_CK)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inj_enable,
  // processor I/O port of the design under test
  input  logic [7:0]        port_id,
  input  logic [7:0]        out_port,
  input  logic              write_strobe,
  input  logic              read_strobe,
  output logic [7:0]        in_port,
  output logic              cpu_halt,
  output logic              txd,
  // reliability controller status
  output logic              loaded,
  output logic [31:0]       n_fd_frames,
  output logic [31:0]       n_fd_passes,
  output logic [31:0]       n_detect,
  output logic [31:0]       n_ckpt,
  output logic [31:0]       n_recover,
  output logic [FA_W-1:0]   last_bad_frame,
  output ecc_status_e       last_bad_status,
  output logic [31:0]       last_recovery_cycles,
  // injector status
  output logic [31:0]       n_events,
  output logic [31:0]       n_bits
);

  // controller side of the access port
  logic              rc_rd, rc_wr;
  logic [FA_W-1:0]   rc_frame;
  logic [WIDX_W-1:0] rc_widx;
  word_t             rc_wdata;
  // injector side
  logic              in_rd, in_wr;
  logic [FA_W-1:0]   in_frame;
  logic [WIDX_W-1:0] in_widx;
  word_t             in_wdata;
  logic              inj_req, inj_gnt;
  // configuration memory
  logic              c_rd, c_wr;
  logic [FA_W-1:0]   c_frame;
  logic [WIDX_W-1:0] c_widx;
  word_t             c_wdata, c_rdata;
  // stores
  logic              g_ready, g_rd;
  logic [FA_W-1:0]   g_frame;
  logic [WIDX_W-1:0] g_widx;
  word_t             g_rdata;
  logic              k_rd, k_wr;
  logic [CA_W-1:0]   k_rframe, k_wframe;
  logic [WIDX_W-1:0] k_rwidx, k_wwidx;
  word_t             k_rdata, k_wdata;
  // ERR control
  logic [N_ERR-1:0]  halt, gcapture, grestore, restore_load;
  logic [63:0]       user_state [N_ERR];
  logic [63:0]       restore_state [N_ERR];

  always_comb begin
    if (inj_gnt) begin
      c_rd = in_rd; c_wr = in_wr; c_frame = in_frame; c_widx = in_widx; c_wdata = in_wdata;
    end else begin
      c_rd = rc_rd; c_wr = rc_wr; c_frame = rc_frame; c_widx = rc_widx; c_wdata = rc_wdata;
    end
  end

  config_mem #(
    .N_ERR(N_ERR), .FRAMES_PER_ERR(FRAMES_PER_ERR), .NCTX(NCTX),
    .CTX_BASE(CTX_BASE), .STATE_WORD(STATE_WORD)
  ) u_cfg (
    .clk, .rd(c_rd), .wr(c_wr), .frame(c_frame), .widx(c_widx),
    .wdata(c_wdata), .rdata(c_rdata),
    .gcapture, .grestore, .user_state, .restore_state, .restore_load
  );

  frame_store #(
    .N_FRAMES(N_FRAMES), .GOLDEN(1'b1), .FRAMES_PER_ERR(FRAMES_PER_ERR),
    .NCTX(NCTX), .CTX_BASE(CTX_BASE), .STATE_WORD(STATE_WORD)
  ) u_golden (
    .clk, .rst_n, .ready(g_ready),
    .rd(g_rd), .rd_frame(g_frame), .rd_widx(g_widx), .rdata(g_rdata),
    .wr(1'b0), .wr_frame('0), .wr_widx('0), .wdata('0)
  );

  frame_store #(
    .N_FRAMES(N_CK), .GOLDEN(1'b0)
  ) u_ckpt (
    .clk, .rst_n, .ready(),
    .rd(k_rd), .rd_frame(k_rframe), .rd_widx(k_rwidx), .rdata(k_rdata),
    .wr(k_wr), .wr_frame(k_wframe), .wr_widx(k_wwidx), .wdata(k_wdata)
  );

  reliability_controller #(
    .N_ERR(N_ERR), .FRAMES_PER_ERR(FRAMES_PER_ERR), .NCTX(NCTX),
    .CTX_BASE(CTX_BASE), .STATE_WORD(STATE_WORD), .CKPT_PERIOD(CKPT_PERIOD)
  ) u_rc (
    .clk, .rst_n,
    .cfg_rd(rc_rd), .cfg_wr(rc_wr), .cfg_frame(rc_frame), .cfg_widx(rc_widx),
    .cfg_wdata(rc_wdata), .cfg_rdata(c_rdata),
    .gold_ready(g_ready), .gold_rd(g_rd), .gold_frame(g_frame), .gold_widx(g_widx),
    .gold_rdata(g_rdata),
    .ck_rd(k_rd), .ck_rframe(k_rframe), .ck_rwidx(k_rwidx), .ck_rdata(k_rdata),
    .ck_wr(k_wr), .ck_wframe(k_wframe), .ck_wwidx(k_wwidx), .ck_wdata(k_wdata),
    .halt, .gcapture, .grestore,
    .inj_req, .inj_gnt,
    .loaded, .n_fd_frames, .n_fd_passes, .n_detect, .n_ckpt, .n_recover,
    .last_bad_frame, .last_bad_status, .last_recovery_cycles
  );

  fault_injector #(
    .N_FRAMES(N_FRAMES), .INJ_PERIOD(INJ_PERIOD), .MBU_PCT(MBU_PCT), .SEED(INJ_SEED)
  ) u_inj (
    .clk, .rst_n, .enable(inj_enable && loaded),
    .req(inj_req), .gnt(inj_gnt),
    .cfg_rd(in_rd), .cfg_wr(in_wr), .cfg_frame(in_frame), .cfg_widx(in_widx),
    .cfg_wdata(in_wdata), .cfg_rdata(c_rdata),
    .n_events, .n_bits,
    .last_mbu(), .last_size(), .last_frame(), .last_widx(), .last_bit()
  );

  dut #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_dut (
    .clk, .rst_n, .halt(halt[0]),
    .port_id, .out_port, .write_strobe, .read_strobe, .in_port,
    .txd,
    .state(user_state[0]), .state_in(restore_state[0]), .state_load(restore_load[0])
  );

  assign cpu_halt = halt[0];

endmodule
