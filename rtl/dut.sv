// dut: the design under test placed in the Enhanced Reliability Region: the
// I/O side of a processor-based AES-128 encryptor. The processor (an 8-bit
// PicoBlaze-class core with its AES program ROM) is not part of this RTL; its
// I/O port is brought out, and through it the program reaches the S-box
// accelerator, the DATAGEN random plaintext/key source and the RS232
// transmitter that sends plaintext, key and ciphertext to the host.
//
// 'halt' from the reliability controller stops every register of the block
// (and must stop the processor too). The block's context, captured into the
// context frames, is {24'b0, S-box register, DATAGEN generator state};
// 'state_load' with 'state_in' restores it (GRESTORE). The top 24 bits of
// the two 32-bit context words stay zero: the transmitter is left out
// because rolling a serial line back would resend half-sent characters,
// and the processor's own registers lie outside this block.
//
// The composition follows the document's DUT diagram; the context contents
// and the port map (see io_controller) are this design's.
module dut #(
  parameter int          CLKS_PER_BIT = 868,
  parameter logic [31:0] DG_SEED      = 32'hACE1_2468
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        halt,
  // processor I/O port
  input  logic [7:0]  port_id,
  input  logic [7:0]  out_port,
  input  logic        write_strobe,
  input  logic        read_strobe,
  output logic [7:0]  in_port,
  // RS232 line to the host
  output logic        txd,
  // context capture / restore
  output logic [63:0] state,
  input  logic [63:0] state_in,
  input  logic        state_load
);

  logic       ce;
  logic       sbox_we, tx_we, tx_busy, dg_gen, dg_busy;
  logic [7:0] sbox_q, wdata, dg_byte;
  logic [4:0] dg_idx;
  logic [31:0] dg_state;

  assign ce = !halt;

  io_controller u_io (
    .clk, .rst_n, .ce,
    .port_id, .out_port, .write_strobe, .read_strobe, .in_port,
    .sbox_we, .sbox_q,
    .tx_we, .tx_busy,
    .dg_gen, .dg_busy, .dg_idx, .dg_byte,
    .wdata
  );

  sbox_ip u_sbox (
    .clk, .rst_n, .ce,
    .we(sbox_we), .wdata, .q(sbox_q),
    .load(state_load), .state_in(state_in[39:32])
  );

  datagen #(.SEED(DG_SEED)) u_dg (
    .clk, .rst_n, .ce,
    .gen(dg_gen), .busy(dg_busy), .rd_idx(dg_idx), .rd_byte(dg_byte),
    .state(dg_state), .load(state_load), .state_in(state_in[31:0])
  );

  rs232_controller #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .ce,
    .we(tx_we), .wdata, .busy(tx_busy), .txd
  );

  assign state = {24'b0, sbox_q, dg_state};

endmodule
