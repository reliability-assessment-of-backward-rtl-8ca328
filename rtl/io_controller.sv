// io_controller: port decoder between the 8-bit PicoBlaze-style processor
// port (port_id, out_port, write_strobe, read_strobe, in_port) and the I/O
// devices of the design under test. Writes become one-cycle strobes to the
// device; reads are multiplexed into in_port, registered, so the data is
// there the cycle after the address (the processor samples it then).
//
// Port map (this design's choice; the document shows the decoder only):
//   0x00  W: byte to substitute   R: S-box result
//   0x01  W: byte to transmit     R: bit 0 = transmitter busy
//   0x02  W: bit 0 = new DATAGEN arrays   R: bit 0 = DATAGEN busy
//   0x10..0x1F  R: plaintext byte 0..15
//   0x20..0x2F  R: key byte 0..15
// Other addresses read as zero and ignore writes.
module io_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  // processor port
  input  logic [7:0] port_id,
  input  logic [7:0] out_port,
  input  logic       write_strobe,
  input  logic       read_strobe,
  output logic [7:0] in_port,
  // S-box
  output logic       sbox_we,
  input  logic [7:0] sbox_q,
  // RS232
  output logic       tx_we,
  input  logic       tx_busy,
  // DATAGEN
  output logic       dg_gen,
  input  logic       dg_busy,
  output logic [4:0] dg_idx,
  input  logic [7:0] dg_byte,
  // shared write data
  output logic [7:0] wdata
);

  localparam logic [7:0] P_SBOX = 8'h00, P_UART = 8'h01, P_DGEN = 8'h02;

  assign wdata   = out_port;
  assign sbox_we = write_strobe && port_id == P_SBOX;
  assign tx_we   = write_strobe && port_id == P_UART;
  assign dg_gen  = write_strobe && port_id == P_DGEN && out_port[0];
  assign dg_idx  = {port_id[5], port_id[3:0]};

  logic [7:0] rmux;
  always_comb begin
    unique casez (port_id)
      P_SBOX:       rmux = sbox_q;
      P_UART:       rmux = {7'b0, tx_busy};
      P_DGEN:       rmux = {7'b0, dg_busy};
      8'b0001_????,
      8'b0010_????: rmux = dg_byte;
      default:      rmux = 8'h00;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   in_port <= '0;
    else if (ce && read_strobe)   in_port <= rmux;
  end

endmodule
