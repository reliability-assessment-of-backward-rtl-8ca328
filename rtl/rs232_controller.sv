// rs232_controller: UART transmitter that sends the logged data (plaintext,
// key, ciphertext) to the host PC. Frame format 8N1, least significant bit
// first, each bit CLKS_PER_BIT cycles. A write while idle starts a byte;
// 'busy' stays high until the stop bit has been sent. 'ce' low freezes it.
//
// The document names the RS232 controller and the UART link only; the frame
// format and the bit period (115200 baud at an assumed 100 MHz) are this
// design's choices. Receive is not built: nothing in the design uses it.
module rs232_controller #(
  parameter int CLKS_PER_BIT = 868
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       txd
);

  logic [9:0]  sh;      // {stop, data, start}, sent from bit 0
  logic [3:0]  nbits;
  logic [$clog2(CLKS_PER_BIT)-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '1;
      nbits <= '0;
      div   <= '0;
      busy  <= 1'b0;
      txd   <= 1'b1;
    end else if (ce) begin
      if (!busy) begin
        txd <= 1'b1;
        if (we) begin
          sh    <= {1'b1, wdata, 1'b0};
          nbits <= 4'd10;
          div   <= '0;
          busy  <= 1'b1;
        end
      end else begin
        txd <= sh[0];
        if (int'(div) == CLKS_PER_BIT - 1) begin
          div   <= '0;
          sh    <= {1'b1, sh[9:1]};
          nbits <= nbits - 1'b1;
          if (nbits == 4'd1) busy <= 1'b0;
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end

endmodule
