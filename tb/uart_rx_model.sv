// uart_rx_model: receiver for 8N1 serial data, sampling each bit in its
// middle, once 'en' is high. Pulses 'valid' with 'data' for every byte; 'frame_err' counts bytes
// whose stop bit was low.
module uart_rx_model #(
  parameter int CLKS_PER_BIT = 16
)(
  input  logic       clk,
  input  logic       rxd,
  input  logic       en,      // line is valid (after reset)
  output logic       valid,
  output logic [7:0] data,
  output int         frame_err
);
  initial begin
    valid = 0; data = 0; frame_err = 0;
    forever begin
      @(posedge clk);
      valid <= 1'b0;
      if (en && rxd == 1'b0) begin
        repeat (CLKS_PER_BIT / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CLKS_PER_BIT) @(posedge clk);
          data[i] = rxd;
        end
        repeat (CLKS_PER_BIT) @(posedge clk);
        if (rxd != 1'b1) frame_err++;
        valid <= 1'b1;
      end
    end
  end
endmodule
