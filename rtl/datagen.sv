// datagen: the DATAGEN IP of the design under test. On a 'gen' command it
// draws a new random 128-bit plaintext and 128-bit key from a 32-bit xorshift
// generator, 32 bits per cycle, so 'busy' is high for 8 cycles. The processor
// reads the arrays a byte at a time: index 0..15 is the plaintext, 16..31 the
// key, byte 0 being the first byte of the AES state. The generator state is
// the block's context: 'state' is captured, 'load' restores it. 'ce' low
// freezes the block.
//
// The document says only that DATAGEN produces the two random 128-bit arrays
// the processor loads; the generator and the interface are this design's.
module datagen #(
  parameter logic [31:0] SEED = 32'hACE1_2468
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        gen,
  output logic        busy,
  input  logic [4:0]  rd_idx,
  output logic [7:0]  rd_byte,
  output logic [31:0] state,
  input  logic        load,
  input  logic [31:0] state_in
);

  logic [7:0]  arr [32];
  logic [2:0]  cnt;

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= (SEED == 0) ? 32'h1 : SEED;
      busy  <= 1'b0;
      cnt   <= '0;
      for (int i = 0; i < 32; i++) arr[i] <= '0;
    end else if (load) begin
      state <= state_in;
    end else if (ce) begin
      if (busy) begin
        state <= xorshift(state);
        for (int j = 0; j < 4; j++) arr[{cnt, 2'(j)}] <= state[8*j +: 8];
        cnt <= cnt + 1'b1;
        if (cnt == 3'd7) busy <= 1'b0;
      end else if (gen) begin
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end

  assign rd_byte = arr[rd_idx];

endmodule
