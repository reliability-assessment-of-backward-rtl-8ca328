// sbox_ip: the AES S-box as an I/O device of the design under test. The
// processor writes a byte; from the next cycle 'q' holds its substitution
// SubBytes(x) = A * x^-1 + 0x63 over GF(2^8) with the AES polynomial
// x^8 + x^4 + x^3 + x + 1 (0 maps to 0x63). The inverse is computed as x^254
// with a chain of squarings and multiplications, so no table is stored.
// 'ce' low freezes the register (the ERR is halted); 'load' overwrites it with
// 'state_in' (restore of a checkpoint) and 'q' is its captured state.
//
// The document only says that a hardware S-box accelerates AES and is seen by
// the processor as an I/O device; its structure here is this design's.
module sbox_ip (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] q,
  input  logic       load,
  input  logic [7:0] state_in
);

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);
    // a^254 = a^(2+4+8+16+32+64+128)
    logic [7:0] r, s;
    r = 8'h01;
    s = a;
    for (int i = 1; i < 8; i++) begin
      s = gmul(s, s);          // a^(2^i)
      r = gmul(r, s);
    end
    return r;
  endfunction

  function automatic logic [7:0] sub(input logic [7:0] a);
    logic [7:0] b, y;
    b = ginv(a);
    for (int i = 0; i < 8; i++)
      y[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= 8'h63;
    else if (load)     q <= state_in;
    else if (ce && we) q <= sub(wdata);
  end

endmodule
