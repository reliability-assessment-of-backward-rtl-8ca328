// aes_cpu_model: behavioural stand-in for the 8-bit processor of the design
// under test and its AES-128 program. It talks to the DUT only through the
// processor I/O port: asks DATAGEN for new arrays, reads plaintext and key,
// runs AES-128 in "software" using the hardware S-box for every SubBytes and
// SubWord, then sends plaintext, key and ciphertext (48 bytes) through the
// RS232 transmitter. It issues no access while 'halt' is high. Each finished
// encryption pulses 'done' with the three arrays on pt/key/ct and whether the
// ERR was halted (recovered) at any time during it.
module aes_cpu_model
  import aes_ref_pkg::*;
(
  input  logic       clk,
  input  logic       halt,
  input  logic       run,
  output logic [7:0] port_id,
  output logic [7:0] out_port,
  output logic       write_strobe,
  output logic       read_strobe,
  input  logic [7:0] in_port,
  output logic       done,
  output bytes16_t   pt,
  output bytes16_t   key,
  output bytes16_t   ct,
  output logic       was_halted,
  output int         n_enc
);

  task automatic slot();
    do @(negedge clk); while (halt);
  endtask

  task automatic io_wr(input logic [7:0] p, input logic [7:0] d);
    slot();
    port_id = p; out_port = d; write_strobe = 1;
    @(negedge clk);
    write_strobe = 0;
  endtask

  task automatic io_rd(input logic [7:0] p, output logic [7:0] d);
    slot();
    port_id = p; read_strobe = 1;
    @(negedge clk);
    read_strobe = 0;
    d = in_port;
  endtask

  function automatic logic [7:0] xt(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  task automatic hw_sub(inout logic [7:0] b);
    io_wr(8'h00, b);
    io_rd(8'h00, b);
  endtask

  always @(posedge clk) if (halt) was_halted <= 1'b1;

  initial begin
    logic [7:0] v, rc, tmp0;
    logic [7:0] w [176];
    logic [7:0] s [16];
    logic [7:0] t [16];
    port_id = 0; out_port = 0; write_strobe = 0; read_strobe = 0; done = 0;
    n_enc = 0; was_halted = 0;
    for (int i = 0; i < 16; i++) begin pt[i] = 0; key[i] = 0; ct[i] = 0; end
    forever begin
      @(negedge clk);
      done = 0;
      if (run) begin
        was_halted = halt;
        io_wr(8'h02, 8'h01);
        do io_rd(8'h02, v); while (v[0]);
        for (int i = 0; i < 16; i++) io_rd(8'h10 + 8'(i), pt[i]);
        for (int i = 0; i < 16; i++) io_rd(8'h20 + 8'(i), key[i]);
        // key expansion with the hardware S-box
        for (int i = 0; i < 16; i++) w[i] = key[i];
        rc = 8'h01;
        for (int i = 4; i < 44; i++) begin
          logic [7:0] a [4];
          for (int j = 0; j < 4; j++) a[j] = w[4*(i-1)+j];
          if (i % 4 == 0) begin
            tmp0 = a[0];
            a[0] = a[1]; a[1] = a[2]; a[2] = a[3]; a[3] = tmp0;
            for (int j = 0; j < 4; j++) hw_sub(a[j]);
            a[0] ^= rc;
            rc = xt(rc);
          end
          for (int j = 0; j < 4; j++) w[4*i+j] = w[4*(i-4)+j] ^ a[j];
        end
        for (int i = 0; i < 16; i++) s[i] = pt[i] ^ w[i];
        for (int r = 1; r <= 10; r++) begin
          for (int i = 0; i < 16; i++) begin t[i] = s[i]; hw_sub(t[i]); end
          for (int c = 0; c < 4; c++)
            for (int rr = 0; rr < 4; rr++) s[4*c+rr] = t[4*((c+rr)%4)+rr];
          if (r != 10)
            for (int c = 0; c < 4; c++) begin
              logic [7:0] a0, a1, a2, a3;
              a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
              s[4*c]   = xt(a0) ^ xt(a1) ^ a1 ^ a2 ^ a3;
              s[4*c+1] = a0 ^ xt(a1) ^ xt(a2) ^ a2 ^ a3;
              s[4*c+2] = a0 ^ a1 ^ xt(a2) ^ xt(a3) ^ a3;
              s[4*c+3] = xt(a0) ^ a0 ^ a1 ^ a2 ^ xt(a3);
            end
          for (int i = 0; i < 16; i++) s[i] ^= w[16*r+i];
        end
        for (int i = 0; i < 16; i++) ct[i] = s[i];
        // log to the host
        for (int i = 0; i < 48; i++) begin
          do io_rd(8'h01, v); while (v[0]);
          io_wr(8'h01, i < 16 ? pt[i] : i < 32 ? key[i-16] : ct[i-32]);
        end
        do io_rd(8'h01, v); while (v[0]);
        n_enc++;
        done = 1;
      end
    end
  end
endmodule
