// frame_ecc: checks one configuration frame with its extended Hamming code
// while the frame is read back word by word.
//
// Each accepted word's contribution (ber_pkg::word_ecc) is XOR-ed into an
// accumulator; 'first' restarts the accumulator with that word. With the word
// flagged 'last' the result is registered and 'done' pulses one cycle later:
//   syndrome == 0, parity even -> ECC_OK
//   parity odd                 -> ECC_SINGLE (one upset; 'syndrome' locates it)
//   syndrome != 0, parity even -> ECC_DOUBLE (two upsets, detect only)
// Bits set in 'mask' (captured user state) are left out of the check.
//
// The document gives the function (detect up to two, correct one upset per
// frame, using parity bits written at bitstream generation) and uses only the
// detection result; the code layout is this design's choice (see ber_pkg).
module frame_ecc
  import ber_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,     // a frame word is present
  input  logic                 first,     // it is word 0 of the frame
  input  logic                 last,      // it is the last word of the frame
  input  logic [WIDX_W-1:0]    widx,      // word index inside the frame
  input  word_t                data,
  input  word_t                mask,      // 1 = bit not covered by the ECC
  output logic                 done,      // result valid (one-cycle pulse)
  output ecc_status_e          status,
  output logic                 error,     // status != ECC_OK
  output logic [HAM_W-1:0]     syndrome
);

  ecc_t acc_q, acc_in, acc_nx;

  always_comb begin
    acc_in = word_ecc(widx, data, mask);
    acc_nx = (first ? '0 : acc_q) ^ acc_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      done     <= 1'b0;
      status   <= ECC_OK;
      syndrome <= '0;
    end else begin
      done <= 1'b0;
      if (valid) begin
        acc_q <= acc_nx;
        if (last) begin
          done     <= 1'b1;
          syndrome <= acc_nx[HAM_W-1:0];
          if (acc_nx[ECC_W-1])                status <= ECC_SINGLE;
          else if (acc_nx[HAM_W-1:0] != '0)   status <= ECC_DOUBLE;
          else                                status <= ECC_OK;
        end
      end
    end
  end

  assign error = (status != ECC_OK);

endmodule
