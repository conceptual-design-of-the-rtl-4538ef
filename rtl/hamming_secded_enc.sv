// hamming_secded_enc: 7-bit SEC-DED code of the frame's digital data.
//
// Extended Hamming code (64,57). The DATA_W = 57 data bits d[0..56] take, in
// order, the codeword positions 1..63 that are not powers of two (d[0] at
// position 3, d[1] at 5, d[2] at 6, ...). Check bit p[k], k = 0..5, is the
// XOR of the data bits whose position has bit k set, so that the XOR of the
// positions of all set codeword bits is 0; p[6] is the parity of the data
// and p[0..5] together, which lets a receiver tell a double-bit error from
// a single one. ecc = {p[6], p[5], ..., p[0]}. Purely combinational.
// A 7-bit Hamming code correcting single and detecting double errors is
// the source design's; the bit placement is this model's choice.
module hamming_secded_enc
  import trace_pkg::*;
(
  input  logic [DATA_W-1:0] data,
  output logic [ECC_W-1:0]  ecc
);
  // Codeword position of data bit i
  function automatic int unsigned data_pos(int unsigned i);
    int unsigned n = 0;
    for (int unsigned q = 3; q < 64; q++) begin
      if ((q & (q - 1)) != 0) begin
        if (n == i) return q;
        n++;
      end
    end
    return 0;
  endfunction

  logic [5:0] p;

  always_comb begin
    p = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      for (int unsigned k = 0; k < 6; k++)
        if (((data_pos(i) >> k) & 1) != 0) p[k] = p[k] ^ data[i];
  end

  assign ecc = {(^data) ^ (^p), p};
endmodule
