// tb_hamming_secded_enc: for random 57-bit data, builds the 64-bit extended
// Hamming codeword (data at the non-power-of-two positions 3..63, check
// bit k at position 2^k, overall parity at 0) and checks that every check
// bit covers its positions (syndrome 0) and that overall parity is even.
// A reference decoder then corrects every single-bit error and flags every
// tested double-bit error.
module tb_hamming_secded_enc;
  import trace_pkg::*;
  logic [DATA_W-1:0] data;
  logic [ECC_W-1:0]  ecc;
  int checks = 0, failures = 0;

  hamming_secded_enc dut (.data, .ecc);

  function automatic logic [63:0] codeword(logic [DATA_W-1:0] d, logic [6:0] e);
    logic [63:0] cw = '0;
    int i = 0;
    for (int q = 1; q < 64; q++) begin
      if ((q & (q - 1)) == 0) cw[q] = e[$clog2(q)];
      else begin
        cw[q] = d[i];
        i++;
      end
    end
    cw[0] = e[6];
    return cw;
  endfunction

  function automatic int syndrome(logic [63:0] cw);
    int s = 0;
    for (int q = 1; q < 64; q++) if (cw[q]) s ^= q;
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] cw, bad;
    int b1, b2;
    for (int it = 0; it < 300; it++) begin
      data = it == 0 ? '0 : it == 1 ? '1 : {$urandom, $urandom};
      #1;
      cw = codeword(data, ecc);
      checks++;
      if (syndrome(cw) != 0 || ^cw != 1'b0) begin
        failures++;
        $display("FAIL codeword data=%h ecc=%b", data, ecc);
      end
      b1 = int'($urandom % 64);
      bad = cw; bad[b1] = ~bad[b1];
      checks++;
      // single error: odd parity, syndrome names the bit
      if (!(^bad == 1'b1 && syndrome(bad) == b1)) begin
        failures++;
        $display("FAIL single error at %0d", b1);
      end
      b2 = (b1 + 1 + int'($urandom % 63)) % 64;
      bad[b2] = ~bad[b2];
      checks++;
      // double error: even parity, non-zero syndrome
      if (!(^bad == 1'b0 && syndrome(bad) != 0)) begin
        failures++;
        $display("FAIL double error at %0d,%0d", b1, b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
