// tb_ldpc_syndrome: self-checking test of the syndrome calculator.
//
// The reference keeps its own copy of the parity-check matrix as columns
// (bit i of COL[j] = H[i][j]) and forms the syndrome as the XOR of the columns
// of the set bits, a different route from the block's row parities. It checks
// the published decoding example (received 1010 1011 1111 1010 gives 10101100),
// all 256 codewords (zero syndrome) and 2000 random words.
module tb_ldpc_syndrome;
  import ldpc_pkg::*;

  codeword_t w;
  syndrome_t s;
  logic      z;

  ldpc_syndrome dut (.word_i(w), .syndrome_o(s), .zero_o(z));

  int checks = 0, failures = 0;

  localparam logic [7:0] COL [16] = '{
    8'h34, 8'h62, 8'h2B, 8'hD3, 8'hE8, 8'hAC, 8'h2E, 8'hA1,
    8'h5B, 8'h96, 8'h39, 8'h8C, 8'h89, 8'h4F, 8'h25, 8'h1E};
  localparam logic [7:0] PAR [8] = '{8'hB4, 8'hCE, 8'h0A, 8'hC2, 8'hC1, 8'hD6, 8'hA0, 8'h9E};

  function automatic logic [7:0] ref_syn(logic [15:0] r);
    logic [7:0] acc = '0;
    for (int j = 0; j < 16; j++) if (r[15-j]) acc ^= COL[j];
    return acc;
  endfunction

  function automatic logic [15:0] ref_cw(logic [7:0] p);
    logic [7:0] par = '0;
    for (int b = 0; b < 8; b++) if (p[b]) par ^= PAR[b];
    return {p, par};
  endfunction

  task automatic check(logic [15:0] r, logic [7:0] exp);
    w = r;
    #1;
    checks++;
    if (s !== exp || z !== (exp == 0)) begin
      failures++;
      $display("FAIL word %h: syndrome %b zero %b, expected %b", r, s, z, exp);
    end
  endtask

  initial begin
    check(16'hABFA, 8'b10101100);
    check(16'hAFFA, 8'h00);
    for (int p = 0; p < 256; p++) check(ref_cw(8'(p)), 8'h00);
    for (int i = 0; i < 2000; i++) begin
      automatic logic [15:0] r = 16'($urandom);
      check(r, ref_syn(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
