// tb_bf_decoder: self-checking test of the bit-flipping decoder.
//
// Words sent:
//  - the published example, codeword of pixel 175 with bit 5 flipped
//    (1010 1011 1111 1010): must give 175 after one flip iteration,
//  - every codeword (all 256 pixels) without error: 0 iterations,
//  - every codeword with every single-bit error: the pixel must come back,
//    with one iteration (two for an error in bit 11, which the first pass does
//    not locate alone), worked out beforehand from the matrix,
//  - 300 random double errors: the result is either a word with a zero
//    syndrome (ok) or flagged after MAX_ITER iterations; the pair (0, 1) is
//    known to end at the iteration limit.
// The reference codewords come from the generator rows (parity of each single
// message bit) and the reference syndrome from the columns of H, both kept here.
// The result must arrive iterations + 1 cycles after the word is accepted.
// A second instance holds the 4 x 6 parity-check matrix of the textbook
// illustration (rows 111000, 100110, 010101, 001011): the received word 001000
// has syndrome 1001, bit 2 (the third bit) fails two checks and is flipped,
// giving 000000; every other single error on the zero word is corrected too.
module tb_bf_decoder;
  import ldpc_pkg::*;

  localparam int unsigned MAX_ITER = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_ready, out_ok;
  codeword_t  in_cw, out_cw;
  message_t   out_msg;
  logic [3:0] out_iters;

  bf_decoder #(.MAX_ITER(MAX_ITER)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_codeword_i(in_cw),
    .out_valid_o(out_valid), .out_ready_i(out_ready),
    .out_message_o(out_msg), .out_codeword_o(out_cw), .out_ok_o(out_ok),
    .out_iters_o(out_iters)
  );

  // Small textbook code
  localparam logic [23:0] H6 = {6'b111000, 6'b100110, 6'b010101, 6'b001011};
  logic       s_in_valid, s_in_ready, s_out_valid, s_out_ok;
  logic [0:5] s_in, s_out;
  logic [0:1] s_msg;
  logic [3:0] s_iters;

  bf_decoder #(.MAX_ITER(MAX_ITER), .NB(6), .MC(4), .KB(2), .HM(H6)) dut6 (
    .clk_i(clk), .rst_ni(rst_n),
    .in_valid_i(s_in_valid), .in_ready_o(s_in_ready), .in_codeword_i(s_in),
    .out_valid_o(s_out_valid), .out_ready_i(1'b1),
    .out_message_o(s_msg), .out_codeword_o(s_out), .out_ok_o(s_out_ok),
    .out_iters_o(s_iters)
  );

  int checks = 0, failures = 0;
  int n_limit = 0, n_multi = 0, n_corr = 0;

  localparam logic [7:0] PAR [8] = '{8'hB4, 8'hCE, 8'h0A, 8'hC2, 8'hC1, 8'hD6, 8'hA0, 8'h9E};
  localparam logic [7:0] COL [16] = '{
    8'h34, 8'h62, 8'h2B, 8'hD3, 8'hE8, 8'hAC, 8'h2E, 8'hA1,
    8'h5B, 8'h96, 8'h39, 8'h8C, 8'h89, 8'h4F, 8'h25, 8'h1E};

  function automatic logic [15:0] ref_cw(logic [7:0] p);
    logic [7:0] par = '0;
    for (int b = 0; b < 8; b++) if (p[b]) par ^= PAR[b];
    return {p, par};
  endfunction

  function automatic logic [7:0] ref_syn(logic [15:0] r);
    logic [7:0] acc = '0;
    for (int j = 0; j < 16; j++) if (r[15-j]) acc ^= COL[j];
    return acc;
  endfunction

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // Decode one word; returns pixel, ok flag, iterations; checks the latency.
  task automatic decode(input logic [15:0] w, output logic [7:0] pix, output bit ok,
                        output int iters);
    int t0, t1;
    @(negedge clk);
    in_valid = 1'b1;
    in_cw    = w;
    do @(posedge clk); while (!in_ready);
    t0 = $time / 10;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    t1 = ($time - 5) / 10;
    pix   = out_msg;
    ok    = out_ok;
    iters = int'(out_iters);
    check(t1 - t0 == iters + 1, $sformatf("latency %0d for %0d iterations, word %h", t1 - t0, iters, w));
    check(!ok || ref_syn(out_cw) == 8'h00, $sformatf("ok flagged with non-zero syndrome, word %h", w));
    check(ok || iters == MAX_ITER, $sformatf("not ok before the limit, word %h", w));
    check(out_cw[0:7] == pix, "message is not the first 8 bits");
    // hold for a cycle with out_ready low, then take it
    out_ready = 1'b0;
    @(negedge clk);
    check(out_valid && out_msg == pix, "result not held");
    out_ready = 1'b1;
    @(negedge clk);
    out_ready = 1'b0;
  endtask

  initial begin
    logic [7:0] pix;
    bit ok;
    int it;
    in_valid = 0; in_cw = '0; out_ready = 0; s_in_valid = 0; s_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    decode(16'hABFA, pix, ok, it);
    check(pix == 8'd175 && ok && it == 1, $sformatf("published example: %0d ok %0d it %0d", pix, ok, it));

    for (int p = 0; p < 256; p++) begin
      automatic logic [15:0] c = ref_cw(8'(p));
      decode(c, pix, ok, it);
      check(pix == 8'(p) && ok && it == 0, $sformatf("clean pixel %0d", p));
      for (int j = 0; j < 16; j++) begin
        decode(c ^ (16'h8000 >> j), pix, ok, it);
        check(pix == 8'(p) && ok && it == ((j == 11) ? 2 : 1),
              $sformatf("pixel %0d error bit %0d: got %0d ok %0d it %0d", p, j, pix, ok, it));
        if (it > 1) n_multi++;
        n_corr++;
      end
    end

    decode(ref_cw(8'd77) ^ 16'hC000, pix, ok, it);
    check(!ok && it == MAX_ITER, "double error (0,1) should reach the limit");
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom_range(0, 15);
      automatic int b = $urandom_range(0, 15);
      if (a == b) continue;
      decode(ref_cw(8'($urandom)) ^ (16'h8000 >> a) ^ (16'h8000 >> b), pix, ok, it);
      if (!ok) n_limit++;
    end
    for (int j = 0; j < 6; j++) begin
      @(negedge clk);
      s_in_valid = 1'b1;
      s_in = 6'b100000 >> ((j + 2) % 6);   // starts with the published 001000
      @(posedge clk);
      @(negedge clk);
      s_in_valid = 1'b0;
      while (!s_out_valid) @(negedge clk);
      check(s_out == 6'b000000 && s_out_ok && s_iters == 1,
            $sformatf("4x6 code, word %b: got %b ok %0d it %0d", 6'b100000 >> ((j + 2) % 6), s_out, s_out_ok, s_iters));
      @(negedge clk);
    end
    check(n_limit > 0, "iteration limit never reached");
    check(n_multi > 0, "no multi-iteration correction");
    $display("corrected %0d, multi-iteration %0d, limit reached %0d", n_corr, n_multi, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
