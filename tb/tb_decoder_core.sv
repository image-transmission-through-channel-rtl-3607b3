// tb_decoder_core: self-checking test of the receive side.
//
// Generates a random 16 x 16 image, encodes it with a reference encoder
// (generator rows kept here) and sends the words with, per word, no error
// (about half), one random bit error, or the double error in bits 0 and 1 that
// the bit-flipping decoder cannot resolve. The source inserts random idle
// cycles. Checks: every pixel with at most one error is recovered, the
// statistics (words, corrected, failed) match the error pattern, done rises
// after the last pixel, the decoder back-pressures the stream while busy, and
// the frame takes exactly sum(iterations + 2) cycles when the source never
// idles (second frame). A start pulse clears the statistics between frames.
module tb_decoder_core;
  import ldpc_pkg::*;

  localparam int PIXELS = 256, AW = 8, MAX_ITER = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, done, cw_valid, cw_ready;
  codeword_t     cw;
  logic [AW-1:0] raddr;
  message_t      rdata;
  logic [AW:0]   words, corrected, failed;

  decoder_core #(.PIXELS(PIXELS), .MAX_ITER(MAX_ITER)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .done_o(done),
    .cw_valid_i(cw_valid), .cw_ready_o(cw_ready), .cw_data_i(cw),
    .rd_addr_i(raddr), .rd_data_o(rdata),
    .words_o(words), .corrected_o(corrected), .failed_o(failed)
  );

  int checks = 0, failures = 0, stalls = 0;
  logic [7:0] img [PIXELS];
  int kind [PIXELS];   // 0 clean, 1 single error, 2 double error (0,1)
  int errbit [PIXELS];

  localparam logic [7:0] PAR [8] = '{8'hB4, 8'hCE, 8'h0A, 8'hC2, 8'hC1, 8'hD6, 8'hA0, 8'h9E};
  function automatic logic [15:0] ref_cw(logic [7:0] p);
    logic [7:0] par = '0;
    for (int b = 0; b < 8; b++) if (p[b]) par ^= PAR[b];
    return {p, par};
  endfunction

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  task automatic run_frame(bit gaps);
    int n_single = 0, n_double = 0, exp_cycles = 0, cyc = 0;
    for (int a = 0; a < PIXELS; a++) begin
      img[a]    = 8'($urandom);
      kind[a]   = ($urandom_range(0, 1) == 0) ? 0 : (($urandom_range(0, 9) == 0) ? 2 : 1);
      errbit[a] = $urandom_range(0, 15);
      if (kind[a] == 1) n_single++;
      if (kind[a] == 2) n_double++;
      exp_cycles += (kind[a] == 0) ? 2 : (kind[a] == 2) ? MAX_ITER + 2 : (errbit[a] == 11) ? 4 : 3;
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(words == 0 && corrected == 0 && failed == 0 && !done, "statistics not cleared");
    for (int a = 0; a < PIXELS; a++) begin
      logic [15:0] w;
      w = ref_cw(img[a]);
      if (kind[a] == 1) w ^= 16'h8000 >> errbit[a];
      if (kind[a] == 2) w ^= 16'hC000;
      while (gaps && $urandom_range(0, 3) == 0) begin
        cw_valid = 0;
        @(negedge clk);
        cyc++;
      end
      cw_valid = 1;
      cw = w;
      @(posedge clk);
      cyc++;
      while (!cw_ready) begin
        stalls++;
        @(posedge clk);
        cyc++;
      end
      @(negedge clk);
    end
    cw_valid = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    // cyc counts edges after the start pulse: the first word is accepted on
    // edge 1 and the last pixel written on edge 1 + sum(iterations + 2).
    if (!gaps) check(cyc == exp_cycles + 1, $sformatf("frame took %0d cycles, expected %0d", cyc, exp_cycles));
    check(words == (AW+1)'(PIXELS), "word count");
    check(corrected == (AW+1)'(n_single), $sformatf("corrected %0d expected %0d", corrected, n_single));
    check(failed == (AW+1)'(n_double), $sformatf("failed %0d expected %0d", failed, n_double));
    for (int a = 0; a < PIXELS; a++) begin
      @(negedge clk);
      raddr = AW'(a);
      @(posedge clk);
      #1 if (kind[a] != 2) check(rdata == img[a], $sformatf("pixel %0d: %0d expected %0d", a, rdata, img[a]));
    end
  endtask

  initial begin
    start = 0; cw_valid = 0; cw = '0; raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_frame(1'b1);
    run_frame(1'b0);
    check(stalls > 0, "decoder never back-pressured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
