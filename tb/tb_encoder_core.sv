// tb_encoder_core: self-checking test of the transmit side.
//
// Loads a random 16 x 16 image, starts a frame with the stream always ready and
// checks every codeword and index against a reference encoder (generator rows
// kept here), the frame time (first codeword valid two cycles after the edge
// that samples start, so taken on the third; then one per cycle, the last taken
// PIXELS + 2 cycles after start) and done. A second frame of a new image
// runs under random back-pressure and must deliver the same words in order.
module tb_encoder_core;
  import ldpc_pkg::*;

  localparam int PIXELS = 256, AW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          we, start, busy, done, cw_valid, cw_ready;
  logic [AW-1:0] waddr, cw_index;
  message_t      wdata;
  codeword_t     cw;

  encoder_core #(.PIXELS(PIXELS)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .pix_we_i(we), .pix_addr_i(waddr), .pix_data_i(wdata),
    .start_i(start), .busy_o(busy), .done_o(done),
    .cw_valid_o(cw_valid), .cw_ready_i(cw_ready), .cw_data_o(cw), .cw_index_o(cw_index)
  );

  int checks = 0, failures = 0, stalls = 0;
  logic [7:0] img [PIXELS];

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

  task automatic load_image();
    for (int a = 0; a < PIXELS; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = 8'($urandom); img[a] = wdata;
    end
    @(negedge clk);
    we = 0;
  endtask

  task automatic run_frame(bit random_ready);
    int n = 0, t_start, t_last = 0, cyc = 0;
    @(negedge clk);
    start = 1;
    @(posedge clk);
    t_start = 0;
    @(negedge clk);
    start = 0;
    while (n < PIXELS) begin
      cw_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      cyc++;
      if (cw_valid && !cw_ready) stalls++;
      if (cw_valid && cw_ready) begin
        check(cw == ref_cw(img[n]) && cw_index == AW'(n),
              $sformatf("word %0d: %h idx %0d, expected %h", n, cw, cw_index, ref_cw(img[n])));
        if (!random_ready && n == 0) check(cyc == 3, $sformatf("first codeword taken after %0d cycles", cyc));
        n++;
        t_last = cyc;
      end
      @(negedge clk);
    end
    cw_ready = 0;
    if (!random_ready) check(t_last == PIXELS + 2, $sformatf("last codeword at cycle %0d", t_last));
    @(negedge clk);
    check(done && !busy && !cw_valid, "done/busy after the frame");
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; start = 0; cw_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_image();
    run_frame(1'b0);
    load_image();
    run_frame(1'b1);
    check(stalls > 0, "back-pressure never applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
