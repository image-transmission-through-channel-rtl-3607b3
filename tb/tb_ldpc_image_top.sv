// tb_ldpc_image_top: end-to-end test of the image link at its default size.
//
// A 16 x 16 image is loaded into the transmitter; its first pixels are the
// published examples 0, 1, 2, 50, 175, 255 and the rest are random. The
// testbench is the channel: it passes the transmitted codewords to the receiver,
// inserts idle cycles at random and corrupts each word with a chosen error
// pattern: none, one random bit, a bit-11 error (needs two flip passes), or the
// double error in bits 0 and 1 (decoder reaches its iteration limit). Pixel 175
// gets the published error in bit 5. Checks: the published codewords on the
// transmit stream, every recovered pixel whose word had at most one error, the
// receiver's statistics, done on both sides, and that each mechanism happened:
// clean words, single corrections, multi-pass corrections, limit failures,
// transmitter stalls by the busy decoder, and channel idle cycles.
module tb_ldpc_image_top;
  import ldpc_pkg::*;

  localparam int PIXELS = 256, AW = 8, MAX_ITER = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          tx_we, tx_start, tx_busy, tx_done, tx_cw_valid, tx_cw_ready;
  logic [AW-1:0] tx_addr, tx_cw_index, rx_addr;
  message_t      tx_data, rx_data;
  codeword_t     tx_cw, rx_cw;
  logic          rx_cw_valid, rx_cw_ready, rx_start, rx_done;
  logic [AW:0]   rx_words, rx_corrected, rx_failed;
  logic          chan_on;

  ldpc_image_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .tx_pix_we_i(tx_we), .tx_pix_addr_i(tx_addr), .tx_pix_data_i(tx_data),
    .tx_start_i(tx_start), .tx_busy_o(tx_busy), .tx_done_o(tx_done),
    .tx_cw_valid_o(tx_cw_valid), .tx_cw_ready_i(tx_cw_ready), .tx_cw_data_o(tx_cw),
    .tx_cw_index_o(tx_cw_index),
    .rx_cw_valid_i(rx_cw_valid), .rx_cw_ready_o(rx_cw_ready), .rx_cw_data_i(rx_cw),
    .rx_start_i(rx_start), .rx_done_o(rx_done), .rx_pix_addr_i(rx_addr),
    .rx_pix_data_o(rx_data), .rx_words_o(rx_words), .rx_corrected_o(rx_corrected),
    .rx_failed_o(rx_failed)
  );

  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_multi = 0, n_limit = 0, n_stall = 0, n_idle = 0;

  logic [7:0]  img  [PIXELS];
  logic [15:0] mask [PIXELS];
  int          kind [PIXELS];   // 0 clean, 1 single, 2 bit 11, 3 double (0,1)

  localparam logic [7:0]  TP [6] = '{8'd0, 8'd1, 8'd2, 8'd50, 8'd175, 8'd255};
  localparam logic [15:0] TC [6] = '{16'h0000, 16'h01B4, 16'h02CE, 16'h32D9, 16'hAFFA, 16'hFF9B};

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // Channel
  assign rx_cw_valid = tx_cw_valid && chan_on;
  assign tx_cw_ready = rx_cw_ready && chan_on;
  assign rx_cw       = tx_cw ^ mask[tx_cw_index];

  always @(negedge clk) chan_on <= ($urandom_range(0, 7) != 0);

  always @(posedge clk) if (rst_n) begin
    if (tx_cw_valid && !chan_on) n_idle++;
    if (tx_cw_valid && chan_on && !rx_cw_ready) n_stall++;
    if (tx_cw_valid && tx_cw_ready && tx_cw_index < 6)
      check(tx_cw == TC[int'(tx_cw_index)], $sformatf("published pixel %0d sent as %h, expected %h",
            TP[int'(tx_cw_index)], tx_cw, TC[int'(tx_cw_index)]));
  end

  initial begin
    tx_we = 0; tx_addr = '0; tx_data = '0; tx_start = 0; rx_start = 0; rx_addr = '0;
    for (int a = 0; a < PIXELS; a++) begin
      img[a]  = (a < 6) ? TP[a] : 8'($urandom);
      case ($urandom_range(0, 9))
        0, 1, 2, 3: kind[a] = 0;
        4, 5, 6, 7: kind[a] = 1;
        8:          kind[a] = 2;
        default:    kind[a] = 3;
      endcase
      if (a == 4) kind[a] = 1;
      mask[a] = (kind[a] == 0) ? 16'h0 :
                (kind[a] == 1) ? (16'h8000 >> ((a == 4) ? 5 : $urandom_range(0, 15))) :
                (kind[a] == 2) ? (16'h8000 >> 11) : 16'hC000;
      if (kind[a] == 1 && mask[a] == (16'h8000 >> 11)) kind[a] = 2;
      case (kind[a])
        0: n_clean++;
        1: n_single++;
        2: n_multi++;
        default: n_limit++;
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < PIXELS; a++) begin
      @(negedge clk);
      tx_we = 1; tx_addr = AW'(a); tx_data = img[a];
    end
    @(negedge clk);
    tx_we = 0; rx_start = 1;
    @(negedge clk);
    rx_start = 0; tx_start = 1;
    @(negedge clk);
    tx_start = 0;
    while (!rx_done) @(negedge clk);
    @(negedge clk);
    check(tx_done && !tx_busy, "transmitter not done");
    check(rx_words == (AW+1)'(PIXELS), "receiver word count");
    check(rx_corrected == (AW+1)'(n_single + n_multi),
          $sformatf("corrected %0d expected %0d", rx_corrected, n_single + n_multi));
    check(rx_failed == (AW+1)'(n_limit), $sformatf("failed %0d expected %0d", rx_failed, n_limit));
    for (int a = 0; a < PIXELS; a++) begin
      @(negedge clk);
      rx_addr = AW'(a);
      @(posedge clk);
      #1 if (kind[a] != 3) check(rx_data == img[a], $sformatf("pixel %0d: got %0d expected %0d (error %h)",
                                 a, rx_data, img[a], mask[a]));
    end
    $display("clean %0d, single %0d, multi-pass %0d, limit %0d, stalls %0d, idle %0d",
             n_clean, n_single, n_multi, n_limit, n_stall, n_idle);
    check(n_clean > 0, "no clean word");
    check(n_single > 0, "no single correction");
    check(n_multi > 0, "no multi-pass correction");
    check(n_limit > 0, "no iteration-limit failure");
    check(n_stall > 0, "transmitter never stalled by the decoder");
    check(n_idle > 0, "channel never idle");
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
