// decoder_core: receive side of the image link.
//
// Received 16-bit words arrive on a valid/ready stream, one per pixel in
// row-major order. Each word is decoded by bf_decoder, and the message bits of
// the corrected word (the recovered pixel) are written into an image_ram at the
// next pixel address. When PIXELS words have been written, done_o rises; the
// recovered image can then be read through rd_addr_i / rd_data_o (one-cycle
// read latency). A pulse on start_i clears the pixel counter and the statistics
// for a new frame.
//
// Statistics per frame: words_o decoded words, corrected_o words that needed at
// least one flip and end with a zero syndrome, failed_o words still failing a
// check after the iteration limit (their pixel is written as it stands).
//
// Timing: the decoder takes one word at a time, so cw_ready_o is low while a word
// is being decoded; a word with i flip iterations occupies the decoder for i + 2
// cycles (accept, i flips, final syndrome check), and its pixel is written on the
// cycle it leaves the decoder. The flow follows the published decoder (decode
// each codeword by bit flipping, store the pixels in an integer matrix); the
// stream interface and counters are this design's own.
module decoder_core
  import ldpc_pkg::*;
#(
  parameter int unsigned PIXELS   = 256,
  parameter int unsigned MAX_ITER = 8,
  localparam int unsigned AW = $clog2(PIXELS)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          start_i,
  output logic          done_o,
  // received word stream
  input  logic          cw_valid_i,
  output logic          cw_ready_o,
  input  codeword_t     cw_data_i,
  // recovered image read port
  input  logic [AW-1:0] rd_addr_i,
  output message_t      rd_data_o,
  // statistics
  output logic [AW:0]   words_o,
  output logic [AW:0]   corrected_o,
  output logic [AW:0]   failed_o
);

  logic       dec_valid;
  message_t   dec_msg;
  codeword_t  dec_cw;
  logic       dec_ok;
  logic [3:0] dec_iters;
  logic       wr_en;

  logic [AW:0] words_q, corr_q, fail_q;

  bf_decoder #(.MAX_ITER(MAX_ITER)) u_dec (
    .clk_i,
    .rst_ni,
    .in_valid_i     (cw_valid_i && !done_o),
    .in_ready_o     (cw_ready_o),
    .in_codeword_i  (cw_data_i),
    .out_valid_o    (dec_valid),
    .out_ready_i    (1'b1),
    .out_message_o  (dec_msg),
    .out_codeword_o (dec_cw),
    .out_ok_o       (dec_ok),
    .out_iters_o    (dec_iters)
  );

  assign wr_en = dec_valid && !done_o;

  image_ram #(.DEPTH(PIXELS), .WIDTH(K)) u_img (
    .clk_i,
    .we_i      (wr_en),
    .wr_addr_i (words_q[AW-1:0]),
    .wr_data_i (dec_msg),
    .rd_addr_i,
    .rd_data_o
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      words_q <= '0;
      corr_q  <= '0;
      fail_q  <= '0;
    end else if (start_i) begin
      words_q <= '0;
      corr_q  <= '0;
      fail_q  <= '0;
    end else if (wr_en) begin
      words_q <= words_q + 1'b1;
      if (dec_ok && dec_iters != '0) corr_q <= corr_q + 1'b1;
      if (!dec_ok) fail_q <= fail_q + 1'b1;
    end
  end

  assign done_o      = (words_q == (AW+1)'(PIXELS));
  assign words_o     = words_q;
  assign corrected_o = corr_q;
  assign failed_o    = fail_q;

  // The decoder's codeword output is only observed through the pixel it carries.
  logic unused;
  assign unused = ^dec_cw;

endmodule
