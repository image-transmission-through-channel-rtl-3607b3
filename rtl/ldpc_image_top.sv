// ldpc_image_top: image transmission over a noisy channel with LDPC channel coding.
//
// Transmit side: encoder_core stores a 16 x 16 grey-scale image and sends every
// pixel as a rate-1/2 (16,8) LDPC codeword. Receive side: decoder_core corrects
// each received word with the bit-flipping decoder and rebuilds the image. The
// channel between them is outside this design: the transmitted codeword stream
// leaves on tx_cw_* and the received stream comes back on rx_cw_*, so a channel
// model, a modulator or a plain loop-back can be placed in between.
//
// Both sides run on one clock and one active-low asynchronous reset. Transmit
// and receive are independent: tx_start_i starts sending the stored image, and
// rx_start_i clears the receiver for a new frame; rx_done_o is high once all
// pixels of the frame have been written to the receive image.
module ldpc_image_top
  import ldpc_pkg::*;
#(
  parameter int unsigned PIXELS   = 256,   // 16 x 16 image
  parameter int unsigned MAX_ITER = 8,     // bit-flipping iteration limit
  localparam int unsigned AW = $clog2(PIXELS)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // transmit image load and control
  input  logic          tx_pix_we_i,
  input  logic [AW-1:0] tx_pix_addr_i,
  input  message_t      tx_pix_data_i,
  input  logic          tx_start_i,
  output logic          tx_busy_o,
  output logic          tx_done_o,
  // transmitted codewords, towards the channel
  output logic          tx_cw_valid_o,
  input  logic          tx_cw_ready_i,
  output codeword_t     tx_cw_data_o,
  output logic [AW-1:0] tx_cw_index_o,
  // received words, from the channel
  input  logic          rx_cw_valid_i,
  output logic          rx_cw_ready_o,
  input  codeword_t     rx_cw_data_i,
  // receive control, recovered image and statistics
  input  logic          rx_start_i,
  output logic          rx_done_o,
  input  logic [AW-1:0] rx_pix_addr_i,
  output message_t      rx_pix_data_o,
  output logic [AW:0]   rx_words_o,
  output logic [AW:0]   rx_corrected_o,
  output logic [AW:0]   rx_failed_o
);

  encoder_core #(.PIXELS(PIXELS)) u_tx (
    .clk_i,
    .rst_ni,
    .pix_we_i   (tx_pix_we_i),
    .pix_addr_i (tx_pix_addr_i),
    .pix_data_i (tx_pix_data_i),
    .start_i    (tx_start_i),
    .busy_o     (tx_busy_o),
    .done_o     (tx_done_o),
    .cw_valid_o (tx_cw_valid_o),
    .cw_ready_i (tx_cw_ready_i),
    .cw_data_o  (tx_cw_data_o),
    .cw_index_o (tx_cw_index_o)
  );

  decoder_core #(.PIXELS(PIXELS), .MAX_ITER(MAX_ITER)) u_rx (
    .clk_i,
    .rst_ni,
    .start_i     (rx_start_i),
    .done_o      (rx_done_o),
    .cw_valid_i  (rx_cw_valid_i),
    .cw_ready_o  (rx_cw_ready_o),
    .cw_data_i   (rx_cw_data_i),
    .rd_addr_i   (rx_pix_addr_i),
    .rd_data_o   (rx_pix_data_o),
    .words_o     (rx_words_o),
    .corrected_o (rx_corrected_o),
    .failed_o    (rx_failed_o)
  );

endmodule
