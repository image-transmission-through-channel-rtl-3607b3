// encoder_core: transmit side of the image link.
//
// The image is first written pixel by pixel into an image_ram (the integer
// matrix of the image, row-major). A pulse on start_i then walks the addresses
// 0 .. PIXELS-1: each pixel is read from the RAM, encoded by ldpc_encoder and
// sent out as a 16-bit codeword on a valid/ready stream, together with the index
// of its pixel. done_o rises when the last codeword has been taken and stays high
// until the next start.
//
// Timing: the RAM read takes one cycle and the encoder one more, so the first
// codeword appears two cycles after start_i; after that one codeword per cycle
// while cw_ready_i is high (PIXELS + 2 cycles per frame without stalls). When
// cw_ready_i is low, the read address is held and the RAM re-reads the same pixel,
// so no pixel is lost. The image must not be rewritten while busy_o is high.
// The order of operations follows the published encoder flow (read image into a
// matrix, encode each pixel, emit the codewords); the streaming interface is this
// design's own.
module encoder_core
  import ldpc_pkg::*;
#(
  parameter int unsigned PIXELS = 256,
  localparam int unsigned AW = $clog2(PIXELS)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // image load port
  input  logic          pix_we_i,
  input  logic [AW-1:0] pix_addr_i,
  input  message_t      pix_data_i,
  // control
  input  logic          start_i,
  output logic          busy_o,
  output logic          done_o,
  // codeword stream
  output logic          cw_valid_o,
  input  logic          cw_ready_i,
  output codeword_t     cw_data_o,
  output logic [AW-1:0] cw_index_o
);

  logic          run_q;      // reads still to issue
  logic [AW:0]   ptr_q;      // next address to read
  logic          pend_q;     // RAM output holds pixel pend_addr_q
  logic [AW-1:0] pend_addr_q;
  logic [AW:0]   out_cnt_q;  // codewords taken so far
  logic          done_q;

  logic          enc_ready;
  logic          advance;
  logic [AW-1:0] rd_addr;
  message_t      rd_pixel;

  assign advance = !pend_q || enc_ready;
  assign rd_addr = advance ? ptr_q[AW-1:0] : pend_addr_q;

  image_ram #(.DEPTH(PIXELS), .WIDTH(K)) u_img (
    .clk_i,
    .we_i      (pix_we_i),
    .wr_addr_i (pix_addr_i),
    .wr_data_i (pix_data_i),
    .rd_addr_i (rd_addr),
    .rd_data_o (rd_pixel)
  );

  ldpc_encoder u_enc (
    .clk_i,
    .rst_ni,
    .in_valid_i     (pend_q),
    .in_ready_o     (enc_ready),
    .in_pixel_i     (rd_pixel),
    .out_valid_o    (cw_valid_o),
    .out_ready_i    (cw_ready_i),
    .out_codeword_o (cw_data_o)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      run_q       <= 1'b0;
      ptr_q       <= '0;
      pend_q      <= 1'b0;
      pend_addr_q <= '0;
      out_cnt_q   <= '0;
      done_q      <= 1'b0;
    end else begin
      if (start_i && !busy_o) begin
        run_q     <= 1'b1;
        ptr_q     <= '0;
        out_cnt_q <= '0;
        done_q    <= 1'b0;
      end else begin
        if (advance) begin
          if (run_q) begin
            pend_q      <= 1'b1;
            pend_addr_q <= ptr_q[AW-1:0];
            ptr_q       <= ptr_q + 1'b1;
            if (ptr_q == (AW+1)'(PIXELS - 1)) run_q <= 1'b0;
          end else begin
            pend_q <= 1'b0;
          end
        end
        if (cw_valid_o && cw_ready_i) begin
          out_cnt_q <= out_cnt_q + 1'b1;
          if (out_cnt_q == (AW+1)'(PIXELS - 1)) done_q <= 1'b1;
        end
      end
    end
  end

  assign busy_o     = run_q || pend_q || cw_valid_o;
  assign done_o     = done_q;
  assign cw_index_o = out_cnt_q[AW-1:0];

  // A codeword on offer stays on offer, unchanged, until it is taken.
  a_cw_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    cw_valid_o && !cw_ready_i |=> cw_valid_o && $stable(cw_data_o));

endmodule
