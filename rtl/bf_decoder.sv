// bf_decoder: iterative hard-decision bit-flipping decoder for the (16,8) LDPC code.
//
// One iteration per clock cycle, with every loop unrolled:
//   1. syndrome S = r * H^T (ldpc_syndrome); if S == 0 the word is a codeword
//      and decoding stops,
//   2. for every variable node j, count the failed checks it is connected to,
//      count[j] = sum_i H[i][j] & S[i],
//   3. the set of variable nodes with the largest count is located,
//   4. those bits of r are flipped, and the next cycle starts again at step 1.
// The syndrome of the flipped word is therefore re-checked before the result is
// released. If the syndrome is still non-zero after MAX_ITER flips the word is
// released with ok_o = 0 and the message bits as they stand.
//
// Interface: valid/ready on both sides. A word is accepted when idle or in the
// cycle its predecessor's result is taken; the result (out_valid_o) follows
// iterations + 1 cycles after the accepting edge and is held until out_ready_i.
// The decoder holds one word at a time, so with a result always taken a word
// with i flip iterations occupies it for i + 2 cycles.
// The algorithm follows the published bit-flipping steps; the one-cycle
// iteration, the flip-all-maximal rule for ties and the iteration limit are
// this design's choices.
//
// The parity-check matrix is a parameter (NB columns, MC rows, row 0 in the most
// significant bits of HM), so the same decoder serves any small code; the
// defaults are the 8 x 16 matrix of the image code, whose first KB = 8 bits are
// the pixel.
module bf_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned      MAX_ITER = 8,
  parameter int unsigned      NB       = N,       // code length
  parameter int unsigned      MC       = M,       // parity checks
  parameter int unsigned      KB       = K,       // leading bits given as the message
  parameter logic [MC*NB-1:0] HM       = H_FLAT   // parity-check matrix, flattened
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          in_valid_i,
  output logic          in_ready_o,
  input  logic [0:NB-1] in_codeword_i,
  output logic          out_valid_o,
  input  logic          out_ready_i,
  output logic [0:KB-1] out_message_o,   // first KB bits of the corrected word
  output logic [0:NB-1] out_codeword_o,  // corrected word
  output logic          out_ok_o,        // syndrome of out_codeword_o is zero
  output logic [3:0]    out_iters_o      // flip iterations used
);

  localparam int unsigned IT_W  = 4;
  localparam int unsigned CNT_W = $clog2(MC + 1);   // a count runs 0..MC

  typedef enum logic [1:0] {IDLE, CHECK, DONE} state_e;

  state_e           state_q;
  logic [0:NB-1]    r_q;
  logic [IT_W-1:0]  iter_q;
  logic             ok_q;

  logic [0:MC-1]    syn;
  logic             syn_zero;
  logic [CNT_W-1:0] cnt [NB];
  logic [CNT_W-1:0] cnt_max;
  logic [0:NB-1]    flip;
  logic [0:NB-1]    hrow [MC];

  ldpc_syndrome #(.NB(NB), .MC(MC), .HM(HM)) u_syn (
    .word_i(r_q), .syndrome_o(syn), .zero_o(syn_zero)
  );

  always_comb begin
    for (int i = 0; i < MC; i++) hrow[i] = HM[(MC-1-i)*NB +: NB];
    for (int j = 0; j < NB; j++) begin
      cnt[j] = '0;
      for (int i = 0; i < MC; i++) cnt[j] = cnt[j] + CNT_W'(hrow[i][j] & syn[i]);
    end
    cnt_max = '0;
    for (int j = 0; j < NB; j++) if (cnt[j] > cnt_max) cnt_max = cnt[j];
    for (int j = 0; j < NB; j++) flip[j] = (cnt[j] == cnt_max) && (cnt_max != '0);
  end

  // A new word is also taken in the cycle the previous result leaves.
  assign in_ready_o     = (state_q == IDLE) || (state_q == DONE && out_ready_i);
  assign out_valid_o    = (state_q == DONE);
  assign out_codeword_o = r_q;
  assign out_message_o  = r_q[0:KB-1];
  assign out_ok_o       = ok_q;
  assign out_iters_o    = iter_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= IDLE;
      r_q     <= '0;
      iter_q  <= '0;
      ok_q    <= 1'b0;
    end else begin
      unique case (state_q)
        IDLE: if (in_valid_i) begin
          r_q     <= in_codeword_i;
          iter_q  <= '0;
          state_q <= CHECK;
        end
        CHECK: begin
          if (syn_zero) begin
            ok_q    <= 1'b1;
            state_q <= DONE;
          end else if (iter_q == IT_W'(MAX_ITER)) begin
            ok_q    <= 1'b0;
            state_q <= DONE;
          end else begin
            r_q    <= r_q ^ flip;
            iter_q <= iter_q + 1'b1;
          end
        end
        DONE: if (out_ready_i) begin
          if (in_valid_i) begin
            r_q     <= in_codeword_i;
            iter_q  <= '0;
            state_q <= CHECK;
          end else begin
            state_q <= IDLE;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // The iteration counter must hold MAX_ITER.
  initial assert (MAX_ITER < (1 << IT_W)) else $fatal(1, "MAX_ITER too large");

  // Output is held stable until taken.
  a_out_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    out_valid_o && !out_ready_i |=> out_valid_o && $stable(out_codeword_o));

endmodule
