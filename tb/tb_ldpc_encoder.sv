// tb_ldpc_encoder: self-checking test of the LDPC pixel encoder.
//
// Sends all 256 pixel values, then the published examples, through the encoder
// under random output back-pressure and compares every codeword with a
// reference built from the encoder's generator rows (the parity of each single
// message bit, listed below), and the six published pixel/codeword pairs with
// their literal values. With the output always ready it also checks the
// one-cycle latency and the one-pixel-per-cycle rate.
module tb_ldpc_encoder;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid, in_ready, out_valid, out_ready;
  message_t  in_pixel;
  codeword_t out_cw;

  ldpc_encoder dut (
    .clk_i(clk), .rst_ni(rst_n),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_pixel_i(in_pixel),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_codeword_o(out_cw)
  );

  int checks = 0, failures = 0;

  // Parity bits of pixel value (1 << b), b = 0..7.
  localparam logic [7:0] PAR [8] = '{8'hB4, 8'hCE, 8'h0A, 8'hC2, 8'hC1, 8'hD6, 8'hA0, 8'h9E};

  function automatic logic [15:0] ref_cw(logic [7:0] p);
    logic [7:0] par = '0;
    for (int b = 0; b < 8; b++) if (p[b]) par ^= PAR[b];
    return {p, par};
  endfunction

  // Published pixel / codeword pairs.
  localparam logic [7:0]  TP [6] = '{8'd0, 8'd1, 8'd2, 8'd50, 8'd175, 8'd255};
  localparam logic [15:0] TC [6] = '{16'h0000, 16'h01B4, 16'h02CE, 16'h32D9, 16'hAFFA, 16'hFF9B};

  logic [15:0] expq[$];
  int n_in = 0, n_out = 0;
  localparam int TOTAL = 256 + 6;
  logic check_rate = 1'b0;
  int accept_cyc, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [7:0] stim(int i);
    return (i < 256) ? 8'(i) : TP[i-256];
  endfunction

  // Driver
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        expq.push_back(ref_cw(in_pixel));
        accept_cyc <= cyc;
        n_in <= n_in + 1;
      end
    end
  end
  always @(negedge clk) begin
    in_valid  <= (n_in + ((in_valid && in_ready) ? 1 : 0)) < TOTAL && rst_n;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_pixel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // Pixel sequence follows accepted count.
  always_comb in_pixel = stim(n_in);

  // Monitor
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [15:0] e;
      e = expq.pop_front();
      checks++;
      if (out_cw !== e) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", n_out, out_cw, e);
      end
      if (n_out >= 256) begin
        checks++;
        if (out_cw !== TC[n_out-256]) begin
          failures++;
          $display("FAIL published pixel %0d: got %h expected %h", TP[n_out-256], out_cw, TC[n_out-256]);
        end
      end
      if (check_rate) begin
        checks++;
        if (cyc != accept_cyc + 1) begin
          failures++;
          $display("FAIL latency: accepted at %0d, out at %0d", accept_cyc, cyc);
        end
      end
      n_out <= n_out + 1;
    end
  end

  // Back-pressure: random for the first 256 words, always ready afterwards.
  always @(negedge clk) begin
    check_rate <= (n_out >= 256);
    out_ready  <= (n_out >= 250) ? 1'b1 : ($urandom_range(0, 3) != 0);
  end

  initial begin
    wait (n_out == TOTAL);
    repeat (2) @(posedge clk);
    checks++;
    if (expq.size() != 0 || out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
