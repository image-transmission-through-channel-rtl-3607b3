// tb_image_ram: self-checking test of the image buffer.
//
// Fills a 16 x 16 image of 8-bit pixels with random values, reads every address
// back and checks the one-cycle read latency, then checks that a read of an
// address written in the same cycle returns the old value, and runs 2000
// random mixed writes and reads against a reference array.
module tb_image_ram;
  localparam int DEPTH = 256, WIDTH = 8, AW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we;
  logic [AW-1:0]    wa, ra;
  logic [WIDTH-1:0] wd, rd;

  image_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk_i(clk), .we_i(we), .wr_addr_i(wa), .wr_data_i(wd), .rd_addr_i(ra), .rd_data_o(rd)
  );

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  initial begin
    logic [WIDTH-1:0] exp_q;
    we = 0; wa = '0; wd = '0; ra = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wa = AW'(a); wd = WIDTH'($urandom); model[a] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ra = AW'(a);
      @(posedge clk);
      #1 check(rd == model[a], $sformatf("read %0d: %h expected %h", a, rd, model[a]));
    end
    // read-during-write returns the old word
    @(negedge clk);
    we = 1; wa = 8'd17; wd = ~model[17]; ra = 8'd17;
    @(posedge clk);
    #1 check(rd == model[17], "read during write did not return the old word");
    model[17] = ~model[17];
    @(negedge clk);
    we = 0;
    @(posedge clk);
    #1 check(rd == model[17], "new word not read back");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra = AW'($urandom);
      exp_q = model[ra];
      we = $urandom_range(0, 1) != 0; wa = AW'($urandom); wd = WIDTH'($urandom);
      @(posedge clk);
      if (we) model[wa] = wd;
      #1 check(rd == exp_q, $sformatf("random read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
