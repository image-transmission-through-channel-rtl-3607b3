// image_ram: image buffer holding an image as an integer matrix.
//
// DEPTH words of WIDTH bits (default 16 x 16 = 256 pixels of 8 bits), addressed
// row-major (address = row * 16 + column). One write port and one read port,
// both on clk_i; the read is synchronous, so rd_data_o holds the word at rd_addr_i
// one cycle after the address is presented. A write and a read of the same
// address in one cycle return the old word. Written as an array so synthesis
// can map it onto block RAM; contents are not reset.
module image_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk_i,
  input  logic             we_i,
  input  logic [AW-1:0]    wr_addr_i,
  input  logic [WIDTH-1:0] wr_data_i,
  input  logic [AW-1:0]    rd_addr_i,
  output logic [WIDTH-1:0] rd_data_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[wr_addr_i] <= wr_data_i;
    rd_data_o <= mem[rd_addr_i];
  end

endmodule
