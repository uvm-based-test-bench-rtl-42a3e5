// axi4_slave_mem: the storage behind the AXI4 slave.
//
// An array of DEPTH words of DATA_W bits with one write port and one read
// port that work in the same cycle. The write port writes the byte lanes
// whose strobe bit is set, so narrow and unaligned writes leave the other
// bytes of the word alone. The read port is synchronous: the word at
// rd_addr is in rd_data in the cycle after rd_en. A read and a write of the
// same word in one cycle return the old word.
//
// Addresses here are word indices. The slave decodes the low bits of the
// byte address; higher address bits alias. The storage size is not given for
// this design; the default of 2**17 words (512 KiB) holds every address the
// reference transfers use (up to 0x0004100F) without aliasing.
// Nothing is cleared at reset (a RAM has no reset); the content starts
// undefined.
module axi4_slave_mem #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned WORD_W = 17            // log2(DEPTH)
) (
  input  logic                  clk,
  // write port
  input  logic                  wr_en,
  input  logic [WORD_W-1:0]     wr_addr,
  input  logic [DATA_W-1:0]     wr_data,
  input  logic [DATA_W/8-1:0]   wr_strb,
  // read port
  input  logic                  rd_en,
  input  logic [WORD_W-1:0]     rd_addr,
  output logic [DATA_W-1:0]     rd_data
);

  localparam int unsigned DEPTH = 2 ** WORD_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < DATA_W / 8; b++) begin
        if (wr_strb[b]) mem[wr_addr][8*b +: 8] <= wr_data[8*b +: 8];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
