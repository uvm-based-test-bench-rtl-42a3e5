// axi4_slave: AXI4 memory slave, the device that the test environment checks.
//
// It joins an independent write side (axi4_slave_write: AW, W and B
// channels) and read side (axi4_slave_read: AR and R channels) around one
// memory (axi4_slave_mem) with a write port and a read port, so a write
// burst and a read burst can be in progress at the same time. Each side
// takes one burst at a time and supports FIXED, INCR and WRAP bursts of 1 to
// 256 beats, beat sizes of 1 to 4 bytes and byte strobes.
//
// Timing (see the two controllers): an address is accepted one cycle after
// the master drives it; write beats are taken one per cycle while WVALID is
// high; the write response follows the cycle after the last beat; read data
// starts two cycles after the read address handshake and then runs one beat
// per cycle while RREADY is high.
//
// The memory is addressed by byte-address bits [WORD_W+1:2]; higher address
// bits are ignored, so the memory repeats every 4 << WORD_W bytes. Every
// response is OKAY except a write whose WLAST is misplaced (SLVERR). Lock,
// cache, protection, QOS and region fields are accepted and ignored.
module axi4_slave
  import axi4_pkg::*;
#(
  parameter int unsigned WORD_W = 17   // log2 of the memory depth in words
) (
  input  logic     aclk,
  input  logic     aresetn,
  input  ax_chan_t aw,
  input  logic     awvalid,
  output logic     awready,
  input  w_chan_t  w,
  input  logic     wvalid,
  output logic     wready,
  output b_chan_t  b,
  output logic     bvalid,
  input  logic     bready,
  input  ax_chan_t ar,
  input  logic     arvalid,
  output logic     arready,
  output r_chan_t  r,
  output logic     rvalid,
  input  logic     rready
);

  logic  mem_wr_en, mem_rd_en;
  addr_t mem_wr_addr, mem_rd_addr;
  data_t mem_wr_data, mem_rd_data;
  strb_t mem_wr_strb;

  axi4_slave_write u_write (
    .aclk, .aresetn,
    .aw, .awvalid, .awready,
    .w, .wvalid, .wready,
    .b, .bvalid, .bready,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data, .mem_wr_strb
  );

  axi4_slave_read u_read (
    .aclk, .aresetn,
    .ar, .arvalid, .arready,
    .r, .rvalid, .rready,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data
  );

  axi4_slave_mem #(
    .DATA_W (DATA_W),
    .WORD_W (WORD_W)
  ) u_mem (
    .clk     (aclk),
    .wr_en   (mem_wr_en),
    .wr_addr (mem_wr_addr[WORD_W+1:2]),
    .wr_data (mem_wr_data),
    .wr_strb (mem_wr_strb),
    .rd_en   (mem_rd_en),
    .rd_addr (mem_rd_addr[WORD_W+1:2]),
    .rd_data (mem_rd_data)
  );

endmodule
