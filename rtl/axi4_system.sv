// axi4_system: one AXI4 master connected point to point to one AXI4 memory
// slave over the five AXI4 channels (write address, write data, write
// response, read address, read data).
//
// The user drives write and read commands, write data and read-data
// readiness into the master (axi4_master); the master runs the bursts over
// AXI4 against the slave (axi4_slave), which stores the data in its memory
// and returns it on reads. Write completions (BID, BRESP) and read beats
// (RID, RDATA, RRESP, RLAST) come back out to the user, and resp_err reports
// a BID, RID or RLAST that does not match the command.
// The AXI4 channels between the two are brought out as observation ports
// so that a bus monitor can watch the traffic.
// Timing is that of the two blocks: the slave accepts each address one
// cycle after the master drives it, write and read data move one beat per
// cycle when both sides are ready.
module axi4_system
  import axi4_pkg::*;
#(
  parameter int unsigned WORD_W      = 17,  // slave memory: 2**WORD_W words
  parameter int unsigned WFIFO_DEPTH = 16   // master write data FIFO
) (
  input  logic     aclk,
  input  logic     aresetn,
  // write commands and data
  input  ax_chan_t wr_cmd,
  input  logic     wr_cmd_valid,
  output logic     wr_cmd_ready,
  input  data_t    wd_data,
  input  strb_t    wd_strb,
  input  logic     wd_valid,
  output logic     wd_ready,
  output b_chan_t  wr_done,
  output logic     wr_done_valid,
  // read commands and data
  input  ax_chan_t rd_cmd,
  input  logic     rd_cmd_valid,
  output logic     rd_cmd_ready,
  output r_chan_t  rd_beat,
  output logic     rd_beat_valid,
  input  logic     rd_ready,
  output logic     resp_err,
  // AXI4 bus, observation only
  output ax_chan_t mon_aw,
  output logic     mon_awvalid,
  output logic     mon_awready,
  output w_chan_t  mon_w,
  output logic     mon_wvalid,
  output logic     mon_wready,
  output b_chan_t  mon_b,
  output logic     mon_bvalid,
  output logic     mon_bready,
  output ax_chan_t mon_ar,
  output logic     mon_arvalid,
  output logic     mon_arready,
  output r_chan_t  mon_r,
  output logic     mon_rvalid,
  output logic     mon_rready
);

  ax_chan_t aw, ar;
  w_chan_t  w;
  b_chan_t  b;
  r_chan_t  r;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;

  axi4_master #(
    .WFIFO_DEPTH (WFIFO_DEPTH)
  ) u_master (
    .aclk, .aresetn,
    .wr_cmd, .wr_cmd_valid, .wr_cmd_ready,
    .wd_data, .wd_strb, .wd_valid, .wd_ready,
    .wr_done, .wr_done_valid,
    .rd_cmd, .rd_cmd_valid, .rd_cmd_ready,
    .rd_beat, .rd_beat_valid, .rd_ready,
    .resp_err,
    .aw, .awvalid, .awready,
    .w, .wvalid, .wready,
    .b, .bvalid, .bready,
    .ar, .arvalid, .arready,
    .r, .rvalid, .rready
  );

  axi4_slave #(
    .WORD_W (WORD_W)
  ) u_slave (
    .aclk, .aresetn,
    .aw, .awvalid, .awready,
    .w, .wvalid, .wready,
    .b, .bvalid, .bready,
    .ar, .arvalid, .arready,
    .r, .rvalid, .rready
  );

  assign mon_aw = aw;  assign mon_awvalid = awvalid;  assign mon_awready = awready;
  assign mon_w  = w;   assign mon_wvalid  = wvalid;   assign mon_wready  = wready;
  assign mon_b  = b;   assign mon_bvalid  = bvalid;   assign mon_bready  = bready;
  assign mon_ar = ar;  assign mon_arvalid = arvalid;  assign mon_arready = arready;
  assign mon_r  = r;   assign mon_rvalid  = rvalid;   assign mon_rready  = rready;

endmodule
