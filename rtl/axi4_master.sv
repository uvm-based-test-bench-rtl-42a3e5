// axi4_master: AXI4 master that carries out write and read bursts on
// command.
//
// The user side has a write command port and a read command port (each an
// AW/AR payload with valid/ready), a write data port that feeds a FIFO, a
// write completion port and a read data port. The write and read sides are
// independent, so a write and a read burst can run at the same time; each
// side runs one burst at a time:
//   write: IDLE -> ADDR (AWVALID until AWREADY) -> DATA (beats from the
//          write data FIFO, WLAST on beat len+1) -> RESP (BREADY until
//          BVALID) -> IDLE. The write data follows the address handshake.
//          The response is passed out on wr_done (one-cycle pulse).
//   read:  IDLE -> ADDR (ARVALID until ARREADY) -> DATA (each R beat is
//          passed to the user; RREADY follows rd_ready) -> IDLE after the
//          len+1-th beat.
// The master checks what the slave returns: BID must equal AWID, RID must
// equal ARID and RLAST must mark exactly the last beat. A miss sets the
// sticky resp_err output until reset.
// AWVALID, WVALID, WLAST, ARVALID and their payloads come from registers
// (WVALID and the W payload from the FIFO state), so no AXI input reaches an
// AXI output through logic. Reset is synchronous, active low.
// The command sequence (address, then data, then response) and the ID
// checks follow the described master-slave transactions; the user-side
// ports and the FIFO are this design's own choices.
module axi4_master
  import axi4_pkg::*;
#(
  parameter int unsigned WFIFO_DEPTH = 16   // write data FIFO entries
) (
  input  logic     aclk,
  input  logic     aresetn,
  // user side: write
  input  ax_chan_t wr_cmd,
  input  logic     wr_cmd_valid,
  output logic     wr_cmd_ready,
  input  data_t    wd_data,
  input  strb_t    wd_strb,
  input  logic     wd_valid,
  output logic     wd_ready,
  output b_chan_t  wr_done,
  output logic     wr_done_valid,
  // user side: read
  input  ax_chan_t rd_cmd,
  input  logic     rd_cmd_valid,
  output logic     rd_cmd_ready,
  output r_chan_t  rd_beat,
  output logic     rd_beat_valid,
  input  logic     rd_ready,
  // checks on the slave's answers
  output logic     resp_err,
  // AXI4 master interface
  output ax_chan_t aw,
  output logic     awvalid,
  input  logic     awready,
  output w_chan_t  w,
  output logic     wvalid,
  input  logic     wready,
  input  b_chan_t  b,
  input  logic     bvalid,
  output logic     bready,
  output ax_chan_t ar,
  output logic     arvalid,
  input  logic     arready,
  input  r_chan_t  r,
  input  logic     rvalid,
  output logic     rready
);

  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_t;
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_t;

  wstate_t wstate;
  rstate_t rstate;
  len_t    wbeat, rbeat;
  logic    werr, rerr;

  // ---------------- write data FIFO ----------------
  logic                      fifo_valid, fifo_pop;
  logic [DATA_W+STRB_W-1:0]  fifo_out;

  axi4_fifo #(
    .WIDTH (DATA_W + STRB_W),
    .DEPTH (WFIFO_DEPTH)
  ) u_wfifo (
    .clk       (aclk),
    .rst_n     (aresetn),
    .in_data   ({wd_data, wd_strb}),
    .in_valid  (wd_valid),
    .in_ready  (wd_ready),
    .out_data  (fifo_out),
    .out_valid (fifo_valid),
    .out_ready (fifo_pop)
  );

  assign wvalid   = (wstate == W_DATA) && fifo_valid;
  assign w.data   = fifo_out[DATA_W+STRB_W-1:STRB_W];
  assign w.strb   = fifo_out[STRB_W-1:0];
  assign w.last   = (wbeat == aw.len);
  assign fifo_pop = wvalid && wready;

  assign wr_cmd_ready = (wstate == W_IDLE);
  assign bready       = (wstate == W_RESP);

  // ---------------- write side ----------------
  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      wstate        <= W_IDLE;
      aw            <= '0;
      awvalid       <= 1'b0;
      wbeat         <= '0;
      wr_done       <= '0;
      wr_done_valid <= 1'b0;
      werr          <= 1'b0;
    end else begin
      wr_done_valid <= 1'b0;
      unique case (wstate)
        W_IDLE: if (wr_cmd_valid) begin
          aw      <= wr_cmd;
          awvalid <= 1'b1;
          wbeat   <= '0;
          wstate  <= W_ADDR;
        end
        W_ADDR: if (awready) begin
          awvalid <= 1'b0;
          wstate  <= W_DATA;
        end
        W_DATA: if (wvalid && wready) begin
          wbeat <= wbeat + 1'b1;
          if (w.last) wstate <= W_RESP;
        end
        W_RESP: if (bvalid) begin
          wr_done       <= b;
          wr_done_valid <= 1'b1;
          if (b.id != aw.id) werr <= 1'b1;
          wstate        <= W_IDLE;
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ---------------- read side ----------------
  assign rd_cmd_ready  = (rstate == R_IDLE);
  assign rready        = (rstate == R_DATA) && rd_ready;
  assign rd_beat       = r;
  assign rd_beat_valid = (rstate == R_DATA) && rvalid;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      rstate  <= R_IDLE;
      ar      <= '0;
      arvalid <= 1'b0;
      rbeat   <= '0;
      rerr    <= 1'b0;
    end else begin
      unique case (rstate)
        R_IDLE: if (rd_cmd_valid) begin
          ar      <= rd_cmd;
          arvalid <= 1'b1;
          rbeat   <= '0;
          rstate  <= R_ADDR;
        end
        R_ADDR: if (arready) begin
          arvalid <= 1'b0;
          rstate  <= R_DATA;
        end
        R_DATA: if (rvalid && rready) begin
          rbeat <= rbeat + 1'b1;
          if (r.id != ar.id || r.last != (rbeat == ar.len)) rerr <= 1'b1;
          if (rbeat == ar.len) rstate <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  assign resp_err = werr || rerr;

  // Handshake rules on the master's outputs: VALID, once high, stays high
  // with its payload unchanged until READY.
  a_aw_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    awvalid && !awready |=> awvalid && $stable(aw));
  a_w_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    wvalid && !wready |=> wvalid && $stable(w));
  a_ar_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    arvalid && !arready |=> arvalid && $stable(ar));

endmodule
