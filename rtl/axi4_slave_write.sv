// axi4_slave_write: write side of the AXI4 slave (write address, write data
// and write response channels).
//
// One write burst is handled at a time, in three phases:
//   ADDR - idle; when AWVALID is seen, AWREADY is raised in the next cycle,
//          so the slave accepts the address one cycle after the master
//          drives it. The handshake latches ID, address, length, size and
//          burst type.
//   DATA - WREADY is high. Each accepted beat is written to memory at the
//          current beat address with its byte strobes, and the address of
//          the next beat is computed by axi4_burst_addr. After len+1 beats
//          the burst is over.
//   RESP - BVALID is high with BID equal to the burst's AWID, until BREADY.
//          BRESP is OKAY, or SLVERR when WLAST did not mark exactly the
//          final beat (the beat count from AWLEN ends the burst either way).
// Every AXI output (AWREADY, WREADY, BVALID, BID, BRESP) comes from a
// register, so there is no combinational path from an AXI input to an AXI
// output. The memory write port (mem_wr_*) is driven combinationally from
// the accepted beat. Reset (active low ARESETn) is synchronous.
// The accept-one-cycle-later address timing, the BID = AWID rule and the
// OKAY response follow the described slave; the SLVERR on a WLAST mismatch
// and the one-burst-at-a-time structure are this design's own choices.
module axi4_slave_write
  import axi4_pkg::*;
(
  input  logic     aclk,
  input  logic     aresetn,
  // write address channel
  input  ax_chan_t aw,
  input  logic     awvalid,
  output logic     awready,
  // write data channel
  input  w_chan_t  w,
  input  logic     wvalid,
  output logic     wready,
  // write response channel
  output b_chan_t  b,
  output logic     bvalid,
  input  logic     bready,
  // memory write port (byte address)
  output logic     mem_wr_en,
  output addr_t    mem_wr_addr,
  output data_t    mem_wr_data,
  output strb_t    mem_wr_strb
);

  typedef enum logic [1:0] {S_ADDR, S_DATA, S_RESP} state_t;

  state_t state;
  addr_t  cur_addr;      // address of the next beat to be written
  len_t   len_q;
  len_t   beat_cnt;      // beats accepted so far in this burst
  size_t  size_q;
  burst_t burst_q;
  logic   last_err;      // WLAST seen on the wrong beat
  addr_t  next_addr;

  axi4_burst_addr u_next (
    .addr      (cur_addr),
    .size      (size_q),
    .len       (len_q),
    .burst     (burst_q),
    .next_addr (next_addr)
  );

  logic aw_hs, w_hs, final_beat;
  assign aw_hs      = awvalid && awready;
  assign w_hs       = wvalid && wready;
  assign final_beat = (beat_cnt == len_q);

  assign mem_wr_en   = w_hs;
  assign mem_wr_addr = cur_addr;
  assign mem_wr_data = w.data;
  assign mem_wr_strb = w.strb;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      state    <= S_ADDR;
      awready  <= 1'b0;
      wready   <= 1'b0;
      bvalid   <= 1'b0;
      b        <= '0;
      cur_addr <= '0;
      len_q    <= '0;
      beat_cnt <= '0;
      size_q   <= '0;
      burst_q  <= BURST_INCR;
      last_err <= 1'b0;
    end else begin
      unique case (state)
        S_ADDR: begin
          if (aw_hs) begin
            awready  <= 1'b0;
            cur_addr <= aw.addr;
            len_q    <= aw.len;
            size_q   <= aw.size;
            burst_q  <= aw.burst;
            b.id     <= aw.id;
            beat_cnt <= '0;
            last_err <= 1'b0;
            wready   <= 1'b1;
            state    <= S_DATA;
          end else begin
            // accept the address in the cycle after it is first driven
            awready <= awvalid;
          end
        end
        S_DATA: begin
          if (w_hs) begin
            cur_addr <= next_addr;
            beat_cnt <= beat_cnt + 1'b1;
            if (w.last != final_beat) last_err <= 1'b1;
            if (final_beat) begin
              wready <= 1'b0;
              bvalid <= 1'b1;
              b.resp <= (last_err || (w.last != final_beat)) ? RESP_SLVERR : RESP_OKAY;
              state  <= S_RESP;
            end
          end
        end
        S_RESP: begin
          if (bready) begin
            bvalid <= 1'b0;
            state  <= S_ADDR;
          end
        end
        default: state <= S_ADDR;
      endcase
    end
  end

  // Handshake rules: once VALID is high it stays high, with its payload
  // unchanged, until READY.
  a_b_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    bvalid && !bready |=> bvalid && $stable(b));
  a_aw_ready_only_idle: assert property (@(posedge aclk) disable iff (!aresetn)
    awready |-> state == S_ADDR);

endmodule
