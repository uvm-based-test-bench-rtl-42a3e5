// axi4_slave_read: read side of the AXI4 slave (read address and read data
// channels).
//
// One read burst is handled at a time:
//   ADDR - idle; when ARVALID is seen, ARREADY is raised in the next cycle,
//          so the slave accepts the address one cycle after the master
//          drives it. The handshake latches ID, address, length, size and
//          burst type.
//   DATA - beats are fetched from the synchronous memory one per cycle
//          whenever the read data register is empty or being emptied
//          (RVALID low, or RVALID and RREADY). The memory's output register
//          is the RDATA register, so a fetch in one cycle shows as RVALID
//          with the data in the next. The address of each following beat
//          comes from axi4_burst_addr. RLAST marks beat len+1, RID is the
//          burst's ARID and RRESP is OKAY. After the handshake of the beat
//          with RLAST the controller returns to ADDR.
// RVALID stays low until data is available, as the read burst requires;
// with RREADY held high a burst of N beats takes N cycles after the first
// beat appears, which arrives two cycles after the address handshake.
// Every AXI output comes from a register. Reset is synchronous, active low.
// The address timing and the RID/RLAST behaviour follow the described
// slave; the fetch pipeline is this design's own.
module axi4_slave_read
  import axi4_pkg::*;
(
  input  logic     aclk,
  input  logic     aresetn,
  // read address channel
  input  ax_chan_t ar,
  input  logic     arvalid,
  output logic     arready,
  // read data channel (r.data comes from mem_rd_data)
  output r_chan_t  r,
  output logic     rvalid,
  input  logic     rready,
  // memory read port (byte address, one-cycle latency)
  output logic     mem_rd_en,
  output addr_t    mem_rd_addr,
  input  data_t    mem_rd_data
);

  typedef enum logic {S_ADDR, S_DATA} state_t;

  state_t state;
  addr_t  cur_addr;     // address of the next beat to fetch
  len_t   len_q;
  len_t   fetch_cnt;    // beats fetched so far
  logic   fetch_done;   // every beat of the burst has been fetched
  size_t  size_q;
  burst_t burst_q;
  id_t    id_q;
  logic   last_q;
  addr_t  next_addr;

  axi4_burst_addr u_next (
    .addr      (cur_addr),
    .size      (size_q),
    .len       (len_q),
    .burst     (burst_q),
    .next_addr (next_addr)
  );

  logic ar_hs, r_hs, fetch;
  assign ar_hs = arvalid && arready;
  assign r_hs  = rvalid && rready;
  assign fetch = (state == S_DATA) && !fetch_done && (!rvalid || rready);

  assign mem_rd_en   = fetch;
  assign mem_rd_addr = cur_addr;

  assign r.id   = id_q;
  assign r.data = mem_rd_data;
  assign r.resp = RESP_OKAY;
  assign r.last = last_q;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      state      <= S_ADDR;
      arready    <= 1'b0;
      rvalid     <= 1'b0;
      cur_addr   <= '0;
      len_q      <= '0;
      fetch_cnt  <= '0;
      fetch_done <= 1'b0;
      size_q     <= '0;
      burst_q    <= BURST_INCR;
      id_q       <= '0;
      last_q     <= 1'b0;
    end else begin
      unique case (state)
        S_ADDR: begin
          if (ar_hs) begin
            arready    <= 1'b0;
            cur_addr   <= ar.addr;
            len_q      <= ar.len;
            size_q     <= ar.size;
            burst_q    <= ar.burst;
            id_q       <= ar.id;
            fetch_cnt  <= '0;
            fetch_done <= 1'b0;
            state      <= S_DATA;
          end else begin
            // accept the address in the cycle after it is first driven
            arready <= arvalid;
          end
        end
        S_DATA: begin
          if (fetch) begin
            cur_addr  <= next_addr;
            fetch_cnt <= fetch_cnt + 1'b1;
            rvalid    <= 1'b1;
            last_q    <= (fetch_cnt == len_q);
            if (fetch_cnt == len_q) fetch_done <= 1'b1;
          end else if (r_hs) begin
            rvalid <= 1'b0;
            if (last_q) begin
              last_q <= 1'b0;
              state  <= S_ADDR;
            end
          end
        end
        default: state <= S_ADDR;
      endcase
    end
  end

  a_r_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    rvalid && !rready |=> rvalid && $stable(r));

endmodule
