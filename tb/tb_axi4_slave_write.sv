// tb_axi4_slave_write: self-checking test of the slave's write side.
//
// Acts as the AXI4 master on the AW, W and B channels and watches the
// memory write port. It first sends the five reference bursts (4 beats of
// 4 bytes, INCR, IDs 1..5, start addresses 0x00001000 + k*0x10000, data
// 0x000k0001..0x000k0004), then random FIXED/INCR/WRAP bursts with random
// gaps in WVALID and BREADY. Checked:
//   - AWREADY rises exactly one cycle after AWVALID is first driven;
//   - each beat reaches the memory port at the reference beat address with
//     its data and strobes;
//   - BVALID comes the cycle after the last beat, with BID = AWID and
//     BRESP = OKAY, and stays up with BID stable until BREADY;
//   - a burst whose WLAST is on the wrong beat is answered with SLVERR.
module tb_axi4_slave_write;
  import axi4_pkg::*;
  import axi4_ref_pkg::*;

  logic     aclk = 0, aresetn = 0;
  ax_chan_t aw;
  logic     awvalid, awready;
  w_chan_t  w;
  logic     wvalid, wready;
  b_chan_t  b;
  logic     bvalid, bready;
  logic     mem_wr_en;
  addr_t    mem_wr_addr;
  data_t    mem_wr_data;
  strb_t    mem_wr_strb;

  int checks = 0, failures = 0;

  axi4_slave_write dut (.*);

  always #5 aclk = ~aclk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (200000) @(posedge aclk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory-port monitor: compares each written beat with the expected queue
  addr_t exp_addr[$];
  data_t exp_data[$];
  strb_t exp_strb[$];
  always @(posedge aclk) begin
    if (aresetn && mem_wr_en) begin
      checks++;
      if (exp_addr.size() == 0) fail("unexpected memory write");
      else begin
        addr_t a; data_t d; strb_t s;
        a = exp_addr.pop_front(); d = exp_data.pop_front(); s = exp_strb.pop_front();
        if (mem_wr_addr != a || mem_wr_data != d || mem_wr_strb != s)
          fail($sformatf("beat: addr %h data %h strb %h, exp %h %h %h",
                         mem_wr_addr, mem_wr_data, mem_wr_strb, a, d, s));
      end
    end
  end

  task automatic write_burst(id_t id, addr_t addr, int len, int sz, burst_t bt,
                             bit gaps, int bad_last_beat, resp_t exp_resp);
    int   wait_cycles;
    int   beat;
    // address phase
    @(negedge aclk);
    aw = '0;
    aw.id = id; aw.addr = addr; aw.len = len_t'(len); aw.size = size_t'(sz); aw.burst = bt;
    awvalid = 1;
    wait_cycles = 0;
    @(posedge aclk);
    while (!awready) begin wait_cycles++; @(posedge aclk); end
    checks++;
    if (wait_cycles != 1) fail($sformatf("AWREADY after %0d cycles, expected 1", wait_cycles));
    // data phase
    for (beat = 0; beat <= len; beat++) begin
      @(negedge aclk);
      awvalid = 0;
      if (gaps) begin
        wvalid = 0;
        while ($urandom_range(0, 2) == 0) @(negedge aclk);
      end
      w.data = $urandom();
      w.strb = lane_strb(beat_addr(addr, sz, len, bt, beat), sz);
      w.last = (beat == bad_last_beat) ? (beat != len) : (beat == len);
      wvalid = 1;
      exp_addr.push_back(beat_addr(addr, sz, len, bt, beat));
      exp_data.push_back(w.data);
      exp_strb.push_back(w.strb);
      @(posedge aclk);
      while (!wready) @(posedge aclk);
    end
    // response phase: BVALID must rise in the cycle after the last beat
    @(negedge aclk);
    wvalid = 0;
    checks++;
    if (!bvalid) fail("BVALID not raised after the last beat");
    if (gaps) begin
      bready = 0;
      repeat ($urandom_range(0, 3)) begin
        @(negedge aclk);
        checks++;
        if (!bvalid || b.id != id) fail("BVALID/BID not held while BREADY low");
      end
    end
    bready = 1;
    @(posedge aclk);
    while (!bvalid) @(posedge aclk);
    checks++;
    if (b.id != id || b.resp != exp_resp)
      fail($sformatf("B: id %0d resp %0d, exp %0d %0d", b.id, b.resp, id, exp_resp));
    @(negedge aclk);
    bready = 0;
    checks++;
    if (bvalid) fail("BVALID still high after the handshake");
  endtask

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; aw = '0; w = '0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1;
    // reference bursts
    for (int k = 0; k < 5; k++) begin
      fork
        write_burst(id_t'(k + 1), 32'h0000_1000 + 32'(k) * 32'h1_0000, 3, 2, BURST_INCR, 0, -1, RESP_OKAY);
      join
    end
    // random bursts
    for (int i = 0; i < 300; i++) begin
      int     sz, ln;
      burst_t bt;
      addr_t  a;
      int     wl[4] = '{1, 3, 7, 15};
      int     pick;
      sz   = $urandom_range(0, 2);
      pick = $urandom_range(0, 2);
      case (pick)
        0: begin bt = BURST_FIXED; ln = $urandom_range(0, 15); end
        1: begin bt = BURST_INCR;  ln = ($urandom_range(0, 7) == 0) ? $urandom_range(0, 255) : $urandom_range(0, 15); end
        default: begin bt = BURST_WRAP; ln = wl[$urandom_range(0, 3)]; end
      endcase
      a = $urandom();
      if (bt == BURST_WRAP) a = a & ~((32'd1 << sz) - 1);
      write_burst(id_t'($urandom()), a, ln, sz, bt, 1, -1, RESP_OKAY);
    end
    // misplaced WLAST
    write_burst(4'h9, 32'h100, 3, 2, BURST_INCR, 0, 1, RESP_SLVERR);
    write_burst(4'hA, 32'h200, 3, 2, BURST_INCR, 0, 3, RESP_SLVERR);
    write_burst(4'hB, 32'h300, 3, 2, BURST_INCR, 0, -1, RESP_OKAY);
    repeat (3) @(posedge aclk);
    checks++;
    if (exp_addr.size() != 0) fail("beats missing at the memory port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
