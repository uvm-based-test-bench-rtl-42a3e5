// tb_axi4_system: end-to-end test of the master and slave together, at the
// default sizes (512 KiB slave memory, 16-entry write data FIFO).
//
// The testbench is the user of the master and keeps a byte-level model of
// the slave memory.
//   1. Reference transfers: five 4-beat, 4-byte INCR writes, IDs 1..5, to
//      0x00001000, 0x00011000, 0x00021000, 0x00031000 and 0x00041000 with
//      data 0x000k0001..0x000k0004, then the five reads of the same bursts.
//      BID must equal AWID with BRESP OKAY; every read beat must return the
//      written word with RID = ARID and RLAST on the fourth beat. Each
//      address must be accepted one cycle after it is driven, and the bus
//      trace of the first write and read is compared cycle by cycle with the
//      expected timing.
//   2. Random traffic with writes and reads in flight at the same time:
//      FIXED, INCR and WRAP bursts, 1, 2 and 4-byte beats, unaligned starts,
//      partial strobes, gaps in the write data and in rd_ready.
// A bus monitor counts how often each mechanism happened (address accepted
// one cycle late, each burst type, a WRAP burst wrapping round, narrow
// beats, partial strobes, unaligned starts, write-data gaps, read
// back-pressure, a write and a read burst in flight together). A mechanism
// that never happened counts as a failure.
module tb_axi4_system;
  import axi4_pkg::*;
  import axi4_ref_pkg::*;

  localparam int MEM_BYTES = 4 << 17;   // default slave memory size

  logic     aclk = 0, aresetn = 0;
  ax_chan_t wr_cmd, rd_cmd;
  logic     wr_cmd_valid, wr_cmd_ready, rd_cmd_valid, rd_cmd_ready;
  data_t    wd_data;
  strb_t    wd_strb;
  logic     wd_valid, wd_ready;
  b_chan_t  wr_done;
  logic     wr_done_valid;
  r_chan_t  rd_beat;
  logic     rd_beat_valid, rd_ready, resp_err;
  ax_chan_t mon_aw, mon_ar;
  w_chan_t  mon_w;
  b_chan_t  mon_b;
  r_chan_t  mon_r;
  logic mon_awvalid, mon_awready, mon_wvalid, mon_wready, mon_bvalid, mon_bready;
  logic mon_arvalid, mon_arready, mon_rvalid, mon_rready;

  int checks = 0, failures = 0;
  logic [7:0] model [int];
  longint cycle = 0;
  longint cmd_cycle;   // cycle in which the last command was presented

  axi4_system dut (.*);

  always #5 aclk = ~aclk;
  always @(posedge aclk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (500000) @(posedge aclk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mkey(addr_t a);
    return int'(a % MEM_BYTES);
  endfunction

  // ---------------- mechanism counters (bus monitor) ----------------
  typedef enum int {
    M_ADDR_LATE, M_FIXED, M_INCR, M_WRAP, M_WRAPPED, M_NARROW, M_PARTIAL,
    M_UNALIGNED, M_WGAP, M_RSTALL, M_CONCURRENT, M_COUNT
  } mech_t;
  int    mech [M_COUNT];
  int    aw_wait = 0, ar_wait = 0;
  addr_t last_w_addr, cur_w_addr;
  ax_chan_t w_burst;
  bit    w_active = 0, r_active = 0;

  always @(posedge aclk) if (aresetn) begin
    // address acceptance: READY comes exactly one cycle after VALID
    if (mon_awvalid) begin
      if (mon_awready) begin
        checks++;
        if (aw_wait != 1) fail($sformatf("AW accepted after %0d cycles", aw_wait));
        else mech[M_ADDR_LATE]++;
        aw_wait = 0;
        w_burst = mon_aw;
        w_active = 1;
        cur_w_addr = mon_aw.addr;
        case (mon_aw.burst)
          BURST_FIXED: mech[M_FIXED]++;
          BURST_INCR:  mech[M_INCR]++;
          BURST_WRAP:  mech[M_WRAP]++;
          default: ;
        endcase
        if (mon_aw.size < 2) mech[M_NARROW]++;
        if (mon_aw.addr[1:0] != 0) mech[M_UNALIGNED]++;
      end else aw_wait++;
    end
    if (mon_arvalid) begin
      if (mon_arready) begin
        checks++;
        if (ar_wait != 1) fail($sformatf("AR accepted after %0d cycles", ar_wait));
        else mech[M_ADDR_LATE]++;
        ar_wait = 0;
        r_active = 1;
        case (mon_ar.burst)
          BURST_FIXED: mech[M_FIXED]++;
          BURST_INCR:  mech[M_INCR]++;
          BURST_WRAP:  mech[M_WRAP]++;
          default: ;
        endcase
      end else ar_wait++;
    end
    if (w_active && !mon_wvalid && !mon_bvalid) mech[M_WGAP]++;
    if (mon_wvalid && mon_wready) begin
      if (mon_w.strb != lane_strb(cur_w_addr, int'(w_burst.size))) mech[M_PARTIAL]++;
      last_w_addr = cur_w_addr;
      cur_w_addr  = addr_t'(ref_next(cur_w_addr, int'(w_burst.size), int'(w_burst.len), w_burst.burst));
      if (w_burst.burst == BURST_WRAP && cur_w_addr < last_w_addr) mech[M_WRAPPED]++;
    end
    if (mon_bvalid && mon_bready) w_active = 0;
    if (mon_rvalid && !mon_rready) mech[M_RSTALL]++;
    if (w_active && r_active) mech[M_CONCURRENT]++;
    if (mon_rvalid && mon_rready && mon_r.last) r_active = 0;
  end

  // ---------------- user side ----------------
  semaphore wlock = new(1);

  task automatic do_write(id_t id, addr_t addr, int len, int sz, burst_t bt,
                          data_t data[$], bit gaps);
    ax_chan_t c;
    c = '0;
    c.id = id; c.addr = addr; c.len = len_t'(len); c.size = size_t'(sz); c.burst = bt;
    @(negedge aclk);
    wr_cmd = c; wr_cmd_valid = 1; cmd_cycle = cycle;
    @(posedge aclk);
    while (!wr_cmd_ready) @(posedge aclk);
    @(negedge aclk);
    wr_cmd_valid = 0;
    for (int beat = 0; beat <= len; beat++) begin
      addr_t ba;
      ba      = beat_addr(addr, sz, len, bt, beat);
      wd_data = data[beat];
      wd_strb = lane_strb(ba, sz);
      if (gaps && $urandom_range(0, 3) == 0) wd_strb = wd_strb & strb_t'($urandom());
      wd_valid = 1;
      for (int i = 0; i < 4; i++)
        if (wd_strb[i]) model[mkey({ba[31:2], 2'(i)})] = wd_data[8*i +: 8];
      @(posedge aclk);
      while (!wd_ready) @(posedge aclk);
      @(negedge aclk);
      wd_valid = 0;
      if (gaps && beat < len) while ($urandom_range(0, 2) == 0) @(negedge aclk);
    end
    @(posedge aclk);
    while (!wr_done_valid) @(posedge aclk);
    checks++;
    if (wr_done.id != id || wr_done.resp != RESP_OKAY)
      fail($sformatf("write done: BID %0d BRESP %0d, exp %0d OKAY", wr_done.id, wr_done.resp, id));
  endtask

  task automatic do_read(id_t id, addr_t addr, int len, int sz, burst_t bt, bit gaps,
                         output int span);
    ax_chan_t c;
    int beat, cyc, first;
    c = '0;
    c.id = id; c.addr = addr; c.len = len_t'(len); c.size = size_t'(sz); c.burst = bt;
    @(negedge aclk);
    rd_cmd = c; rd_cmd_valid = 1; rd_ready = !gaps; cmd_cycle = cycle;
    @(posedge aclk);
    while (!rd_cmd_ready) @(posedge aclk);
    @(negedge aclk);
    rd_cmd_valid = 0;
    beat = 0; cyc = 0; first = 0;
    while (beat <= len) begin
      if (gaps) rd_ready = ($urandom_range(0, 2) != 0);
      cyc++;
      @(posedge aclk);
      if (rd_beat_valid && rd_ready) begin
        addr_t ba;
        strb_t lanes;
        ba    = beat_addr(addr, sz, len, bt, beat);
        lanes = lane_strb(ba, sz);
        checks++;
        if (rd_beat.id != id || rd_beat.resp != RESP_OKAY || rd_beat.last != (beat == len))
          fail($sformatf("read beat %0d: RID %0d RRESP %0d RLAST %0d", beat, rd_beat.id,
                         rd_beat.resp, rd_beat.last));
        for (int i = 0; i < 4; i++) begin
          int k;
          k = mkey({ba[31:2], 2'(i)});
          if (lanes[i] && model.exists(k) && rd_beat.data[8*i +: 8] != model[k])
            fail($sformatf("read beat %0d addr %h lane %0d: %h exp %h",
                           beat, ba, i, rd_beat.data[8*i +: 8], model[k]));
        end
        if (beat == 0) first = cyc;
        beat++;
      end
      @(negedge aclk);
    end
    span = cyc - first + 1;
    rd_ready = 0;
  endtask

  task automatic random_burst(output addr_t a, output int ln, output int sz,
                              output burst_t bt, input addr_t region);
    int pick;
    int wl[4] = '{1, 3, 7, 15};
    sz   = $urandom_range(0, 2);
    pick = $urandom_range(0, 2);
    case (pick)
      0: begin bt = BURST_FIXED; ln = $urandom_range(0, 7); end
      1: begin bt = BURST_INCR;  ln = $urandom_range(0, 31); end
      default: begin bt = BURST_WRAP; ln = wl[$urandom_range(0, 3)]; end
    endcase
    a = region + (addr_t'($urandom_range(0, 63)) << 12) + addr_t'($urandom_range(0, 1023));
    if (bt == BURST_WRAP) a = a & ~((32'd1 << sz) - 1);
  endtask

  initial begin
    int span;
    data_t d[$];
    wr_cmd = '0; rd_cmd = '0; wr_cmd_valid = 0; rd_cmd_valid = 0;
    wd_valid = 0; wd_data = 0; wd_strb = 0; rd_ready = 0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1;

    // 1. reference transfers
    for (int k = 0; k < 5; k++) begin
      d = {};
      for (int i = 1; i <= 4; i++) d.push_back(32'(k) * 32'h1_0000 + 32'(i));
      do_write(id_t'(k + 1), 32'h0000_1000 + 32'(k) * 32'h1_0000, 3, 2, BURST_INCR, d, 0);
      if (k == 0) begin
        // command taken at the first edge, address accepted at the third,
        // four beats at the fourth to seventh, response at the eighth
        checks++;
        if (cycle - cmd_cycle != 8)
          fail($sformatf("reference write took %0d cycles, expected 8", cycle - cmd_cycle));
      end
    end
    for (int k = 0; k < 5; k++) begin
      do_read(id_t'(k + 1), 32'h0000_1000 + 32'(k) * 32'h1_0000, 3, 2, BURST_INCR, 0, span);
      checks++;
      if (span != 4) fail($sformatf("reference read delivered 4 beats in %0d cycles", span));
      if (k == 0) begin
        // command taken at the first edge, AR accepted at the third, first
        // beat at the fifth, then three more beats
        checks++;
        if (cycle - cmd_cycle != 8)
          fail($sformatf("reference read took %0d cycles, expected 8", cycle - cmd_cycle));
      end
    end
    checks++;
    if (resp_err) fail("master flagged a response mismatch");

    // 2. random concurrent traffic in two halves of the memory
    for (int phase = 0; phase < 3; phase++) begin
      addr_t wreg, rreg;
      wreg = (phase % 2 == 0) ? 32'h0004_0000 : 32'h0000_0000;
      rreg = (phase % 2 == 0) ? 32'h0000_0000 : 32'h0004_0000;
      fork
        for (int i = 0; i < 100; i++) begin
          addr_t a; int ln, sz; burst_t bt;
          random_burst(a, ln, sz, bt, wreg);
          d = {};
          for (int j = 0; j <= ln; j++) d.push_back($urandom());
          do_write(id_t'($urandom()), a, ln, sz, bt, d, 1);
        end
        if (phase > 0)
          for (int i = 0; i < 100; i++) begin
            addr_t a; int ln, sz; burst_t bt; int sp;
            random_burst(a, ln, sz, bt, rreg);
            do_read(id_t'($urandom()), a, ln, sz, bt, 1, sp);
          end
      join
    end
    checks++;
    if (resp_err) fail("master flagged a response mismatch");

    for (int m = 0; m < M_COUNT; m++) begin
      mech_t mm;
      mm = mech_t'(m);
      $display("mechanism %-14s happened %0d times", mm.name(), mech[m]);
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism %s never happened", mm.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
