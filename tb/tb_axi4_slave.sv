// tb_axi4_slave: self-checking test of the complete AXI4 slave.
//
// The testbench is the AXI4 master and keeps a byte-level model of the
// slave memory (addresses taken modulo the memory size).
//   1. Reference transfers: five 4-beat, 4-byte INCR writes with IDs 1..5 to
//      0x00001000 + k*0x10000 carrying 0x000k0001..0x000k0004, then the
//      five matching reads. Every read beat must return the written word,
//      BID/RID must equal AWID/ARID, BRESP/RRESP must be OKAY, RLAST must
//      mark beat 4, and with READY held high the read must deliver its four
//      beats in four consecutive cycles.
//   2. Random traffic: a writer thread and a reader thread run at the same
//      time with random bursts (FIXED, INCR, WRAP; 1, 2 or 4-byte beats;
//      byte strobes; random VALID/READY gaps). Writer and reader use
//      separate halves of the address space, the reader reading what an
//      earlier phase wrote, so the expected data is known. Every byte lane
//      a read beat carries is compared with the model.
module tb_axi4_slave;
  import axi4_pkg::*;
  import axi4_ref_pkg::*;

  localparam int WORD_W = 17;
  localparam int MEM_BYTES = 4 << WORD_W;

  logic     aclk = 0, aresetn = 0;
  ax_chan_t aw, ar;
  logic     awvalid, awready, wvalid, wready, bvalid, bready;
  logic     arvalid, arready, rvalid, rready;
  w_chan_t  w;
  b_chan_t  b;
  r_chan_t  r;

  int checks = 0, failures = 0;
  logic [7:0] model [int];

  axi4_slave dut (.*);

  always #5 aclk = ~aclk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (400000) @(posedge aclk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mkey(addr_t a);
    return int'(a % MEM_BYTES);
  endfunction

  // one write burst; data[i] is beat i's word, the strobes come from the
  // beat address, optionally thinned at random
  task automatic axi_write(id_t id, addr_t addr, int len, int sz, burst_t bt,
                           data_t data[$], bit gaps);
    @(negedge aclk);
    aw = '0;
    aw.id = id; aw.addr = addr; aw.len = len_t'(len); aw.size = size_t'(sz); aw.burst = bt;
    awvalid = 1;
    @(posedge aclk);
    while (!awready) @(posedge aclk);
    for (int beat = 0; beat <= len; beat++) begin
      addr_t ba;
      @(negedge aclk);
      awvalid = 0;
      if (gaps) begin
        wvalid = 0;
        while ($urandom_range(0, 3) == 0) @(negedge aclk);
      end
      ba     = beat_addr(addr, sz, len, bt, beat);
      w.data = data[beat];
      w.strb = lane_strb(ba, sz);
      if (gaps) w.strb = w.strb & strb_t'($urandom());
      w.last = (beat == len);
      wvalid = 1;
      for (int i = 0; i < 4; i++)
        if (w.strb[i]) model[mkey({ba[31:2], 2'(i)})] = w.data[8*i +: 8];
      @(posedge aclk);
      while (!wready) @(posedge aclk);
    end
    @(negedge aclk);
    wvalid = 0;
    bready = gaps ? ($urandom_range(0, 1) == 1) : 1'b1;
    @(posedge aclk);
    while (!(bvalid && bready)) begin
      @(negedge aclk);
      if (gaps) bready = ($urandom_range(0, 1) == 1);
      @(posedge aclk);
    end
    checks++;
    if (b.id != id || b.resp != RESP_OKAY)
      fail($sformatf("B: id %0d resp %0d, exp id %0d OKAY", b.id, b.resp, id));
    @(negedge aclk);
    bready = 0;
  endtask

  // one read burst, checked against the model; returns the cycles from the
  // first beat to the last
  task automatic axi_read(id_t id, addr_t addr, int len, int sz, burst_t bt, bit gaps,
                          output int span);
    int beat, cyc, first;
    @(negedge aclk);
    ar = '0;
    ar.id = id; ar.addr = addr; ar.len = len_t'(len); ar.size = size_t'(sz); ar.burst = bt;
    arvalid = 1;
    @(posedge aclk);
    while (!arready) @(posedge aclk);
    beat = 0; cyc = 0; first = 0;
    while (beat <= len) begin
      @(negedge aclk);
      arvalid = 0;
      rready  = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      cyc++;
      @(posedge aclk);
      if (rvalid && rready) begin
        addr_t ba;
        strb_t lanes;
        ba    = beat_addr(addr, sz, len, bt, beat);
        lanes = lane_strb(ba, sz);
        checks++;
        if (r.id != id || r.resp != RESP_OKAY || r.last != (beat == len))
          fail($sformatf("R beat %0d: id %0d resp %0d last %0d", beat, r.id, r.resp, r.last));
        for (int i = 0; i < 4; i++) begin
          int k;
          k = mkey({ba[31:2], 2'(i)});
          if (lanes[i] && model.exists(k) && r.data[8*i +: 8] != model[k])
            fail($sformatf("R beat %0d addr %h lane %0d: %h exp %h",
                           beat, ba, i, r.data[8*i +: 8], model[k]));
        end
        if (beat == 0) first = cyc;
        beat++;
      end
    end
    span = cyc - first + 1;
    @(negedge aclk);
    rready = 0;
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
    // keep the burst inside a 4 KiB page of the given half of the memory
    a = region + (addr_t'($urandom_range(0, 63)) << 12) + addr_t'($urandom_range(0, 1023));
    if (bt == BURST_WRAP) a = a & ~((32'd1 << sz) - 1);
  endtask

  initial begin
    int span;
    data_t d[$];
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    aw = '0; ar = '0; w = '0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1;

    // 1. reference transfers
    for (int k = 0; k < 5; k++) begin
      d = {};
      for (int i = 1; i <= 4; i++) d.push_back(32'(k) * 32'h1_0000 + 32'(i));
      axi_write(id_t'(k + 1), 32'h0000_1000 + 32'(k) * 32'h1_0000, 3, 2, BURST_INCR, d, 0);
    end
    for (int k = 0; k < 5; k++) begin
      axi_read(id_t'(k + 1), 32'h0000_1000 + 32'(k) * 32'h1_0000, 3, 2, BURST_INCR, 0, span);
      checks++;
      if (span != 4) fail($sformatf("4-beat read took %0d cycles", span));
    end

    // 2. random concurrent traffic: fill the upper half, then write the
    //    upper half while reading the lower half and the other way round
    for (int phase = 0; phase < 3; phase++) begin
      addr_t wreg, rreg;
      wreg = (phase % 2 == 0) ? 32'h0004_0000 : 32'h0000_0000;
      rreg = (phase % 2 == 0) ? 32'h0000_0000 : 32'h0004_0000;
      fork
        for (int i = 0; i < 150; i++) begin
          addr_t a; int ln, sz; burst_t bt;
          random_burst(a, ln, sz, bt, wreg);
          d = {};
          for (int j = 0; j <= ln; j++) d.push_back($urandom());
          axi_write(id_t'($urandom()), a, ln, sz, bt, d, 1);
        end
        if (phase > 0)
          for (int i = 0; i < 150; i++) begin
            addr_t a; int ln, sz; burst_t bt; int sp;
            random_burst(a, ln, sz, bt, rreg);
            axi_read(id_t'($urandom()), a, ln, sz, bt, 1, sp);
          end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
