// tb_axi4_slave_read: self-checking test of the slave's read side.
//
// Acts as the AXI4 master on the AR and R channels and as a one-cycle
// synchronous memory whose word at byte address a holds a fixed hash of a.
// It sends the five reference bursts (4 beats of 4 bytes, INCR, IDs 1..5,
// start addresses 0x00001000 + k*0x10000) with RREADY held high, then random
// FIXED/INCR/WRAP bursts with random RREADY gaps. Checked:
//   - ARREADY rises exactly one cycle after ARVALID is first driven;
//   - each beat carries the word of the reference beat address, RID = ARID,
//     RRESP = OKAY, and RLAST on beat len+1 only;
//   - R beats hold while RREADY is low;
//   - with RREADY high the first beat appears two cycles after the address
//     handshake and the beats follow one per cycle.
module tb_axi4_slave_read;
  import axi4_pkg::*;
  import axi4_ref_pkg::*;

  logic     aclk = 0, aresetn = 0;
  ax_chan_t ar;
  logic     arvalid, arready;
  r_chan_t  r;
  logic     rvalid, rready;
  logic     mem_rd_en;
  addr_t    mem_rd_addr;
  data_t    mem_rd_data;

  int checks = 0, failures = 0;

  axi4_slave_read dut (.*);

  always #5 aclk = ~aclk;

  function automatic data_t word_at(addr_t a);
    addr_t wa;
    wa = {a[31:2], 2'b00};
    return (wa * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // behavioural synchronous memory
  always @(posedge aclk) if (mem_rd_en) mem_rd_data <= word_at(mem_rd_addr);

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

  task automatic read_burst(id_t id, addr_t addr, int len, int sz, burst_t bt, bit gaps);
    int wait_cycles, cyc;
    int first_cyc, last_cyc;
    int beat;
    @(negedge aclk);
    ar = '0;
    ar.id = id; ar.addr = addr; ar.len = len_t'(len); ar.size = size_t'(sz); ar.burst = bt;
    arvalid = 1;
    rready  = !gaps;
    wait_cycles = 0;
    @(posedge aclk);
    while (!arready) begin wait_cycles++; @(posedge aclk); end
    checks++;
    if (wait_cycles != 1) fail($sformatf("ARREADY after %0d cycles, expected 1", wait_cycles));
    cyc = 0;
    first_cyc = -1;
    beat = 0;
    while (beat <= len) begin
      @(negedge aclk);
      arvalid = 0;
      cyc++;
      if (gaps) begin
        if (rvalid && !rready) begin
          // a stalled beat must still be there
          checks++;
        end
        rready = ($urandom_range(0, 2) != 0);
      end
      @(posedge aclk);
      if (rvalid && rready) begin
        addr_t ea;
        ea = beat_addr(addr, sz, len, bt, beat);
        checks++;
        if (r.data != word_at(ea) || r.id != id || r.resp != RESP_OKAY || r.last != (beat == len))
          fail($sformatf("beat %0d: data %h id %0d resp %0d last %0d, exp %h %0d 0 %0d",
                         beat, r.data, r.id, r.resp, r.last, word_at(ea), id, beat == len));
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        beat++;
      end
    end
    if (!gaps) begin
      checks++;
      if (first_cyc != 2 || last_cyc != first_cyc + len)
        fail($sformatf("read timing: first beat %0d cycles after AR, %0d cycles for %0d beats",
                       first_cyc, last_cyc - first_cyc + 1, len + 1));
    end
    @(negedge aclk);
    rready = 0;
    checks++;
    if (rvalid) fail("RVALID high after the last beat");
  endtask

  // R payload must not change while stalled
  r_chan_t r_prev;
  logic    stalled;
  always @(posedge aclk) begin
    if (aresetn && stalled) begin
      checks++;
      if (!rvalid || r != r_prev) fail("R beat changed while RREADY low");
    end
    stalled <= rvalid && !rready;
    r_prev  <= r;
  end

  initial begin
    arvalid = 0; rready = 0; ar = '0; stalled = 0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1;
    for (int k = 0; k < 5; k++)
      read_burst(id_t'(k + 1), 32'h0000_1000 + 32'(k) * 32'h1_0000, 3, 2, BURST_INCR, 0);
    for (int i = 0; i < 300; i++) begin
      int     sz, ln, pick;
      burst_t bt;
      addr_t  a;
      int     wl[4] = '{1, 3, 7, 15};
      sz   = $urandom_range(0, 2);
      pick = $urandom_range(0, 2);
      case (pick)
        0: begin bt = BURST_FIXED; ln = $urandom_range(0, 15); end
        1: begin bt = BURST_INCR;  ln = ($urandom_range(0, 7) == 0) ? $urandom_range(0, 255) : $urandom_range(0, 15); end
        default: begin bt = BURST_WRAP; ln = wl[$urandom_range(0, 3)]; end
      endcase
      a = $urandom();
      if (bt == BURST_WRAP) a = a & ~((32'd1 << sz) - 1);
      read_burst(id_t'($urandom()), a, ln, sz, bt, ($urandom_range(0, 3) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
