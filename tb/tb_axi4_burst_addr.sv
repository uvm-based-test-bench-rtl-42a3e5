// tb_axi4_burst_addr: self-checking test of the burst next-address unit.
//
// Drives random addresses, sizes and lengths for each burst type and
// compares the result with a reference written with integer division:
// FIXED keeps the address, INCR goes to the next multiple of the beat size,
// WRAP does the same but falls back to the start of the aligned block of
// (beats * bytes) bytes at its upper end. Also walks the reference case of
// a 4-beat, 4-byte INCR burst from 0x00001000 (0x1004, 0x1008, 0x100C).
module tb_axi4_burst_addr;
  import axi4_pkg::*;

  addr_t  addr, next_addr;
  size_t  size;
  len_t   len;
  burst_t burst;
  int checks = 0, failures = 0;

  axi4_burst_addr dut (.addr, .size, .len, .burst, .next_addr);

  function automatic longint unsigned ref_next(longint unsigned a, int sz, int ln, burst_t bt);
    longint unsigned bytes, total, lower, nxt;
    bytes = 64'd1 << sz;
    nxt   = (a / bytes) * bytes + bytes;
    if (bt == BURST_FIXED) return a;
    if (bt == BURST_WRAP) begin
      total = bytes * (ln + 1);
      lower = (a / total) * total;
      if (nxt >= lower + total) nxt = lower;
    end
    return nxt & 64'hFFFF_FFFF;
  endfunction

  task automatic check(addr_t a, int sz, int ln, burst_t bt);
    longint unsigned exp;
    addr = a; size = size_t'(sz); len = len_t'(ln); burst = bt;
    #1;
    exp = ref_next(a, sz, ln, bt);
    checks++;
    if (next_addr != addr_t'(exp)) begin
      failures++;
      $display("FAIL addr=%h size=%0d len=%0d burst=%s got %h exp %h",
               a, sz, ln, bt.name(), next_addr, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t a;
    int    wl[4] = '{1, 3, 7, 15};
    // reference burst: 4 beats of 4 bytes from 0x00001000
    a = 32'h0000_1000;
    for (int i = 0; i < 3; i++) begin
      check(a, 2, 3, BURST_INCR);
      a = next_addr;
    end
    checks++;
    if (a != 32'h0000_100C) begin failures++; $display("FAIL INCR walk ended at %h", a); end
    // a wrapping walk returns to its start after len+1 beats
    a = 32'h0000_0038;
    for (int i = 0; i < 8; i++) begin
      check(a, 2, 7, BURST_WRAP);
      a = next_addr;
    end
    checks++;
    if (a != 32'h0000_0038) begin failures++; $display("FAIL WRAP walk ended at %h", a); end
    // random cases
    for (int i = 0; i < 3000; i++) begin
      int sz;
      sz = $urandom_range(0, 7);
      a  = $urandom();
      check(a, sz, $urandom_range(0, 255), BURST_FIXED);
      check(a, sz, $urandom_range(0, 255), BURST_INCR);
      // wrap bursts must start aligned to the beat size
      check(a & ~((32'd1 << sz) - 1), sz, wl[$urandom_range(0, 3)], BURST_WRAP);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
