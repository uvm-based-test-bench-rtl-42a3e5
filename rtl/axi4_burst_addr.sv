// axi4_burst_addr: next-address calculator for AXI4 bursts.
//
// Given the address of the current beat and the burst's size, length and
// type, it gives the address of the following beat:
//   FIXED - the address does not change (repeated access to one location,
//           such as a FIFO).
//   INCR  - the address, aligned down to the transfer size, plus the number
//           of bytes per beat (2**size). An unaligned start address is thus
//           aligned from the second beat on.
//   WRAP  - as INCR, but the address wraps to the lower boundary of the
//           aligned block of (beats * bytes per beat) bytes when it reaches
//           the block's upper end. The block size is a power of two for the
//           legal wrap lengths 2, 4, 8 and 16, so the wrap is a mask.
// The three burst types and the size-dependent increment follow the AXI4
// burst rules; the implementation (a purely combinational unit) is this
// design's own. Burst type 2'b11 is reserved and treated as INCR.
// Bursts are not checked against the 4 KB boundary rule; that is the
// master's duty.
module axi4_burst_addr
  import axi4_pkg::*;
(
  input  addr_t  addr,       // address of the current beat
  input  size_t  size,       // log2(bytes per beat)
  input  len_t   len,        // beats - 1
  input  burst_t burst,      // burst type
  output addr_t  next_addr   // address of the next beat
);

  addr_t bytes;       // bytes per beat
  addr_t aligned;     // addr aligned down to the beat size
  addr_t incr;        // aligned + bytes
  addr_t wrap_mask;   // (beats * bytes) - 1

  always_comb begin
    bytes     = ADDR_W'(1) << size;
    aligned   = addr & ~(bytes - ADDR_W'(1));
    incr      = aligned + bytes;
    // beats * bytes = (len + 1) << size; for legal wrap lengths this is a
    // power of two, so subtracting one gives the offset mask of the block.
    wrap_mask = ((ADDR_W'(len) + ADDR_W'(1)) << size) - ADDR_W'(1);
    unique case (burst)
      BURST_FIXED: next_addr = addr;
      BURST_WRAP:  next_addr = (addr & ~wrap_mask) | (incr & wrap_mask);
      default:     next_addr = incr;
    endcase
  end

endmodule
