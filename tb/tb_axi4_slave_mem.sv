// tb_axi4_slave_mem: self-checking test of the slave memory.
//
// Fills a small instance (64 words) through the write port with all
// strobes set, then runs random cycles that write random bytes with random
// strobes and read random words at the same time. A byte-level model in
// the testbench gives the expected word; the read data is checked one cycle
// after the read (one-cycle latency), a same-cycle write to the read word
// must not show yet, and the read data must hold while rd_en is low.
module tb_axi4_slave_mem;
  localparam int WORD_W = 6;
  localparam int DEPTH  = 2 ** WORD_W;

  logic              clk = 0;
  logic              wr_en, rd_en;
  logic [WORD_W-1:0] wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data;
  logic [3:0]        wr_strb;
  logic [31:0]       model [DEPTH];
  int checks = 0, failures = 0;

  axi4_slave_mem #(.DATA_W(32), .WORD_W(WORD_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_q;
    logic        pending;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0; wr_strb = 0;
    // initialise every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = WORD_W'(i); wr_data = $urandom(); wr_strb = 4'hF;
      model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    pending = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // check the read issued in the previous cycle
      if (pending) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("FAIL read: got %h exp %h", rd_data, expect_q);
        end
      end
      wr_en   = ($urandom_range(0, 1) == 1);
      wr_addr = WORD_W'($urandom());
      wr_data = $urandom();
      wr_strb = 4'($urandom());
      rd_en   = ($urandom_range(0, 2) != 0);
      rd_addr = ($urandom_range(0, 3) == 0) ? wr_addr : WORD_W'($urandom());
      // expected: the word before this cycle's write (read-old-data)
      if (rd_en) begin
        expect_q = model[rd_addr];
        pending  = 1;
      end
      if (wr_en)
        for (int b = 0; b < 4; b++)
          if (wr_strb[b]) model[wr_addr][8*b +: 8] = wr_data[8*b +: 8];
    end
    @(negedge clk);
    if (pending) begin
      checks++;
      if (rd_data !== expect_q) begin failures++; $display("FAIL last read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
