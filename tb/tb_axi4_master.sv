// tb_axi4_master: self-checking test of the AXI4 master.
//
// The testbench is the user (commands, write data, read-data readiness) and
// the AXI4 slave (random AWREADY, WREADY, ARREADY, BVALID and RVALID
// timing). Checked:
//   - each command appears once on AW or AR with the same payload;
//   - the write beats appear on W in order, only after the AW handshake,
//     with WLAST on beat len+1 only;
//   - the B response is passed to wr_done with its ID and response;
//   - R beats are passed to the user unchanged, and RREADY follows rd_ready;
//   - a wrong BID, a wrong RID and a misplaced RLAST each set resp_err.
module tb_axi4_master;
  import axi4_pkg::*;

  logic     aclk = 0, aresetn = 0;
  ax_chan_t wr_cmd, rd_cmd, aw, ar;
  logic     wr_cmd_valid, wr_cmd_ready, rd_cmd_valid, rd_cmd_ready;
  data_t    wd_data;
  strb_t    wd_strb;
  logic     wd_valid, wd_ready;
  b_chan_t  wr_done, b;
  logic     wr_done_valid;
  r_chan_t  rd_beat, r;
  logic     rd_beat_valid, rd_ready, resp_err;
  logic     awvalid, awready, wvalid, wready, bvalid, bready;
  logic     arvalid, arready, rvalid, rready;
  w_chan_t  w;

  int checks = 0, failures = 0;

  axi4_master dut (.*);

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

  // ---------------- write side ----------------
  ax_chan_t exp_aw[$];
  data_t    exp_wd[$];
  strb_t    exp_ws[$];
  id_t      exp_bid[$];
  bit       corrupt_bid = 0;

  task automatic user_write(ax_chan_t c);
    @(negedge aclk);
    wr_cmd = c; wr_cmd_valid = 1;
    exp_aw.push_back(c);
    @(posedge aclk);
    while (!wr_cmd_ready) @(posedge aclk);
    @(negedge aclk);
    wr_cmd_valid = 0;
    for (int i = 0; i <= int'(c.len); i++) begin
      wd_data = $urandom(); wd_strb = strb_t'($urandom()); wd_valid = 1;
      exp_wd.push_back(wd_data); exp_ws.push_back(wd_strb);
      @(posedge aclk);
      while (!wd_ready) @(posedge aclk);
      @(negedge aclk);
      wd_valid = ($urandom_range(0, 3) == 0) ? 1'b0 : 1'b1;
      if (!wd_valid) @(negedge aclk);
    end
    wd_valid = 0;
  endtask

  // slave side of AW/W/B
  ax_chan_t cur_aw;
  int       wbeat;
  bit       in_burst = 0;
  always @(posedge aclk) begin
    if (aresetn) begin
      if (awvalid && awready) begin
        checks++;
        if (exp_aw.size() == 0 || aw != exp_aw[0]) fail("AW payload differs from command");
        else void'(exp_aw.pop_front());
        cur_aw <= aw; wbeat <= 0; in_burst <= 1;
      end
      if (wvalid && wready) begin
        checks++;
        if (!in_burst) fail("W beat before the AW handshake");
        else if (w.data != exp_wd[0] || w.strb != exp_ws[0] || w.last != (wbeat == int'(cur_aw.len)))
          fail($sformatf("W beat %0d: %h/%h last %0d", wbeat, w.data, w.strb, w.last));
        void'(exp_wd.pop_front()); void'(exp_ws.pop_front());
        wbeat <= wbeat + 1;
        if (w.last) begin
          in_burst <= 0;
          exp_bid.push_back(cur_aw.id);
        end
      end
    end
  end
  // handshakes seen at the clock edge, acted on at the next falling edge
  bit b_hs = 0, r_hs = 0;
  always @(posedge aclk) begin
    b_hs = bvalid && bready;
    r_hs = rvalid && rready;
  end

  always @(negedge aclk) begin
    awready <= ($urandom_range(0, 2) == 0);
    wready  <= ($urandom_range(0, 2) != 0);
    if (b_hs) bvalid <= 0;
    if ((!bvalid || b_hs) && exp_bid.size() > 0 && $urandom_range(0, 1) == 1) begin
      b.id   <= corrupt_bid ? exp_bid[0] + 1'b1 : exp_bid[0];
      b.resp <= resp_t'($urandom_range(0, 3));
      bvalid <= 1;
    end
  end
  always @(posedge aclk) begin
    if (aresetn && bvalid && bready) begin
      void'(exp_bid.pop_front());
      @(negedge aclk);
      @(posedge aclk);
      checks++;
      if (!wr_done_valid || wr_done != b) fail("write response not passed on");
    end
  end

  // ---------------- read side ----------------
  ax_chan_t cur_ar;
  int       rbeat_s;
  bit       r_active = 0;
  bit       corrupt_rid = 0, corrupt_rlast = 0;
  r_chan_t  exp_rb[$];

  always @(posedge aclk) begin
    if (aresetn) begin
      if (arvalid && arready) begin
        checks++;
        if (ar != rd_cmd) fail("AR payload differs from command");
        cur_ar <= ar; rbeat_s <= 0; r_active <= 1;
      end
      if (rvalid && rready) begin
        checks++;
        if (!rd_beat_valid || rd_beat != r) fail("R beat not passed to the user");
      end
      if (rvalid && !rd_ready && rready) fail("RREADY high while rd_ready low");
    end
  end
  always @(negedge aclk) begin
    arready <= ($urandom_range(0, 2) == 0);
    if (r_hs) begin
      rvalid <= 0;
      if (r.last || rbeat_s == int'(cur_ar.len)) r_active <= 0;
      rbeat_s <= rbeat_s + 1;
    end
    if (r_active && (!rvalid || r_hs) && $urandom_range(0, 2) != 0
        && !(r_hs && rbeat_s == int'(cur_ar.len))) begin
      int n;
      n = r_hs ? rbeat_s + 1 : rbeat_s;
      r.id   <= corrupt_rid ? cur_ar.id + 1'b1 : cur_ar.id;
      r.data <= $urandom();
      r.resp <= RESP_OKAY;
      r.last <= corrupt_rlast ? 1'b0 : (n == int'(cur_ar.len));
      rvalid <= 1;
    end
    rd_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic user_read(ax_chan_t c);
    @(negedge aclk);
    rd_cmd = c; rd_cmd_valid = 1;
    @(posedge aclk);
    while (!rd_cmd_ready) @(posedge aclk);
    @(negedge aclk);
    rd_cmd_valid = 0;
    @(posedge aclk);
    while (!(rd_cmd_ready && !r_active && !arvalid)) @(posedge aclk);
  endtask

  function automatic ax_chan_t rand_cmd(int k);
    ax_chan_t c;
    c        = ax_chan_t'({$urandom(), $urandom(), $urandom()});
    c.len    = len_t'($urandom_range(0, 15));
    c.size   = 3'd2;
    c.burst  = BURST_INCR;
    if (k >= 0) begin
      c.id = id_t'(k + 1); c.addr = 32'h0000_1000 + 32'(k) * 32'h1_0000; c.len = 3;
    end
    return c;
  endfunction

  initial begin
    wr_cmd = '0; rd_cmd = '0; wr_cmd_valid = 0; rd_cmd_valid = 0;
    wd_valid = 0; wd_data = 0; wd_strb = 0;
    bvalid = 0; rvalid = 0; b = '0; r = '0; awready = 0; wready = 0; arready = 0; rd_ready = 0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1;
    fork
      for (int i = 0; i < 120; i++) user_write(rand_cmd(i < 5 ? i : -1));
      for (int i = 0; i < 120; i++) user_read(rand_cmd(i < 5 ? i : -1));
    join
    wait (exp_bid.size() == 0 && exp_aw.size() == 0);
    repeat (5) @(posedge aclk);
    checks++;
    if (resp_err) fail("resp_err set on correct traffic");
    // error detection
    corrupt_bid = 1;
    user_write(rand_cmd(-1));
    @(posedge aclk);
    while (!wr_done_valid) @(posedge aclk);
    repeat (5) @(posedge aclk);
    checks++;
    if (!resp_err) fail("wrong BID not flagged");
    corrupt_bid = 0;
    for (int e = 0; e < 2; e++) begin
      aresetn = 0;
      repeat (2) @(posedge aclk);
      @(negedge aclk) aresetn = 1;
      checks++;
      if (resp_err) fail("resp_err not cleared by reset");
      if (e == 0) corrupt_rid = 1; else corrupt_rlast = 1;
      user_read(rand_cmd(-1));
      repeat (3) @(posedge aclk);
      checks++;
      if (!resp_err) fail(e == 0 ? "wrong RID not flagged" : "missing RLAST not flagged");
      corrupt_rid = 0; corrupt_rlast = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
