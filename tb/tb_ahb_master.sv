// tb_ahb_master: self-checking test of the AHB master.
// A small slave model in the test answers with a chosen number of wait states
// and can be told to give RETRY, SPLIT or ERROR once for a given address; the
// test drives HGRANT itself. Every address phase accepted on the bus is
// logged and compared with the expected address / HTRANS / HBURST sequence.
// Covered: request before grant, single write latency, INCR4 read with wait
// states, WRAP4 address wrapping, BUSY insertion through `hold`, an INCR
// burst of given length, RETRY and SPLIT inside a burst (rebuild as NONSEQ
// SINGLE beats), ERROR ending a command, and losing the grant mid-burst.
module tb_ahb_master;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  always #5 hclk = ~hclk;

  logic hbusreq, hgrant;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m;
  logic cmd_valid, cmd_ready, cmd_write, hold;
  logic [31:0] cmd_addr, wr_data, rd_data;
  hsize_t cmd_size;
  hburst_t cmd_burst;
  logic [4:0] cmd_len, wr_beat, rd_beat;
  logic rd_valid, done, done_err;

  ahb_master dut (.hclk, .hresetn, .hbusreq, .hgrant, .m2s, .bus_s2m(s2m),
                  .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_size,
                  .cmd_burst, .cmd_len, .hold, .wr_data, .wr_beat, .rd_valid,
                  .rd_data, .rd_beat, .done, .done_err);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge hclk) cycle++;

  // ---------------- slave model ----------------
  logic [31:0] mem [256];
  int          waits = 0;
  logic [31:0] force_addr = '1;
  hresp_t      force_resp = RESP_OKAY;
  logic        dp_v = 0, dp_w = 0;
  logic [31:0] dp_a;
  int          dp_cnt = 0;      // cycles left before the final one
  hresp_t      dp_r = RESP_OKAY;
  logic [31:0] log_addr [$];
  htrans_t     log_trans [$];
  hburst_t     log_burst [$];
  int          busy_seen = 0;

  always_comb begin
    s2m.hrdata = dp_v ? mem[dp_a[9:2]] : '0;
    if (!dp_v) begin
      s2m.hready = 1; s2m.hresp = RESP_OKAY;
    end else if (dp_r == RESP_OKAY) begin
      s2m.hready = (dp_cnt == 0); s2m.hresp = RESP_OKAY;
    end else begin
      s2m.hready = (dp_cnt == 0); s2m.hresp = dp_r;
    end
  end

  always @(posedge hclk) begin
    if (s2m.hready) begin
      if (dp_v && dp_w && dp_r == RESP_OKAY) mem[dp_a[9:2]] <= m2s.hwdata;
      if (m2s.htrans == TRANS_BUSY) busy_seen++;
      if (m2s.htrans == TRANS_NONSEQ || m2s.htrans == TRANS_SEQ) begin
        log_addr.push_back(m2s.haddr);
        log_trans.push_back(m2s.htrans);
        log_burst.push_back(m2s.hburst);
        dp_v <= 1; dp_w <= m2s.hwrite; dp_a <= m2s.haddr;
        if (m2s.haddr == force_addr && force_resp != RESP_OKAY) begin
          dp_r <= force_resp; dp_cnt <= 1; force_resp <= RESP_OKAY;
        end else begin
          dp_r <= RESP_OKAY; dp_cnt <= waits;
        end
      end else begin
        dp_v <= 0; dp_r <= RESP_OKAY;
      end
    end else if (dp_cnt > 0) dp_cnt <= dp_cnt - 1;
  end

  // ---------------- client side ----------------
  logic [31:0] wbase = 0;
  assign wr_data = wbase + 32'(wr_beat);
  logic [31:0] rd_got [$];
  always @(posedge hclk) if (rd_valid) rd_got.push_back(rd_data);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic issue(logic wr, logic [31:0] a, hsize_t sz, hburst_t bu, int len);
    @(negedge hclk);
    log_addr.delete(); log_trans.delete(); log_burst.delete(); rd_got.delete();
    cmd_valid = 1; cmd_write = wr; cmd_addr = a; cmd_size = sz; cmd_burst = bu;
    cmd_len = 5'(len);
    @(negedge hclk);
    cmd_valid = 0;
  endtask

  // Wait for done; returns the cycles from command acceptance and the error flag.
  task automatic wait_done(output int cycles, output logic err);
    int start = cycle;
    while (!done) @(negedge hclk);
    cycles = cycle - start + 1;
    err = done_err;
    @(negedge hclk);
  endtask

  task automatic expect_log(string what, logic [31:0] a [], htrans_t t [], hburst_t b []);
    chk({what, " beats"}, 32'(log_addr.size()), 32'(a.size()));
    for (int i = 0; i < a.size() && i < log_addr.size(); i++) begin
      chk($sformatf("%s addr %0d", what, i), log_addr[i], a[i]);
      chk($sformatf("%s htrans %0d", what, i), 32'(log_trans[i]), 32'(t[i]));
      chk($sformatf("%s hburst %0d", what, i), 32'(log_burst[i]), 32'(b[i]));
    end
  endtask

  int cyc;
  logic err;

  initial begin
    repeat (3000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; cmd_write = 0; cmd_addr = 0; cmd_size = SIZE_WORD;
    cmd_burst = BURST_SINGLE; cmd_len = 1; hold = 0; hgrant = 0;
    for (int i = 0; i < 256; i++) mem[i] = 32'hC0DE_0000 + 32'(i);
    repeat (2) @(posedge hclk);
    @(negedge hclk);
    hresetn = 1;

    // 1. Request, grant, single write.
    wbase = 32'h1234_0000;
    issue(1, 32'h100, SIZE_WORD, BURST_SINGLE, 1);
    chk("hbusreq raised", 32'(hbusreq), 1);
    repeat (2) @(negedge hclk);
    chk("idle without grant", 32'(m2s.htrans), 32'(TRANS_IDLE));
    hgrant = 1;
    wait_done(cyc, err);
    chk("single write done", 32'(err), 0);
    chk("single write mem", mem[8'h40], 32'h1234_0000);
    expect_log("single", '{32'h100}, '{TRANS_NONSEQ}, '{BURST_SINGLE});
    // With the grant already held: accept, address, data, done = 3 cycles.
    issue(1, 32'h104, SIZE_WORD, BURST_SINGLE, 1);
    wait_done(cyc, err);
    chk("single latency", 32'(cyc), 32'd3);

    // 2. INCR4 read with one wait state per beat.
    waits = 1;
    issue(0, 32'h200, SIZE_WORD, BURST_INCR4, 0);
    wait_done(cyc, err);
    expect_log("incr4", '{32'h200, 32'h204, 32'h208, 32'h20C},
               '{TRANS_NONSEQ, TRANS_SEQ, TRANS_SEQ, TRANS_SEQ},
               '{BURST_INCR4, BURST_INCR4, BURST_INCR4, BURST_INCR4});
    chk("incr4 reads", 32'(rd_got.size()), 4);
    for (int i = 0; i < 4 && i < rd_got.size(); i++)
      chk("incr4 data", rd_got[i], 32'hC0DE_0080 + 32'(i));
    // 1 accept + 4 beats x 2 cycles + 1 to see done
    chk("incr4 latency", 32'(cyc), 32'd10);
    waits = 0;

    // 3. WRAP4 from 0x38.
    issue(0, 32'h38, SIZE_WORD, BURST_WRAP4, 0);
    wait_done(cyc, err);
    expect_log("wrap4", '{32'h38, 32'h3C, 32'h30, 32'h34},
               '{TRANS_NONSEQ, TRANS_SEQ, TRANS_SEQ, TRANS_SEQ},
               '{BURST_WRAP4, BURST_WRAP4, BURST_WRAP4, BURST_WRAP4});

    // 4. INCR8 write with BUSY cycles inserted.
    wbase = 32'hBB00_0000;
    busy_seen = 0;
    issue(1, 32'h300, SIZE_WORD, BURST_INCR8, 0);
    fork
      begin
        while (!done) begin
          @(negedge hclk);
          hold = (cycle % 3 == 0);
        end
        hold = 0;
      end
      wait_done(cyc, err);
    join
    chk("busy inserted", 32'(busy_seen > 0), 1);
    chk("incr8 beats", 32'(log_addr.size()), 8);
    for (int i = 0; i < 8; i++) chk("incr8 mem", mem[192 + i], 32'hBB00_0000 + 32'(i));

    // 5. Undefined-length INCR of 3 halfwords.
    issue(0, 32'h402, SIZE_HALF, BURST_INCR, 3);
    wait_done(cyc, err);
    expect_log("incr3", '{32'h402, 32'h404, 32'h406},
               '{TRANS_NONSEQ, TRANS_SEQ, TRANS_SEQ},
               '{BURST_INCR, BURST_INCR, BURST_INCR});

    // 6. RETRY on the second beat of an INCR4 write.
    wbase = 32'hAA00_0000;
    force_addr = 32'h504; force_resp = RESP_RETRY;
    issue(1, 32'h500, SIZE_WORD, BURST_INCR4, 0);
    wait_done(cyc, err);
    chk("retry no error", 32'(err), 0);
    expect_log("retry", '{32'h500, 32'h504, 32'h504, 32'h508, 32'h50C},
               '{TRANS_NONSEQ, TRANS_SEQ, TRANS_NONSEQ, TRANS_NONSEQ, TRANS_NONSEQ},
               '{BURST_INCR4, BURST_INCR4, BURST_SINGLE, BURST_SINGLE, BURST_SINGLE});
    for (int i = 0; i < 4; i++) chk("retry mem", mem[64 + i], 32'hAA00_0000 + 32'(i));

    // 7. SPLIT on a single read: grant withdrawn, then returned.
    force_addr = 32'h60; force_resp = RESP_SPLIT;
    issue(0, 32'h60, SIZE_WORD, BURST_SINGLE, 0);
    while (!(s2m.hresp == RESP_SPLIT && s2m.hready)) @(negedge hclk);
    hgrant = 0;
    repeat (4) @(negedge hclk);
    chk("split waits idle", 32'(m2s.htrans), 32'(TRANS_IDLE));
    chk("split still asks", 32'(hbusreq), 1);
    hgrant = 1;
    wait_done(cyc, err);
    expect_log("split", '{32'h60, 32'h60}, '{TRANS_NONSEQ, TRANS_NONSEQ},
               '{BURST_SINGLE, BURST_SINGLE});
    chk("split read data", rd_got.size() > 0 ? rd_got[0] : 0, 32'hC0DE_0018);

    // 8. ERROR ends the command.
    force_addr = 32'h704; force_resp = RESP_ERROR;
    issue(0, 32'h700, SIZE_WORD, BURST_INCR4, 0);
    wait_done(cyc, err);
    chk("error flagged", 32'(err), 1);
    chk("error stops burst", 32'(log_addr.size()), 2);
    chk("error request dropped", 32'(hbusreq), 0);

    // 9. Grant lost in the middle of an INCR8 read.
    issue(0, 32'h800, SIZE_WORD, BURST_INCR8, 0);
    repeat (3) @(negedge hclk);
    hgrant = 0;
    repeat (3) @(negedge hclk);
    hgrant = 1;
    wait_done(cyc, err);
    chk("regrant reads", 32'(rd_got.size()), 8);
    for (int i = 0; i < 8 && i < rd_got.size(); i++)
      chk("regrant data", rd_got[i], 32'hC0DE_0000 + 32'(i));
    chk("regrant first beat", 32'(log_trans[0]), 32'(TRANS_NONSEQ));
    chk("regrant rebuilt last beat", 32'(log_burst[log_burst.size()-1]), 32'(BURST_SINGLE));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
