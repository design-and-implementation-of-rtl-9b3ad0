// tb_ahb_top: end-to-end test of the AHB system at its default size
// (three masters, four slaves, 256 words per slave).
// Each master runs a stream of random commands: single transfers of byte,
// halfword or word size and bursts of every HBURST type, to all four slaves,
// with random BUSY insertion. Each master owns its own window in every slave
// so a byte-level shadow memory predicts every read. One command in twelve
// targets an address beyond a slave's memory and must end with an error.
// Slaves 2 (split-capable) and 3 (RETRY) are made busy at random.
// The test counts how often each bus mechanism happened and fails if one
// never did: arbitration under contention, a change of bus owner, wait
// states, SEQ burst beats, WRAP bursts, BUSY, sub-word writes, ERROR, RETRY,
// SPLIT, an HSPLITx release and a rebuilt burst.
module tb_ahb_top;
  import ahb_pkg::*;

  localparam int NM = 3;
  localparam int NS = 4;
  localparam int CMDS = 60;

  logic hclk = 0, hresetn = 0;
  always #5 hclk = ~hclk;

  logic              cmd_valid [NM];
  logic              cmd_ready [NM];
  logic              cmd_write [NM];
  logic [ADDR_W-1:0] cmd_addr  [NM];
  hsize_t            cmd_size  [NM];
  hburst_t           cmd_burst [NM];
  logic [4:0]        cmd_len   [NM];
  logic              hold      [NM];
  logic [DATA_W-1:0] wr_data   [NM];
  logic [4:0]        wr_beat   [NM];
  logic              rd_valid  [NM];
  logic [DATA_W-1:0] rd_data   [NM];
  logic [4:0]        rd_beat   [NM];
  logic              done      [NM];
  logic              done_err  [NM];
  logic [NS-1:0]     slv_busy;
  logic [HMASTER_W-1:0] bus_hmaster;
  logic [NM-1:0]     bus_hbusreq, bus_hgrant, bus_split_mask;
  htrans_t           bus_htrans;
  hburst_t           bus_hburst;
  logic              bus_hready;
  hresp_t            bus_hresp;

  ahb_top dut (.*);

  int checks = 0, failures = 0;

  // Byte-level shadow of what has been written.
  logic [7:0] shadow [logic [31:0]];

  // Command each master is working on.
  logic    cur_write [NM];
  hsize_t  cur_size  [NM];
  hburst_t cur_burst [NM];

  // ---------------- mechanism counters ----------------
  int n_contend = 0, n_handover = 0, n_wait = 0, n_seq = 0, n_wrap = 0,
      n_busy = 0, n_subword = 0, n_error = 0, n_retry = 0, n_split = 0,
      n_release = 0, n_rebuilt = 0;
  logic [HMASTER_W-1:0] last_master = 0;
  logic [NM-1:0] last_mask = 0;

  always @(posedge hclk) if (hresetn) begin
    if ($countones(bus_hbusreq) > 1 && bus_hready) n_contend++;
    if (bus_hready && bus_hmaster != last_master) n_handover++;
    if (bus_hready) last_master <= bus_hmaster;
    if (!bus_hready && bus_hresp == RESP_OKAY) n_wait++;
    if (bus_hready && bus_htrans == TRANS_SEQ) n_seq++;
    if (bus_hready && bus_htrans == TRANS_NONSEQ && burst_is_wrap(bus_hburst)) n_wrap++;
    if (bus_hready && bus_htrans == TRANS_BUSY) n_busy++;
    if (bus_hready && bus_htrans == TRANS_NONSEQ && bus_hmaster < NM &&
        cur_write[bus_hmaster] && cur_size[bus_hmaster] != SIZE_WORD) n_subword++;
    if (!bus_hready && bus_hresp == RESP_ERROR) n_error++;
    if (!bus_hready && bus_hresp == RESP_RETRY) n_retry++;
    if (!bus_hready && bus_hresp == RESP_SPLIT) n_split++;
    n_release += $countones(last_mask & ~bus_split_mask);
    last_mask <= bus_split_mask;
    // a burst command whose beats go out as NONSEQ SINGLE: rebuilt
    if (bus_hready && bus_htrans == TRANS_NONSEQ && bus_hburst == BURST_SINGLE &&
        bus_hmaster < NM && cur_burst[bus_hmaster] != BURST_SINGLE) n_rebuilt++;
  end

  // ---------------- busy slaves ----------------
  logic stop_busy = 0;
  initial begin
    slv_busy = '0;
    forever begin
      repeat (20 + $urandom_range(0, 30)) @(negedge hclk);
      if (stop_busy) slv_busy = '0;
      else begin
        slv_busy[2] = ($urandom_range(0, 2) == 0);
        slv_busy[3] = ($urandom_range(0, 2) == 0);
      end
    end
  end

  // Address of beat b of a burst (reference, written independently of the RTL).
  function automatic logic [31:0] beat_addr(logic [31:0] a, hsize_t sz, hburst_t bu, int b);
    int unsigned step = 1 << sz;
    int unsigned span = burst_beats(bu) * step;
    logic [31:0] base;
    if (burst_is_wrap(bu)) begin
      base = a - (a % span);
      return base + ((a - base + b * step) % span);
    end
    return a + b * step;
  endfunction

  function automatic logic [31:0] wdata_of(int m, int c, int b);
    return {8'(m + 1), 8'(c), 8'(b), 8'(m * 16 + b * 3 + c)};
  endfunction

  int finished = 0;

  for (genvar gm = 0; gm < NM; gm++) begin : g_drv
    int cur_cmd = 0;
    assign wr_data[gm] = wdata_of(gm, cur_cmd, int'(wr_beat[gm]));

    initial begin
      logic wr, bad;
      logic [31:0] a;
      hsize_t sz;
      hburst_t bu;
      int len, nbytes;
      cmd_valid[gm] = 0; cmd_write[gm] = 0; cmd_addr[gm] = 0;
      cmd_size[gm] = SIZE_WORD; cmd_burst[gm] = BURST_SINGLE; cmd_len[gm] = 1;
      hold[gm] = 0;
      cur_write[gm] = 0; cur_size[gm] = SIZE_WORD; cur_burst[gm] = BURST_SINGLE;
      wait (hresetn);
      for (int c = 0; c < CMDS; c++) begin
        int rds;
        @(negedge hclk);
        bu  = hburst_t'($urandom_range(0, 7));
        len = (bu == BURST_INCR) ? $urandom_range(1, 6) : burst_beats(bu);
        sz  = (bu == BURST_SINGLE) ? hsize_t'($urandom_range(0, 2)) : SIZE_WORD;
        wr  = (c < 8) ? 1'b1 : 1'(($urandom_range(0, 1)));
        bad = (c >= 8) && ($urandom_range(0, 11) == 0);
        nbytes = len * (1 << sz);
        // window of master gm: bytes gm*0x100 .. gm*0x100+0xFF of a slave
        a = 32'($urandom_range(0, 3)) << 30;
        if (burst_is_wrap(bu))
          a += 32'(gm * 256) + 32'($urandom_range(0, 63) * 4);
        else
          a += 32'(gm * 256) + ((32'($urandom_range(0, 256 - nbytes))) & ~32'((1 << sz) - 1));
        if (bad) a += 32'h0000_1000;
        cur_cmd = c;
        cur_write[gm] = wr; cur_size[gm] = sz; cur_burst[gm] = bu;
        cmd_valid[gm] = 1; cmd_write[gm] = wr; cmd_addr[gm] = a;
        cmd_size[gm] = sz; cmd_burst[gm] = bu; cmd_len[gm] = 5'(len);
        @(negedge hclk);
        cmd_valid[gm] = 0;
        rds = 0;
        while (!done[gm]) begin
          hold[gm] = ($urandom_range(0, 7) == 0);
          @(posedge hclk);
          if (rd_valid[gm]) begin
            logic [31:0] ba;
            ba = beat_addr(a, sz, bu, int'(rd_beat[gm])) & ~32'h3;
            rds++;
            for (int l = 0; l < 4; l++)
              if (shadow.exists(ba + 32'(l))) begin
                checks++;
                if (rd_data[gm][8*l +: 8] !== shadow[ba + 32'(l)]) begin
                  failures++;
                  $display("FAIL m%0d cmd %0d read %h lane %0d: got %h expected %h",
                           gm, c, ba, l, rd_data[gm][8*l +: 8], shadow[ba + 32'(l)]);
                end
              end
          end
          @(negedge hclk);
        end
        hold[gm] = 0;
        checks++;
        if (done_err[gm] !== bad) begin
          failures++;
          $display("FAIL m%0d cmd %0d error flag %b expected %b", gm, c, done_err[gm], bad);
        end
        if (!bad && !wr) begin
          checks++;
          if (rds != len) begin
            failures++;
            $display("FAIL m%0d cmd %0d got %0d read beats, expected %0d", gm, c, rds, len);
          end
        end
        if (!bad && wr)
          for (int b = 0; b < len; b++) begin
            automatic logic [31:0] ba = beat_addr(a, sz, bu, b);
            automatic logic [31:0] d = wdata_of(gm, c, b);
            for (int k = 0; k < (1 << sz); k++) begin
              automatic logic [31:0] ya = ba + 32'(k);
              shadow[ya] = d[8*ya[1:0] +: 8];
            end
          end
      end
      finished++;
    end
  end

  initial begin
    repeat (200000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge hclk);
    @(negedge hclk);
    hresetn = 1;
    wait (finished == NM);
    stop_busy = 1;
    repeat (5) @(posedge hclk);
    $display("mechanism counts:");
    need("contention", n_contend);
    need("owner handover", n_handover);
    need("wait states", n_wait);
    need("SEQ beats", n_seq);
    need("WRAP bursts", n_wrap);
    need("BUSY", n_busy);
    need("sub-word writes", n_subword);
    need("ERROR", n_error);
    need("RETRY", n_retry);
    need("SPLIT", n_split);
    need("HSPLIT release", n_release);
    need("rebuilt bursts", n_rebuilt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
