// tb_ahb_arbiter: self-checking test of the fixed-priority arbiter.
// Each step sets the requests and the bus state for one cycle, checks the
// one-hot grant in that cycle and HMASTER after the edge. Covered: parking
// with no request, fixed priority (master 0 first), ownership changing only
// on an HREADY-high edge, a fixed-length INCR4 burst that is not broken by a
// higher-priority request until its last beat, BUSY inside a burst, an
// undefined-length INCR burst held while its master requests, and a SPLIT
// response that masks the split master until its HSPLITx pulse.
module tb_ahb_arbiter;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  always #5 hclk = ~hclk;

  logic [2:0] hbusreq, hsplit, hgrant, split_mask;
  logic hready;
  htrans_t htrans;
  hburst_t hburst;
  hresp_t hresp;
  logic [HMASTER_W-1:0] hmaster;

  ahb_arbiter #(.NUM_MASTERS(3)) dut (.*);

  int checks = 0, failures = 0;
  int exp_master = 0;

  // One cycle: drive, check the grant, let the edge pass, check HMASTER.
  task automatic step(input logic [2:0] req, input htrans_t tr, input hburst_t bu,
                      input logic rdy, input hresp_t rs, input logic [2:0] spl,
                      input int exp_grant, input string what);
    @(negedge hclk);
    hbusreq = req; htrans = tr; hburst = bu; hready = rdy; hresp = rs; hsplit = spl;
    #1;
    checks++;
    if (hgrant !== (3'b001 << exp_grant)) begin
      failures++;
      $display("FAIL %s: hgrant=%b expected master %0d", what, hgrant, exp_grant);
    end
    @(posedge hclk);
    #1;
    if (rdy) exp_master = exp_grant;
    checks++;
    if (hmaster !== HMASTER_W'(exp_master)) begin
      failures++;
      $display("FAIL %s: hmaster=%0d expected %0d", what, hmaster, exp_master);
    end
  endtask

  initial begin
    repeat (2000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hbusreq = 0; hsplit = 0; hready = 1; htrans = TRANS_IDLE;
    hburst = BURST_SINGLE; hresp = RESP_OKAY;
    repeat (2) @(posedge hclk);
    @(negedge hclk);
    hresetn = 1;

    step(3'b000, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 0, "park after reset");
    step(3'b100, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 2, "only m2 asks");
    step(3'b110, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 1, "m1 beats m2");
    step(3'b111, TRANS_IDLE, BURST_SINGLE, 0, RESP_OKAY, 0, 0, "m0 first, HREADY low");
    step(3'b111, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 0, "m0 owner");
    // Master 1 owns the bus and runs INCR4 while master 0 keeps asking.
    step(3'b010, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 1, "grant m1");
    step(3'b011, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 0, "m1 owner, idle");
    // hand the bus to m1 again for a burst
    step(3'b010, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 1, "grant m1 again");
    step(3'b011, TRANS_NONSEQ, BURST_INCR4, 1, RESP_OKAY, 0, 1, "beat1 holds");
    step(3'b011, TRANS_SEQ,    BURST_INCR4, 0, RESP_OKAY, 0, 1, "beat2 waited");
    step(3'b011, TRANS_SEQ,    BURST_INCR4, 1, RESP_OKAY, 0, 1, "beat2 holds");
    step(3'b011, TRANS_BUSY,   BURST_INCR4, 1, RESP_OKAY, 0, 1, "busy holds");
    step(3'b011, TRANS_SEQ,    BURST_INCR4, 1, RESP_OKAY, 0, 1, "beat3 holds");
    step(3'b011, TRANS_SEQ,    BURST_INCR4, 1, RESP_OKAY, 0, 0, "beat4 releases");
    // Undefined-length INCR by m0 while m1 asks: kept while m0 asks.
    step(3'b011, TRANS_NONSEQ, BURST_INCR, 1, RESP_OKAY, 0, 0, "incr beat1");
    step(3'b011, TRANS_SEQ,    BURST_INCR, 1, RESP_OKAY, 0, 0, "incr beat2");
    step(3'b010, TRANS_SEQ,    BURST_INCR, 1, RESP_OKAY, 0, 1, "incr last beat");
    // m1 single transfer, gets SPLIT: masked, m2 granted.
    step(3'b110, TRANS_NONSEQ, BURST_SINGLE, 1, RESP_OKAY, 0, 1, "m1 single");
    step(3'b110, TRANS_IDLE, BURST_SINGLE, 0, RESP_SPLIT, 0, 1, "split cycle 1");
    checks++;
    if (split_mask !== 3'b010) begin
      failures++;
      $display("FAIL split mask %b", split_mask);
    end
    step(3'b110, TRANS_IDLE, BURST_SINGLE, 1, RESP_SPLIT, 0, 2, "split cycle 2 regrants");
    step(3'b010, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 2, "masked m1 ignored, park on m2");
    step(3'b010, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 3'b010, 2, "hsplit pulse");
    step(3'b010, TRANS_IDLE, BURST_SINGLE, 1, RESP_OKAY, 0, 1, "m1 released");
    checks++;
    if (split_mask !== 3'b000) begin
      failures++;
      $display("FAIL split mask not cleared %b", split_mask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
