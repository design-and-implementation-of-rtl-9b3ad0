// tb_ahb_slave: self-checking test of the AHB memory slave.
// Slave A has two wait states and is split-capable; slave B has none and
// answers RETRY when busy. A small bus driver in the test issues transfers
// and checks: write then read-back of words, byte and halfword writes into
// the right lanes, the data-phase length (1 + wait states cycles), a
// pipelined four-beat burst, the two-cycle ERROR response beyond the memory,
// the two-cycle SPLIT response while busy followed by exactly one HSPLITx
// pulse for the split master once busy drops, and RETRY from slave B.
module tb_ahb_slave;
  import ahb_pkg::*;

  localparam int W = 2;

  logic hclk = 0, hresetn = 0;
  always #5 hclk = ~hclk;

  ahb_m2s_t bus;
  logic sel_b;
  logic busy_a, busy_b;
  logic [HMASTER_W-1:0] hmaster;
  ahb_s2m_t s2m_a, s2m_b, rsp;
  logic [2:0] hsplit_a, hsplit_b;
  logic hready;

  assign rsp    = sel_b ? s2m_b : s2m_a;
  assign hready = rsp.hready;

  ahb_slave #(.DEPTH(16), .WAIT_STATES(W), .SPLIT_CAPABLE(1'b1), .NUM_MASTERS(3))
    dut_a (.hclk, .hresetn, .hsel(!sel_b), .bus_m2s(bus), .hready, .hmaster,
           .busy(busy_a), .s2m(s2m_a), .hsplit(hsplit_a));
  ahb_slave #(.DEPTH(16), .WAIT_STATES(0), .SPLIT_CAPABLE(1'b0), .NUM_MASTERS(3))
    dut_b (.hclk, .hresetn, .hsel(sel_b), .bus_m2s(bus), .hready, .hmaster,
           .busy(busy_b), .s2m(s2m_b), .hsplit(hsplit_b));

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One single transfer; returns response, read data and data-phase cycles.
  task automatic xfer(input logic wr, input logic [31:0] addr, input hsize_t sz,
                      input logic [31:0] wdata, output hresp_t resp,
                      output logic [31:0] rdata, output int cycles,
                      output hresp_t first_resp);
    @(negedge hclk);
    bus.haddr  = addr;
    bus.htrans = TRANS_NONSEQ;
    bus.hwrite = wr;
    bus.hsize  = sz;
    bus.hburst = BURST_SINGLE;
    @(negedge hclk);
    bus.htrans = TRANS_IDLE;
    bus.hwdata = wdata;
    cycles = 1;
    first_resp = rsp.hresp;
    while (!hready) begin
      @(negedge hclk);
      cycles++;
    end
    resp  = rsp.hresp;
    rdata = rsp.hrdata;
  endtask

  hresp_t r, r1;
  logic [31:0] d;
  int cyc;

  initial begin
    repeat (3000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0;
    sel_b = 0; busy_a = 0; busy_b = 0; hmaster = 0;
    repeat (3) @(posedge hclk);
    @(negedge hclk);
    hresetn = 1;

    // Word writes and reads with wait states.
    for (int i = 0; i < 16; i++) begin
      xfer(1, 32'(i * 4), SIZE_WORD, 32'h1111_0000 + 32'(i * 7), r, d, cyc, r1);
      expect_eq("write resp", 32'(r), 32'(RESP_OKAY));
      expect_eq("write cycles", 32'(cyc), 32'(1 + W));
    end
    for (int i = 15; i >= 0; i--) begin
      xfer(0, 32'(i * 4), SIZE_WORD, 0, r, d, cyc, r1);
      expect_eq("read data", d, 32'h1111_0000 + 32'(i * 7));
      expect_eq("read cycles", 32'(cyc), 32'(1 + W));
    end

    // Byte and halfword lanes (little-endian).
    xfer(1, 32'h20, SIZE_WORD, 32'h0000_0000, r, d, cyc, r1);
    xfer(1, 32'h22, SIZE_BYTE, 32'h00AB_0000, r, d, cyc, r1);
    xfer(1, 32'h20, SIZE_HALF, 32'h0000_CDEF, r, d, cyc, r1);
    xfer(1, 32'h23, SIZE_BYTE, 32'h1200_0000, r, d, cyc, r1);
    xfer(0, 32'h20, SIZE_WORD, 0, r, d, cyc, r1);
    expect_eq("byte lanes", d, 32'h12AB_CDEF);

    // Pipelined four-beat INCR4 write burst, then read it back.
    @(negedge hclk);
    cyc = 0;
    for (int b = 0; b < 5; b++) begin
      bus.haddr  = 32'h10 + 32'(b * 4);
      bus.htrans = (b == 4) ? TRANS_IDLE : (b == 0 ? TRANS_NONSEQ : TRANS_SEQ);
      bus.hwrite = 1;
      bus.hsize  = SIZE_WORD;
      bus.hburst = BURST_INCR4;
      if (b > 0) bus.hwdata = 32'hB0B0_0000 + 32'(b - 1);
      @(negedge hclk);
      cyc++;
      while (!hready) begin
        @(negedge hclk);
        cyc++;
      end
    end
    expect_eq("burst cycles", 32'(cyc), 32'(1 + 4 * (1 + W)));
    for (int b = 0; b < 4; b++) begin
      xfer(0, 32'h10 + 32'(b * 4), SIZE_WORD, 0, r, d, cyc, r1);
      expect_eq("burst data", d, 32'hB0B0_0000 + 32'(b));
    end

    // ERROR beyond the memory.
    xfer(0, 32'h0000_0040, SIZE_WORD, 0, r, d, cyc, r1);
    expect_eq("error resp", 32'(r), 32'(RESP_ERROR));
    expect_eq("error first-cycle resp", 32'(r1), 32'(RESP_ERROR));
    expect_eq("error cycles", 32'(cyc), 32'd2);

    // SPLIT while busy, release by HSPLITx.
    busy_a  = 1;
    hmaster = 2;
    xfer(1, 32'h0, SIZE_WORD, 32'hDEAD_BEEF, r, d, cyc, r1);
    expect_eq("split resp", 32'(r), 32'(RESP_SPLIT));
    expect_eq("split first-cycle resp", 32'(r1), 32'(RESP_SPLIT));
    expect_eq("split cycles", 32'(cyc), 32'd2);
    hmaster = 0;
    repeat (4) begin
      @(negedge hclk);
      expect_eq("no hsplit while busy", 32'(hsplit_a), 0);
    end
    busy_a = 0;
    begin
      int pulses = 0;
      repeat (6) begin
        @(negedge hclk);
        if (hsplit_a == 3'b100) pulses++;
        else expect_eq("hsplit idle", 32'(hsplit_a), 0);
      end
      expect_eq("hsplit pulses", 32'(pulses), 1);
    end
    xfer(0, 32'h0, SIZE_WORD, 0, r, d, cyc, r1);
    expect_eq("split write not done", d, 32'h1111_0000);

    // RETRY from the slave that cannot split.
    sel_b  = 1;
    busy_b = 1;
    xfer(0, 32'h4, SIZE_WORD, 0, r, d, cyc, r1);
    expect_eq("retry resp", 32'(r), 32'(RESP_RETRY));
    expect_eq("retry cycles", 32'(cyc), 32'd2);
    busy_b = 0;
    xfer(1, 32'h4, SIZE_WORD, 32'h5A5A_5A5A, r, d, cyc, r1);
    expect_eq("b write cycles", 32'(cyc), 32'd1);
    xfer(0, 32'h4, SIZE_WORD, 0, r, d, cyc, r1);
    expect_eq("b read", d, 32'h5A5A_5A5A);
    expect_eq("b hsplit never", 32'(hsplit_b), 0);

    @(negedge hclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
