// tb_ahb_mux: self-checking test of the central multiplexers.
// Three masters drive distinct address/control/write-data values and four
// slaves distinct read-data/ready/response values. The test checks that
// address and control follow HMASTER in the same cycle, that write data
// follows the HMASTER of the previous HREADY-high edge, that read data and
// response follow the HSELx registered on the previous HREADY-high edge, and
// that both selects hold while HREADY is low.
module tb_ahb_mux;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  always #5 hclk = ~hclk;

  ahb_m2s_t m2s [3];
  ahb_s2m_t s2m [4];
  logic [HMASTER_W-1:0] hmaster;
  logic [3:0] hsel;
  ahb_m2s_t bus_m2s;
  ahb_s2m_t bus_s2m;
  int checks = 0, failures = 0;

  ahb_mux #(.NUM_MASTERS(3), .NUM_SLAVES(4)) dut (.*);

  // Reference model of the two data-phase selects.
  int exp_dm, exp_ds;

  initial begin
    repeat (5000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      m2s[m].haddr  = 32'h1000_0000 * (m + 1) + 32'h40;
      m2s[m].htrans = htrans_t'(m + 1);
      m2s[m].hwrite = m[0];
      m2s[m].hsize  = hsize_t'(m);
      m2s[m].hburst = hburst_t'(m + 2);
      m2s[m].hwdata = 32'hA000_0000 + m;
    end
    for (int s = 0; s < 4; s++) begin
      s2m[s].hrdata = 32'hD000_0000 + s;
      s2m[s].hready = 1'b1;
      s2m[s].hresp  = RESP_OKAY;
    end
    hmaster = 0;
    hsel    = 4'b0001;
    exp_dm  = 0;
    exp_ds  = -1;
    repeat (2) @(posedge hclk);
    @(negedge hclk);
    hresetn = 1;
    exp_dm = 0; exp_ds = 0;  // one edge with hsel=0001, HREADY high passes next
    for (int cyc = 0; cyc < 300; cyc++) begin
      int nm, ns;
      logic rdy;
      @(negedge hclk);
      nm = $urandom_range(0, 2);
      ns = $urandom_range(0, 3);
      hmaster = HMASTER_W'(nm);
      hsel = 4'b0001 << ns;
      for (int s = 0; s < 4; s++) begin
        s2m[s].hready = ($urandom_range(0, 3) != 0);
        s2m[s].hresp  = hresp_t'($urandom_range(0, 3));
        s2m[s].hrdata = $urandom;
      end
      #1;
      // Address/control: same cycle as HMASTER.
      checks++;
      if (bus_m2s.haddr !== m2s[nm].haddr || bus_m2s.htrans !== m2s[nm].htrans ||
          bus_m2s.hburst !== m2s[nm].hburst || bus_m2s.hsize !== m2s[nm].hsize) begin
        failures++;
        $display("FAIL cyc %0d addr/ctrl not from master %0d", cyc, nm);
      end
      // Write data: data-phase master.
      checks++;
      if (bus_m2s.hwdata !== m2s[exp_dm].hwdata) begin
        failures++;
        $display("FAIL cyc %0d hwdata %h expected master %0d", cyc, bus_m2s.hwdata, exp_dm);
      end
      // Read side: data-phase slave, or the idle default.
      checks++;
      if (exp_ds < 0) begin
        if (bus_s2m.hready !== 1'b1 || bus_s2m.hresp !== RESP_OKAY) begin
          failures++;
          $display("FAIL cyc %0d idle read side", cyc);
        end
        rdy = 1'b1;
      end else begin
        if (bus_s2m !== s2m[exp_ds]) begin
          failures++;
          $display("FAIL cyc %0d read side expected slave %0d", cyc, exp_ds);
        end
        rdy = s2m[exp_ds].hready;
      end
      if (rdy) begin
        exp_dm = nm;
        exp_ds = ns;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
