// ahb_mux: the central multiplexers of the AHB system.
//
// Three multiplexers share this block:
//   * address and control (HADDR, HTRANS, HWRITE, HSIZE, HBURST) come from
//     the master named by the arbiter's HMASTER, i.e. the address-phase owner;
//   * write data (HWDATA) comes from the master that owned the previous
//     address phase, the one now in its data phase. The block keeps that
//     HMASTER value in a register loaded on each edge with HREADY high;
//   * read data, HREADY and HRESP come from the slave whose HSELx was high
//     during the address phase now in its data phase, again registered on
//     HREADY. With no slave selected, the bus returns HREADY high and OKAY.
// Steering by HMASTER and by HSELx is as the bus description gives it; the
// registers that delay both selects into the data phase follow the pipelined
// AHB timing.
//
// Interface: m2s[NUM_MASTERS] and hmaster in, bus_m2s out to every slave;
// s2m[NUM_SLAVES] and hsel in, bus_s2m out to every master.
module ahb_mux
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 3,
  parameter int unsigned NUM_SLAVES  = 4
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  input  ahb_m2s_t               m2s [NUM_MASTERS],
  input  logic [HMASTER_W-1:0]   hmaster,
  input  logic [NUM_SLAVES-1:0]  hsel,
  input  ahb_s2m_t               s2m [NUM_SLAVES],
  output ahb_m2s_t               bus_m2s,
  output ahb_s2m_t               bus_s2m
);

  logic [HMASTER_W-1:0]  hmaster_dq;  // data-phase master
  logic [NUM_SLAVES-1:0] hsel_dq;     // data-phase slave select

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      hmaster_dq <= '0;
      hsel_dq    <= '0;
    end else if (bus_s2m.hready) begin
      hmaster_dq <= hmaster;
      hsel_dq    <= hsel;
    end
  end

  always_comb begin
    // Address/control from the address-phase owner.
    bus_m2s = '0;
    for (int unsigned m = 0; m < NUM_MASTERS; m++)
      if (hmaster == HMASTER_W'(m)) begin
        bus_m2s.haddr  = m2s[m].haddr;
        bus_m2s.htrans = m2s[m].htrans;
        bus_m2s.hwrite = m2s[m].hwrite;
        bus_m2s.hsize  = m2s[m].hsize;
        bus_m2s.hburst = m2s[m].hburst;
      end
    // Write data from the data-phase owner.
    for (int unsigned m = 0; m < NUM_MASTERS; m++)
      if (hmaster_dq == HMASTER_W'(m)) bus_m2s.hwdata = m2s[m].hwdata;

    // Read data and response from the data-phase slave.
    bus_s2m.hrdata = '0;
    bus_s2m.hready = 1'b1;
    bus_s2m.hresp  = RESP_OKAY;
    for (int unsigned s = 0; s < NUM_SLAVES; s++)
      if (hsel_dq[s]) bus_s2m = s2m[s];
  end

endmodule
