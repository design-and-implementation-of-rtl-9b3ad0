// ahb_top: AHB system with three masters, four memory slaves, a fixed-priority
// arbiter, an address decoder and the central multiplexers.
//
// Every master asks the arbiter for the bus with HBUSREQ; the arbiter grants
// one at a time and names the owner on HMASTER, which steers the
// address/control and write-data multiplexers. The decoder turns the owner's
// address into one HSELx; the registered HSELx steers the read-data/response
// multiplexer back to the masters. HREADY from the selected slave is the one
// bus-wide HREADY seen by every block. The HSPLITx outputs of all slaves are
// ORed into the arbiter.
//
// The counts of masters and slaves are the ones the design is built with.
// The slaves differ so that each bus mechanism can occur (this design's
// choice): slave s has SLV_WAIT[s] wait states, and is split-capable when
// SLV_SPLIT[s] is set; a slave that is not split-capable answers RETRY while
// its `slv_busy` input is high. Memory map: slave s owns the region whose top
// two address bits equal s; each holds MEM_DEPTH words at the start of its
// region, and addresses above them get an ERROR response.
//
// Ports: per master, the client command interface of ahb_master (arrays
// indexed by master); per slave, the `busy` input; plus the bus-wide HMASTER,
// HBUSREQ, HGRANT, HTRANS, HBURST, HREADY and HRESP brought out for observation.
module ahb_top
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 3,
  parameter int unsigned NUM_SLAVES  = 4,
  parameter int unsigned MEM_DEPTH   = 256,
  parameter int unsigned SLV_WAIT  [NUM_SLAVES] = '{0, 1, 2, 0},
  parameter bit          SLV_SPLIT [NUM_SLAVES] = '{1'b0, 1'b0, 1'b1, 1'b0}
) (
  input  logic              hclk,
  input  logic              hresetn,
  // client side of each master
  input  logic              cmd_valid [NUM_MASTERS],
  output logic              cmd_ready [NUM_MASTERS],
  input  logic              cmd_write [NUM_MASTERS],
  input  logic [ADDR_W-1:0] cmd_addr  [NUM_MASTERS],
  input  hsize_t            cmd_size  [NUM_MASTERS],
  input  hburst_t           cmd_burst [NUM_MASTERS],
  input  logic [4:0]        cmd_len   [NUM_MASTERS],
  input  logic              hold      [NUM_MASTERS],
  input  logic [DATA_W-1:0] wr_data   [NUM_MASTERS],
  output logic [4:0]        wr_beat   [NUM_MASTERS],
  output logic              rd_valid  [NUM_MASTERS],
  output logic [DATA_W-1:0] rd_data   [NUM_MASTERS],
  output logic [4:0]        rd_beat   [NUM_MASTERS],
  output logic              done      [NUM_MASTERS],
  output logic              done_err  [NUM_MASTERS],
  // slave side
  input  logic [NUM_SLAVES-1:0] slv_busy,
  // bus observation
  output logic [HMASTER_W-1:0]  bus_hmaster,
  output logic [NUM_MASTERS-1:0] bus_hbusreq,
  output logic [NUM_MASTERS-1:0] bus_hgrant,
  output htrans_t           bus_htrans,
  output hburst_t           bus_hburst,
  output logic              bus_hready,
  output hresp_t            bus_hresp,
  output logic [NUM_MASTERS-1:0] bus_split_mask
);

  ahb_m2s_t                m2s [NUM_MASTERS];
  ahb_s2m_t                s2m [NUM_SLAVES];
  ahb_m2s_t                bus_m2s;
  ahb_s2m_t                bus_s2m;
  logic [NUM_MASTERS-1:0]  hbusreq;
  logic [NUM_MASTERS-1:0]  hgrant;
  logic [HMASTER_W-1:0]    hmaster;
  logic [NUM_SLAVES-1:0]   hsel;
  logic [NUM_MASTERS-1:0]  hsplit_s [NUM_SLAVES];
  logic [NUM_MASTERS-1:0]  hsplit;
  logic [NUM_MASTERS-1:0]  split_mask;

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    ahb_master u_master (
      .hclk      (hclk),
      .hresetn   (hresetn),
      .hbusreq   (hbusreq[m]),
      .hgrant    (hgrant[m]),
      .m2s       (m2s[m]),
      .bus_s2m   (bus_s2m),
      .cmd_valid (cmd_valid[m]),
      .cmd_ready (cmd_ready[m]),
      .cmd_write (cmd_write[m]),
      .cmd_addr  (cmd_addr[m]),
      .cmd_size  (cmd_size[m]),
      .cmd_burst (cmd_burst[m]),
      .cmd_len   (cmd_len[m]),
      .hold      (hold[m]),
      .wr_data   (wr_data[m]),
      .wr_beat   (wr_beat[m]),
      .rd_valid  (rd_valid[m]),
      .rd_data   (rd_data[m]),
      .rd_beat   (rd_beat[m]),
      .done      (done[m]),
      .done_err  (done_err[m])
    );
  end

  ahb_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arbiter (
    .hclk       (hclk),
    .hresetn    (hresetn),
    .hbusreq    (hbusreq),
    .hsplit     (hsplit),
    .hready     (bus_s2m.hready),
    .htrans     (bus_m2s.htrans),
    .hburst     (bus_m2s.hburst),
    .hresp      (bus_s2m.hresp),
    .hgrant     (hgrant),
    .hmaster    (hmaster),
    .split_mask (split_mask)
  );

  ahb_decoder #(.NUM_SLAVES(NUM_SLAVES)) u_decoder (
    .haddr (bus_m2s.haddr),
    .hsel  (hsel)
  );

  ahb_mux #(.NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES)) u_mux (
    .hclk    (hclk),
    .hresetn (hresetn),
    .m2s     (m2s),
    .hmaster (hmaster),
    .hsel    (hsel),
    .s2m     (s2m),
    .bus_m2s (bus_m2s),
    .bus_s2m (bus_s2m)
  );

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slave
    ahb_slave #(
      .DEPTH         (MEM_DEPTH),
      .WAIT_STATES   (SLV_WAIT[s]),
      .SPLIT_CAPABLE (SLV_SPLIT[s]),
      .NUM_MASTERS   (NUM_MASTERS),
      .OFFSET_W      (ADDR_W - $clog2(NUM_SLAVES))
    ) u_slave (
      .hclk    (hclk),
      .hresetn (hresetn),
      .hsel    (hsel[s]),
      .bus_m2s (bus_m2s),
      .hready  (bus_s2m.hready),
      .hmaster (hmaster),
      .busy    (slv_busy[s]),
      .s2m     (s2m[s]),
      .hsplit  (hsplit_s[s])
    );
  end

  always_comb begin
    hsplit = '0;
    for (int s = 0; s < NUM_SLAVES; s++) hsplit |= hsplit_s[s];
  end

  assign bus_hmaster = hmaster;
  assign bus_hbusreq = hbusreq;
  assign bus_hgrant  = hgrant;
  assign bus_htrans  = bus_m2s.htrans;
  assign bus_hburst  = bus_m2s.hburst;
  assign bus_hready  = bus_s2m.hready;
  assign bus_hresp   = bus_s2m.hresp;
  assign bus_split_mask = split_mask;

endmodule
