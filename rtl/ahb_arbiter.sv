// ahb_arbiter: fixed-priority bus arbiter with SPLIT support.
//
// Chooses which master owns the address bus next. Among the masters that
// assert HBUSREQ, the one with the lowest index wins (master 0 has the highest
// priority). HGRANT is one-hot and may change in any cycle; ownership passes
// on the next rising edge at which HREADY is high, and on that edge HMASTER is
// updated to the index of the granted master, so HMASTER always names the
// owner of the current address phase and steers the address/control
// multiplexer. A registered copy of HMASTER for the data phase is kept to
// know which master a SPLIT response belongs to.
//
// Burst protection (this design's choice): once the owner starts a
// fixed-length burst (INCR4/8/16, WRAP4/8/16) the grant stays with it until
// its last beat is on the bus; the arbiter counts the beats itself from HTRANS
// and HBURST. An undefined-length INCR burst keeps the grant while its master
// still requests. BUSY cycles in a burst keep the grant as long as beats are
// left.
//
// SPLIT: when the data-phase master receives a SPLIT response, its request is
// masked so it takes no part in arbitration, and a different master is
// granted in the second response cycle. A one-cycle pulse on HSPLITx[m] from
// the splitting slave removes the mask of master m. With no request, the
// grant parks on the current owner, or on the lowest-index unmasked master if
// the owner is masked.
//
// Interface: hbusreq/hsplit in, per master; the muxed bus HREADY, HTRANS,
// HBURST and HRESP in; hgrant (one-hot) and hmaster out.
// Lint may report hresetn as used both asynchronously and synchronously; the
// synchronous use is only the disable condition of the assertions at the end.
module ahb_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 3
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  input  logic [NUM_MASTERS-1:0] hbusreq,
  input  logic [NUM_MASTERS-1:0] hsplit,
  input  logic                   hready,
  input  htrans_t                htrans,
  input  hburst_t                hburst,
  input  hresp_t                 hresp,
  output logic [NUM_MASTERS-1:0] hgrant,
  output logic [HMASTER_W-1:0]   hmaster,
  output logic [NUM_MASTERS-1:0] split_mask
);

  localparam int unsigned M_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;

  logic [M_W-1:0] owner_q;     // owner of the current address phase
  logic [M_W-1:0] owner_dq;    // owner of the current data phase
  logic [M_W-1:0] next_owner;
  logic [4:0]     beats_left_q; // beats of the owner's burst not yet accepted
  logic           keep;
  logic [NUM_MASTERS-1:0] req_eff;

  always_comb begin
    // Does the owner's burst continue past the address phase now on the bus?
    keep = 1'b0;
    case (htrans)
      TRANS_NONSEQ: keep = (hburst == BURST_INCR) ? hbusreq[owner_q]
                                                  : (burst_beats(hburst) > 1);
      TRANS_SEQ:    keep = (hburst == BURST_INCR) ? hbusreq[owner_q]
                                                  : (beats_left_q > 5'd1);
      TRANS_BUSY:   keep = (hburst == BURST_INCR) ? hbusreq[owner_q]
                                                  : (beats_left_q != 5'd0);
      default:      keep = 1'b0;
    endcase
    if (split_mask[owner_q]) keep = 1'b0;

    req_eff = hbusreq & ~split_mask;

    next_owner = owner_q;
    if (!keep) begin
      if (req_eff != '0) begin
        // Fixed priority: lowest index wins.
        for (int i = NUM_MASTERS - 1; i >= 0; i--)
          if (req_eff[i]) next_owner = M_W'(i);
      end else if (split_mask[owner_q]) begin
        for (int i = NUM_MASTERS - 1; i >= 0; i--)
          if (!split_mask[i]) next_owner = M_W'(i);
      end
    end

    hgrant = '0;
    hgrant[next_owner] = 1'b1;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      owner_q      <= '0;
      owner_dq     <= '0;
      beats_left_q <= '0;
    end else if (hready) begin
      owner_q  <= next_owner;
      owner_dq <= owner_q;
      case (htrans)
        TRANS_NONSEQ: beats_left_q <= 5'(burst_beats(hburst) - 1);
        TRANS_SEQ:    if (beats_left_q != 5'd0) beats_left_q <= beats_left_q - 5'd1;
        default: ;
      endcase
    end
  end

  // Split mask: set in the first cycle of a SPLIT response for the master
  // owning that data phase, cleared by the slave's HSPLITx pulse.
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      split_mask <= '0;
    end else begin
      for (int i = 0; i < NUM_MASTERS; i++) begin
        if (hsplit[i])
          split_mask[i] <= 1'b0;
        else if (!hready && hresp == RESP_SPLIT && owner_dq == M_W'(i))
          split_mask[i] <= 1'b1;
      end
    end
  end

  assign hmaster = HMASTER_W'(owner_q);

  // Exactly one master is granted at any time out of reset.
  a_grant_onehot: assert property (@(posedge hclk) disable iff (!hresetn)
                                   $onehot(hgrant))
    else $error("HGRANT not one-hot");

  // HMASTER only moves on an edge with HREADY high.
  a_hmaster_held: assert property (@(posedge hclk) disable iff (!hresetn)
                                   !hready |=> $stable(hmaster))
    else $error("HMASTER changed while HREADY was low");

endmodule
