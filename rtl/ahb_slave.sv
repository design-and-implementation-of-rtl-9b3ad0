// ahb_slave: AHB memory slave with wait states and ERROR/RETRY/SPLIT responses.
//
// The slave answers transfers for which the decoder raises its HSELx. On an
// edge with HREADY high it samples address and control of a NONSEQ or SEQ
// transfer (IDLE and BUSY get a zero-wait OKAY) and starts the data phase:
//   * a write stores HWDATA into the word memory in the byte lanes given by
//     HSIZE and the low address bits (little-endian lanes) at the end of the
//     data phase;
//   * a read returns the addressed word on HRDATA;
//   * WAIT_STATES cycles with HREADYOUT low stretch every data phase, which
//     is how a slave extends a transfer;
//   * an address beyond the DEPTH words of the memory inside the slave's
//     region gets a two-cycle ERROR response;
//   * while the input `busy` is high the slave cannot serve: it gives a
//     two-cycle SPLIT response when SPLIT_CAPABLE is set and RETRY otherwise.
//     A split slave remembers the HMASTER of each master it split and, once
//     `busy` has dropped and the response is over, pulses HSPLITx[m] for one
//     cycle so the arbiter lets master m ask for the bus again.
// Every non-OKAY response is two cycles long: HREADYOUT low then high, with
// HRESP held in both. The memory behaviour, the byte lanes, the busy input
// and the rules that choose among the four responses are this design's own;
// the bus description gives the responses themselves and the use of HSELx
// and HREADY. The memory array is not reset.
//
// Interface: hsel, bus_m2s (address, control, write data), bus HREADY and
// HMASTER in; s2m (HRDATA, HREADYOUT, HRESP) and hsplit out.
// Lint may report hresetn as used both asynchronously and synchronously; the
// synchronous use is only the disable condition of the assertion at the end.
module ahb_slave
  import ahb_pkg::*;
#(
  parameter int unsigned DEPTH         = 256,  // words of memory
  parameter int unsigned WAIT_STATES   = 0,    // extra cycles per data phase
  parameter bit          SPLIT_CAPABLE = 1'b0,
  parameter int unsigned NUM_MASTERS   = 3,
  parameter int unsigned OFFSET_W      = 30    // address bits inside the region
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  input  logic                   hsel,
  input  ahb_m2s_t               bus_m2s,
  input  logic                   hready,
  input  logic [HMASTER_W-1:0]   hmaster,
  input  logic                   busy,
  output ahb_s2m_t               s2m,
  output logic [NUM_MASTERS-1:0] hsplit
);

  localparam int unsigned IDX_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned WAIT_W = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  typedef enum logic [1:0] {DP_NONE, DP_OKAY, DP_RESP1, DP_RESP2} dp_state_t;

  logic [DATA_W-1:0] mem [DEPTH];

  dp_state_t          state_q;
  hresp_t             resp_q;
  logic [IDX_W-1:0]   idx_q;
  logic [1:0]         lane_q;
  hsize_t             size_q;
  logic               write_q;
  logic [WAIT_W-1:0]  wait_q;
  logic [NUM_MASTERS-1:0] pending_q;

  logic               start;
  logic               in_range;
  logic [3:0]         be;

  assign start    = hready && hsel &&
                    (bus_m2s.htrans == TRANS_NONSEQ || bus_m2s.htrans == TRANS_SEQ);
  assign in_range = bus_m2s.haddr[OFFSET_W-1:0] < OFFSET_W'(DEPTH * 4);

  // Byte enables of the data-phase transfer.
  always_comb begin
    case (size_q)
      SIZE_BYTE: be = 4'b0001 << lane_q;
      SIZE_HALF: be = lane_q[1] ? 4'b1100 : 4'b0011;
      default:   be = 4'b1111;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state_q   <= DP_NONE;
      resp_q    <= RESP_OKAY;
      idx_q     <= '0;
      lane_q    <= '0;
      size_q    <= SIZE_WORD;
      write_q   <= 1'b0;
      wait_q    <= '0;
      pending_q <= '0;
      hsplit    <= '0;
    end else begin
      // Release split masters once the slave is free again.
      hsplit <= '0;
      if (!busy && state_q != DP_RESP1 && pending_q != '0) begin
        hsplit    <= pending_q;
        pending_q <= '0;
      end

      if (hready) begin
        if (start) begin
          idx_q   <= bus_m2s.haddr[IDX_W+1:2];
          lane_q  <= bus_m2s.haddr[1:0];
          size_q  <= bus_m2s.hsize;
          write_q <= bus_m2s.hwrite;
          wait_q  <= WAIT_W'(WAIT_STATES);
          if (busy) begin
            state_q <= DP_RESP1;
            resp_q  <= SPLIT_CAPABLE ? RESP_SPLIT : RESP_RETRY;
            if (SPLIT_CAPABLE)
              for (int m = 0; m < NUM_MASTERS; m++)
                if (hmaster == HMASTER_W'(m)) pending_q[m] <= 1'b1;
          end else if (!in_range) begin
            state_q <= DP_RESP1;
            resp_q  <= RESP_ERROR;
          end else begin
            state_q <= DP_OKAY;
            resp_q  <= RESP_OKAY;
          end
        end else begin
          state_q <= DP_NONE;
          resp_q  <= RESP_OKAY;
        end
      end else begin
        if (state_q == DP_RESP1) state_q <= DP_RESP2;
        if (state_q == DP_OKAY && wait_q != '0) wait_q <= wait_q - 1'b1;
      end
    end
  end

  // Memory write at the last cycle of an OKAY write data phase.
  always_ff @(posedge hclk) begin
    if (hready && state_q == DP_OKAY && wait_q == '0 && write_q)
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[idx_q][8*b +: 8] <= bus_m2s.hwdata[8*b +: 8];
  end

  always_comb begin
    s2m.hready = !(state_q == DP_RESP1 || (state_q == DP_OKAY && wait_q != '0));
    s2m.hresp  = (state_q == DP_RESP1 || state_q == DP_RESP2) ? resp_q : RESP_OKAY;
    s2m.hrdata = (state_q == DP_OKAY && !write_q) ? mem[idx_q] : '0;
  end

  // A non-OKAY response is two cycles: HREADYOUT low, then high with the
  // same HRESP.
  a_two_cycle_resp: assert property (@(posedge hclk) disable iff (!hresetn)
      (s2m.hresp != RESP_OKAY && !s2m.hready) |=> (s2m.hready && s2m.hresp == $past(s2m.hresp)))
    else $error("non-OKAY response not two cycles long");

endmodule
