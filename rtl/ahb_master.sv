// ahb_master: AHB bus master with a simple command interface.
//
// A local client hands the master one command at a time (read or write, start
// address, HSIZE, HBURST and, for an undefined-length INCR burst, the number
// of beats). The master then
//   1. asserts HBUSREQ and waits until it owns the bus: it becomes owner on a
//      rising edge where HGRANT and HREADY are both high;
//   2. drives the beats on the pipelined bus: the first beat as NONSEQ, the
//      others as SEQ, with incrementing or wrapping addresses as HBURST asks.
//      While the client holds `hold` inside a burst it drives BUSY instead of
//      the next SEQ beat. When it does not own the bus, or has nothing to
//      send, it drives IDLE;
//   3. runs each beat's data phase one cycle later: for a write, HWDATA is
//      `wr_data`, which the client supplies for beat `wr_beat`; for a read
//      `rd_valid` pulses with HRDATA when the beat ends with OKAY. Wait states
//      (HREADY low) simply stretch the data phase;
//   4. handles the two-cycle responses. On the first cycle of any non-OKAY
//      response it turns the pending address phase into IDLE. ERROR ends the
//      command with `done_err`. RETRY and SPLIT rewind to the failed beat,
//      which is issued again when the master next owns the bus;
//   5. if it loses the bus in the middle of a burst, or after a RETRY/SPLIT,
//      it finishes the remaining beats as separate NONSEQ SINGLE transfers
//      (a rebuilt burst).
// `done` pulses for one cycle after the last beat's response.
// All operations are on the rising clock edge; HRESETn is active low. The
// request/grant handshake, HTRANS types and response meanings follow the bus
// description; the client interface, the `hold` input and the way a broken
// burst is rebuilt are this design's own choices.
// Lint may report hresetn as used both asynchronously and synchronously; the
// synchronous use is only the disable condition of the assertion at the end.
module ahb_master
  import ahb_pkg::*;
(
  input  logic        hclk,
  input  logic        hresetn,
  // bus side
  output logic        hbusreq,
  input  logic        hgrant,
  output ahb_m2s_t    m2s,
  input  ahb_s2m_t    bus_s2m,
  // client side
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_write,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  hsize_t      cmd_size,
  input  hburst_t     cmd_burst,
  input  logic [4:0]  cmd_len,      // beats of an INCR burst, 1..16
  input  logic        hold,         // insert BUSY inside a burst
  input  logic [DATA_W-1:0] wr_data,
  output logic [4:0]  wr_beat,
  output logic        rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output logic [4:0]  rd_beat,
  output logic        done,
  output logic        done_err
);

  // Command registers
  logic        active_q;
  logic        c_write_q;
  hsize_t      c_size_q;
  hburst_t     c_burst_q;
  logic [4:0]  c_len_q;
  // Address-phase state
  logic [ADDR_W-1:0] a_addr_q;
  logic [4:0]  a_beat_q;      // index of the next beat to issue
  logic        need_nonseq_q; // next issued beat starts a (re)burst
  logic        rebuilt_q;     // remaining beats go out as NONSEQ SINGLE
  logic        own_q;         // master owns the current address phase
  logic        cancel_q;      // first cycle of a non-OKAY response seen
  // Data-phase state
  logic        dp_valid_q;
  logic [ADDR_W-1:0] dp_addr_q;
  logic [4:0]  dp_beat_q;

  logic        issuing;
  logic        beats_left;
  htrans_t     htrans;
  logic [ADDR_W-1:0] next_addr;
  logic [ADDR_W-1:0] wrap_mask;
  logic [ADDR_W-1:0] step;

  assign beats_left = active_q && (a_beat_q < c_len_q);
  assign issuing    = own_q && beats_left && !cancel_q;
  assign hbusreq    = beats_left;
  assign cmd_ready  = !active_q;

  always_comb begin
    if (!issuing)
      htrans = TRANS_IDLE;
    else if (need_nonseq_q || rebuilt_q)
      htrans = TRANS_NONSEQ;
    else if (hold)
      htrans = TRANS_BUSY;
    else
      htrans = TRANS_SEQ;
  end

  // Address of the beat after a_addr_q: incrementing, or wrapping at the
  // boundary of (beats x size) bytes for WRAP bursts.
  always_comb begin
    step      = ADDR_W'(1) << c_size_q;
    wrap_mask = ADDR_W'(burst_beats(c_burst_q)) * step - ADDR_W'(1);
    if (burst_is_wrap(c_burst_q))
      next_addr = (a_addr_q & ~wrap_mask) | ((a_addr_q + step) & wrap_mask);
    else
      next_addr = a_addr_q + step;
  end

  always_comb begin
    m2s.haddr  = a_addr_q;
    m2s.htrans = htrans;
    m2s.hwrite = c_write_q;
    m2s.hsize  = c_size_q;
    m2s.hburst = rebuilt_q ? BURST_SINGLE : c_burst_q;
    m2s.hwdata = wr_data;
  end

  assign wr_beat  = dp_beat_q;
  assign rd_data  = bus_s2m.hrdata;
  assign rd_beat  = dp_beat_q;
  assign rd_valid = dp_valid_q && !c_write_q && bus_s2m.hready &&
                    bus_s2m.hresp == RESP_OKAY;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      active_q      <= 1'b0;
      c_write_q     <= 1'b0;
      c_size_q      <= SIZE_WORD;
      c_burst_q     <= BURST_SINGLE;
      c_len_q       <= '0;
      a_addr_q      <= '0;
      a_beat_q      <= '0;
      need_nonseq_q <= 1'b1;
      rebuilt_q     <= 1'b0;
      own_q         <= 1'b0;
      cancel_q      <= 1'b0;
      dp_valid_q    <= 1'b0;
      dp_addr_q     <= '0;
      dp_beat_q     <= '0;
      done          <= 1'b0;
      done_err      <= 1'b0;
    end else begin
      done     <= 1'b0;
      done_err <= 1'b0;

      if (cmd_valid && cmd_ready) begin
        active_q      <= 1'b1;
        c_write_q     <= cmd_write;
        c_size_q      <= cmd_size;
        c_burst_q     <= cmd_burst;
        c_len_q       <= (cmd_burst == BURST_INCR) ? cmd_len
                                                   : 5'(burst_beats(cmd_burst));
        a_addr_q      <= cmd_addr;
        a_beat_q      <= '0;
        need_nonseq_q <= 1'b1;
        rebuilt_q     <= 1'b0;
      end

      if (!bus_s2m.hready) begin
        // First cycle of a two-cycle response: cancel the waiting address.
        if (dp_valid_q && bus_s2m.hresp != RESP_OKAY) cancel_q <= 1'b1;
      end else begin
        own_q    <= hgrant;
        cancel_q <= 1'b0;

        // Address phase accepted on this edge.
        dp_valid_q <= 1'b0;
        if (issuing && (htrans == TRANS_NONSEQ || htrans == TRANS_SEQ)) begin
          dp_valid_q    <= 1'b1;
          dp_addr_q     <= a_addr_q;
          dp_beat_q     <= a_beat_q;
          a_addr_q      <= next_addr;
          a_beat_q      <= a_beat_q + 5'd1;
          need_nonseq_q <= 1'b0;
        end

        // Losing the bus: the next beat, if any, must open a new burst.
        if (!hgrant && active_q) begin
          need_nonseq_q <= 1'b1;
          if (a_beat_q != '0 || issuing) rebuilt_q <= 1'b1;
        end

        // Data phase ends on this edge.
        if (dp_valid_q) begin
          case (bus_s2m.hresp)
            RESP_OKAY: begin
              if (dp_beat_q == c_len_q - 5'd1) begin
                active_q <= 1'b0;
                done     <= 1'b1;
              end
            end
            RESP_ERROR: begin
              active_q <= 1'b0;
              done     <= 1'b1;
              done_err <= 1'b1;
            end
            default: begin  // RETRY or SPLIT: issue the beat again
              a_addr_q      <= dp_addr_q;
              a_beat_q      <= dp_beat_q;
              need_nonseq_q <= 1'b1;
              rebuilt_q     <= 1'b1;
            end
          endcase
        end
      end
    end
  end

  // BUSY and SEQ only continue a burst that this master has opened.
  a_no_orphan_seq: assert property (@(posedge hclk) disable iff (!hresetn)
      (htrans == TRANS_BUSY || htrans == TRANS_SEQ) |-> (!need_nonseq_q && !rebuilt_q))
    else $error("SEQ/BUSY without an open burst");

endmodule
