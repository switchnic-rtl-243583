// arm_core_model: behavioural model of the ARM cores' side of the SwitchNIC
// protocol, running a TCP packet reassembler. Not synthesizable; testbench only.
//
// Every packet takes IN_DELAY cycles to reach the cores, is processed in
// arrival order (one per cycle), and each packet the cores send back leaves
// OUT_DELAY cycles later, one per cycle, in order.
// Per flow the model keeps the next expected byte, a buffer of early packets
// and the write-back bit:
//  - wb flag: if the write-back bit is 0, import the piggybacked state and set
//    the bit; later write-backs are ignored. Either way the packet is ACKed
//    (ack flag on the returned packet, or a header-only ACK when the packet
//    itself is kept in the buffer or is header-only).
//  - reassembly: a packet at the expected byte is released and the buffer is
//    drained; a later one is buffered; an unknown flow starts at its first
//    packet.
//  - req flag: if the packet is released alone and nothing is buffered, the
//    current state is piggybacked (resp) and the write-back bit is cleared;
//    otherwise, or for the flow `decline_flow`, the request is ignored.
module arm_core_model
  import switchnic_pkg::*;
#(
  parameter int IN_DELAY  = 20,
  parameter int OUT_DELAY = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pkt_t              in_pkt,
  output logic              out_valid,
  input  logic              out_ready,
  output pkt_t              out_pkt,
  input  logic [FLOW_W-1:0] decline_flow
);
  typedef struct {
    pkt_t   p;
    longint t;
  } item_t;

  item_t inq[$];
  item_t outq[$];
  longint cyc;

  logic [STATE_W-1:0] nxt    [logic [FLOW_W-1:0]];
  bit                 wbbit  [logic [FLOW_W-1:0]];
  pkt_t               buffer [logic [FLOW_W-1:0]][$];

  // statistics read by the testbench
  int n_wb_applied, n_wb_ignored, n_resp, n_declined, n_buffered, n_standalone_ack;

  function automatic void emit(pkt_t p);
    item_t it;
    it.p = p;
    it.t = cyc + longint'(OUT_DELAY);
    outq.push_back(it);
  endfunction

  function automatic void process(pkt_t p);
    logic [FLOW_W-1:0] f;
    logic acked, released_alone, kept;
    pkt_t r;
    int k;
    f = p.flow_id;
    acked = 1'b0;
    if (p.hdr.flags.wb) begin
      if (nxt.exists(f) && !wbbit[f]) begin
        nxt[f]   = p.hdr.state;
        wbbit[f] = 1'b1;
        n_wb_applied++;
      end else begin
        n_wb_ignored++;
      end
      acked = 1'b1;
    end
    if (p.ctrl_only) begin
      if (acked) begin
        r = p;
        r.hdr = '0;
        r.hdr.flags.ack = 1'b1;
        n_standalone_ack++;
        emit(r);
      end
      return;
    end
    kept = 1'b0;
    released_alone = 1'b0;
    r = p;
    r.hdr = '0;
    r.hdr.flags.ack = acked;
    if (!nxt.exists(f)) begin
      nxt[f]   = p.seq + STATE_W'(p.len);
      wbbit[f] = 1'b1;
      released_alone = 1'b1;
    end else if (p.seq == nxt[f]) begin
      nxt[f] = nxt[f] + STATE_W'(p.len);
      released_alone = (buffer[f].size() == 0);
    end else if (p.seq > nxt[f]) begin
      buffer[f].push_back(p);
      n_buffered++;
      kept = 1'b1;
    end
    if (kept) begin
      if (acked) begin
        r.ctrl_only = 1'b1;
        n_standalone_ack++;
        emit(r);
      end
      if (p.hdr.flags.req) n_declined++;
    end else begin
      if (p.hdr.flags.req) begin
        if (released_alone && f != decline_flow) begin
          r.hdr.flags.resp = 1'b1;
          r.hdr.state      = nxt[f];
          wbbit[f]         = 1'b0;
          n_resp++;
        end else begin
          n_declined++;
        end
      end
      emit(r);
      // drain the buffer
      do begin
        k = -1;
        for (int i = 0; i < buffer[f].size(); i++) begin
          pkt_t c;
          c = buffer[f][i];
          if (k < 0 && c.seq == nxt[f]) k = i;
        end
        if (k >= 0) begin
          pkt_t b;
          b = buffer[f][k];
          b.hdr = '0;
          nxt[f] = nxt[f] + STATE_W'(b.len);
          buffer[f].delete(k);
          emit(b);
        end
      end while (k >= 0);
    end
  endfunction

  // Registered output: the head of the output queue is presented once its
  // time has come; it is removed when taken.
  always @(posedge clk) begin
    if (!rst_n) begin
      cyc       = 0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      if (out_valid && out_ready) void'(outq.pop_front());
      cyc = cyc + 1;
      if (in_valid) begin
        item_t it;
        it.p = in_pkt;
        it.t = cyc + longint'(IN_DELAY);
        inq.push_back(it);
      end
      if (inq.size() > 0 && inq[0].t <= cyc) begin
        item_t it;
        it = inq.pop_front();
        process(it.p);
      end
      if (outq.size() > 0 && outq[0].t <= cyc) begin
        out_valid <= 1'b1;
        out_pkt   <= outq[0].p;
      end else begin
        out_valid <= 1'b0;
        out_pkt   <= '0;
      end
    end
  end

  function automatic int pending();
    return inq.size() + outq.size();
  endfunction

  function automatic logic [STATE_W-1:0] state_of(logic [FLOW_W-1:0] f);
    return nxt.exists(f) ? nxt[f] : '0;
  endfunction

  function automatic int buffered_of(logic [FLOW_W-1:0] f);
    return buffer.exists(f) ? buffer[f].size() : 0;
  endfunction
endmodule
