// switchnic_pkg: types and constants shared by the SwitchNIC switch data plane.
//
// The data plane keeps one flow-state table whose columns are spread over
// several pipeline stages. Packets carry a small in-band header (hdr_t) that
// lets the switch and the ARM cores move a flow's state along with the data:
//   req  - switch asks the ARM cores for the flow's state (pull, ARM -> switch)
//   resp - ARM cores piggyback the requested state on the returning packet
//   wb   - switch piggybacks its frozen state as a write-back request
//   ack  - ARM cores confirm that a write-back was applied
// The four flags and the piggyback idea follow the document; the bit layout,
// the widths and the extra packet fields (seq/len/op/arg/ctrl_only) are this
// design's own choice, sized for a TCP reassembler and a key-value store.
package switchnic_pkg;

  localparam int FLOW_W  = 32;  // flow ID (e.g. a pre-hashed 5-tuple)
  localparam int STATE_W = 32;  // one flow-state value
  localparam int SEQ_W   = 32;  // TCP sequence number
  localparam int LEN_W   = 16;  // payload length in bytes
  localparam int TS_W    = 32;  // timestamp, in clock cycles

  // Network function whose simple operation runs in the switch.
  typedef enum logic [1:0] {
    NF_REASSEMBLER = 2'd0,
    NF_KVSTORE     = 2'd1,
    NF_LOADBAL     = 2'd2,
    NF_FIREWALL    = 2'd3
  } nf_kind_e;

  // What a packet asks of the network function.
  typedef enum logic [1:0] {
    OP_DATA    = 2'd0,  // ordinary data packet (reassembler / LB / firewall)
    OP_READ    = 2'd1,  // key-value read
    OP_WRITE   = 2'd2,  // key-value write of arg
    OP_COMPLEX = 2'd3   // marked as needing the ARM cores (e.g. SYN, deep inspection)
  } nf_op_e;

  typedef struct packed {
    logic req;
    logic resp;
    logic wb;
    logic ack;
  } hdr_flags_t;

  // In-band communication header.
  typedef struct packed {
    hdr_flags_t          flags;
    logic [STATE_W-1:0]  state;
  } hdr_t;

  typedef struct packed {
    logic [FLOW_W-1:0]  flow_id;
    logic [SEQ_W-1:0]   seq;
    logic [LEN_W-1:0]   len;
    nf_op_e             op;
    logic [STATE_W-1:0] arg;        // KV write data in, read/lookup result out
    logic               ctrl_only;  // header-only message (standalone ACK / write-back)
    hdr_t               hdr;
  } pkt_t;

  // Where a pipeline slot came from.
  typedef enum logic [1:0] {
    SRC_NET   = 2'd0,  // first pass, from the network
    SRC_ARM   = 2'd1,  // second pass, back from the ARM cores
    SRC_SWEEP = 2'd2,  // table-maintenance slot, no packet
    SRC_NONE  = 2'd3
  } src_e;

  // Decision of stage 1 for this slot, acted on by the later stages.
  typedef enum logic [2:0] {
    ACT_NONE    = 3'd0,  // nothing to do in the table; forward as decided
    ACT_HIT     = 3'd1,  // entry active for this flow: fast path (or frozen)
    ACT_INSERT  = 3'd2,  // accepted state response: write both value copies
    ACT_DELETE  = 3'd3,  // accepted ACK: clear frozen/duplicate
    ACT_EXPIRE  = 3'd4   // TTL expiry of an idle active entry: freeze + write back
  } act_e;

  // One pipeline slot: a packet (or a maintenance slot) plus the decisions
  // the stages have taken so far. The table index travels beside it.
  typedef struct packed {
    logic               valid;
    src_e               src;
    pkt_t               pkt;
    logic               heavy;     // count-min estimate above threshold
    act_e               act;       // table action chosen by stage 1
    logic               to_arm;    // send to the ARM cores
    logic               drop;      // do not emit
    logic               req;       // set the state-request flag
    logic               wb;        // set the write-back flag and piggyback pb_state
    logic [STATE_W-1:0] pb_state;  // state to piggyback
  } slot_t;

  // Run-time configuration written by the control plane.
  typedef struct packed {
    logic [15:0]     hh_threshold;  // a flow is cached once its count-min estimate exceeds this
    logic [TS_W-1:0] ttl;           // idle time after which an active entry is evicted
    logic [TS_W-1:0] timeout;       // idle time after which an incomplete pull is dropped
    logic [TS_W-1:0] reset_delay;   // time an entry stays inactive before it is freed
  } cfg_t;

  // One-cycle event pulses, one bit per protocol mechanism.
  typedef struct packed {
    logic fast_hit;       // packet served entirely in the switch
    logic miss;           // forwarded to ARM, no table action
    logic collision;      // entry held by another flow
    logic cold;           // entry free but flow below heavy-hitter threshold
    logic state_req;      // initial -> incomplete, state requested
    logic cancel;         // incomplete -> inactive on a concurrent packet
    logic resp_accept;    // incomplete -> active
    logic resp_discard;   // response dropped (cancelled / timed out)
    logic timeout;        // incomplete -> inactive on timeout
    logic freeze;         // active -> frozen
    logic wb_repeat;      // frozen state piggybacked again
    logic ack_delete;     // frozen -> inactive on ACK
    logic reset;          // inactive -> initial
    logic ttl_expire;     // idle active entry written back by TTL
  } event_t;

endpackage
