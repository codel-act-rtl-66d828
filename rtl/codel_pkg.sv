// codel_pkg: types and constants shared by the CoDel-ACT egress pipeline.
//
// Time is counted in nanoseconds on a 48-bit egress timestamp. The two CoDel
// parameters take the values recommended for the Internet: INTERVAL = 100 ms
// and TARGET = 5 ms. Drop counts are kept doubled (2*count): a drop adds two,
// and the math unit is fed the doubled value, which is the design's way of
// getting a more accurate INTERVAL/sqrt(count).
//
// Every packet in the pipeline is a pipe_t. It is either a data packet (with
// its egress timestamp and queue delay) or a synchronisation packet, the
// recirculated mirror copy that carries register values from codel_init to
// codel_update or back. The widths and the packet layout are this design's
// own choices.
package codel_pkg;

  localparam int TS_W  = 48;  // timestamp and dropNext width, ns
  localparam int CNT_W = 32;  // doubled drop count width
  localparam int ID_W  = 16;  // packet tag width, carried through unchanged

  localparam longint unsigned INTERVAL_NS = 64'd100_000_000;
  localparam longint unsigned TARGET_NS   = 64'd5_000_000;

  typedef logic [TS_W-1:0]  ts_t;
  typedef logic [CNT_W-1:0] cnt_t;

  // Kind of a packet travelling through the egress pipeline.
  typedef enum logic [1:0] {
    PKT_DATA      = 2'd0,  // ordinary traffic
    PKT_SYNC_INIT = 2'd1,  // mirror made by codel_init, consumed by codel_update (and lastCount)
    PKT_SYNC_UPD  = 2'd2   // mirror made at cycle end, consumed by codel_init
  } pkt_kind_e;

  // Metadata of a data packet as the egress parser hands it over.
  typedef struct packed {
    logic [ID_W-1:0] id;      // tag, e.g. a sequence number
    ts_t             now;     // egress timestamp
    ts_t             qdelay;  // sojourn time in the queue
  } data_meta_t;

  // Register values carried by a mirror (synchronisation) packet.
  typedef struct packed {
    cnt_t count;       // doubled count
    ts_t  drop_next;   // dropNext
    cnt_t last_count;  // doubled lastCount (only used by PKT_SYNC_INIT)
  } sync_payload_t;

  // Mirror packet as queued for recirculation.
  typedef struct packed {
    pkt_kind_e     kind;
    sync_payload_t pay;
  } mirror_t;

  // One pipeline slot.
  typedef struct packed {
    logic          valid;
    pkt_kind_e     kind;
    data_meta_t    meta;        // data packets
    sync_payload_t pay;         // sync packets, and the payload of a mirror to be made
    logic          violation;   // queue delay >= TARGET
    logic          first_viol;  // first violation of a congestion cycle
    logic          cycle_end;   // first non-violating packet after a cycle
    logic          drop;        // mark_to_drop
    logic          mirror;      // emit a mirror packet of kind mirror_kind with pay
    pkt_kind_e     mirror_kind;
  } pipe_t;

  // Register contents of the CoDel-ACT program, as the control plane would
  // read them back.
  typedef struct packed {
    logic dropping;
    logic prev_dropping;
    cnt_t count_i;         // countI
    cnt_t count_i_sh;      // countI' (shadow)
    ts_t  drop_next_i;     // dropNextI
    ts_t  drop_next_i_sh;  // dropNextI' (shadow)
    cnt_t last_count;      // lastCount
    cnt_t count_u;         // countU
    ts_t  drop_next_u;     // dropNextU
  } codel_regs_t;

  // Signed distance a - b of two wrapping timestamps (valid while the true
  // distance is below 2^(TS_W-1) ns, about 1.6 days).
  function automatic logic signed [TS_W-1:0] ts_diff(input ts_t a, input ts_t b);
    return signed'(ts_t'(a - b));
  endfunction

  localparam pipe_t PIPE_IDLE = '{default: '0, kind: PKT_DATA, mirror_kind: PKT_DATA};

endpackage
