// acc_manager: the thin management layer placed in front of an accelerator.
// It executes the six request ACMs (RESERVE, CHECK, TRANSFER, EXEC, ISBUSY,
// RELEASE) and holds the reservation state, so that processes can share the
// accelerator without operating-system help.
//
// Parts: acm_rx (accId comparator and message buffer), a reservation_queue
// of procIds whose head is the owner, the control unit below with its state
// register, the busy flip-flop, the K buffer-descriptor registers written by
// TRANSFER, and a one-packet response register for CHECK and ISBUSY.
//
// Accelerator state (held in state_q plus xfer_q):
//   IDLE -RESERVE-> RESERVED -TRANSFER-> T1 ... T(K-1) -TRANSFER-> READY
//   READY -EXEC-> READY (starts the operation, sets busy)
//   T(h) -EXEC-> T(h) for an operation that needs only h buffers
//   READY -TRANSFER-> T1 (a new buffer set begins; the received buffer is
//   the first one), any non-idle state -RELEASE-> RESERVED for the next
//   waiting process, or IDLE when nobody waits.
// Only the owner (the head of the queue) may TRANSFER, EXEC, ISBUSY and
// RELEASE; other requests of these kinds are ignored (ISBUSY answers
// ISB_NOT_OWNER). A RELEASE while busy is remembered and carried out when
// the operation completes. EXEC with opId >= NUM_OPS does not start and sets
// an error that ISBUSY reports until an operation starts or a release.
// EXEC is accepted in READY, and in T(h) when the operation needs at most h
// buffers: the manager shows the opId on op_query and the datapath answers
// combinationally on op_bufs. This follows the framework's note that any
// T(h) may act as the ready state of h-ary operations; a datapath whose
// operations all take K buffers ties op_bufs to K.
//
// Timing: a command is applied LAT_x cycles after the clock edge at which its
// message is taken from acm_rx (the command-interpretation latencies of the
// framework: 3 cycles for RESERVE, CHECK and RELEASE, 1 for TRANSFER, EXEC
// and ISBUSY); the response packet is offered on the following cycle. One
// command is processed at a time. Accelerator side: start pulses for one
// cycle with start_op; bufs holds the descriptors and may change during an
// operation (transfer/compute overlap), so the datapath copies them at
// start; done is a one-cycle pulse from the datapath.
// procIds are compared and queued on their PROCID_W low bits. The state
// encoding, error codes and the READY -TRANSFER-> T1 reading are this
// design's choices.
module acc_manager
  import acm_pkg::*;
#(
  parameter logic [ACCID_W-1:0] ACC_ID       = '0,
  parameter int unsigned        K            = 3,
  parameter int unsigned        QUEUE_DEPTH  = 4,
  parameter int unsigned        PROCID_W     = 32,
  parameter int unsigned        NUM_OPS      = 8,
  parameter int unsigned        LAT_RESERVE  = 3,
  parameter int unsigned        LAT_CHECK    = 3,
  parameter int unsigned        LAT_TRANSFER = 1,
  parameter int unsigned        LAT_EXEC     = 1,
  parameter int unsigned        LAT_ISBUSY   = 1,
  parameter int unsigned        LAT_RELEASE  = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // request ACMs (NoC broadcast)
  input  logic                req_valid,
  output logic                req_ready,
  input  acm_flit_t           req_flit,
  // response ACMs
  output logic                resp_valid,
  input  logic                resp_ready,
  output acm_flit_t           resp_flit,
  // accelerator datapath
  output logic                start,
  output logic [OPID_W-1:0]   start_op,
  output buf_desc_t           bufs [K],
  input  logic                done,
  // buffers the operation op_query needs (answered by the datapath)
  output logic [OPID_W-1:0]   op_query,
  input  logic [$clog2(K+1)-1:0] op_bufs,
  // status
  output logic                busy,
  output logic [1:0]          state,
  output logic [$clog2(K+1)-1:0] xfer_count,
  output logic [PROCID_W-1:0] owner
);

  typedef enum logic [1:0] {ST_IDLE, ST_RESERVED, ST_TRANSFER, ST_READY} acc_state_e;
  typedef enum logic [1:0] {C_WAIT, C_APPLY, C_RESP} cmd_state_e;
  localparam int unsigned XW = $clog2(K + 1);

  // ---------------- receiver ----------------
  logic     msg_valid, msg_ready;
  acm_msg_t msg;

  acm_rx #(.ACC_ID(ACC_ID)) u_rx (
    .clk, .rst_n,
    .in_valid(req_valid), .in_ready(req_ready), .in_flit(req_flit),
    .msg_valid, .msg_ready, .msg
  );

  // ---------------- reservation queue ----------------
  logic                  q_push, q_pop, q_found, q_found_head, q_empty, q_full;
  logic [PROCID_W-1:0]   q_head, pid;
  logic [$clog2(QUEUE_DEPTH+1)-1:0] q_count;

  reservation_queue #(.DEPTH(QUEUE_DEPTH), .W(PROCID_W)) u_queue (
    .clk, .rst_n,
    .push(q_push), .push_id(pid), .pop(q_pop), .search_id(pid),
    .found(q_found), .found_head(q_found_head), .head(q_head),
    .count(q_count), .empty(q_empty), .full(q_full)
  );

  // ---------------- control unit ----------------
  acc_state_e       state_q;
  logic [XW-1:0]    xfer_q;
  cmd_state_e       cmd_q;
  acm_msg_t         cur_q;
  logic [2:0]       lat_q;
  logic             busy_q, err_q, pend_rel_q;
  logic [ACM_W-1:0] resp_q;

  assign pid       = cur_q.proc_id[PROCID_W-1:0];
  assign op_query  = cur_q.op_id;
  assign msg_ready = (cmd_q == C_WAIT);
  assign busy      = busy_q;
  assign state     = state_q;
  assign xfer_count = xfer_q;
  assign owner     = q_head;
  assign resp_valid = (cmd_q == C_RESP);
  assign resp_flit  = '{data: resp_q, last: 1'b1};

  function automatic logic [2:0] lat_of(acm_inst_e inst);
    unique case (inst)
      INST_RESERVE:  return 3'(LAT_RESERVE - 1);
      INST_CHECK:    return 3'(LAT_CHECK - 1);
      INST_TRANSFER: return 3'(LAT_TRANSFER - 1);
      INST_EXEC:     return 3'(LAT_EXEC - 1);
      INST_ISBUSY:   return 3'(LAT_ISBUSY - 1);
      default:       return 3'(LAT_RELEASE - 1);
    endcase
  endfunction

  logic apply, is_owner, rel_now, rel_cmd;
  assign apply    = (cmd_q == C_APPLY) && (lat_q == '0);
  assign is_owner = (state_q != ST_IDLE) && q_found_head;
  // RELEASE by the owner, immediate when not busy
  assign rel_cmd  = apply && (cur_q.inst == INST_RELEASE) && is_owner && !busy_q;
  // deferred RELEASE once the operation has completed
  assign rel_now  = rel_cmd || (pend_rel_q && !busy_q && !apply);

  always_comb begin
    q_push = 1'b0;
    if (apply && cur_q.inst == INST_RESERVE && !q_found) q_push = 1'b1;
    q_pop = rel_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      xfer_q     <= '0;
      cmd_q      <= C_WAIT;
      cur_q      <= '0;
      lat_q      <= '0;
      busy_q     <= 1'b0;
      err_q      <= 1'b0;
      pend_rel_q <= 1'b0;
      resp_q     <= '0;
      start      <= 1'b0;
      start_op   <= '0;
      for (int unsigned i = 0; i < K; i++) bufs[i] <= '0;
    end else begin
      start <= 1'b0;
      if (done) busy_q <= 1'b0;

      unique case (cmd_q)
        C_WAIT: if (msg_valid) begin
          cur_q <= msg;
          lat_q <= lat_of(msg.inst);
          cmd_q <= C_APPLY;
        end
        C_APPLY: if (lat_q != '0) begin
          lat_q <= lat_q - 3'd1;
        end else begin
          cmd_q <= C_WAIT;
          unique case (cur_q.inst)
            INST_RESERVE: if (state_q == ST_IDLE) state_q <= ST_RESERVED;
            INST_CHECK: begin
              resp_q <= resp_pack(INST_CHECK,
                                  (is_owner ? CHK_RESERVED : (q_found ? CHK_ENQUEUED : CHK_MISSING)),
                                  cur_q.core_id, ACC_ID);
              cmd_q  <= C_RESP;
            end
            INST_TRANSFER: if (is_owner) begin
              logic [XW-1:0] slot;
              slot = (state_q == ST_TRANSFER) ? xfer_q : '0;
              bufs[slot] <= '{pptr: cur_q.pptr, size: cur_q.size};
              if (slot + XW'(1) == XW'(K)) begin
                state_q <= ST_READY;
                xfer_q  <= XW'(K);
              end else begin
                state_q <= ST_TRANSFER;
                xfer_q  <= slot + XW'(1);
              end
            end
            INST_EXEC: if (is_owner && state_q inside {ST_TRANSFER, ST_READY} && !busy_q) begin
              if (cur_q.op_id >= OPID_W'(NUM_OPS)) begin
                err_q <= 1'b1;
              end else if (xfer_q >= op_bufs) begin   // T_h is ready for h-buffer ops
                busy_q   <= 1'b1;
                start    <= 1'b1;
                start_op <= cur_q.op_id;
                err_q    <= 1'b0;
              end
            end
            INST_ISBUSY: begin
              resp_q <= resp_pack(INST_ISBUSY,
                                  (!is_owner ? ISB_NOT_OWNER :
                                   err_q     ? ISB_BAD_OPID  :
                                   busy_q    ? ISB_BUSY      : ISB_FREE),
                                  cur_q.core_id, ACC_ID);
              cmd_q  <= C_RESP;
            end
            INST_RELEASE: if (is_owner && busy_q) pend_rel_q <= 1'b1;
            default: ;
          endcase
        end
        C_RESP: if (resp_ready) cmd_q <= C_WAIT;
        default: cmd_q <= C_WAIT;
      endcase

      if (rel_now) begin
        pend_rel_q <= 1'b0;
        err_q      <= 1'b0;
        xfer_q     <= '0;
        state_q    <= (q_count > 1) ? ST_RESERVED : ST_IDLE;
      end
    end
  end

  // The busy flip-flop only rises on a start.
  a_busy_start: assert property (@(posedge clk) disable iff (!rst_n)
                                 $rose(busy_q) |-> $past(start) || start);
  // The owner of a non-idle accelerator is always at the head of the queue.
  a_idle_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state_q == ST_IDLE) == q_empty);

endmodule
