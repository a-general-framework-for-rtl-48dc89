// tb_acc_manager: drives request ACMs straight into one accelerator manager
// (accId 3, K = 3 buffers, four-entry queue) and walks through the whole
// reservation life cycle: CHECK before RESERVE, reservation by one process,
// queueing of three more, a dropped fifth request, duplicate RESERVE,
// commands from non-owners, three TRANSFERs to READY, EXEC of a
// two-buffer operation in T2, a bad opId, EXEC,
// ISBUSY while busy, RELEASE while busy (deferred until done), hand-over of
// ownership in queue order, READY -TRANSFER-> T1, messages for another
// accelerator, and the final return to IDLE. It also checks the command
// latencies: a CHECK response comes 2 cycles later than an ISBUSY response
// (3 against 1 cycle), and RESERVE/RELEASE take effect 3 cycles after the
// message is taken.
module tb_acc_manager;
  import acm_pkg::*;
  localparam int unsigned K = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic req_valid, req_ready, resp_valid, resp_ready, start, done, busy;
  acm_flit_t req_flit, resp_flit;
  logic [OPID_W-1:0] start_op, op_query;
  logic [1:0] op_bufs;
  buf_desc_t bufs [K];
  logic [1:0] state;
  logic [1:0] xfer_count;
  logic [31:0] owner;
  int checks = 0, failures = 0;
  int starts = 0;
  logic [RET_W-1:0] last_ret;
  int last_resp_cycles;

  acc_manager #(.ACC_ID(8'd3), .K(K), .QUEUE_DEPTH(4), .NUM_OPS(7)) dut (.*);

  localparam logic [1:0] ST_IDLE = 2'd0, ST_RESERVED = 2'd1, ST_TRANSFER = 2'd2, ST_READY = 2'd3;

  always #5 clk = ~clk;
  // datapath model: opId 5 needs two buffers, the others three
  assign op_bufs = (op_query == 5) ? 2'd2 : 2'd3;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic pkt(logic [63:0] d, logic last);
    req_valid = 1; req_flit = '{data: d, last: last};
    forever begin
      #1;
      if (req_ready) break;
      @(negedge clk);
    end
    @(negedge clk);
    req_valid = 0;
  endtask

  // Send one request ACM; for CHECK/ISBUSY wait for the response.
  task automatic send(acm_inst_e inst, int pid, logic [7:0] acc = 8'd3,
                      logic [63:0] arg = 0, logic [63:0] pptr = 0);
    @(negedge clk);
    pkt(req_head(inst, acc, 8'd1, SIZE_W'(arg), OPID_W'(arg)), 1'b0);
    pkt(64'(pid), inst != INST_TRANSFER);
    if (inst == INST_TRANSFER) pkt(pptr, 1'b1);
    if (inst_is_sync(inst) && acc == 8'd3) begin
      last_resp_cycles = 1;   // the last packet was taken one edge ago
      while (!resp_valid) begin @(negedge clk); last_resp_cycles++; end
      check("response core id", pkt_core_id(resp_flit.data) == 8'd1);
      last_ret = resp_ret(resp_flit.data);
      @(negedge clk);
    end
  endtask

  // wait until the manager is idle again
  task automatic settle();
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int t0;
    req_valid = 0; req_flit = '0; resp_ready = 1; done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    send(INST_CHECK, 10);
    check("check before reserve = missing", last_ret == CHK_MISSING);
    check("CHECK latency", last_resp_cycles == 1 + 3 + 1);
    send(INST_ISBUSY, 10);
    check("ISBUSY latency", last_resp_cycles == 1 + 1 + 1);
    check("isbusy by non-owner", last_ret == ISB_NOT_OWNER);

    // RESERVE: state changes 3 cycles after the manager takes the message
    @(negedge clk);
    pkt(req_head(INST_RESERVE, 8'd3, 8'd0, '0, '0), 1'b0);
    pkt(64'd10, 1'b1);
    t0 = 0;
    while (state == ST_IDLE && t0 < 20) begin @(negedge clk); t0++; end
    check("RESERVE latency", t0 == 1 + 3);
    check("reserved", state == ST_RESERVED && owner == 10);
    send(INST_CHECK, 10);
    check("check owner = reserved", last_ret == CHK_RESERVED);

    send(INST_RESERVE, 20);
    send(INST_RESERVE, 30);
    send(INST_RESERVE, 40);
    send(INST_RESERVE, 50);   // queue full: dropped
    send(INST_RESERVE, 20);   // already waiting: no effect
    settle();
    check("queue holds four", dut.u_queue.count == 4);
    send(INST_CHECK, 20);
    check("check waiting = enqueued", last_ret == CHK_ENQUEUED);
    send(INST_CHECK, 50);
    check("check dropped = missing", last_ret == CHK_MISSING);
    send(INST_RESERVE, 10);   // owner again: no effect
    settle();
    check("owner unchanged", owner == 10 && dut.u_queue.count == 4);

    // TRANSFERs
    send(INST_TRANSFER, 20, 8'd3, 64'h100, 64'hAAAA);   // not owner: ignored
    settle();
    check("non-owner transfer ignored", state == ST_RESERVED);
    send(INST_TRANSFER, 10, 8'd3, 64'h40, 64'h1000);
    settle();
    check("T1", state == ST_TRANSFER && xfer_count == 1);
    send(INST_TRANSFER, 10, 8'd3, 64'h48, 64'h2000);
    settle();
    check("T2", state == ST_TRANSFER && xfer_count == 2);
    send(INST_EXEC, 10, 8'd3, 64'd1);      // not ready yet
    settle();
    check("exec before ready ignored", starts == 0);
    send(INST_EXEC, 10, 8'd3, 64'd5);      // needs two buffers: T2 is its ready state
    settle();
    check("two-buffer op starts in T2", starts == 1 && start_op == 5 && busy && state == ST_TRANSFER);
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    settle();
    check("busy cleared", !busy);
    send(INST_TRANSFER, 10, 8'd3, 64'h50, 64'h3000);
    settle();
    check("READY", state == ST_READY);
    check("buffers", bufs[0] == '{64'h1000, 40'h40} && bufs[1] == '{64'h2000, 40'h48} &&
                     bufs[2] == '{64'h3000, 40'h50});

    // EXEC
    send(INST_EXEC, 20, 8'd3, 64'd1);      // not owner
    settle();
    check("non-owner exec ignored", starts == 1 && !busy);
    send(INST_EXEC, 10, 8'd3, 64'd9);      // bad opId
    settle();
    check("bad opid no start", starts == 1);
    send(INST_ISBUSY, 10);
    check("isbusy bad opid", last_ret == ISB_BAD_OPID);
    send(INST_EXEC, 10, 8'd3, 64'd2);
    settle();
    check("exec started", starts == 2 && start_op == 2 && busy);
    send(INST_ISBUSY, 10);
    check("isbusy busy", last_ret == ISB_BUSY);
    send(INST_ISBUSY, 20);
    check("isbusy other process", last_ret == ISB_NOT_OWNER);
    send(INST_EXEC, 10, 8'd3, 64'd3);      // busy: ignored
    settle();
    check("exec while busy ignored", starts == 2);

    // RELEASE while busy is deferred
    send(INST_RELEASE, 10);
    settle();
    check("release deferred", owner == 10 && state == ST_READY && busy);
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    settle();
    check("released after done", owner == 20 && state == ST_RESERVED && !busy);
    send(INST_CHECK, 10);
    check("old owner missing", last_ret == CHK_MISSING);
    send(INST_CHECK, 20);
    check("new owner reserved", last_ret == CHK_RESERVED);

    // READY -TRANSFER-> T1
    send(INST_TRANSFER, 20, 8'd3, 64'h8, 64'h10);
    send(INST_TRANSFER, 20, 8'd3, 64'h8, 64'h20);
    send(INST_TRANSFER, 20, 8'd3, 64'h8, 64'h30);
    settle();
    check("READY again", state == ST_READY);
    send(INST_TRANSFER, 20, 8'd3, 64'h18, 64'h40);
    settle();
    check("READY -> T1", state == ST_TRANSFER && xfer_count == 1 && bufs[0].pptr == 64'h40);
    send(INST_ISBUSY, 20);
    check("isbusy free", last_ret == ISB_FREE);

    // messages for another accelerator are not ours
    send(INST_RELEASE, 20, 8'd4);
    settle();
    check("other accId ignored", owner == 20);

    // hand-over in queue order, then idle; RELEASE takes 3 cycles
    send(INST_RELEASE, 30);   // waiting, not owner: ignored
    settle();
    check("non-owner release ignored", owner == 20);
    @(negedge clk);
    pkt(req_head(INST_RELEASE, 8'd3, 8'd0, '0, '0), 1'b0);
    pkt(64'd20, 1'b1);
    t0 = 0;
    while (owner == 20 && t0 < 20) begin @(negedge clk); t0++; end
    check("RELEASE latency", t0 == 1 + 3);
    check("owner 30", owner == 30 && state == ST_RESERVED && xfer_count == 0);
    send(INST_RELEASE, 30);
    settle();
    check("owner 40", owner == 40 && state == ST_RESERVED);
    send(INST_RELEASE, 40);
    settle();
    check("idle", state == ST_IDLE && dut.u_queue.count == 0);
    send(INST_CHECK, 40);
    check("after idle missing", last_ret == CHK_MISSING);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
