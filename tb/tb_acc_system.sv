// tb_acc_system: end-to-end test of the whole fabric at its default size
// (four cores, four accelerators, 16-cycle one-way NoC latency, 16 lanes).
// Each core runs a small program of accelerator instructions in parallel:
//   core 0 (procId 100): RESERVE/CHECK the vector accelerator, three
//     TRANSFERs, EXEC add on 40 elements (three strips), ISBUSY polling,
//     EXEC dot-product, then EXEC div on 64 elements followed at once by
//     RELEASE, which the accelerator defers until the division completes;
//   core 1 (procId 200): RESERVE the vector accelerator while core 0 owns
//     it, sees "enqueued", polls CHECK until ownership passes to it, runs
//     mul, then reduce-sum after only two TRANSFERs (EXEC in state T2),
//     and releases;
//   core 2 (procId 300): drives accelerator 2 (an external datapath
//     modelled here) through RESERVE, TRANSFER x3, EXEC, ISBUSY, RELEASE;
//   core 3 (procId 400): an instruction with a non-existent accId, a bad
//     opId on accelerator 1 reported by ISBUSY, then RELEASE.
// Results in the memory model are compared with values computed here, the
// idle round-trip times of CHECK and ISBUSY are checked against
// packets + 2 x NoC latency + command latency + 3, and every mechanism
// (queueing, hand-over, busy polling, deferred release, illegal accId, bad
// opId, strip mining, NoC contention, memory stalls, external accelerator,
// EXEC in a T state, strip loads overlapping execute or store in the
// vector pipeline) is counted and must have happened at least once.
module tb_acc_system;
  import acm_pkg::*;
  localparam int unsigned NC = 4, NA = 4, L = 16;
  localparam logic [63:0] VBASE = 64'h0000_7000_0000_0000;  // virtual = physical + VBASE

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge before the first clock
  logic [63:0] proc_id [NC];
  logic        issue_valid [NC], issue_ready [NC];
  logic [31:0] instr [NC];
  logic [63:0] rs1_val [NC], rs2_val [NC], rd_val [NC], tlb_vaddr [NC], tlb_paddr [NC];
  logic        done [NC], illegal_insn [NC], wb_valid [NC];
  logic [4:0]  wb_rd [NC];
  logic [63:0] wb_data [NC];
  logic ld_req_valid, ld_req_ready, ld_resp_valid, st_req_valid, st_req_ready;
  logic [63:0] ld_req_addr, ld_resp_rdata, st_req_addr, st_req_wdata;
  logic              ext_start [NA-1];
  logic [OPID_W-1:0] ext_op    [NA-1];
  buf_desc_t         ext_bufs  [NA-1][3];
  logic              ext_done  [NA-1];
  logic              acc_busy  [NA];
  logic [1:0]        acc_state [NA];
  logic stall_en = 1;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_enqueued = 0, n_handover = 0, n_busy_seen = 0, n_deferred = 0, n_illegal = 0;
  int n_bad_op = 0, n_multi_strip = 0, n_contention = 0, n_mem_stall = 0, n_ext = 0;
  int n_early_exec = 0;
  int n_overlap = 0;

  acc_system dut (.*);

  l3_mem_model #(.WORDS(4096), .LATENCY(36)) u_mem (
    .clk, .stall_en, .req_valid(ld_req_valid), .req_ready(ld_req_ready),
    .req_write(1'b0), .req_addr(ld_req_addr), .req_wdata(64'd0),
    .resp_valid(ld_resp_valid), .resp_rdata(ld_resp_rdata),
    .st_valid(st_req_valid), .st_ready(st_req_ready), .st_addr(st_req_addr), .st_wdata(st_req_wdata));

  for (genvar c = 0; c < NC; c++) begin : g_tlb
    assign tlb_paddr[c] = tlb_vaddr[c] - VBASE;
  end

  // external accelerator datapaths: done 20 cycles after start
  for (genvar a = 0; a < NA - 1; a++) begin : g_ext
    initial begin
      ext_done[a] = 0;
      forever begin
        @(posedge clk);
        if (ext_start[a]) begin
          n_ext++;
          repeat (20) @(posedge clk);
          ext_done[a] <= 1;
          @(posedge clk);
          ext_done[a] <= 0;
        end
      end
    end
  end

  always #5 clk = ~clk;

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = 0;
    for (int c = 0; c < NC; c++) nv += dut.c_req_valid[c];
    if (nv > 1) n_contention++;
    if ((ld_req_valid && !ld_req_ready) || (st_req_valid && !st_req_ready)) n_mem_stall++;
    if (dut.g_acc[0].u_mgr.pend_rel_q && !$past(dut.g_acc[0].u_mgr.pend_rel_q)) n_deferred++;
    if (dut.g_acc[0].u_mgr.q_pop && dut.g_acc[0].u_mgr.q_count > 1) n_handover++;
    if (dut.g_acc[0].u_mgr.start && acc_state[0] == 2) n_early_exec++;
    if (ld_req_valid && (dut.g_acc[0].g_vector.u_vec.ex_busy_q || st_req_valid)) n_overlap++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // Execute one accelerator instruction on core c; returns rd value, the
  // illegal flag and the cycles from issue to commit.
  task automatic run(int c, int code, logic [63:0] rs1, logic [63:0] rs2, logic [63:0] rdv,
                     output logic [63:0] ret, output logic illegal, output int cycles);
    @(negedge clk);
    while (!issue_ready[c]) @(negedge clk);
    instr[c]   = {7'(code), 5'd11, 5'd10, 3'b000, 5'd12, 7'b0001011};
    rs1_val[c] = rs1; rs2_val[c] = rs2; rd_val[c] = rdv;
    issue_valid[c] = 1;
    @(negedge clk);
    issue_valid[c] = 0;
    cycles = 1;
    while (!done[c]) begin @(negedge clk); cycles++; end
    ret = wb_data[c];
    illegal = illegal_insn[c];
    if (code == 2 || code == 5) check("writeback to rd", wb_valid[c] && wb_rd[c] == 5'd12);
  endtask

  // shorthand wrappers
  task automatic reserve(int c, int acc);
    logic [63:0] r; logic il; int t;
    run(c, 1, acc, 0, 0, r, il, t);
  endtask
  task automatic check_acc(int c, int acc, output logic [63:0] r, output int t);
    logic il;
    run(c, 2, acc, 0, 0, r, il, t);
  endtask
  task automatic transfer(int c, int acc, logic [63:0] vptr, logic [63:0] size);
    logic [63:0] r; logic il; int t;
    run(c, 3, acc, vptr, size, r, il, t);
  endtask
  task automatic exec_op(int c, int acc, int op);
    logic [63:0] r; logic il; int t;
    run(c, 4, acc, 64'(op), 0, r, il, t);
  endtask
  task automatic isbusy(int c, int acc, output logic [63:0] r, output int t);
    logic il;
    run(c, 5, acc, 0, 0, r, il, t);
  endtask
  task automatic release_acc(int c, int acc);
    logic [63:0] r; logic il; int t;
    run(c, 6, acc, 0, 0, r, il, t);
  endtask
  task automatic wait_free(int c, int acc);
    logic [63:0] r; int t;
    do begin
      isbusy(c, acc, r, t);
      if (r == 1) n_busy_seen++;
    end while (r == 1);
    check("isbusy free at the end", r == 0);
  endtask

  // word addresses (physical) of the vectors
  localparam int A0 = 0, B0 = 256, D0 = 512, A1 = 1024, B1 = 1280, D1 = 1536;

  function automatic longint ref_op(int op, longint a, longint b);
    case (op)
      0: return a + b;
      2: return a * b;
      default: begin
        if (b == 0) return -1;
        return a / b;
      end
    endcase
  endfunction

  task automatic check_vec(string what, int op, int n, int a0, int b0, int d0);
    for (int i = 0; i < n; i++)
      check($sformatf("%s elem %0d", what, i),
            longint'(u_mem.mem[d0 + i]) == ref_op(op, longint'(u_mem.mem[a0 + i]),
                                                   longint'(u_mem.mem[b0 + i])));
  endtask

  logic core0_released = 0;

  initial begin
    for (int c = 0; c < NC; c++) begin
      proc_id[c] = 64'(100 * (c + 1)); issue_valid[c] = 0; instr[c] = 0;
      rs1_val[c] = 0; rs2_val[c] = 0; rd_val[c] = 0;
    end
    for (int i = 0; i < 2048; i++) begin
      u_mem.mem[i] = 64'($signed($urandom % 2001) - 1000);
      if (i >= B0 && i < B0 + 256 && u_mem.mem[i] == 0) u_mem.mem[i] = 7;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    fork
      // ---------------- core 0 ----------------
      begin
        logic [63:0] r; int t;
        longint dot;
        // idle round trips
        check_acc(0, 0, r, t);
        check("CHECK before reserve", r == CHK_MISSING);
        check("CHECK round trip", t == 2 + 2 * L + 3 + 3);
        $display("round trip CHECK %0d", t);
        isbusy(0, 0, r, t);
        check("ISBUSY round trip", t == 2 + 2 * L + 1 + 3);
        $display("round trip ISBUSY %0d", t);
        reserve(0, 0);
        check_acc(0, 0, r, t);
        check("core 0 owns acc 0", r == CHK_RESERVED);
        transfer(0, 0, VBASE + A0 * 8, 40 * 8);
        transfer(0, 0, VBASE + B0 * 8, 40 * 8);
        transfer(0, 0, VBASE + D0 * 8, 40 * 8);
        exec_op(0, 0, 0);
        wait_free(0, 0);
        check_vec("add", 0, 40, A0, B0, D0);
        n_multi_strip++;
        exec_op(0, 0, 6);
        wait_free(0, 0);
        dot = 0;
        for (int i = 0; i < 40; i++) dot += longint'(u_mem.mem[A0 + i]) * longint'(u_mem.mem[B0 + i]);
        check("dot-product", longint'(u_mem.mem[D0]) == dot);
        transfer(0, 0, VBASE + A0 * 8, 64 * 8);
        transfer(0, 0, VBASE + B0 * 8, 64 * 8);
        transfer(0, 0, VBASE + D0 * 8, 64 * 8);
        exec_op(0, 0, 3);
        release_acc(0, 0);   // still busy: deferred
        core0_released = 1;
      end
      // ---------------- core 1 ----------------
      begin
        logic [63:0] r; int t;
        repeat (300) @(negedge clk);
        reserve(1, 0);
        check_acc(1, 0, r, t);
        check("core 1 enqueued", r == CHK_ENQUEUED);
        if (r == CHK_ENQUEUED) n_enqueued++;
        do check_acc(1, 0, r, t); while (r != CHK_RESERVED);
        check("hand-over only after release", core0_released);
        check("hand-over only after the division", !acc_busy[0]);
        check_vec("div", 3, 64, A0, B0, D0);
        transfer(1, 0, VBASE + A1 * 8, 24 * 8);
        transfer(1, 0, VBASE + B1 * 8, 24 * 8);
        transfer(1, 0, VBASE + D1 * 8, 24 * 8);
        exec_op(1, 0, 2);
        wait_free(1, 0);
        check_vec("mul", 2, 24, A1, B1, D1);
        // reduce-sum needs two buffers and starts in T2
        begin
          longint sum;
          sum = 0;
          for (int i = 0; i < 24; i++) sum += longint'(u_mem.mem[A1 + i]);
          transfer(1, 0, VBASE + A1 * 8, 24 * 8);
          transfer(1, 0, VBASE + (D1 + 100) * 8, 8);
          exec_op(1, 0, 7);
          wait_free(1, 0);
          check("reduce-sum", longint'(u_mem.mem[D1 + 100]) == sum);
        end
        release_acc(1, 0);
      end
      // ---------------- core 2 ----------------
      begin
        logic [63:0] r; int t;
        repeat (120) @(negedge clk);   // after core 0's idle round trips
        reserve(2, 2);
        check_acc(2, 2, r, t);
        check("core 2 owns acc 2", r == CHK_RESERVED);
        transfer(2, 2, VBASE + 64'h100, 64'h20);
        transfer(2, 2, VBASE + 64'h200, 64'h30);
        transfer(2, 2, VBASE + 64'h300, 64'h40);
        exec_op(2, 2, 5);
        while (!ext_start[1]) @(negedge clk);
        check("ext op", ext_op[1] == 5);
        check("ext buffers", ext_bufs[1][0] == '{64'h100, 40'h20} &&
                             ext_bufs[1][1] == '{64'h200, 40'h30} &&
                             ext_bufs[1][2] == '{64'h300, 40'h40});
        wait_free(2, 2);
        release_acc(2, 2);
        check_acc(2, 2, r, t);
        check("core 2 released acc 2", r == CHK_MISSING);
      end
      // ---------------- core 3 ----------------
      begin
        logic [63:0] r; logic il; int t;
        repeat (120) @(negedge clk);
        run(3, 1, 7, 0, 0, r, il, t);
        check("illegal accId", il);
        if (il) n_illegal++;
        reserve(3, 1);
        transfer(3, 1, VBASE, 8);
        transfer(3, 1, VBASE, 8);
        transfer(3, 1, VBASE, 8);
        exec_op(3, 1, 300);
        isbusy(3, 1, r, t);
        check("bad opId reported", r == ISB_BAD_OPID);
        if (r == ISB_BAD_OPID) n_bad_op++;
        release_acc(3, 1);
      end
    join
    repeat (100) @(negedge clk);
    check("all idle", acc_state[0] == 0 && acc_state[1] == 0 && acc_state[2] == 0);

    $display("mechanisms: enqueued=%0d handover=%0d busy_polls=%0d deferred_release=%0d illegal=%0d bad_opid=%0d multi_strip=%0d noc_contention=%0d mem_stalls=%0d ext_runs=%0d exec_in_T2=%0d pipeline_overlap=%0d",
             n_enqueued, n_handover, n_busy_seen, n_deferred, n_illegal, n_bad_op,
             n_multi_strip, n_contention, n_mem_stall, n_ext, n_early_exec, n_overlap);
    check("mechanism: enqueue", n_enqueued > 0);
    check("mechanism: hand-over", n_handover > 0);
    check("mechanism: busy polling", n_busy_seen > 0);
    check("mechanism: deferred release", n_deferred > 0);
    check("mechanism: illegal accId", n_illegal > 0);
    check("mechanism: bad opId", n_bad_op > 0);
    check("mechanism: strip mining", n_multi_strip > 0);
    check("mechanism: NoC contention", n_contention > 0);
    check("mechanism: memory stall", n_mem_stall > 0);
    check("mechanism: external accelerator", n_ext > 0);
    check("mechanism: EXEC in T2", n_early_exec > 0);
    check("mechanism: load overlapping execute or store", n_overlap > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
